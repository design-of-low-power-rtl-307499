// decoder: control unit of the processor.
//
// Combinational. The phase of the instruction is read from the three phase
// signals of the clock generator, phase = {~fetch, ~clk2, ~clk1}, and the
// control outputs are set per phase and opcode exactly as the processor's
// control table lists them:
//
//   phase          pclk   ldac  ldpc  mwr  mrd  ldir
//   address setup   0      0     0    0    0    0
//   instr. fetch    0      0     0    0    1    0
//   instr. load     0      0     0    0    1    1
//   idle            0      0     0    0    1    1
//   address setup   1      0     0    0    0    0
//   operand fetch   mrd for ADD/AND/XOR/LOAD
//   ALU operation   pclk for SKIP with zr, ldac+mrd for ADD/AND/XOR/LOAD,
//                   ldpc for JUMP
//   store result    pclk+ldpc for JUMP, mwr for STORE, pclk for SKIP with
//                   zr, ldac+mrd for ADD/AND/XOR/LOAD
//
// pclk (the table's INC_PC) is read by the program counter as a clock: a
// high run counts once. aclk, the ALU strobe, is high in the ALU-operation
// phase for every opcode. halt is high in the four execute phases of a HALT
// instruction; the clock generator stops on it. aclk's phase is taken from
// the description; halt and the zr input for the SKIP condition are this
// design's reading. All outputs are low while rst (active low) is low.
module decoder (
  input  risc8_pkg::opcode_e opcode,
  input  logic               clk1,
  input  logic               clk2,
  input  logic               fetch,
  input  logic               rst,
  input  logic               zr,
  output logic               aclk,
  output logic               ldac,
  output logic               ldir,
  output logic               ldpc,
  output logic               mrd,
  output logic               mwr,
  output logic               pclk,
  output logic               halt
);
  import risc8_pkg::*;

  phase_e phase;
  logic   alu_op, skip;

  assign phase  = phase_e'({~fetch, ~clk2, ~clk1});
  assign alu_op = is_alu_op(opcode);
  assign skip   = (opcode == OP_SKZ) && zr;

  always_comb begin
    {aclk, ldac, ldir, ldpc, mrd, mwr, pclk, halt} = '0;
    if (rst) begin
      unique case (phase)
        PH_INST_ADDR:  ;
        PH_INST_FETCH: mrd = 1'b1;
        PH_INST_LOAD,
        PH_IDLE: begin
          mrd  = 1'b1;
          ldir = 1'b1;
        end
        PH_OP_ADDR:  pclk = 1'b1;
        PH_OP_FETCH: mrd  = alu_op;
        PH_ALU_OP: begin
          aclk = 1'b1;
          pclk = skip;
          ldac = alu_op;
          mrd  = alu_op;
          ldpc = (opcode == OP_JMP);
        end
        PH_STORE: begin
          pclk = skip || (opcode == OP_JMP);
          ldpc = (opcode == OP_JMP);
          mwr  = (opcode == OP_STO);
          ldac = alu_op;
          mrd  = alu_op;
        end
        default: ;
      endcase
      if (phase inside {PH_OP_ADDR, PH_OP_FETCH, PH_ALU_OP, PH_STORE})
        halt = (opcode == OP_HLT);
    end
  end

endmodule
