// risc8_pkg: types and constants shared by the 8-bit accumulator processor.
//
// The processor has an 8-bit data word and a 5-bit address (32 memory
// locations). An instruction is one word: the upper three bits select the
// operation, the lower five bits hold a memory address. Every instruction
// takes eight clock cycles, the eight phases below; the first four fetch the
// instruction and the last four execute it. The opcode values and the phase
// names are those of the processor's instruction and control tables; the
// binary code of the phases is this design's choice (see clock_generator).
package risc8_pkg;

  localparam int unsigned DATA_W = 8;
  localparam int unsigned ADDR_W = 5;
  localparam int unsigned OP_W   = 3;
  localparam int unsigned DEPTH  = 1 << ADDR_W;

  typedef logic [DATA_W-1:0] word_t;
  typedef logic [ADDR_W-1:0] addr_t;

  typedef enum logic [OP_W-1:0] {
    OP_HLT = 3'b000,  // halt
    OP_SKZ = 3'b001,  // skip the next instruction if the accumulator is zero
    OP_ADD = 3'b010,  // acc <= acc + mem[addr]
    OP_AND = 3'b011,  // acc <= acc & mem[addr]
    OP_XOR = 3'b100,  // acc <= acc ^ mem[addr]
    OP_LDA = 3'b101,  // acc <= mem[addr]
    OP_STO = 3'b110,  // mem[addr] <= acc
    OP_JMP = 3'b111   // pc <= addr
  } opcode_e;

  // Phase index = {~fetch, ~clk2, ~clk1}.
  typedef enum logic [2:0] {
    PH_INST_ADDR  = 3'd0,  // address setup
    PH_INST_FETCH = 3'd1,  // instruction fetch
    PH_INST_LOAD  = 3'd2,  // instruction load
    PH_IDLE       = 3'd3,  // idle
    PH_OP_ADDR    = 3'd4,  // address setup (execute half)
    PH_OP_FETCH   = 3'd5,  // operand fetch
    PH_ALU_OP     = 3'd6,  // ALU operation
    PH_STORE      = 3'd7   // store result
  } phase_e;

  // Opcodes whose result goes through the ALU into the accumulator.
  function automatic logic is_alu_op(opcode_e op);
    return op inside {OP_ADD, OP_AND, OP_XOR, OP_LDA};
  endfunction

endpackage
