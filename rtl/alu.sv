// alu: arithmetic and logic unit of the processor.
//
// Works on the accumulator (acout) and the data bus (mdat). ADD gives the
// 8-bit sum (the carry is dropped; there is no carry flag), AND and XOR the
// bitwise result, LOAD the bus value. HALT, SKIP, STORE and JUMP pass the
// accumulator, so that a STORE puts the accumulator on the bus through the
// IO buffer. The result is registered into alout on the rising edge of clk
// when the decoder's strobe aclk is high (one cycle, in the ALU-operation
// phase). The processor's description clocks the ALU on the falling edge
// with aclk as its clock; here aclk is an enable on the common clock edge.
//
// zr is high when the accumulator is zero. It is combinational, so the SKIP
// test sees the accumulator at the time SKIP executes; the description
// registers zr together with alout, which would test a stale value.
// rst (active low) clears alout.
module alu (
  input  logic               clk,
  input  logic               rst,
  input  logic               aclk,
  input  risc8_pkg::word_t   acout,
  input  risc8_pkg::word_t   mdat,
  input  risc8_pkg::opcode_e opcod,
  output risc8_pkg::word_t   alout,
  output logic               zr
);
  import risc8_pkg::*;

  word_t result;

  always_comb begin
    unique case (opcod)
      OP_ADD:  result = acout + mdat;
      OP_AND:  result = acout & mdat;
      OP_XOR:  result = acout ^ mdat;
      OP_LDA:  result = mdat;
      default: result = acout;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst)      alout <= '0;
    else if (aclk) alout <= result;
  end

  assign zr = (acout == '0);

endmodule
