// instruction_register: holds the instruction being executed.
//
// On the rising edge of clk, with rst (active low) high and ldir high, the
// word on the data bus is captured: bits 7:5 become the opcode, bits 4:0 the
// address field. rst low clears both fields. The decoder raises ldir during
// the instruction-load and idle phases, while memory presents the word at the
// program counter's address; loading twice stores the same word. Behaviour
// follows the processor's description; the synchronous reset is this
// design's choice.
module instruction_register (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  ldir,
  input  risc8_pkg::word_t      mdat,
  output risc8_pkg::opcode_e    opcod,
  output risc8_pkg::addr_t      adir
);
  import risc8_pkg::*;

  always_ff @(posedge clk) begin
    if (!rst) begin
      opcod <= OP_HLT;
      adir  <= '0;
    end else if (ldir) begin
      opcod <= opcode_e'(mdat[DATA_W-1 -: OP_W]);
      adir  <= mdat[ADDR_W-1:0];
    end
  end

endmodule
