// accumulator: the processor's only data register.
//
// On the rising edge of clk: rst (active low) low clears it to zero;
// otherwise, with ldac high, it takes the ALU result alout. The decoder
// raises ldac in the ALU-operation and store-result phases of ADD, AND, XOR
// and LOAD; the ALU result is registered at the end of the ALU-operation
// phase, so the value that stays is the one taken at the end of the
// store-result phase (the load one cycle earlier writes the previous ALU
// result, which is the accumulator's own value). Follows the processor's
// description; the synchronous reset is this design's choice.
module accumulator (
  input  logic             clk,
  input  logic             rst,
  input  logic             ldac,
  input  risc8_pkg::word_t alout,
  output risc8_pkg::word_t acout
);

  always_ff @(posedge clk) begin
    if (!rst)      acout <= '0;
    else if (ldac) acout <= alout;
  end

endmodule
