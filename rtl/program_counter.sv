// program_counter: 5-bit address of the next instruction.
//
// On the rising edge of clk: rst (active low) low clears it; ldpc high loads
// the instruction's address field adir (a JUMP); otherwise it counts up by
// one in the cycle where pclk rises. pclk plays the part of the counter's
// clock in the description, so one high run of pclk is one increment even
// when the decoder holds it high for two phases (SKIP). The edge is found by
// registering pclk. Load before increment follows the description; the
// single clock and the edge detection are this design's choice. The count
// wraps from 31 to 0.
module program_counter (
  input  logic             clk,
  input  logic             rst,
  input  risc8_pkg::addr_t adir,
  input  logic             ldpc,
  input  logic             pclk,
  output risc8_pkg::addr_t adpc
);

  logic pclk_q;

  always_ff @(posedge clk) begin
    if (!rst) begin
      adpc   <= '0;
      pclk_q <= 1'b0;
    end else begin
      pclk_q <= pclk;
      if (ldpc)                 adpc <= adir;
      else if (pclk && !pclk_q) adpc <= adpc + 1'b1;
    end
  end

endmodule
