// clock_generator: phase sequencer and reset synchroniser of the processor.
//
// A 3-bit phase counter, clocked on the rising edge of clk, steps each
// instruction through the eight phases of risc8_pkg::phase_e. Its inverted
// bits are brought out as clk1 (toggles every cycle), clk2 (every two cycles)
// and fetch (every four cycles; high for the fetch half of the instruction).
// fetch therefore changes together with the rising edge of clk2, as the
// processor's description of this block requires. These are level signals in
// the clk domain, not separate clocks: the rest of the processor samples
// them with clk. Deriving them as a divider chain follows the description;
// the single clock edge, the bit polarities and the binary code are this
// design's choice.
//
// Reset: rstreq (active high) is registered into rst (active low). While rst
// is low the counter is held at phase 0, so the first cycle after rst rises
// is the address-setup phase of the first instruction.
//
// Halt: when the decoder reports a HALT instruction (halt high) in the last
// phase, the counter stops there and halted rises; only rstreq restarts it.
// The halt input and halted output are additions of this design; the
// processor's description only lists HALT as an opcode.
module clock_generator (
  input  logic clk,
  input  logic rstreq,
  input  logic halt,
  output logic clk1,
  output logic clk2,
  output logic fetch,
  output logic rst,
  output logic halted
);
  import risc8_pkg::*;

  logic [2:0] phase;

  always_ff @(posedge clk) begin
    rst <= ~rstreq;
    if (rstreq || !rst) begin
      phase  <= 3'd0;
      halted <= 1'b0;
    end else if (halted) begin
      phase  <= phase;
    end else if (halt && phase == 3'(PH_STORE)) begin
      halted <= 1'b1;
    end else begin
      phase  <= phase + 3'd1;
    end
  end

  assign clk1  = ~phase[0];
  assign clk2  = ~phase[1];
  assign fetch = ~phase[2];

endmodule
