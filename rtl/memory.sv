// memory: 32 x 8-bit program and data store.
//
// While the processor is held in reset (rst low) the memory is loaded from
// outside: ewr high writes edat to location ead on the rising edge of clk.
// While running, mwr high writes the data-bus value wdat to location mad,
// and mrd high reads location mad onto rdat (combinational read) and raises
// rd_oe to say the memory drives the bus. The shared bidirectional data bus
// of the description is split here into wdat, rdat and rd_oe; io_buffer
// resolves the bus. The contents are not cleared by reset. The load, write
// and read rules follow the description; the read timing is this design's
// choice.
module memory #(
  parameter int unsigned DEPTH = 32,
  parameter int unsigned WIDTH = 8
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [$clog2(DEPTH)-1:0] ead,
  input  logic [WIDTH-1:0]         edat,
  input  logic                     ewr,
  input  logic [$clog2(DEPTH)-1:0] mad,
  input  logic                     mrd,
  input  logic                     mwr,
  input  logic [WIDTH-1:0]         wdat,
  output logic [WIDTH-1:0]         rdat,
  output logic                     rd_oe
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (!rst) begin
      if (ewr) mem[ead] <= edat;
    end else if (mwr) begin
      mem[mad] <= wdat;
    end
  end

  assign rd_oe = rst && !mwr && mrd;
  assign rdat  = rd_oe ? mem[mad] : '0;

endmodule
