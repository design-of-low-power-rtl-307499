// io_buffer: data-bus driver of the processor.
//
// The ALU result is put on the data bus when no one else may use it:
// en = mrd | fetch | clk2 and the buffer drives while en is low. With the
// clock generator's phase code that is the ALU-operation and store-result
// phases of instructions that do not read memory, which is where STORE
// writes the accumulator to memory. The rule for en follows the
// description. The description's bus is a tri-state net; here it is a
// multiplexer: mdat is alout when the buffer drives, the memory's read data
// when the memory drives (mem_oe), and zero when the bus would float.
// Combinational. An assertion checks that the two drivers never overlap.
module io_buffer (
  input  risc8_pkg::word_t alout,
  input  risc8_pkg::word_t mem_rdat,
  input  logic             mem_oe,
  input  logic             mrd,
  input  logic             fetch,
  input  logic             clk2,
  output risc8_pkg::word_t mdat,
  output logic             drive
);

  assign drive = ~(mrd | fetch | clk2);

  always_comb begin
    if (drive)       mdat = alout;
    else if (mem_oe) mdat = mem_rdat;
    else             mdat = '0;
  end

  always_comb begin
    assert (!(drive && mem_oe))
      else $error("io_buffer: buffer and memory drive the data bus together");
  end

endmodule
