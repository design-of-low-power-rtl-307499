// tb_io_buffer: checks the driver enable, not(mrd | fetch | clk2), and the
// resulting bus value for all control combinations.
module tb_io_buffer;
  import risc8_pkg::*;
  word_t alout, mem_rdat, mdat, exp_bus;
  logic mem_oe, mrd, fetch, clk2, drive;
  int checks = 0, failures = 0;

  io_buffer dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      {mrd, fetch, clk2} = 3'(i);
      mem_oe   = mrd;          // the memory drives exactly when it is read
      alout    = word_t'($urandom);
      mem_rdat = word_t'($urandom);
      #1;
      checks++;
      if (drive !== (!mrd && !fetch && !clk2)) begin failures++; $display("drive wrong for %b", {mrd, fetch, clk2}); end
      exp_bus = (!mrd && !fetch && !clk2) ? alout : (mrd ? mem_rdat : 8'h00);
      checks++;
      if (mdat !== exp_bus) begin failures++; $display("bus %h expected %h for %b", mdat, exp_bus, {mrd, fetch, clk2}); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
