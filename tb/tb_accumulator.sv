// tb_accumulator: checks reset, hold and load of the accumulator against a
// reference register kept in the testbench, over random stimulus.
module tb_accumulator;
  import risc8_pkg::*;
  logic clk = 0, rst, ldac;
  word_t alout, acout, ref_q;
  int checks = 0, failures = 0;

  accumulator dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 0; ldac = 1; alout = 8'h5A;
    @(posedge clk); #1;
    checks++; if (acout !== 8'h00) begin failures++; $display("reset failed: %h", acout); end
    ref_q = 0;
    for (int i = 0; i < 500; i++) begin
      rst   = ($urandom_range(0, 19) != 0);
      ldac  = $urandom_range(0, 1);
      alout = word_t'($urandom);
      @(posedge clk);
      if (!rst) ref_q = 0; else if (ldac) ref_q = alout;
      #1;
      checks++;
      if (acout !== ref_q) begin failures++; $display("cycle %0d: acout=%h expected %h", i, acout, ref_q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
