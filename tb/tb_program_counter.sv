// tb_program_counter: checks reset, jump load, load priority over the
// increment, and that a pclk pulse held high for several cycles counts once.
module tb_program_counter;
  import risc8_pkg::*;
  logic clk = 0, rst, ldpc, pclk, prev_pclk;
  addr_t adir, adpc, exp_pc;
  int checks = 0, failures = 0;

  program_counter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 0; ldpc = 0; pclk = 0; adir = 0;
    @(posedge clk); #1;
    checks++; if (adpc !== 0) begin failures++; $display("reset failed"); end
    rst = 1; exp_pc = 0; prev_pclk = 0;
    // three separate pulses, one of them three cycles long
    pclk = 1; @(posedge clk); #1; pclk = 0; @(posedge clk); #1;
    pclk = 1; repeat (3) @(posedge clk); #1; pclk = 0; @(posedge clk); #1;
    checks++; if (adpc !== 5'd2) begin failures++; $display("pulse count: pc=%0d expected 2", adpc); end
    exp_pc = 2; prev_pclk = 0;
    for (int i = 0; i < 800; i++) begin
      ldpc = ($urandom_range(0, 7) == 0);
      pclk = 1'($urandom_range(0, 1));
      adir = addr_t'($urandom);
      @(posedge clk);
      if (ldpc) exp_pc = adir;
      else if (pclk && !prev_pclk) exp_pc = exp_pc + 1;
      prev_pclk = pclk;
      #1;
      checks++;
      if (adpc !== exp_pc) begin failures++; $display("cycle %0d: pc=%0d expected %0d", i, adpc, exp_pc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
