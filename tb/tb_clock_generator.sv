// tb_clock_generator: checks the reset handshake, the eight-cycle phase
// sequence of clk1/clk2/fetch (fetch changes only when clk2 rises), and
// the stop on halt.
module tb_clock_generator;
  logic clk = 0, rstreq, halt, clk1, clk2, fetch, rst, halted;
  int checks = 0, failures = 0;
  int ph;

  clock_generator dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rstreq = 1; halt = 0;
    repeat (3) @(posedge clk); #1;
    checks++; if (rst !== 0 || halted !== 0) begin failures++; $display("rst not low during rstreq"); end
    rstreq = 0;
    @(posedge clk); #1;
    checks++; if (rst !== 1) begin failures++; $display("rst not released"); end
    // first cycle with rst high is phase 0: clk1=clk2=fetch=1
    for (int c = 0; c < 64; c++) begin
      logic [2:0] p;
      logic last_clk2, last_fetch;
      p = 3'(c);
      checks++;
      if ({~fetch, ~clk2, ~clk1} !== p) begin
        failures++; $display("cycle %0d: fetch/clk2/clk1 = %b%b%b, phase expected %0d", c, fetch, clk2, clk1, p);
      end
      last_clk2 = clk2; last_fetch = fetch;
      @(posedge clk); #1;
      if (fetch !== last_fetch) begin
        checks++;
        if (!(clk2 && !last_clk2)) begin failures++; $display("fetch changed without clk2 rising"); end
      end
    end
    // halt request in phase 3 is ignored, in phase 7 stops the sequence
    while ({~fetch, ~clk2, ~clk1} != 3'd3) @(posedge clk);
    #1; halt = 1; @(posedge clk); #1; halt = 0;
    checks++; if (halted) begin failures++; $display("halted outside phase 7"); end
    while ({~fetch, ~clk2, ~clk1} != 3'd7) begin @(posedge clk); #1; end
    halt = 1; @(posedge clk); #1; halt = 0;
    repeat (10) begin
      checks++;
      if (!halted || {~fetch, ~clk2, ~clk1} !== 3'd7) begin failures++; $display("not frozen after halt"); end
      @(posedge clk); #1;
    end
    rstreq = 1; @(posedge clk); #1;
    rstreq = 0; @(posedge clk); #1;
    checks++; if (halted || {~fetch, ~clk2, ~clk1} !== 3'd0 || !rst) begin failures++; $display("restart failed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
