// tb_memory: loads the memory through the external port while in reset,
// then checks reads, processor writes, that external writes are ignored
// while running, and that writes need mwr, against a shadow array.
module tb_memory;
  logic clk = 0, rst, ewr, mrd, mwr, rd_oe;
  logic [4:0] ead, mad;
  logic [7:0] edat, wdat, rdat;
  logic [7:0] shadow [32];
  int checks = 0, failures = 0;

  memory dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 0; mrd = 0; mwr = 0; mad = 0; wdat = 0;
    #1;
    for (int a = 0; a < 32; a++) begin
      ewr = 1; ead = 5'(a); edat = 8'(a * 7 + 3);
      shadow[a] = edat;
      @(posedge clk); #1;
    end
    ewr = 0;
    rst = 1;
    for (int a = 0; a < 32; a++) begin
      mad = 5'(a); mrd = 1; #1;
      checks++;
      if (rdat !== shadow[a] || !rd_oe) begin failures++; $display("read %0d: %h expected %h", a, rdat, shadow[a]); end
    end
    mrd = 0; #1;
    checks++; if (rd_oe) begin failures++; $display("rd_oe high without mrd"); end
    for (int i = 0; i < 600; i++) begin
      mad  = 5'($urandom);
      mwr  = 1'($urandom_range(0, 1));
      mrd  = !mwr;
      wdat = 8'($urandom);
      ewr  = 1'($urandom_range(0, 1));   // must be ignored while running
      ead  = 5'($urandom);
      edat = 8'($urandom);
      #1;
      if (mrd) begin
        checks++;
        if (rdat !== shadow[mad]) begin failures++; $display("read %0d: %h expected %h", mad, rdat, shadow[mad]); end
      end
      @(posedge clk);
      if (mwr) shadow[mad] = wdat;
      #1;
    end
    mwr = 0; ewr = 0;
    for (int a = 0; a < 32; a++) begin
      mad = 5'(a); mrd = 1; #1;
      checks++;
      if (rdat !== shadow[a]) begin failures++; $display("final %0d: %h expected %h", a, rdat, shadow[a]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
