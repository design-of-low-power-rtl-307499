// tb_instruction_register: checks that a loaded word splits into opcode
// (bits 7:5) and address (bits 4:0), that the register holds without ldir,
// and that reset clears it.
module tb_instruction_register;
  import risc8_pkg::*;
  logic clk = 0, rst, ldir;
  word_t mdat, ref_w;
  opcode_e opcod;
  addr_t adir;
  int checks = 0, failures = 0;

  instruction_register dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 0; ldir = 1; mdat = 8'hFF;
    @(posedge clk); #1;
    checks++; if (opcod !== OP_HLT || adir !== 5'd0) begin failures++; $display("reset failed"); end
    ref_w = 0;
    for (int i = 0; i < 500; i++) begin
      rst  = ($urandom_range(0, 19) != 0);
      ldir = $urandom_range(0, 1);
      mdat = word_t'($urandom);
      @(posedge clk);
      if (!rst) ref_w = 0; else if (ldir) ref_w = mdat;
      #1;
      checks++;
      if (3'(opcod) !== ref_w[7:5] || adir !== ref_w[4:0]) begin
        failures++; $display("cycle %0d: op=%b ad=%h expected word %h", i, opcod, adir, ref_w);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
