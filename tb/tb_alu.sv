// tb_alu: checks every opcode's result against arithmetic written out in
// the testbench, that the result is taken only on the aclk strobe, and the
// zero flag.
module tb_alu;
  import risc8_pkg::*;
  logic clk = 0, rst, aclk, zr;
  word_t acout, mdat, alout, exp_q;
  opcode_e opcod;
  int checks = 0, failures = 0;

  alu dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t model(logic [2:0] op, word_t a, word_t m);
    case (op)
      3'b010:  return word_t'((int'(a) + int'(m)) % 256);
      3'b011:  return a & m;
      3'b100:  return a ^ m;
      3'b101:  return m;
      default: return a;
    endcase
  endfunction

  initial begin
    rst = 0; aclk = 1; acout = 8'h12; mdat = 8'h34; opcod = OP_ADD;
    @(posedge clk); #1;
    checks++; if (alout !== 0) begin failures++; $display("reset failed"); end
    rst = 1; exp_q = 0;
    // fixed corner cases, then random
    for (int i = 0; i < 1200; i++) begin
      logic [2:0] op;
      op    = (i < 8) ? 3'(i) : 3'($urandom);
      opcod = opcode_e'(op);
      aclk  = (i < 8) ? 1'b1 : 1'($urandom_range(0, 1));
      acout = (i < 8) ? 8'hF0 : ((i % 13 == 0) ? 8'h00 : word_t'($urandom));
      mdat  = (i < 8) ? 8'h3C : word_t'($urandom);
      #1;
      checks++;
      if (zr !== (acout == 0)) begin failures++; $display("zr wrong for acc %h", acout); end
      @(posedge clk);
      if (aclk) exp_q = model(op, acout, mdat);
      #1;
      checks++;
      if (alout !== exp_q) begin
        failures++; $display("op %b a=%h m=%h aclk=%b: alout=%h expected %h", op, acout, mdat, aclk, alout, exp_q);
      end
    end
    // ADD with carry out wraps to 8 bits
    opcode_spot: begin
      opcod = OP_ADD; aclk = 1; acout = 8'hC8; mdat = 8'h64;
      @(posedge clk); #1;
      checks++; if (alout !== 8'h2C) begin failures++; $display("wrap add wrong: %h", alout); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
