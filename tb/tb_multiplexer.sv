// tb_multiplexer: exhaustively checks the address select.
module tb_multiplexer;
  import risc8_pkg::*;
  addr_t adir, adpc, admen;
  logic fetch;
  int checks = 0, failures = 0;

  multiplexer dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < 2; f++)
      for (int a = 0; a < 32; a++)
        for (int p = 0; p < 32; p++) begin
          fetch = 1'(f); adir = 5'(a); adpc = 5'(p);
          #1;
          checks++;
          if (admen !== (f ? 5'(p) : 5'(a))) begin
            failures++; $display("fetch=%0d ir=%0d pc=%0d -> %0d", f, a, p, admen);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
