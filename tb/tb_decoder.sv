// tb_decoder: checks every phase x opcode x zero-flag combination against
// the control table typed in here row by row.
module tb_decoder;
  import risc8_pkg::*;
  opcode_e opcode;
  logic clk1, clk2, fetch, rst, zr;
  logic aclk, ldac, ldir, ldpc, mrd, mwr, pclk, halt;
  int checks = 0, failures = 0;

  decoder dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected {pclk, ldac, ldpc, mwr, mrd, ldir}
  function automatic logic [5:0] table_row(int ph, int op, bit z);
    bit aluop = (op >= 2 && op <= 5);
    bit skz   = (op == 1) && z;
    case (ph)
      0: return 6'b000000;
      1: return 6'b000010;
      2: return 6'b000011;
      3: return 6'b000011;
      4: return 6'b100000;
      5: return aluop ? 6'b000010 : 6'b000000;
      6: if (skz) return 6'b100000;
         else if (aluop) return 6'b010010;
         else if (op == 7) return 6'b001000;
         else return 6'b000000;
      7: if (op == 7) return 6'b101000;
         else if (op == 6) return 6'b000100;
         else if (skz) return 6'b100000;
         else if (aluop) return 6'b010010;
         else return 6'b000000;
      default: return 6'b000000;
    endcase
  endfunction

  initial begin
    for (int r = 0; r < 2; r++)
      for (int ph = 0; ph < 8; ph++)
        for (int op = 0; op < 8; op++)
          for (int z = 0; z < 2; z++) begin
            logic [5:0] exp_v;
            rst = 1'(r); zr = 1'(z); opcode = opcode_e'(3'(op));
            {fetch, clk2, clk1} = ~3'(ph);
            #1;
            exp_v = r ? table_row(ph, op, 1'(z)) : 6'b0;
            checks++;
            if ({pclk, ldac, ldpc, mwr, mrd, ldir} !== exp_v) begin
              failures++;
              $display("rst=%0d phase=%0d op=%0d zr=%0d: got %b expected %b", r, ph, op, z,
                       {pclk, ldac, ldpc, mwr, mrd, ldir}, exp_v);
            end
            checks++;
            if (aclk !== (r == 1 && ph == 6)) begin failures++; $display("aclk wrong at phase %0d", ph); end
            checks++;
            if (halt !== (r == 1 && ph >= 4 && op == 0)) begin failures++; $display("halt wrong at phase %0d op %0d", ph, op); end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
