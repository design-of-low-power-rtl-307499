// tb_risc8_top: end-to-end test of the processor at its default size.
//
// A reference model of the instruction set (one step per instruction, no
// timing) runs in lockstep with the processor. At the start of every
// instruction (first address-setup phase) the processor's program counter and
// accumulator are compared with the model; after the program halts, all 32
// memory words are compared too. Every instruction must take exactly eight
// clock cycles, which is checked from the cycle count between instruction
// starts and from the total run time.
//
// Programs: one directed program that executes every opcode, a skip that is
// taken and one that is not, a jump, a store, an 8-bit add overflow and a
// halt; then a set of random programs, each run for a fixed number of
// instructions or until it halts. The testbench counts how often each
// mechanism occurred and counts a failure for any that never did.
module tb_risc8_top;
  import risc8_pkg::*;

  logic  clk = 0, rstreq, ewr, halt;
  addr_t ead;
  word_t edat;
  int    checks = 0, failures = 0;

  risc8_top dut (.*);

  always #5 clk = ~clk;

  localparam int MAX_CYCLES = 200000;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (MAX_CYCLES) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  word_t m_mem [32];
  word_t m_acc;
  addr_t m_pc;
  bit    m_halted;

  // event counters
  int n_op [8];
  int n_skip_taken, n_skip_not, n_store, n_jump, n_overflow, n_halt, n_bus_drive, n_mem_read;

  function automatic void model_step();
    word_t   ins = m_mem[m_pc];
    logic [2:0] op = ins[7:5];
    addr_t   a  = ins[4:0];
    m_pc = m_pc + 1;
    n_op[op]++;
    case (op)
      3'b000: begin m_halted = 1; n_halt++; end
      3'b001: if (m_acc == 0) begin m_pc = m_pc + 1; n_skip_taken++; end else n_skip_not++;
      3'b010: begin
        if (int'(m_acc) + int'(m_mem[a]) > 255) n_overflow++;
        m_acc = word_t'(int'(m_acc) + int'(m_mem[a]));
      end
      3'b011: m_acc = m_acc & m_mem[a];
      3'b100: m_acc = m_acc ^ m_mem[a];
      3'b101: m_acc = m_mem[a];
      3'b110: begin m_mem[a] = m_acc; n_store++; end
      3'b111: begin m_pc = a; n_jump++; end
    endcase
  endfunction

  function automatic word_t I(logic [2:0] op, int a);
    return {op, 5'(a)};
  endfunction

  // ---------------- program loading and run ----------------
  word_t prog [32];

  task automatic load_and_run(input int max_instr, input string name);
    int n = 0, t_start, t_prev;
    rstreq = 1; ewr = 0;
    repeat (2) @(posedge clk);
    for (int i = 0; i < 32; i++) begin
      ewr = 1; ead = 5'(i); edat = prog[i];
      @(posedge clk); #1;
    end
    ewr = 0;
    foreach (m_mem[i]) m_mem[i] = prog[i];
    m_acc = 0; m_pc = 0; m_halted = 0;
    rstreq = 0;
    // wait for the first phase 0 with reset released
    @(posedge clk); #1;
    checks++;
    if (!(dut.rst && dut.fetch && dut.clk2 && dut.clk1)) begin
      failures++; $display("%s: not at phase 0 one cycle after reset release", name);
    end
    t_start = cycle; t_prev = cycle;
    while (!m_halted && n < max_instr) begin
      // here: start of an instruction
      checks++;
      if (dut.adpc !== m_pc || dut.acout !== m_acc) begin
        failures++;
        $display("%s instr %0d: pc=%0d acc=%h, model pc=%0d acc=%h", name, n, dut.adpc, dut.acout, m_pc, m_acc);
      end
      model_step();
      n++;
      // advance 8 cycles, watching the bus
      for (int c = 0; c < 8; c++) begin
        if (dut.u_iobuf.drive) n_bus_drive++;
        if (dut.mem_oe && !dut.fetch) n_mem_read++;
        @(posedge clk); #1;
      end
      if (!m_halted) begin
        checks++;
        if (!(dut.fetch && dut.clk2 && dut.clk1) || cycle - t_prev != 8) begin
          failures++; $display("%s instr %0d: next instruction not at 8 cycles", name, n);
        end
      end
      t_prev = cycle;
    end
    if (m_halted) begin
      repeat (4) @(posedge clk); #1;
      checks++;
      if (!halt) begin failures++; $display("%s: halt output not set", name); end
      checks++;
      if (cycle - t_start != 8 * n + 4) begin
        failures++; $display("%s: %0d cycles for %0d instructions", name, cycle - t_start, n);
      end
      checks++;
      if (dut.acout !== m_acc) begin failures++; $display("%s: final acc %h expected %h", name, dut.acout, m_acc); end
    end
    for (int i = 0; i < 32; i++) begin
      checks++;
      if (dut.u_mem.mem[i] !== m_mem[i]) begin
        failures++; $display("%s: mem[%0d]=%h expected %h", name, i, dut.u_mem.mem[i], m_mem[i]);
      end
    end
    $display("%s: %0d instructions, halted=%0d", name, n, m_halted);
  endtask

  initial begin
    rstreq = 1; ewr = 0; ead = 0; edat = 0;
    foreach (n_op[i]) n_op[i] = 0;
    {n_skip_taken, n_skip_not, n_store, n_jump, n_overflow, n_halt, n_bus_drive, n_mem_read} = '0;

    // Directed program. Data at 24..31.
    foreach (prog[i]) prog[i] = 8'h00;
    prog[0]  = I(3'b101, 24);  // LOAD  [24]=0xC8
    prog[1]  = I(3'b010, 25);  // ADD   [25]=0x64  -> 0x2C, overflow
    prog[2]  = I(3'b110, 30);  // STORE -> [30]
    prog[3]  = I(3'b001, 0);   // SKZ   (acc != 0: not taken)
    prog[4]  = I(3'b011, 26);  // AND   [26]=0x0F  -> 0x0C
    prog[5]  = I(3'b100, 27);  // XOR   [27]=0x0C  -> 0x00
    prog[6]  = I(3'b001, 0);   // SKZ   (acc == 0: taken)
    prog[7]  = I(3'b000, 0);   // HALT  (skipped)
    prog[8]  = I(3'b111, 12);  // JMP 12
    prog[9]  = I(3'b000, 0);   // HALT  (jumped over)
    prog[12] = I(3'b101, 28);  // LOAD  [28]=0x81
    prog[13] = I(3'b110, 31);  // STORE -> [31]
    prog[14] = I(3'b000, 0);   // HALT
    prog[24] = 8'hC8; prog[25] = 8'h64; prog[26] = 8'h0F;
    prog[27] = 8'h0C; prog[28] = 8'h81;
    load_and_run(64, "directed");
    checks++;
    if (dut.u_mem.mem[30] !== 8'h2C || dut.u_mem.mem[31] !== 8'h81) begin
      failures++; $display("directed: stored values wrong");
    end

    // Random programs; opcodes weighted away from HALT so they run longer.
    for (int p = 0; p < 40; p++) begin
      for (int i = 0; i < 32; i++) begin
        logic [2:0] op;
        op = 3'($urandom_range(1, 7));
        if ($urandom_range(0, 40) == 0) op = 3'b000;
        prog[i] = (i >= 24) ? word_t'($urandom) : {op, 5'($urandom)};
      end
      load_and_run(300, $sformatf("random%0d", p));
    end

    // every mechanism must have happened
    for (int o = 0; o < 8; o++) begin
      checks++;
      if (n_op[o] == 0) begin failures++; $display("opcode %0d never executed", o); end
    end
    checks++; if (n_skip_taken == 0) begin failures++; $display("no skip taken"); end
    checks++; if (n_skip_not   == 0) begin failures++; $display("no skip not taken"); end
    checks++; if (n_store      == 0) begin failures++; $display("no store"); end
    checks++; if (n_jump       == 0) begin failures++; $display("no jump"); end
    checks++; if (n_overflow   == 0) begin failures++; $display("no add overflow"); end
    checks++; if (n_halt       == 0) begin failures++; $display("no halt"); end
    checks++; if (n_bus_drive  == 0) begin failures++; $display("IO buffer never drove the bus"); end
    checks++; if (n_mem_read   == 0) begin failures++; $display("no operand read"); end
    $display("opcodes executed: HLT %0d SKZ %0d ADD %0d AND %0d XOR %0d LDA %0d STO %0d JMP %0d",
             n_op[0], n_op[1], n_op[2], n_op[3], n_op[4], n_op[5], n_op[6], n_op[7]);
    $display("skips taken %0d, not taken %0d, stores %0d, jumps %0d, add overflows %0d, halts %0d, bus-drive cycles %0d",
             n_skip_taken, n_skip_not, n_store, n_jump, n_overflow, n_halt, n_bus_drive);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
