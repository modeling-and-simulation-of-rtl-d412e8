// tb_bisr_top: end-to-end test of the BISR wrapper with three defective
// words (word 4 stuck at 8'hAA, word 9 bit 0 stuck at 1, word 13 bit 7 stuck
// at 0) and four spares.
//  1. A test is started and aborted, then run with the threshold programmed
//     to 2: three faulty words cannot be repaired, unrepairable must rise.
//  2. The threshold is programmed back to 4 and the test repeated: every
//     Fault pulse and its Faddr must match the reference March SS model,
//     test_done must come after exactly the modelled number of clocks, and
//     ra_finish must rise without unrepairable.
//  3. The repair signature is shifted out and compared with the faulty words
//     in the order they were found.
//  4. Normal mode: random writes and reads over all words must behave as a
//     fault-free memory (faulty words served by spares).
// Every mechanism is counted and each must occur at least once.
module tb_bisr_top;
  import bisr_pkg::*;
  import bisr_tb_pkg::*;

  localparam int AW = 4, DW = 8, NS = 4, WORDS = 16;

  logic Clk = 0, Rst = 1;
  mode_e ModeType = MODE_IDLE;
  logic [AW-1:0] AddrIn = '0, Faddr;
  logic [DW-1:0] DataIn = '0, Output, CorrectData;
  logic REna = 0, WEna = 0, Fault, test_done, ra_finish, unrepairable;
  logic prog = 0, shift_en = 0, rsr_out;
  logic [2:0] threshold = '0;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_tests = 0, n_abort = 0, n_fault = 0, n_pause = 0, n_alloc = 0, n_repeat = 0;
  int n_unrep = 0, n_prog = 0, n_spare_rd = 0, n_spare_wr = 0, n_mem_rd = 0, n_shift = 0;
  int n_down = 0, n_multi_back = 0;

  bisr_top #(
    .NUM_FAULTS(3),
    .FAULT_ADDR({4'd13, 4'd9, 4'd4}),
    .FAULT_MASK({8'h80, 8'h01, 8'hFF}),
    .FAULT_VAL ({8'h00, 8'h01, 8'hAA})
  ) dut (.*);

  always #5 Clk = ~Clk;
  initial begin #2000000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // internal events, observed for the mechanism counts only
  always @(posedge Clk) begin
    if (dut.u_rl_array.u_bira.alloc) n_alloc++;
    if (dut.u_rl_array.cont) n_pause++;
    if (dut.u_smc.AddrEna && dut.u_inst_reg.InstOp.dir) n_down++;
    if (dut.u_smc.InstEna && dut.u_inst_reg.InstOp.lo && !dut.u_smc.Over) n_multi_back++;
  end

  fault_t faults [$];
  int exp_addrs [$], got_addrs [$];

  task automatic run_test(output int clocks);
    clocks = 0;
    got_addrs.delete();
    ModeType = MODE_TEST;
    while (!test_done) begin
      @(posedge Clk); #1;
      clocks++;
      if (Fault) begin got_addrs.push_back(int'(Faddr)); n_fault++; end
      if (clocks > 100000) break;
    end
    repeat (3) @(posedge Clk); #1;
    n_tests++;
  endtask

  task automatic set_threshold(int t);
    prog = 1; threshold = 3'(t); @(posedge Clk); #1; prog = 0; n_prog++;
  endtask

  initial begin
    int clocks, exp_clocks;
    int distinct [$];
    logic [DW-1:0] ref_mem [WORDS];
    bit written [WORDS];
    logic [AW-1:0] ra;

    faults.push_back('{4, 8'hFF, 8'hAA});
    faults.push_back('{9, 8'h01, 8'h01});
    faults.push_back('{13, 8'h80, 8'h00});
    exp_clocks = march_run(march_ss(), faults, WORDS, exp_addrs);
    foreach (exp_addrs[i]) if (!(exp_addrs[i] inside {distinct})) distinct.push_back(exp_addrs[i]);
    foreach (exp_addrs[i]) if (i > 0) foreach (exp_addrs[j]) if (j < i && exp_addrs[j] == exp_addrs[i]) begin n_repeat++; break; end

    repeat (2) @(posedge Clk); #1; Rst = 0;
    repeat (3) @(posedge Clk); #1;
    checks++; if (test_done || ra_finish || unrepairable || Fault) failures++;

    // abort a test half-way
    ModeType = MODE_TEST; repeat (300) @(posedge Clk); #1;
    ModeType = MODE_IDLE; repeat (2) @(posedge Clk); #1; n_abort++;

    // 1. threshold 2: unrepairable
    set_threshold(2);
    run_test(clocks);
    checks++; if (clocks != exp_clocks) begin failures++; $display("clocks %0d exp %0d", clocks, exp_clocks); end
    checks++; if (unrepairable !== 1 || ra_finish !== 1) failures++;
    if (unrepairable) n_unrep++;
    ModeType = MODE_IDLE; repeat (2) @(posedge Clk); #1;

    // 2. threshold 4: repaired
    set_threshold(4);
    run_test(clocks);
    checks++; if (clocks != exp_clocks) begin failures++; $display("clocks %0d exp %0d", clocks, exp_clocks); end
    checks++; if (got_addrs.size() != exp_addrs.size()) begin failures++; $display("faults %0d exp %0d", got_addrs.size(), exp_addrs.size()); end
    foreach (exp_addrs[i]) begin
      checks++; if (i >= got_addrs.size() || got_addrs[i] != exp_addrs[i]) failures++;
    end
    checks++; if (unrepairable !== 0 || ra_finish !== 1 || test_done !== 1) failures++;
    $display("March SS: %0d clocks, %0d fault reports, %0d faulty words", clocks, got_addrs.size(), distinct.size());

    // 3. repair signature out: {valid, address} per register, register 0 first
    begin
      logic [NS*(AW+1)-1:0] exp_chain = '0, got_chain = '0;
      for (int i = 0; i < NS; i++)
        exp_chain = {exp_chain[NS*(AW+1)-AW-2:0], (i < distinct.size()), (i < distinct.size()) ? AW'(distinct[i]) : AW'(0)};
      shift_en = 1;
      for (int b = 0; b < NS*(AW+1); b++) begin
        got_chain = {got_chain[NS*(AW+1)-2:0], rsr_out};
        @(posedge Clk); #1; n_shift++;
      end
      shift_en = 0;
      checks++; if (got_chain !== exp_chain) begin failures++; $display("rsr %h exp %h", got_chain, exp_chain); end
    end

    // 4. normal mode
    ModeType = MODE_NORMAL; @(posedge Clk); #1;
    for (int a = 0; a < WORDS; a++) begin
      AddrIn = AW'(a); DataIn = 8'($urandom); WEna = 1; ref_mem[a] = DataIn; written[a] = 1;
      if (a inside {distinct}) n_spare_wr++;
      @(posedge Clk); #1; WEna = 0;
    end
    for (int i = 0; i < 400; i++) begin
      ra = AW'($urandom);
      if ($urandom % 3 == 0) begin
        AddrIn = ra; DataIn = 8'($urandom); WEna = 1; ref_mem[ra] = DataIn;
        if (int'(ra) inside {distinct}) n_spare_wr++;
        @(posedge Clk); #1; WEna = 0;
      end else begin
        AddrIn = ra; REna = 1;
        @(posedge Clk); #1; REna = 0;
        checks++;
        if (Output !== ref_mem[ra]) begin failures++; $display("read %0d got %h exp %h", ra, Output, ref_mem[ra]); end
        if (int'(ra) inside {distinct}) n_spare_rd++; else n_mem_rd++;
      end
    end

    // every mechanism must have happened
    checks++; if (n_tests < 2)       begin failures++; $display("no test run"); end
    checks++; if (n_abort == 0)      begin failures++; $display("no abort"); end
    checks++; if (n_fault == 0)      begin failures++; $display("no fault"); end
    checks++; if (n_pause == 0)      begin failures++; $display("no pause/continue"); end
    checks++; if (n_alloc == 0)      begin failures++; $display("no allocation"); end
    checks++; if (n_repeat == 0)     begin failures++; $display("no repeated fault"); end
    checks++; if (n_unrep == 0)      begin failures++; $display("no unrepairable"); end
    checks++; if (n_prog == 0)       begin failures++; $display("no threshold program"); end
    checks++; if (n_spare_rd == 0)   begin failures++; $display("no spare read"); end
    checks++; if (n_spare_wr == 0)   begin failures++; $display("no spare write"); end
    checks++; if (n_mem_rd == 0)     begin failures++; $display("no memory read"); end
    checks++; if (n_shift == 0)      begin failures++; $display("no signature shift"); end
    checks++; if (n_down == 0)       begin failures++; $display("no decreasing sweep"); end
    checks++; if (n_multi_back == 0) begin failures++; $display("no jump back"); end
    $display("mechanisms: tests=%0d abort=%0d fault=%0d pause=%0d alloc=%0d repeat=%0d unrep=%0d prog=%0d spare_rd=%0d spare_wr=%0d mem_rd=%0d shift=%0d down=%0d back=%0d",
             n_tests, n_abort, n_fault, n_pause, n_alloc, n_repeat, n_unrep, n_prog, n_spare_rd, n_spare_wr, n_mem_rd, n_shift, n_down, n_multi_back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
