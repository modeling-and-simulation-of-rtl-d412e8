// tb_bisr_top_full: one complete operation of the BISR wrapper at its default
// parameters (16 x 8-bit memory, four spares, March SS, word 4 reading
// 8'hAA): self-test with repair analysis, check of the fault reports and of
// the clock count against the reference model, signature read-out, then
// normal operation in which the repaired memory must read back what was
// written to every word.
module tb_bisr_top_full;
  import bisr_pkg::*;
  import bisr_tb_pkg::*;

  localparam int AW = 4, DW = 8, WORDS = 16;

  logic Clk = 0, Rst = 1;
  mode_e ModeType = MODE_IDLE;
  logic [AW-1:0] AddrIn = '0, Faddr;
  logic [DW-1:0] DataIn = '0, Output, CorrectData;
  logic REna = 0, WEna = 0, Fault, test_done, ra_finish, unrepairable;
  logic prog = 0, shift_en = 0, rsr_out;
  logic [2:0] threshold = '0;
  int checks = 0, failures = 0;

  bisr_top dut (.*);

  always #5 Clk = ~Clk;
  initial begin #1000000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    fault_t faults [$];
    int exp_addrs [$], got_addrs [$];
    int clocks = 0, exp_clocks;
    logic [DW-1:0] ref_mem [WORDS];
    logic [19:0] sig = '0;

    faults.push_back('{4, 8'hFF, 8'hAA});
    exp_clocks = march_run(march_ss(), faults, WORDS, exp_addrs);

    repeat (2) @(posedge Clk); #1; Rst = 0;
    ModeType = MODE_TEST;
    while (!test_done && clocks < 100000) begin
      @(posedge Clk); #1; clocks++;
      if (Fault) begin
        got_addrs.push_back(int'(Faddr));
        checks++; if (CorrectData !== 8'h00 && CorrectData !== 8'hFF) failures++;
      end
    end
    repeat (3) @(posedge Clk); #1;
    checks++; if (clocks != exp_clocks) begin failures++; $display("clocks %0d exp %0d", clocks, exp_clocks); end
    checks++; if (got_addrs.size() != exp_addrs.size()) failures++;
    foreach (got_addrs[i]) begin checks++; if (got_addrs[i] != 4) failures++; end
    checks++; if (ra_finish !== 1 || unrepairable !== 0) failures++;
    $display("March SS on 16 words: %0d clocks, %0d fault reports", clocks, got_addrs.size());

    shift_en = 1;
    for (int b = 0; b < 20; b++) begin sig = {sig[18:0], rsr_out}; @(posedge Clk); #1; end
    shift_en = 0;
    checks++; if (sig !== {1'b1, 4'd4, 15'd0}) begin failures++; $display("signature %h", sig); end

    ModeType = MODE_NORMAL; @(posedge Clk); #1;
    for (int a = 0; a < WORDS; a++) begin
      AddrIn = AW'(a); DataIn = 8'($urandom); ref_mem[a] = DataIn; WEna = 1;
      @(posedge Clk); #1; WEna = 0;
    end
    for (int a = 0; a < WORDS; a++) begin
      AddrIn = AW'(a); REna = 1;
      @(posedge Clk); #1; REna = 0;
      checks++; if (Output !== ref_mem[a]) begin failures++; $display("word %0d got %h exp %h", a, Output, ref_mem[a]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
