// tb_bisr_march_c: the same BISR hardware running a different March
// algorithm, March C- (any(w0); up(r0,w1); up(r1,w0); down(r0,w1);
// down(r1,w0); any(r0)), loaded only through the instruction storage
// contents. Two defective words; the fault reports and clock count are
// compared with the reference model, then the repaired memory is checked in
// normal mode.
module tb_bisr_march_c;
  import bisr_pkg::*;
  import bisr_tb_pkg::*;

  localparam int AW = 4, DW = 8, WORDS = 16;
  // {valid, Fo, Io, Lo, I/D, R/W, data}
  localparam imem_t MARCH_C_MINUS = '{
    7'b1000010,                 // any(w0)
    7'b1100000, 7'b1001011,     // up(r0, w1)
    7'b1100001, 7'b1001010,     // up(r1, w0)
    7'b1100100, 7'b1001111,     // down(r0, w1)
    7'b1100101, 7'b1001110,     // down(r1, w0)
    7'b1000100,                 // any(r0)
    7'b0000000,                 // end
    7'd0, 7'd0, 7'd0, 7'd0, 7'd0, 7'd0, 7'd0, 7'd0, 7'd0, 7'd0, 7'd0,
    7'd0, 7'd0, 7'd0, 7'd0, 7'd0, 7'd0, 7'd0, 7'd0, 7'd0, 7'd0
  };

  logic Clk = 0, Rst = 1;
  mode_e ModeType = MODE_IDLE;
  logic [AW-1:0] AddrIn = '0, Faddr;
  logic [DW-1:0] DataIn = '0, Output, CorrectData;
  logic REna = 0, WEna = 0, Fault, test_done, ra_finish, unrepairable;
  logic prog = 0, shift_en = 0, rsr_out;
  logic [2:0] threshold = '0;
  int checks = 0, failures = 0;

  bisr_top #(
    .PROGRAM(MARCH_C_MINUS),
    .NUM_FAULTS(2),
    .FAULT_ADDR({4'd11, 4'd2}),
    .FAULT_MASK({8'h10, 8'h03}),
    .FAULT_VAL ({8'h10, 8'h00})
  ) dut (.*);

  always #5 Clk = ~Clk;
  initial begin #1000000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    fault_t faults [$];
    int exp_addrs [$], got_addrs [$];
    int clocks = 0, exp_clocks;
    logic [DW-1:0] ref_mem [WORDS];
    imem_words_t code;

    // the literal program above must be the encoding of the March C- description
    code = microcode(march_c_minus());
    foreach (code[i]) begin checks++; if (code[i] !== MARCH_C_MINUS[i]) failures++; end

    faults.push_back('{2, 8'h03, 8'h00});
    faults.push_back('{11, 8'h10, 8'h10});
    exp_clocks = march_run(march_c_minus(), faults, WORDS, exp_addrs);

    repeat (2) @(posedge Clk); #1; Rst = 0;
    ModeType = MODE_TEST;
    while (!test_done && clocks < 100000) begin
      @(posedge Clk); #1; clocks++;
      if (Fault) got_addrs.push_back(int'(Faddr));
    end
    repeat (3) @(posedge Clk); #1;
    checks++; if (clocks != exp_clocks) begin failures++; $display("clocks %0d exp %0d", clocks, exp_clocks); end
    checks++; if (got_addrs.size() != exp_addrs.size() || got_addrs.size() == 0) failures++;
    foreach (exp_addrs[i]) begin checks++; if (i >= got_addrs.size() || got_addrs[i] != exp_addrs[i]) failures++; end
    checks++; if (ra_finish !== 1 || unrepairable !== 0) failures++;
    $display("March C- on 16 words: %0d clocks, %0d fault reports", clocks, got_addrs.size());

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
