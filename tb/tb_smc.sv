// tb_smc: steps the controller through a write, a read, a faulty read with a
// BIRA pause and the end word, playing the instruction register and the BIRA,
// and checks every enable cycle by cycle; then checks normal and idle modes.
module tb_smc;
  import bisr_pkg::*;
  logic Clk = 0, Rst = 1;
  mode_e ModeType = MODE_IDLE;
  micro_t InstOp = '0;
  logic AddrLast = 0, Fault = 0, cont = 0;
  logic TestMode, BistClr, IEna, IREna, InstEna, Over, AddrInit, AddrEna;
  logic DataEna, RWEna, FDEna, RLAEna, MemEna, fail, test_done;
  int checks = 0, failures = 0;

  // output bit positions
  localparam logic [14:0] TM = 15'h4000, CLR = 15'h2000, IE = 15'h1000, IR = 15'h0800,
    INE = 15'h0400, OV = 15'h0200, AI = 15'h0100, AE = 15'h0080, DE = 15'h0040,
    RW = 15'h0020, FD = 15'h0010, RLA = 15'h0008, ME = 15'h0004, FL = 15'h0002, TD = 15'h0001;

  smc dut (.*);
  always #5 Clk = ~Clk;
  initial begin #20000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic logic [14:0] outs();
    return {TestMode, BistClr, IEna, IREna, InstEna, Over, AddrInit, AddrEna,
            DataEna, RWEna, FDEna, RLAEna, MemEna, fail, test_done};
  endfunction

  task automatic expect_cycle(logic [14:0] e, string what);
    #1;
    checks++;
    if (outs() !== e) begin failures++; $display("%s: got %h exp %h", what, outs(), e); end
    @(posedge Clk); #1;
  endtask

  initial begin
    @(posedge Clk); #1; Rst = 0;
    expect_cycle(0, "idle");
    ModeType = MODE_TEST;
    expect_cycle(TM|CLR, "start");
    // op 1: single-operation write, first of its element, not last address
    expect_cycle(TM|IE, "fetch");
    expect_cycle(TM|IR, "load");
    InstOp = 7'b1000010;                        // IR now holds w0
    expect_cycle(TM|AI, "decode first");
    expect_cycle(TM|RW|DE|ME, "exec w");
    expect_cycle(TM|INE|AE, "next step addr");
    // op 2: first op of a multi-op element, read, no fault
    expect_cycle(TM|IE, "fetch");
    expect_cycle(TM|IR, "load");
    InstOp = 7'b1100000;
    expect_cycle(TM, "decode");
    expect_cycle(TM|RW|DE|ME, "exec r");
    expect_cycle(TM|DE|FD, "check");
    expect_cycle(TM, "result ok");
    expect_cycle(TM|INE, "next same addr");
    // op 3: last op, read with a fault, last address
    expect_cycle(TM|IE, "fetch");
    expect_cycle(TM|IR, "load");
    InstOp = 7'b1001000; AddrLast = 1;
    expect_cycle(TM, "decode");
    expect_cycle(TM|RW|DE|ME, "exec r");
    expect_cycle(TM|DE|FD, "check");
    Fault = 1;
    expect_cycle(TM|FL, "result fault");
    Fault = 0;
    expect_cycle(TM, "pause");
    expect_cycle(TM, "pause");
    cont = 1;
    expect_cycle(TM, "pause cont");
    cont = 0;
    expect_cycle(TM|INE|OV, "next over");
    // op 4: new element (AddrInit again), then end word
    expect_cycle(TM|IE, "fetch");
    expect_cycle(TM|IR, "load");
    InstOp = 7'b1000110; AddrLast = 0;
    expect_cycle(TM|AI, "decode new element");
    expect_cycle(TM|RW|DE|ME, "exec w");
    expect_cycle(TM|INE|AE, "next");
    expect_cycle(TM|IE, "fetch");
    expect_cycle(TM|IR, "load");
    InstOp = 7'b0000000;
    expect_cycle(TM, "decode end");
    expect_cycle(TM|TD, "done");
    expect_cycle(TM|TD, "done held");
    ModeType = MODE_NORMAL;
    expect_cycle(RLA|ME, "normal");
    expect_cycle(RLA|ME, "normal");
    ModeType = MODE_RSVD;
    expect_cycle(0, "reserved");
    ModeType = MODE_TEST;
    expect_cycle(TM|CLR, "restart");
    expect_cycle(TM|IE, "fetch");
    ModeType = MODE_IDLE;                        // abort
    expect_cycle(0, "abort");
    expect_cycle(0, "idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
