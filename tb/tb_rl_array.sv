// tb_rl_array: repairs two words through the BIRA port (as in test mode), then
// in normal mode checks the address match, spare reads one clock after REna,
// writes redirected to spares, that other addresses are not matched, and
// that RLAEna gates the match.
module tb_rl_array;
  localparam int AW = 4, DW = 8, NS = 4;
  logic Clk = 0, Rst = 1, RLAEna = 0, start = 0, fail = 0, test_done = 0;
  logic [AW-1:0] Faddr = '0, AddrIn = '0;
  logic [DW-1:0] Syndrome = '0, CorrectData = '0, DataIn = '0;
  logic cont, ra_finish, unrepairable, prog = 0, shift_en = 0, rsr_out;
  logic [2:0] threshold = '0;
  logic WEna = 0, REna = 0, Match, RLASel;
  logic [DW-1:0] RLAOp;
  logic [DW-1:0] ref_spare [16];
  bit is_rep [16];
  int checks = 0, failures = 0;

  rl_array #(.ADDR_W(AW), .DATA_W(DW), .NUM_SPARES(NS)) dut (.*);
  always #5 Clk = ~Clk;
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic repair(logic [AW-1:0] a, logic [DW-1:0] good);
    Faddr = a; Syndrome = 8'h5A; CorrectData = good; fail = 1;
    @(posedge Clk); #1; fail = 0;
    while (!cont) begin @(posedge Clk); #1; end
    @(posedge Clk); #1;
    ref_spare[a] = good; is_rep[a] = 1;
  endtask

  initial begin
    @(posedge Clk); #1; Rst = 0;
    start = 1; @(posedge Clk); #1; start = 0;
    repair(4'd5, 8'hFF);
    repair(4'd10, 8'h00);
    repair(4'd15, 8'hFF);
    test_done = 1; #1;
    checks++; if (ra_finish !== 1 || unrepairable !== 0) failures++;
    // RLAEna low: no match
    AddrIn = 4'd5; #1;
    checks++; if (Match !== 0) failures++;
    RLAEna = 1;
    // spares hold the correct data loaded at allocation
    foreach (is_rep[a]) if (is_rep[a]) begin
      AddrIn = 4'(a); REna = 1; #1;
      checks++; if (Match !== 1) failures++;
      @(posedge Clk); #1; REna = 0;
      checks++; if (RLASel !== 1 || RLAOp !== ref_spare[a]) begin failures++; $display("spare %0d %h", a, RLAOp); end
    end
    // random normal-mode traffic
    for (int i = 0; i < 400; i++) begin
      AddrIn = 4'($urandom); DataIn = 8'($urandom);
      WEna = ($urandom % 2 == 0); REna = !WEna;
      #1;
      checks++; if (Match !== is_rep[AddrIn]) failures++;
      @(posedge Clk); #1;
      if (WEna && is_rep[AddrIn]) ref_spare[AddrIn] = DataIn;
      if (REna) begin
        checks++;
        if (RLASel !== is_rep[AddrIn] || (is_rep[AddrIn] && RLAOp !== ref_spare[AddrIn])) begin
          failures++; $display("read %0d sel %0d op %h", AddrIn, RLASel, RLAOp);
        end
      end
      WEna = 0; REna = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
