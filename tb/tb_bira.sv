// tb_bira: drives the BIRA with a sequence of fault reports as the BIST would
// (fail pulse, then wait for cont) and checks the fail-to-cont latency (two
// clocks), spare allocation order, that a repeated address and a zero
// syndrome take no spare, unrepairable when the spares run out or the
// programmed threshold is reached, ra_finish, and the serial signature.
module tb_bira;
  localparam int AW = 4, DW = 8, NS = 4;
  logic Clk = 0, Rst = 1, start = 0, fail = 0, test_done = 0;
  logic [AW-1:0] faulty_address = '0;
  logic [DW-1:0] faulty_syndrome = '0;
  logic cont, ra_finish, unrepairable, prog = 0, shift_en = 0, rsr_out;
  logic [2:0] threshold = '0;
  logic [NS-1:0] sig_valid;
  logic [NS-1:0][AW-1:0] sig_addr;
  logic alloc;
  logic [1:0] alloc_idx;
  int checks = 0, failures = 0;
  int n_alloc = 0;
  int ref_used;
  logic [AW-1:0] ref_addr [NS];

  bira #(.ADDR_W(AW), .DATA_W(DW), .NUM_SPARES(NS)) dut (.*);
  always #5 Clk = ~Clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  always @(posedge Clk) if (alloc) n_alloc++;

  // Report one fault; expect_alloc: a new spare should be taken.
  task automatic report(logic [AW-1:0] a, logic [DW-1:0] s, bit expect_alloc, bit expect_unrep);
    int n_before = n_alloc;
    faulty_address = a; faulty_syndrome = s; fail = 1;
    @(posedge Clk); #1; fail = 0;
    checks++; if (cont !== 0) failures++;
    @(posedge Clk); #1;
    checks++; if (cont !== 1) begin failures++; $display("cont late for %0d", a); end
    if (expect_alloc) begin
      checks++;
      if (alloc_idx !== 2'(ref_used)) failures++;
      ref_addr[ref_used] = a; ref_used++;
    end
    @(posedge Clk); #1;
    checks++; if (cont !== 0) failures++;
    checks++; if ((n_alloc - n_before) != int'(expect_alloc)) begin failures++; $display("alloc count wrong for %0d", a); end
    checks++; if (unrepairable !== expect_unrep) begin failures++; $display("unrepairable %0d for %0d", unrepairable, a); end
    faulty_address = AW'($urandom); faulty_syndrome = 8'($urandom);
    repeat (2) @(posedge Clk); #1;
  endtask

  task automatic check_sigs();
    for (int i = 0; i < NS; i++) begin
      checks++;
      if (sig_valid[i] !== (i < ref_used) || (i < ref_used && sig_addr[i] !== ref_addr[i])) failures++;
    end
  endtask

  initial begin
    logic [NS*(AW+1)-1:0] exp_chain;
    @(posedge Clk); #1; Rst = 0;
    ref_used = 0;
    checks++; if (sig_valid !== '0 || unrepairable !== 0 || cont !== 0) failures++;
    report(4'd3, 8'h55, 1, 0);
    report(4'd7, 8'h01, 1, 0);
    report(4'd3, 8'hFF, 0, 0);     // already repaired
    report(4'd9, 8'h00, 0, 0);     // no syndrome bit: nothing to repair
    report(4'd12, 8'h80, 1, 0);
    report(4'd0, 8'h10, 1, 0);
    check_sigs();
    checks++; if (ra_finish !== 0) failures++;
    report(4'd5, 8'h10, 0, 1);     // no spare left
    report(4'd12, 8'h10, 0, 1);    // sticky
    test_done = 1; #1;
    checks++; if (ra_finish !== 1) failures++;
    // serial signature: register 0 first, {valid, address} MSB first
    exp_chain = '0;
    for (int i = 0; i < NS; i++) exp_chain = {exp_chain[NS*(AW+1)-AW-2:0], 1'b1, ref_addr[i]};
    shift_en = 1;
    for (int b = NS*(AW+1)-1; b >= 0; b--) begin
      checks++; if (rsr_out !== exp_chain[b]) failures++;
      @(posedge Clk); #1;
    end
    shift_en = 0;
    check_sigs();                  // full rotation restores the registers
    // new test with the threshold programmed to 1
    test_done = 0;
    prog = 1; threshold = 3'd1; @(posedge Clk); #1; prog = 0;
    start = 1; @(posedge Clk); #1; start = 0;
    ref_used = 0;
    check_sigs();
    checks++; if (unrepairable !== 0) failures++;
    report(4'd1, 8'h01, 1, 0);
    report(4'd2, 8'h01, 0, 1);
    check_sigs();
    // threshold above NUM_SPARES is clipped; repeat the repair
    prog = 1; threshold = 3'd7; @(posedge Clk); #1; prog = 0;
    start = 1; @(posedge Clk); #1; start = 0;
    ref_used = 0;
    report(4'd1, 8'h01, 1, 0);
    report(4'd2, 8'h01, 1, 0);
    report(4'd14, 8'h01, 1, 0);
    report(4'd15, 8'h01, 1, 0);
    report(4'd13, 8'h01, 0, 1);
    check_sigs();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
