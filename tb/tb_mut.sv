// tb_mut: memory under test with two modelled defects (overridden here):
// word 4 stuck at 8'hAA on all bits, word 9 with bit 0 stuck at 1. Writes
// random data, reads it back one clock after the read strobe, and checks the
// stuck bits, the read hold and the MemEna gating against a reference array.
module tb_mut;
  localparam int AW = 4, DW = 8;
  logic Clk = 0, MemEna = 0, WrEna = 0, RdEna = 0;
  logic [AW-1:0] Address = '0;
  logic [DW-1:0] Data = '0, MemOut;
  logic [DW-1:0] model [16];
  logic [DW-1:0] exp_rd;
  int checks = 0, failures = 0;

  mut #(.ADDR_W(AW), .DATA_W(DW), .NUM_FAULTS(2),
        .FAULT_ADDR({4'd9, 4'd4}), .FAULT_MASK({8'h01, 8'hFF}), .FAULT_VAL({8'h01, 8'hAA}))
    dut (.*);
  always #5 Clk = ~Clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic logic [DW-1:0] faulty(int a, logic [DW-1:0] v);
    if (a == 4) return 8'hAA;
    if (a == 9) return v | 8'h01;
    return v;
  endfunction

  initial begin
    MemEna = 1;
    for (int a = 0; a < 16; a++) begin
      Address = AW'(a); Data = 8'($urandom); model[a] = Data; WrEna = 1;
      @(posedge Clk); #1;
    end
    WrEna = 0;
    for (int r = 0; r < 3; r++)
      for (int a = 0; a < 16; a++) begin
        Address = AW'(a); RdEna = 1;
        @(posedge Clk); #1;
        RdEna = 0;
        exp_rd = faulty(a, model[a]);
        checks++;
        if (MemOut !== exp_rd) begin failures++; $display("a %0d got %h exp %h", a, MemOut, exp_rd); end
        // hold without read strobe
        Address = AW'(a + 1); @(posedge Clk); #1;
        checks++; if (MemOut !== exp_rd) failures++;
        // random write while reading off
        if ($urandom % 2 == 1) begin
          Address = AW'($urandom); Data = 8'($urandom); WrEna = 1; model[Address] = Data;
          @(posedge Clk); #1; WrEna = 0;
        end
      end
    // MemEna low: write ignored
    MemEna = 0; Address = 4'd2; Data = ~model[2]; WrEna = 1; @(posedge Clk); #1; WrEna = 0;
    MemEna = 1; RdEna = 1; @(posedge Clk); #1; RdEna = 0;
    checks++; if (MemOut !== model[2]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
