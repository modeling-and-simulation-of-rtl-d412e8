// tb_inst_reg: loads random words into the instruction register and checks
// load on IREna, hold without it, the field split and reset.
module tb_inst_reg;
  import bisr_pkg::*;
  logic Clk = 0, Rst = 1, IREna = 0;
  logic [6:0] Inst = '0;
  micro_t InstOp;
  logic [6:0] held;
  int checks = 0, failures = 0;

  inst_reg dut (.*);
  always #5 Clk = ~Clk;
  initial begin #20000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    @(posedge Clk); #1; Rst = 0;
    checks++; if (InstOp !== '0) failures++;
    held = '0;
    for (int i = 0; i < 200; i++) begin
      Inst = 7'($urandom); IREna = 1'($urandom);
      @(posedge Clk); #1;
      if (IREna) held = Inst;
      checks++;
      if (InstOp !== held) failures++;
      checks++;
      if (InstOp.valid !== held[6] || InstOp.fo !== held[5] || InstOp.io !== held[4] ||
          InstOp.lo !== held[3] || InstOp.dir !== held[2] || InstOp.wr !== held[1] ||
          InstOp.data !== held[0]) failures++;
    end
    Rst = 1; @(posedge Clk); #1;
    checks++; if (InstOp !== '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
