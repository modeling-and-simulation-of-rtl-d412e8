// tb_fault_diag: random compares; checks that Fault pulses one clock after a
// mismatching compare cycle only, and that Faddr, CorrectData and Syndrome
// hold the values of the last fault.
module tb_fault_diag;
  logic Clk = 0, Rst = 1, FDEna = 0;
  logic [7:0] MemIn = '0, Expected = '0;
  logic [3:0] Address = '0;
  logic Fault;
  logic [3:0] Faddr;
  logic [7:0] CorrectData, Syndrome;
  logic exp_f;
  logic [3:0] exp_a;
  logic [7:0] exp_c, exp_s;
  int checks = 0, failures = 0, n_fault = 0;

  fault_diag dut (.*);
  always #5 Clk = ~Clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    @(posedge Clk); #1; Rst = 0;
    checks++; if (Fault !== 0 || Faddr !== 0) failures++;
    exp_a = 0; exp_c = 0; exp_s = 0;
    for (int i = 0; i < 500; i++) begin
      FDEna = 1'($urandom); Address = 4'($urandom);
      Expected = ($urandom % 2) ? 8'hFF : 8'h00;
      MemIn = ($urandom % 3 == 0) ? Expected ^ 8'(1 << ($urandom % 8)) : Expected;
      if ($urandom % 7 == 0) MemIn = 8'hAA;
      exp_f = FDEna && (MemIn != Expected);
      if (exp_f) begin exp_a = Address; exp_c = Expected; exp_s = MemIn ^ Expected; n_fault++; end
      @(posedge Clk); #1;
      checks++;
      if (Fault !== exp_f || Faddr !== exp_a || CorrectData !== exp_c || Syndrome !== exp_s) begin
        failures++; $display("i %0d fault %0d/%0d", i, Fault, exp_f);
      end
    end
    FDEna = 0; @(posedge Clk); #1;
    checks++; if (Fault !== 0) failures++;
    checks++; if (n_fault == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
