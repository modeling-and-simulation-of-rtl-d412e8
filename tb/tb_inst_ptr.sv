// tb_inst_ptr: drives the instruction pointer with the Fo/Io/Lo codes of a
// March program and random Over values and compares with a reference pointer.
module tb_inst_ptr;
  logic Clk = 0, Rst = 1, InstEna = 0, Over = 0;
  logic [2:0] InstOp = '0;
  logic [4:0] InstAddr;
  logic [4:0] ref_ptr, ref_start;
  int checks = 0, failures = 0;
  int n_back = 0, n_stay = 0;

  inst_ptr dut (.*);
  always #5 Clk = ~Clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    @(posedge Clk); #1; Rst = 0;
    ref_ptr = 0; ref_start = 0;
    checks++; if (InstAddr !== 0) failures++;
    for (int i = 0; i < 2000; i++) begin
      InstOp  = ($urandom % 4 == 0) ? 3'b000 : 3'(1 << ($urandom % 3));
      Over    = ($urandom % 3 == 0);
      InstEna = ($urandom % 4 != 0);
      @(posedge Clk); #1;
      if (InstEna) begin
        if (InstOp == 3'b100) begin ref_start = ref_ptr; ref_ptr++; end
        else if (InstOp == 3'b010) ref_ptr++;
        else if (InstOp == 3'b001) begin
          if (Over) ref_ptr++; else begin ref_ptr = ref_start; n_back++; end
        end else begin
          if (Over) ref_ptr++; else n_stay++;
        end
      end
      checks++;
      if (InstAddr !== ref_ptr) begin
        failures++; $display("step %0d got %0d exp %0d", i, InstAddr, ref_ptr);
      end
    end
    checks++; if (n_back == 0 || n_stay == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
