// tb_data_gen: checks all four input combinations of data control.
module tb_data_gen;
  logic DataEna, InstOp0;
  logic [7:0] Data;
  int checks = 0, failures = 0;

  data_gen dut (.*);
  initial begin #1000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {DataEna, InstOp0} = 2'(i);
      #1;
      checks++;
      if (Data !== ((i == 3) ? 8'hFF : 8'h00)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
