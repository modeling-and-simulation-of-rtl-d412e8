// tb_op_mux: random data on both inputs, checks the selected one.
module tb_op_mux;
  logic [7:0] MemOut, RLAOp, Output;
  logic RLASel;
  int checks = 0, failures = 0;

  op_mux dut (.*);
  initial begin #10000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    for (int i = 0; i < 200; i++) begin
      MemOut = 8'($urandom); RLAOp = 8'($urandom); RLASel = 1'($urandom);
      #1;
      checks++;
      if (Output !== (RLASel ? RLAOp : MemOut)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
