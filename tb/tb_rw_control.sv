// tb_rw_control: checks all four input combinations of read/write control.
module tb_rw_control;
  logic RWEna, InstOp1, WrEna, RdEna;
  int checks = 0, failures = 0;

  rw_control dut (.*);
  initial begin #1000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {RWEna, InstOp1} = 2'(i);
      #1;
      checks++;
      if (WrEna !== (i == 3) || RdEna !== (i == 2)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
