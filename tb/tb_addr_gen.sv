// tb_addr_gen: sweeps the address generator up and down with AddrInit and
// AddrEna and checks each address and the AddrLast flag.
module tb_addr_gen;
  localparam int AW = 4;
  logic Clk = 0, Rst = 1, AddrInit = 0, AddrEna = 0, Dir = 0;
  logic [AW-1:0] Address;
  logic AddrLast;
  int checks = 0, failures = 0;

  addr_gen #(.ADDR_W(AW)) dut (.*);
  always #5 Clk = ~Clk;
  initial begin #20000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic sweep(bit d);
    int a;
    Dir = d; AddrInit = 1; @(posedge Clk); #1; AddrInit = 0;
    a = d ? 2**AW - 1 : 0;
    for (int k = 0; k < 2**AW; k++) begin
      checks++;
      if (Address !== AW'(a) || AddrLast !== (k == 2**AW - 1)) begin
        failures++; $display("dir %0d k %0d addr %0d last %0d", d, k, Address, AddrLast);
      end
      // idle cycle: no change
      @(posedge Clk); #1;
      checks++; if (Address !== AW'(a)) failures++;
      AddrEna = 1; @(posedge Clk); #1; AddrEna = 0;
      a = d ? a - 1 : a + 1;
    end
  endtask

  initial begin
    @(posedge Clk); #1; Rst = 0;
    checks++; if (Address !== 0) failures++;
    sweep(0); sweep(1); sweep(1); sweep(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
