// tb_ip_mux: random test-collar and external inputs in both modes; checks
// which source reaches the memory and that a spare hit blocks a normal write.
module tb_ip_mux;
  logic TestMode, SpareHit;
  logic [3:0] Address, AddrIn, MemAddr;
  logic [7:0] Data, DataIn, MemData;
  logic WrEna, RdEna, WEna, REna, MemWr, MemRd;
  int checks = 0, failures = 0;

  ip_mux dut (.*);
  initial begin #10000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    for (int i = 0; i < 300; i++) begin
      TestMode = 1'($urandom); SpareHit = 1'($urandom);
      Address = 4'($urandom); AddrIn = 4'($urandom);
      Data = 8'($urandom); DataIn = 8'($urandom);
      WrEna = 1'($urandom); RdEna = 1'($urandom); WEna = 1'($urandom); REna = 1'($urandom);
      #1;
      checks++;
      if (TestMode) begin
        if (MemAddr !== Address || MemData !== Data || MemWr !== WrEna || MemRd !== RdEna) failures++;
      end else begin
        if (MemAddr !== AddrIn || MemData !== DataIn || MemWr !== (WEna && !SpareHit) || MemRd !== REna) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
