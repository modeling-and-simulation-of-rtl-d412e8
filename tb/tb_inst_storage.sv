// tb_inst_storage: checks the March SS program held by the instruction storage.
// The expected words are written out here from the instruction format (Valid,
// Fo, Io, Lo, I/D, R/W, Data) and the March SS element list, independently of
// the package constant. Also checks the registered read, IEna hold and reset.
module tb_inst_storage;
  logic       Clk = 0, Rst = 1, IEna = 0;
  logic [4:0] InstAddr = '0;
  logic [6:0] Inst;
  int checks = 0, failures = 0;

  inst_storage dut (.*);
  always #5 Clk = ~Clk;
  initial begin #20000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic logic [6:0] w(bit v, bit f, bit i, bit l, bit d, bit rw, bit dat);
    return {v, f, i, l, d, rw, dat};
  endfunction

  logic [6:0] exp_w [32];
  initial begin
    int k = 0;
    foreach (exp_w[j]) exp_w[j] = '0;
    exp_w[k++] = w(1,0,0,0,0,1,0);                                    // M0 w0
    for (int e = 1; e <= 4; e++) begin                                // M1..M4
      bit d, x;                                                        // dir, data of reads
      d = (e >= 3); x = (e % 2 == 0);
      exp_w[k++] = w(1,1,0,0,d,0,x);  // r
      exp_w[k++] = w(1,0,1,0,d,0,x);  // r
      exp_w[k++] = w(1,0,1,0,d,1,x);  // w
      exp_w[k++] = w(1,0,1,0,d,0,x);  // r
      exp_w[k++] = w(1,0,0,1,d,1,!x); // w inverse
    end
    exp_w[k++] = w(1,0,0,0,1,0,0);                                    // M5 r0
    exp_w[k]   = '0;                                                  // end

    @(posedge Clk); #1; Rst = 0;
    if (Inst !== 7'h00) failures++; checks++;
    for (int a = 0; a < 32; a++) begin
      InstAddr = 5'(a); IEna = 1;
      @(posedge Clk); #1;
      checks++;
      if (Inst !== exp_w[a]) begin failures++; $display("addr %0d got %h exp %h", a, Inst, exp_w[a]); end
    end
    // spot values printed in the reference waveform: word 5 = 7'h4B, word 2 = 7'h50
    checks++; if (exp_w[5] !== 7'h4B || exp_w[2] !== 7'h50) failures++;
    // hold with IEna low
    InstAddr = 5'd5; IEna = 1; @(posedge Clk); #1;
    IEna = 0; InstAddr = 5'd0; @(posedge Clk); #1;
    checks++; if (Inst !== 7'h4B) failures++;
    Rst = 1; @(posedge Clk); #1;
    checks++; if (Inst !== 7'h00) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
