// fault_diag: fault diagnosis of the BIST.
//
// In the compare cycle of a read (FDEna high) it checks the word read from
// the memory, MemIn, against the expected byte from data control, Expected.
// The result is registered: Fault is a one-clock pulse on the edge after a
// mismatching compare, i.e. one clock after the read data arrived, so a run of
// faulty reads gives a train of positive pulses. With each pulse it latches
// the faulty address (Faddr), the expected, correct data (CorrectData) and the
// syndrome, the bitwise XOR of read and expected data; these hold until the
// next fault. The compare and the reported values follow the published
// description; the syndrome output and register timing are this design's.
module fault_diag #(
  parameter int unsigned ADDR_W = 4,
  parameter int unsigned DATA_W = 8
) (
  input  logic              Clk,
  input  logic              Rst,
  input  logic              FDEna,
  input  logic [DATA_W-1:0] MemIn,
  input  logic [DATA_W-1:0] Expected,
  input  logic [ADDR_W-1:0] Address,
  output logic              Fault,
  output logic [ADDR_W-1:0] Faddr,
  output logic [DATA_W-1:0] CorrectData,
  output logic [DATA_W-1:0] Syndrome
);

  logic mismatch;
  assign mismatch = FDEna && (MemIn != Expected);

  always_ff @(posedge Clk) begin
    if (Rst) begin
      Fault       <= 1'b0;
      Faddr       <= '0;
      CorrectData <= '0;
      Syndrome    <= '0;
    end else begin
      Fault <= mismatch;
      if (mismatch) begin
        Faddr       <= Address;
        CorrectData <= Expected;
        Syndrome    <= MemIn ^ Expected;
      end
    end
  end

endmodule
