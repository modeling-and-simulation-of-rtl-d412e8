// ip_mux: input multiplexer of the memory under test.
//
// In test mode (TestMode = 1) the memory takes its address, write data and
// strobes from the test collar (address generator, data control, read/write
// control). Otherwise it takes them from the external port. In normal mode a
// write whose address matches a signature register (SpareHit) goes to the spare
// register instead, so the write strobe to the memory is withheld; reads still
// go to the memory and the output multiplexer picks the spare data.
// Combinational. TestMode comes from the mode input via the controller.
// Test/normal switching follows the published description; withholding the
// memory write on a spare hit is this design's reading of "instead of
// storing data in the faulty location".
module ip_mux #(
  parameter int unsigned ADDR_W = 4,
  parameter int unsigned DATA_W = 8
) (
  input  logic              TestMode,
  input  logic              SpareHit,
  // test collar
  input  logic [ADDR_W-1:0] Address,
  input  logic [DATA_W-1:0] Data,
  input  logic              WrEna,
  input  logic              RdEna,
  // external port
  input  logic [ADDR_W-1:0] AddrIn,
  input  logic [DATA_W-1:0] DataIn,
  input  logic              WEna,
  input  logic              REna,
  // to the memory
  output logic [ADDR_W-1:0] MemAddr,
  output logic [DATA_W-1:0] MemData,
  output logic              MemWr,
  output logic              MemRd
);

  always_comb begin
    if (TestMode) begin
      MemAddr = Address;
      MemData = Data;
      MemWr   = WrEna;
      MemRd   = RdEna;
    end else begin
      MemAddr = AddrIn;
      MemData = DataIn;
      MemWr   = WEna && !SpareHit;
      MemRd   = REna;
    end
  end

endmodule
