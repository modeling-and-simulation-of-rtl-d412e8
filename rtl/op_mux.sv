// op_mux: output multiplexer of the repaired memory.
//
// Drives Output with the spare register data RLAOp when RLASel is high (the
// read address matched a signature register) and with the memory data MemOut
// otherwise. Both inputs arrive registered, one clock after the read strobe.
// Combinational. The selection by an address match follows the published
// description; the registered RLASel flag is this design's.
module op_mux #(
  parameter int unsigned DATA_W = 8
) (
  input  logic [DATA_W-1:0] MemOut,
  input  logic [DATA_W-1:0] RLAOp,
  input  logic              RLASel,
  output logic [DATA_W-1:0] Output
);

  assign Output = RLASel ? RLAOp : MemOut;

endmodule
