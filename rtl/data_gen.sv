// data_gen: data control of the memory test collar.
//
// Produces the test byte for the current operation: all ones when InstOp0
// (the Data bit of the instruction) is 1, all zeros when it is 0. The same
// byte is the write data of a write and the expected data of a read. Data is
// 0 while DataEna is low (this design's choice). Combinational.
module data_gen #(
  parameter int unsigned DATA_W = 8
) (
  input  logic              DataEna,
  input  logic              InstOp0,
  output logic [DATA_W-1:0] Data
);

  assign Data = (DataEna && InstOp0) ? '1 : '0;

endmodule
