// rw_control: read/write control of the memory test collar.
//
// While RWEna is high it drives WrEna when InstOp1 (the R/W bit) is 1 and
// RdEna when it is 0; both are low otherwise. The controller raises RWEna for
// exactly the one clock of an operation's execute cycle. Combinational.
// The R/W bit meaning follows the published instruction format; gating by
// RWEna is the controller interface of this design.
module rw_control (
  input  logic RWEna,
  input  logic InstOp1,
  output logic WrEna,
  output logic RdEna
);

  assign WrEna = RWEna &&  InstOp1;
  assign RdEna = RWEna && !InstOp1;

endmodule
