// inst_storage: microcode instruction storage of the BIST controller.
//
// A read-only store of IMEM_DEPTH microcode words holding the March algorithm.
// The contents are the PROGRAM parameter, March SS by default, so a different
// March algorithm needs only a different parameter value, not new logic. The
// read is registered: when IEna is high at a rising clock edge, Inst takes the
// word at InstAddr on that edge. Rst clears Inst to the end-of-test word.
// Holding the program in a parameter is this design's choice; the word format
// and the March SS contents follow the published instruction table.
module inst_storage
  import bisr_pkg::*;
#(
  parameter int unsigned IADDR_W = 5,
  parameter imem_t       PROGRAM = MARCH_SS
) (
  input  logic               Clk,
  input  logic               Rst,
  input  logic               IEna,
  input  logic [IADDR_W-1:0] InstAddr,
  output logic [INST_W-1:0]  Inst
);

  always_ff @(posedge Clk) begin
    if (Rst)       Inst <= '0;
    else if (IEna) Inst <= PROGRAM[int'(InstAddr) % IMEM_DEPTH];
  end

endmodule
