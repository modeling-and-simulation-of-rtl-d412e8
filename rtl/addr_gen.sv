// addr_gen: address generator of the memory test collar.
//
// An up/down counter over the 2**ADDR_W words of the memory under test.
// AddrInit (high for one edge) loads the start address of a March element:
// 0 when Dir = 0 (increasing), all ones when Dir = 1 (decreasing). AddrEna
// (one edge) steps one word in the direction Dir. AddrLast is high while the
// address is the last one of the current direction. Dir is the I/D bit of the
// instruction register. The up/down addressing follows the published
// description; the separate AddrInit strobe and the AddrLast flag are this
// design's own.
module addr_gen #(
  parameter int unsigned ADDR_W = 4
) (
  input  logic              Clk,
  input  logic              Rst,
  input  logic              AddrInit,
  input  logic              AddrEna,
  input  logic              Dir,
  output logic [ADDR_W-1:0] Address,
  output logic              AddrLast
);

  always_ff @(posedge Clk) begin
    if (Rst)           Address <= '0;
    else if (AddrInit) Address <= Dir ? '1 : '0;
    else if (AddrEna)  Address <= Dir ? Address - 1'b1 : Address + 1'b1;
  end

  assign AddrLast = Dir ? (Address == '0) : (Address == '1);

endmodule
