// inst_ptr: instruction pointer of the BIST controller.
//
// Holds the address of the microcode word to fetch. On a rising edge with
// InstEna high it moves according to the Fo/Io/Lo bits of the word just
// executed (InstOp = {Fo, Io, Lo}) and Over, which the controller raises when
// the address generator has reached its last address:
//   Fo            : remember this word as the element start, go to the next word
//   Io            : next word
//   Lo            : Over ? next word : jump back to the element start
//   single (000)  : Over ? next word : stay on this word
// So a multi-operation element runs all its words on one address before the
// address moves, and a single-operation element repeats its word. The three
// moves (same, next, back) follow the published description; remembering the
// start address in a register is this design's way of finding "back".
module inst_ptr #(
  parameter int unsigned IADDR_W = 5
) (
  input  logic               Clk,
  input  logic               Rst,
  input  logic               InstEna,
  input  logic               Over,
  input  logic [2:0]         InstOp,     // {Fo, Io, Lo}
  output logic [IADDR_W-1:0] InstAddr
);

  logic [IADDR_W-1:0] elem_start;

  always_ff @(posedge Clk) begin
    if (Rst) begin
      InstAddr   <= '0;
      elem_start <= '0;
    end else if (InstEna) begin
      unique casez (InstOp)
        3'b1??: begin                       // first op
          elem_start <= InstAddr;
          InstAddr   <= InstAddr + 1'b1;
        end
        3'b01?:  InstAddr <= InstAddr + 1'b1;          // in-between op
        3'b001:  InstAddr <= Over ? InstAddr + 1'b1 : elem_start; // last op
        default: InstAddr <= Over ? InstAddr + 1'b1 : InstAddr;   // single op
      endcase
    end
  end

endmodule
