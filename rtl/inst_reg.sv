// inst_reg: instruction register of the BIST controller.
//
// Holds the microcode word being executed and fans its fields out as InstOp:
// InstOp[5:3] (Fo, Io, Lo) to the instruction pointer, InstOp[2] (I/D) to the
// address generator, InstOp[1] (R/W) to read/write control, InstOp[0] (data)
// to data control, InstOp[6] (valid) to the controller. Loads Inst on a rising
// edge with IREna high; Rst clears it (reset value is this design's choice).
module inst_reg
  import bisr_pkg::*;
(
  input  logic              Clk,
  input  logic              Rst,
  input  logic              IREna,
  input  logic [INST_W-1:0] Inst,
  output micro_t            InstOp
);

  always_ff @(posedge Clk) begin
    if (Rst)        InstOp <= '0;
    else if (IREna) InstOp <= micro_t'(Inst);
  end

endmodule
