// bisr_pkg: types and constants shared by the BISR blocks.
//
// The microcode word is the 7-bit March instruction: one memory operation per
// word. Field order, most significant bit first, is Valid, Fo (first op of a
// multi-operation element), Io (in-between op), Lo (last op), I/D (1 = walk the
// addresses downwards), R/W (1 = write) and Data (1 = all-ones byte). A word
// with Fo=Io=Lo=0 is a single-operation element; a word with Valid=0 ends the
// test. The bit fields and the March SS program follow the published
// instruction format; which instruction bit feeds which block (Inst[5:3] to the
// pointer, Inst[2] to the address generator, Inst[1] to read/write control and
// Inst[0] to data control) follows the block diagram.
package bisr_pkg;

  typedef struct packed {
    logic valid;  // 1 = executable word, 0 = end of test
    logic fo;     // first operation of a multi-operation element
    logic io;     // in-between operation
    logic lo;     // last operation
    logic dir;    // 1 = decreasing addresses
    logic wr;     // 1 = write, 0 = read and compare
    logic data;   // 1 = all-ones byte, 0 = all-zeros byte
  } micro_t;

  localparam int unsigned INST_W = $bits(micro_t);  // 7

  // Operating modes on ModeType. 1 (test) and 2 (normal with repair) are the
  // design's working modes; 0 and 3 leave everything idle.
  typedef enum logic [1:0] {
    MODE_IDLE   = 2'd0,
    MODE_TEST   = 2'd1,
    MODE_NORMAL = 2'd2,
    MODE_RSVD   = 2'd3
  } mode_e;

  // Instruction storage depth: 5-bit instruction address.
  localparam int unsigned IMEM_DEPTH = 32;
  typedef logic [INST_W-1:0] imem_t [IMEM_DEPTH];

  // March SS:  any(w0); up(r0,r0,w0,r0,w1); up(r1,r1,w1,r1,w0);
  //            down(r0,r0,w0,r0,w1); down(r1,r1,w1,r1,w0); any(r0); end.
  localparam imem_t MARCH_SS = '{
    7'b1000010,                                              // M0: w0
    7'b1100000, 7'b1010000, 7'b1010010, 7'b1010000, 7'b1001011, // M1
    7'b1100001, 7'b1010001, 7'b1010011, 7'b1010001, 7'b1001010, // M2
    7'b1100100, 7'b1010100, 7'b1010110, 7'b1010100, 7'b1001111, // M3
    7'b1100101, 7'b1010101, 7'b1010111, 7'b1010101, 7'b1001110, // M4
    7'b1000100,                                              // M5: r0
    7'b0000000,                                              // end of test
    7'd0, 7'd0, 7'd0, 7'd0, 7'd0, 7'd0, 7'd0, 7'd0, 7'd0
  };

endpackage
