// bira: built-in redundancy analysis.
//
// Three parts, as in the published block diagram: an FSM, a local bitmap and
// the repair signature registers (RSR).
//  * When the BIST finds a fault it pauses and pulses fail. The local bitmap
//    catches the fault (faulty_address, and a valid flag that is set only if
//    faulty_syndrome is non-zero).
//  * ANALYZE: the bitmap entry is checked against the signature registers. An
//    address already stored is already repaired and needs nothing. A new
//    address takes the next free signature register, with a one-clock alloc
//    pulse and its index so the spare array can load the spare word. If the
//    number of registers in use has reached threshold, unrepairable is set
//    (sticky until the next start).
//  * CONT: cont (the "continue" signal) pulses for one clock and the BIST
//    resumes; the bitmap is empty again.
//  * ra_finish is high once test_done is high, the FSM is idle and the bitmap
//    is clear.
// start (one clock) clears the bitmap, the signatures and unrepairable before
// a test. threshold, the number of spares the analysis may use, is loaded
// while prog (the "program" signal) is high and is NUM_SPARES after reset; lowering it or raising
// it again and repeating the test repeats the repair.
// With shift_en high and the FSM idle, the signature registers rotate left by
// one bit per clock and rsr_out shows the most significant bit: register 0
// first, each as {valid, address[ADDR_W-1:0]} MSB first. After
// NUM_SPARES*(ADDR_W+1) clocks the contents are back in place.
// The analysis is the simplest one for word-wide spares (one spare word per
// faulty address); the algorithm of the original analysis is not used here.
module bira #(
  parameter int unsigned ADDR_W     = 4,
  parameter int unsigned DATA_W     = 8,
  parameter int unsigned NUM_SPARES = 4,
  localparam int unsigned CNT_W     = $clog2(NUM_SPARES + 1),
  localparam int unsigned IDX_W     = (NUM_SPARES > 1) ? $clog2(NUM_SPARES) : 1
) (
  input  logic              Clk,
  input  logic              Rst,
  input  logic              start,
  // from the BIST
  input  logic              fail,
  input  logic              test_done,
  input  logic [ADDR_W-1:0] faulty_address,
  input  logic [DATA_W-1:0] faulty_syndrome,
  // to the BIST
  output logic              cont,
  // status and control
  output logic              ra_finish,
  output logic              unrepairable,
  input  logic              prog,
  input  logic [CNT_W-1:0]  threshold,
  input  logic              shift_en,
  output logic              rsr_out,
  // signature registers, to the spare array
  output logic [NUM_SPARES-1:0]             sig_valid,
  output logic [NUM_SPARES-1:0][ADDR_W-1:0] sig_addr,
  output logic              alloc,
  output logic [IDX_W-1:0]  alloc_idx
);

  localparam int unsigned ENT_W = ADDR_W + 1;
  localparam int unsigned RSR_W = NUM_SPARES * ENT_W;

  typedef enum logic [1:0] {B_IDLE, B_ANALYZE, B_CONT} bstate_e;

  bstate_e            state;
  logic               bm_valid;      // local bitmap: one pending fault
  logic [ADDR_W-1:0]  bm_addr;
  logic [RSR_W-1:0]   rsr;           // entry i at bits [RSR_W-1-i*ENT_W -: ENT_W]
  logic [CNT_W-1:0]   used;
  logic [CNT_W-1:0]   limit;
  logic               hit;

  always_comb begin
    for (int i = 0; i < NUM_SPARES; i++) begin
      sig_valid[i] = rsr[RSR_W-1-i*ENT_W];
      sig_addr[i]  = rsr[RSR_W-2-i*ENT_W -: ADDR_W];
    end
    hit = 1'b0;
    for (int i = 0; i < NUM_SPARES; i++)
      if (sig_valid[i] && sig_addr[i] == bm_addr) hit = 1'b1;
  end

  always_ff @(posedge Clk) begin
    if (Rst) limit <= CNT_W'(NUM_SPARES);
    else if (prog) limit <= (threshold > CNT_W'(NUM_SPARES)) ? CNT_W'(NUM_SPARES) : threshold;
  end

  always_ff @(posedge Clk) begin
    alloc <= 1'b0;
    if (Rst || start) begin
      state        <= B_IDLE;
      bm_valid     <= 1'b0;
      bm_addr      <= '0;
      rsr          <= '0;
      used         <= '0;
      unrepairable <= 1'b0;
      alloc_idx    <= '0;
    end else begin
      unique case (state)
        B_IDLE: begin
          if (fail) begin
            bm_valid <= (faulty_syndrome != '0);
            bm_addr  <= faulty_address;
            state    <= B_ANALYZE;
          end else if (shift_en) begin
            rsr <= {rsr[RSR_W-2:0], rsr[RSR_W-1]};
          end
        end
        B_ANALYZE: begin
          if (bm_valid && !hit) begin
            if (used < limit) begin
              rsr[RSR_W-1-int'(used)*ENT_W -: ENT_W] <= {1'b1, bm_addr};
              used      <= used + 1'b1;
              alloc     <= 1'b1;
              alloc_idx <= IDX_W'(used);
            end else begin
              unrepairable <= 1'b1;
            end
          end
          bm_valid <= 1'b0;
          state    <= B_CONT;
        end
        B_CONT:  state <= B_IDLE;
        default: state <= B_IDLE;
      endcase
    end
  end

  // Handshake rules: the BIST reports a fault only while the BIRA is idle,
  // and every cont answers a fail two clocks earlier.
  a_fail_when_idle: assert property (@(posedge Clk) disable iff (Rst || start)
    fail |-> state == B_IDLE);
  a_cont_after_fail: assert property (@(posedge Clk) disable iff (Rst || start)
    fail |=> ##1 cont);

  assign cont      = (state == B_CONT);
  assign ra_finish = test_done && (state == B_IDLE) && !bm_valid;
  assign rsr_out   = rsr[RSR_W-1];

endmodule
