// rl_array: redundancy array logic, i.e. the repair side of the BISR.
//
// It holds the BIRA (whose repair signature registers store the faulty word
// addresses found in test mode) and, for each signature register, one spare
// data register of DATA_W bits.
//  * Test mode: the BIRA takes the BIST's fail / faulty address / syndrome
//    and answers with cont. When it allocates signature register k, spare k is
//    loaded with CorrectData, the expected (fault-free) data of that word.
//  * Normal mode (RLAEna high): every external address AddrIn is compared with
//    the valid signature registers. Match is high on a hit. A write (WEna) on
//    a hit stores DataIn in the matching spare (the memory write is withheld by
//    the input multiplexer). A read (REna) registers the matching spare into
//    RLAOp and the hit into RLASel, one clock after the strobe, the same clock
//    the memory's read data appears; the output multiplexer uses RLASel.
// The word-wide spares and their compare-and-redirect behaviour follow the
// published description; loading a spare with the expected data at
// allocation and the register timing are this design's choices.
module rl_array #(
  parameter int unsigned ADDR_W     = 4,
  parameter int unsigned DATA_W     = 8,
  parameter int unsigned NUM_SPARES = 4,
  localparam int unsigned CNT_W     = $clog2(NUM_SPARES + 1),
  localparam int unsigned IDX_W     = (NUM_SPARES > 1) ? $clog2(NUM_SPARES) : 1
) (
  input  logic              Clk,
  input  logic              Rst,
  input  logic              RLAEna,
  // BIRA side (test mode)
  input  logic              start,
  input  logic              fail,
  input  logic              test_done,
  input  logic [ADDR_W-1:0] Faddr,
  input  logic [DATA_W-1:0] Syndrome,
  input  logic [DATA_W-1:0] CorrectData,
  output logic              cont,
  output logic              ra_finish,
  output logic              unrepairable,
  input  logic              prog,
  input  logic [CNT_W-1:0]  threshold,
  input  logic              shift_en,
  output logic              rsr_out,
  // normal-mode access
  input  logic [ADDR_W-1:0] AddrIn,
  input  logic [DATA_W-1:0] DataIn,
  input  logic              WEna,
  input  logic              REna,
  output logic              Match,
  output logic [DATA_W-1:0] RLAOp,
  output logic              RLASel
);

  logic [NUM_SPARES-1:0]             sig_valid;
  logic [NUM_SPARES-1:0][ADDR_W-1:0] sig_addr;
  logic                              alloc;
  logic [IDX_W-1:0]                  alloc_idx;
  logic [DATA_W-1:0]                 spare [NUM_SPARES];
  logic [IDX_W-1:0]                  hit_idx;

  bira #(.ADDR_W(ADDR_W), .DATA_W(DATA_W), .NUM_SPARES(NUM_SPARES)) u_bira (
    .Clk, .Rst, .start, .fail, .test_done,
    .faulty_address(Faddr), .faulty_syndrome(Syndrome),
    .cont, .ra_finish, .unrepairable, .prog, .threshold, .shift_en, .rsr_out,
    .sig_valid, .sig_addr, .alloc, .alloc_idx
  );

  // Address compare against the signature registers.
  always_comb begin
    Match   = 1'b0;
    hit_idx = '0;
    for (int i = 0; i < NUM_SPARES; i++)
      if (sig_valid[i] && sig_addr[i] == AddrIn) begin
        Match   = RLAEna;
        hit_idx = IDX_W'(i);
      end
  end

  always_ff @(posedge Clk) begin
    if (alloc) spare[alloc_idx] <= CorrectData;
    else if (Match && WEna) spare[hit_idx] <= DataIn;
  end

  always_ff @(posedge Clk) begin
    if (Rst) begin
      RLAOp  <= '0;
      RLASel <= 1'b0;
    end else if (RLAEna && REna) begin
      RLAOp  <= spare[hit_idx];
      RLASel <= Match;
    end
  end

endmodule
