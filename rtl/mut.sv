// mut: memory under test, a single-port RAM with modelled manufacturing faults.
//
// 2**ADDR_W words of DATA_W bits. Writes are synchronous: with MemEna and
// WrEna high, Data is stored at Address on the rising edge. Reads are
// registered: with MemEna and RdEna high, MemOut takes the word at Address on
// the rising edge and holds it until the next read. The storage array is not
// reset, as in a real RAM.
//
// Defects are modelled as stuck-at bits on the read path: for each of the
// NUM_FAULTS entries, the bits set in FAULT_MASK[i] of word FAULT_ADDR[i] read
// as the matching bits of FAULT_VAL[i], whatever was written. A mask of 0
// disables an entry. The default, word 4 always reading 8'hAA, reproduces the
// faulty memory of the reference simulation; the fault model itself is this
// design's choice.
module mut #(
  parameter int unsigned ADDR_W     = 4,
  parameter int unsigned DATA_W     = 8,
  parameter int unsigned NUM_FAULTS = 1,
  parameter logic [NUM_FAULTS-1:0][ADDR_W-1:0] FAULT_ADDR = {NUM_FAULTS{ADDR_W'(4)}},
  parameter logic [NUM_FAULTS-1:0][DATA_W-1:0] FAULT_MASK = {NUM_FAULTS{{DATA_W{1'b1}}}},
  parameter logic [NUM_FAULTS-1:0][DATA_W-1:0] FAULT_VAL  = {NUM_FAULTS{DATA_W'(8'hAA)}}
) (
  input  logic              Clk,
  input  logic              MemEna,
  input  logic              WrEna,
  input  logic              RdEna,
  input  logic [ADDR_W-1:0] Address,
  input  logic [DATA_W-1:0] Data,
  output logic [DATA_W-1:0] MemOut
);

  logic [DATA_W-1:0] ram [2**ADDR_W];
  logic [DATA_W-1:0] rd_word;

  // Apply the stuck-at bits of every fault entry that covers this address.
  always_comb begin
    rd_word = ram[Address];
    for (int i = 0; i < NUM_FAULTS; i++)
      if (FAULT_ADDR[i] == Address)
        rd_word = (rd_word & ~FAULT_MASK[i]) | (FAULT_VAL[i] & FAULT_MASK[i]);
  end

  always_ff @(posedge Clk) begin
    if (MemEna && WrEna) ram[Address] <= Data;
    if (MemEna && RdEna) MemOut <= rd_word;
  end

endmodule
