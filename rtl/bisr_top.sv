// bisr_top: built-in self-repair (BISR) wrapper around an embedded memory.
//
// A microcoded BIST runs a March test (March SS by default) on the memory
// under test, a built-in redundancy analysis (BIRA) records every faulty word
// address in a signature register, and in normal operation accesses to those
// addresses are served from spare registers instead of the memory.
//
// Blocks: instruction pointer, instruction storage and instruction register
// (the BIST controller); address generator, data control and read/write
// control (the test collar); input multiplexer; memory under test; fault
// diagnosis; redundancy array logic with the BIRA; output multiplexer; and the
// state machine controller that sequences them all.
//
// Modes on ModeType: 1 runs the test and repair analysis (test_done, then
// ra_finish, or unrepairable when the faulty words outnumber the allowed
// spares); 2 is normal operation with repair; 0 and 3 are idle. In normal mode
// a read strobe (REna) at AddrIn gives Output one clock later; a write strobe
// (WEna) stores DataIn on the clock edge. Fault pulses once per miscompare in
// test mode, with Faddr / CorrectData holding the last fault. The repair
// signature shifts out on rsr_out while shift_en is high; prog with threshold
// limits the number of spares the analysis may use. Rst is synchronous and
// active high. The memory's modelled defects are the FAULT_* parameters (by
// default word 4 reads 8'hAA).
//
// The partitioning into these blocks and their connections follow the
// published BISR architecture; the controller's clock-by-clock sequence, the
// mode encoding beyond test (1) and normal (2), the number of spares and the
// fault model are this design's choices.
module bisr_top
  import bisr_pkg::*;
#(
  parameter int unsigned ADDR_W     = 4,
  parameter int unsigned DATA_W     = 8,
  parameter int unsigned IADDR_W    = 5,
  parameter int unsigned NUM_SPARES = 4,
  parameter imem_t       PROGRAM    = MARCH_SS,
  parameter int unsigned NUM_FAULTS = 1,
  parameter logic [NUM_FAULTS-1:0][ADDR_W-1:0] FAULT_ADDR = {NUM_FAULTS{ADDR_W'(4)}},
  parameter logic [NUM_FAULTS-1:0][DATA_W-1:0] FAULT_MASK = {NUM_FAULTS{{DATA_W{1'b1}}}},
  parameter logic [NUM_FAULTS-1:0][DATA_W-1:0] FAULT_VAL  = {NUM_FAULTS{DATA_W'(8'hAA)}},
  localparam int unsigned CNT_W     = $clog2(NUM_SPARES + 1)
) (
  input  logic              Clk,
  input  logic              Rst,
  input  mode_e             ModeType,
  // normal-mode memory port
  input  logic [ADDR_W-1:0] AddrIn,
  input  logic [DATA_W-1:0] DataIn,
  input  logic              REna,
  input  logic              WEna,
  output logic [DATA_W-1:0] Output,
  // test results
  output logic              Fault,
  output logic [ADDR_W-1:0] Faddr,
  output logic [DATA_W-1:0] CorrectData,
  output logic              test_done,
  // redundancy analysis
  output logic              ra_finish,
  output logic              unrepairable,
  input  logic              prog,
  input  logic [CNT_W-1:0]  threshold,
  input  logic              shift_en,
  output logic              rsr_out
);

  // controller
  logic TestMode, BistClr, IEna, IREna, InstEna, Over, AddrInit, AddrEna;
  logic DataEna, RWEna, FDEna, RLAEna, MemEna, fail, cont, bist_rst;
  // BIST and collar
  logic [IADDR_W-1:0] InstAddr;
  logic [INST_W-1:0]  Inst;
  micro_t             InstOp;
  logic [ADDR_W-1:0]  Address;
  logic               AddrLast;
  logic [DATA_W-1:0]  Data;
  logic               WrEna, RdEna;
  // memory
  logic [ADDR_W-1:0]  MemAddr;
  logic [DATA_W-1:0]  MemData, MemOut;
  logic               MemWr, MemRd;
  // diagnosis and repair
  logic [DATA_W-1:0]  Syndrome, RLAOp;
  logic               Match, RLASel;

  assign bist_rst = Rst || BistClr;

  smc u_smc (
    .Clk, .Rst, .ModeType, .InstOp, .AddrLast, .Fault, .cont,
    .TestMode, .BistClr, .IEna, .IREna, .InstEna, .Over, .AddrInit, .AddrEna,
    .DataEna, .RWEna, .FDEna, .RLAEna, .MemEna, .fail, .test_done
  );

  inst_ptr #(.IADDR_W(IADDR_W)) u_inst_ptr (
    .Clk, .Rst(bist_rst), .InstEna, .Over,
    .InstOp({InstOp.fo, InstOp.io, InstOp.lo}), .InstAddr
  );

  inst_storage #(.IADDR_W(IADDR_W), .PROGRAM(PROGRAM)) u_inst_storage (
    .Clk, .Rst(bist_rst), .IEna, .InstAddr, .Inst
  );

  inst_reg u_inst_reg (.Clk, .Rst(bist_rst), .IREna, .Inst, .InstOp);

  addr_gen #(.ADDR_W(ADDR_W)) u_addr_gen (
    .Clk, .Rst(bist_rst), .AddrInit, .AddrEna, .Dir(InstOp.dir), .Address, .AddrLast
  );

  data_gen #(.DATA_W(DATA_W)) u_data_gen (.DataEna, .InstOp0(InstOp.data), .Data);

  rw_control u_rw_control (.RWEna, .InstOp1(InstOp.wr), .WrEna, .RdEna);

  ip_mux #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_ip_mux (
    .TestMode, .SpareHit(Match),
    .Address, .Data, .WrEna, .RdEna,
    .AddrIn, .DataIn, .WEna, .REna,
    .MemAddr, .MemData, .MemWr, .MemRd
  );

  mut #(
    .ADDR_W(ADDR_W), .DATA_W(DATA_W), .NUM_FAULTS(NUM_FAULTS),
    .FAULT_ADDR(FAULT_ADDR), .FAULT_MASK(FAULT_MASK), .FAULT_VAL(FAULT_VAL)
  ) u_mut (
    .Clk, .MemEna, .WrEna(MemWr), .RdEna(MemRd), .Address(MemAddr), .Data(MemData),
    .MemOut
  );

  fault_diag #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_fault_diag (
    .Clk, .Rst(bist_rst), .FDEna, .MemIn(MemOut), .Expected(Data), .Address,
    .Fault, .Faddr, .CorrectData, .Syndrome
  );

  rl_array #(.ADDR_W(ADDR_W), .DATA_W(DATA_W), .NUM_SPARES(NUM_SPARES)) u_rl_array (
    .Clk, .Rst, .RLAEna,
    .start(BistClr), .fail, .test_done, .Faddr, .Syndrome, .CorrectData,
    .cont, .ra_finish, .unrepairable, .prog, .threshold, .shift_en, .rsr_out,
    .AddrIn, .DataIn, .WEna, .REna, .Match, .RLAOp, .RLASel
  );

  op_mux #(.DATA_W(DATA_W)) u_op_mux (.MemOut, .RLAOp, .RLASel, .Output);

endmodule
