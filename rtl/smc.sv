// smc: state machine controller of the BISR.
//
// Decodes ModeType and switches the other blocks on and off.
//  * Idle (0 or 3): everything off, the memory disabled.
//  * Normal (2): the memory answers the external port; the redundancy array
//    is enabled (RLAEna) so faulty words are served from spares.
//  * Test (1): on entry, BistClr (one clock) restarts the instruction
//    pointer, instruction register, address generator and BIRA. Then every
//    microcode operation runs through these states, one clock each:
//      FETCH  IEna     instruction storage reads the word at the pointer
//      LOAD   IREna    instruction register takes it
//      DECODE          end word (valid = 0) -> DONE; on the first operation
//                      of a March element AddrInit loads the start address
//      EXEC   RWEna, DataEna, MemEna: the memory reads or writes
//      CHECK  FDEna, DataEna: (reads only) fault diagnosis compares
//      RESULT          (reads only) if Fault is high, pulse fail to the BIRA
//      PAUSE           wait for the BIRA's cont
//      NEXT   InstEna, Over = AddrLast: the pointer moves; after the last
//                      operation of an element at an address, AddrEna steps
//                      the address, or at the last address the next word
//                      starts a new element
//      DONE   test_done held until the mode changes
//    A write takes 5 clocks, a read 7, and each fault adds 2 clocks of pause
//    while the BIRA works. Leaving test mode aborts the test.
// The enable names and the pause/continue handshake follow the published
// architecture; the state sequence and its timing are this design's own.
module smc
  import bisr_pkg::*;
(
  input  logic   Clk,
  input  logic   Rst,
  input  mode_e  ModeType,
  input  micro_t InstOp,
  input  logic   AddrLast,
  input  logic   Fault,
  input  logic   cont,
  output logic   TestMode,
  output logic   BistClr,
  output logic   IEna,
  output logic   IREna,
  output logic   InstEna,
  output logic   Over,
  output logic   AddrInit,
  output logic   AddrEna,
  output logic   DataEna,
  output logic   RWEna,
  output logic   FDEna,
  output logic   RLAEna,
  output logic   MemEna,
  output logic   fail,
  output logic   test_done
);

  typedef enum logic [3:0] {
    S_IDLE, S_FETCH, S_LOAD, S_DECODE, S_EXEC, S_CHECK, S_RESULT, S_PAUSE,
    S_NEXT, S_DONE
  } sstate_e;

  sstate_e state, state_n;
  logic    elem_start, elem_start_n;
  logic    elem_end;

  // last operation of an element at this address: Lo word or single-op word
  assign elem_end = InstOp.lo || !(InstOp.fo || InstOp.io);
  assign TestMode = (ModeType == MODE_TEST);

  always_comb begin
    state_n      = state;
    elem_start_n = elem_start;
    BistClr  = 1'b0;
    IEna     = 1'b0;
    IREna    = 1'b0;
    InstEna  = 1'b0;
    Over     = 1'b0;
    AddrInit = 1'b0;
    AddrEna  = 1'b0;
    DataEna  = 1'b0;
    RWEna    = 1'b0;
    FDEna    = 1'b0;
    fail     = 1'b0;
    test_done = 1'b0;
    RLAEna   = (ModeType == MODE_NORMAL);
    MemEna   = (ModeType == MODE_NORMAL);

    if (!TestMode) begin
      state_n = S_IDLE;
    end else begin
      unique case (state)
        S_IDLE: begin
          BistClr      = 1'b1;
          elem_start_n = 1'b1;
          state_n      = S_FETCH;
        end
        S_FETCH: begin
          IEna    = 1'b1;
          state_n = S_LOAD;
        end
        S_LOAD: begin
          IREna   = 1'b1;
          state_n = S_DECODE;
        end
        S_DECODE: begin
          if (!InstOp.valid) begin
            state_n = S_DONE;
          end else begin
            if (elem_start) begin
              AddrInit     = 1'b1;
              elem_start_n = 1'b0;
            end
            state_n = S_EXEC;
          end
        end
        S_EXEC: begin
          RWEna   = 1'b1;
          DataEna = 1'b1;
          MemEna  = 1'b1;
          state_n = InstOp.wr ? S_NEXT : S_CHECK;
        end
        S_CHECK: begin
          DataEna = 1'b1;
          FDEna   = 1'b1;
          state_n = S_RESULT;
        end
        S_RESULT: begin
          if (Fault) begin
            fail    = 1'b1;
            state_n = S_PAUSE;
          end else begin
            state_n = S_NEXT;
          end
        end
        S_PAUSE: begin
          if (cont) state_n = S_NEXT;
        end
        S_NEXT: begin
          InstEna = 1'b1;
          Over    = AddrLast;
          if (elem_end) begin
            if (AddrLast) elem_start_n = 1'b1;
            else          AddrEna      = 1'b1;
          end
          state_n = S_FETCH;
        end
        S_DONE: begin
          test_done = 1'b1;
        end
        default: state_n = S_IDLE;
      endcase
    end
  end

  // The memory is enabled whenever the collar strobes it, and the BIST
  // never reports a new fault while it waits for the BIRA.
  a_mem_on_exec: assert property (@(posedge Clk) disable iff (Rst) RWEna |-> MemEna);
  a_no_fail_in_pause: assert property (@(posedge Clk) disable iff (Rst)
    state == S_PAUSE |-> !fail);

  always_ff @(posedge Clk) begin
    if (Rst) begin
      state      <= S_IDLE;
      elem_start <= 1'b1;
    end else begin
      state      <= state_n;
      elem_start <= elem_start_n;
    end
  end

endmodule
