# Built-in self-repair for a small embedded memory

Large embedded memories are rarely free of defects. This design lets a memory
find and repair its own faulty words:

1. A **built-in self-test (BIST)** runs a March test on the memory. The test
   is a microprogram: each 7-bit microcode word is one memory operation.
   The default program is March SS. Because the program is data, another
   March algorithm needs no new logic.
2. Each time a read returns the wrong value, the BIST pauses. It hands the
   faulty address to the **built-in redundancy analysis (BIRA)**. The BIRA
   stores each new faulty address in a *signature register*, then tells the
   BIST to continue.
3. In **normal operation**, every access is compared with the signature
   registers. A read or write to a faulty word goes to that word's *spare
   register* instead of the memory.

By default the memory has 16 words of 8 bits. There are four spares. The
memory model has one built-in defect: word 4 always reads `8'hAA`.

```
          +-----------+   +--------------+   +----------+
          | inst_ptr  |-->| inst_storage |-->| inst_reg |-- InstOp[6:0]
          +-----------+   +--------------+   +----------+      |
               ^ Over / InstEna                                 |
   ModeType  +-----+   enables   +----------+  +----------+  +------------+
   --------->| smc |------------>| addr_gen |  | data_gen |  | rw_control |
             +-----+             +----------+  +----------+  +------------+
              ^  | fail               |  Address     | Data       | WrEna/RdEna
         cont |  v                    v              v            v
   +------------------+   AddrIn/DataIn/WEna/REna  +--------+   +-----+  MemOut   +--------+
   |     rl_array     |--------------------------->| ip_mux |-->| mut |---------->| op_mux |--> Output
   |  bira + spares   |<-- Faddr/CorrectData ---+  +--------+   +-----+     |     +--------+
   +------------------+                         |                           |         ^
        |  RLAOp / RLASel                     +------------+   MemIn        |         |
        +-------------------------------------| fault_diag |<---------------+         |
        +---------------------------------------------------------------------------- +
```

## The microcode word

| bit | Inst[6] | Inst[5] | Inst[4] | Inst[3] | Inst[2] | Inst[1] | Inst[0] |
|-----|---------|---------|---------|---------|---------|---------|---------|
| name | valid | Fo | Io | Lo | I/D | R/W | data |
| 1 means | execute | first op of element | in-between op | last op | decreasing addresses | write | all-ones byte |

- `Fo = Io = Lo = 0` marks a single-operation element.
- A word with `valid = 0` ends the test.
- The fields go to different blocks. Inst[5:3] goes to the instruction
  pointer, Inst[2] to the address generator, Inst[1] to read/write control
  and Inst[0] to data control.
- `bisr_pkg::micro_t` is the struct for the word.

March SS is stored as 22 operation words and one end word (`bisr_pkg::MARCH_SS`):

| element | operations | words (hex) |
|---------|------------|-------------|
| M0 any order | w0 | 42 |
| M1 up | r0 r0 w0 r0 w1 | 60 50 52 50 4B |
| M2 up | r1 r1 w1 r1 w0 | 61 51 53 51 4A |
| M3 down | r0 r0 w0 r0 w1 | 64 54 56 54 4F |
| M4 down | r1 r1 w1 r1 w0 | 65 55 57 55 4E |
| M5 any order | r0 | 44 |
| end | | 00 |

The two "any order" elements use the I/D bit as coded: M0 runs upwards and M5
runs downwards.

## How a March element is executed

This is the part that makes an element of any length work. A
multi-operation element performs all of its operations on one address before
the address moves. The **instruction pointer** (`inst_ptr`) therefore moves
in one of three ways after each operation:

| word just executed | Over = 0 (more addresses) | Over = 1 (last address done) |
|---|---|---|
| Fo | remember this word as the element start; next word | same |
| Io | next word | next word |
| Lo | jump back to the element start | next word |
| single (000) | stay on this word | next word |

`Over` is the address generator's `AddrLast` flag, passed on by the
controller. This flag is high on address 15 when counting up and on address 0
when counting down. After the last operation of an element at an address, the
controller either steps the address (`AddrEna`) or, if this was the last
address, marks the next word as the start of a new element. The **address
generator** then loads 0 or 15 (`AddrInit`), depending on the new element's
I/D bit.

The **state machine controller** (`smc`) takes every operation through a
fixed sequence of states, one clock each:

```
FETCH  -> LOAD  -> DECODE -> EXEC -> [CHECK -> RESULT -> (PAUSE...)] -> NEXT
IEna      IREna    AddrInit  RWEna    FDEna    fail                     InstEna, Over,
                   (1st op)  DataEna                                    AddrEna
                             MemEna
```

- A write takes 5 clocks.
- A read takes 7 clocks. It adds a CHECK clock, where `fault_diag` compares
  the registered memory output with the expected byte, and a RESULT clock,
  where the registered `Fault` is seen.
- Each fault adds 2 clocks of PAUSE while the BIRA works.
- Starting the test costs 1 clock. Fetching and decoding the end word costs 3.

March SS on 16 words is 144 writes and 208 reads. That makes 2180 clocks
without faults. The default memory model gives 13 fault reports, all at word
4, so the test takes 2206 clocks.

The sequence spends clocks to keep every step visible and easy to check. Its
timing is this design's own choice. A pipelined controller could overlap the
fetch with the execute.

## Fault reporting and the repair analysis

- **`fault_diag`** registers the compare result. `Fault` is a one-clock pulse
  on the edge after the compare, so a run of faulty reads shows as a train of
  pulses.
- With each pulse, `fault_diag` latches three values: the faulty address
  `Faddr`, the expected data `CorrectData`, and the syndrome (read XOR
  expected). They hold until the next fault.

**`bira`** has three parts:

- A small FSM.
- A one-entry *local bitmap*. One entry is enough because the BIST waits on
  every fault.
- The *repair signature registers*, one `{valid, address}` pair per spare.

The handshake for one fault runs over three clocks:

1. The controller pulses `fail` in RESULT. The bitmap captures the address.
   It marks the entry valid only if the syndrome is non-zero.
2. In ANALYZE, the FSM compares the address with the stored signatures:
   - If the address is already stored, the word is already repaired and
     nothing changes.
   - Otherwise, if fewer than `threshold` registers are in use, the next
     register takes the address. An `alloc` pulse tells the spare array to
     load that spare with `CorrectData`.
   - Otherwise `unrepairable` is set. It stays set until the next test.
3. In CONT, `cont` pulses for one clock and the BIST resumes.

Other controls:

- **`ra_finish`** is high when the test is done, the FSM is idle and the
  bitmap is empty.
- **`threshold`** is the number of spares the analysis may use. It is loaded
  while `prog` is high and is clipped to `NUM_SPARES`. After reset it is
  `NUM_SPARES`. If a memory is reported unrepairable, raise the threshold and
  run the test again.
- **Signature read-out.** While `shift_en` is high (and the BIRA is idle),
  the signature registers rotate left by one bit per clock. `rsr_out` shows
  the bit that leaves the top. The order is register 0 first, each register
  as `{valid, address[3:0]}`, MSB first. After 20 clocks (4 × 5 bits) the
  registers are back in place. This lets an external tester or a fuse
  programmer read the repair without destroying it. Do not use normal mode
  during a partial rotation.

With word-wide spares, this one-spare-per-new-address rule is a complete
redundancy analysis. No row or column trade-off is needed.

## Normal operation with repair

In mode 2, the memory answers the external port:

- A read strobe `REna` at `AddrIn` gives `Output` one clock later.
- A write strobe `WEna` stores `DataIn` at the clock edge.

`rl_array` compares `AddrIn` with the valid signature registers (`Match`):

- **Write that hits:** the data goes into the matching spare. `ip_mux`
  withholds the memory's write strobe.
- **Read that hits:** the spare is registered into `RLAOp` and the hit into
  `RLASel`, in the same clock as the memory read. `op_mux` then gives the
  spare instead of the memory word.

## Top-level interface (`bisr_top`)

| port | dir | width | meaning |
|---|---|---|---|
| Clk, Rst | in | 1 | clock; synchronous active-high reset |
| ModeType | in | 2 (`mode_e`) | 0 idle, 1 test and repair analysis, 2 normal with repair, 3 idle |
| AddrIn, DataIn, REna, WEna | in | 4, 8, 1, 1 | normal-mode memory port |
| Output | out | 8 | read data, one clock after `REna` |
| Fault, Faddr, CorrectData | out | 1, 4, 8 | fault pulse and the last fault's address and expected data |
| test_done | out | 1 | the test has reached its end word (held while in test mode) |
| ra_finish, unrepairable | out | 1, 1 | repair analysis status |
| prog, threshold | in | 1, 3 | load the spare limit |
| shift_en, rsr_out | in/out | 1, 1 | serial repair-signature read-out |

How the modes behave:

- Entering mode 1 restarts the test from word 0 and clears the BIRA.
- Leaving mode 1 aborts a test.
- Idle disables the memory and every block.

### Parameters

| parameter | default | meaning |
|---|---|---|
| ADDR_W | 4 | memory address width (16 words) |
| DATA_W | 8 | memory word width; the test patterns are all-zeros and all-ones |
| IADDR_W | 5 | instruction address width (32-word storage) |
| NUM_SPARES | 4 | signature/spare register pairs (this design's choice) |
| PROGRAM | `MARCH_SS` | the 32 microcode words |
| NUM_FAULTS, FAULT_ADDR, FAULT_MASK, FAULT_VAL | 1, 4, 8'hFF, 8'hAA | modelled stuck-at defects of the memory |

### Running a different March algorithm

Pass a different `PROGRAM`, encoded as in the table above. Elements may have
any number of operations, and the whole program, including the end word, must
fit in 32 words. `tb/tb_bisr_march_c.sv` runs March C− this way.

## The memory model

`mut` is a single-port RAM with synchronous write and registered read. Its
array is not reset. Defects are stuck-at bits on the read path: the bits in
`FAULT_MASK[i]` of word `FAULT_ADDR[i]` always read as in `FAULT_VAL[i]`. A
mask of 0 disables an entry. For a real memory macro, replace `mut` and keep
its port timing.

## Verification

Every module has a self-checking testbench `tb/tb_<module>.sv`. The
system-level testbenches share `tb/bisr_tb_pkg.sv`. That package describes a
March algorithm as a list of elements, independently of the microcode. It
plays the algorithm on a model of the faulty memory and predicts every fault
report and the exact clock count.

| testbench | what it runs |
|---|---|
| `tb_bisr_top_full` | default parameters: full March SS test, signature read-out, normal-mode write/read of every word |
| `tb_bisr_top` | three defects (whole word, single stuck-1 bit, single stuck-0 bit): aborted test; test with threshold 2 (unrepairable); repeated test with threshold 4; signature check; random normal traffic. Counts each mechanism (pause/continue, allocation, repeated fault, jump-back, down sweep, spare read/write, shift, ...) and fails if one never happens |
| `tb_bisr_march_c` | March C− loaded through `PROGRAM` on the same hardware |

Run any of them with Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb \
  rtl/bisr_pkg.sv tb/bisr_tb_pkg.sv tb/tb_bisr_top.sv --top-module tb_bisr_top
./obj_dir/Vtb_bisr_top
```

Each testbench prints `TB_RESULT checks=N failures=M`. Each has a watchdog
and finishes in well under a second.

## Where this design makes its own choices

The following come from the original description:

- the microcode format and the March SS program
- the block partitioning
- the pause/continue handshake between BIST and BIRA
- the BIRA's port list
- word-wide spare registers that take over faulty addresses

The following are this design's choices:

- **Widths.** The memory size, 16 × 8 bits, comes from the 4-bit address
  bus of the block diagram and the byte-wide patterns. Some reference
  waveforms show 6-bit address buses; the 4-bit bus was followed.
- **Number of spares:** 4.
- **Mode encoding of 0 and 3.** 1 = test and 2 = normal follow the
  reference waveforms.
- **Controller timing:** the state sequence and clock counts above.
- **Register timing** of the fault pulse, the memory and the spare reads.
- **Redundancy analysis.** The analysis is the simple one for word spares;
  no more elaborate allocation algorithm is implemented.
- **Threshold.** It is the number of spares the analysis may use, loaded
  through `prog`.
- **Spare contents.** A spare is loaded with the expected test data when it
  is allocated.
- **Signature shift format.** The signature is shifted out in a circular
  format.
- **Added signals:** `AddrInit`/`AddrLast` between the controller and the
  address generator, and the syndrome port.
- **March SS program.** The word list follows the standard March SS. The
  fourth operation of M1 and M3 is a read of 0 (its code bits say so), even
  where a label could be read as "r1".
- **Signal name.** `program` is a SystemVerilog keyword, so the port is
  called `prog`. The BIRA's "continue" output is called `cont` for the same
  reason.
