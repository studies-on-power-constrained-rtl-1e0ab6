# Power-constrained test hardware: non-scan BIST data path and scan chain disable

When a chip is tested, many more nodes switch at once than in normal use.
The power drawn during test can exceed what the package and the power grid
are built for. That causes yield loss, heat damage or false failures. This
RTL implements two test architectures that keep test power under a limit
and still keep test time short:

1. **Non-scan built-in self-test (BIST) for an RTL data path.** Pattern
   generators and signature registers are added at the data path's own
   inputs, outputs and a few chosen registers. Each functional module
   (adder, multiplier, subtractor) gets its patterns through the normal
   data-path wiring. Some modules get a *thru function*, which lets a value
   pass through the module unchanged. No scan chain is used. Which modules
   are tested together (a *test session*) is chosen so that the power of a
   session stays under the peak-power budget. The example is the well-known
   Paulin data path (four modules, seven registers, eleven multiplexers).
2. **Low-power scan with scan chain disable.** The scan flip-flops are split
   into N short chains that share one scan input and one scan enable. In
   test mode a small clock controller clocks *only one chain at a time*, for
   shifting and for capture alike. A multiplexer routes that chain to the
   scan output. Only about 1/N of the flip-flops, and the logic they drive,
   switch in any clock cycle. Peak power and average power drop together.

The two parts share nothing. The top module `pctest_top` places them side by
side, each with its own clock, reset and pins.

## Contents

| file | what it is |
|---|---|
| `rtl/bist_pkg.sv` | shared types: register modes, register kinds, module operations, the Paulin control word, the feedback polynomial |
| `rtl/lfsr_tpg.sv` | test pattern generator (TPG), an LFSR |
| `rtl/misr_ra.sv` | response analyser (RA), a multiple-input signature register (MISR) |
| `rtl/bilbo_reg.sv` | BILBO register: load, hold, pattern generation, signature, shift, reset |
| `rtl/cbilbo_reg.sv` | concurrent BILBO: generates and compacts in the same clock |
| `rtl/test_reg.sv` | picks a plain register, a BILBO or a CBILBO through a parameter |
| `rtl/thru_unit.sv` | adder, subtractor or multiplier with an optional thru function |
| `rtl/paulin_nsbist.sv` | the Paulin data path with its non-scan BIST hardware |
| `rtl/scan_chain.sv` | one scan chain |
| `rtl/scan_clock_controller.sv` | decoder plus latch-based clock gates, one gated clock per chain |
| `rtl/scan_out_mux.sv` | picks the active chain for Scan-out |
| `rtl/scan_disable_core.sv` | N chains, the clock controller and the output multiplexer |
| `rtl/pctest_top.sv` | both architectures side by side |
| `tb/tb_*.sv` | self-checking testbenches: one per module, plus `tb_paulin_cbilbo` and `tb_scan_workloads` |
| `tb/scan_workload_run.sv` | one parameterised scan test run, used by `tb_scan_workloads` |
| `tb/paulin_ref.svh` | cycle-level reference model of the Paulin data path and the control words of the test sessions |

## Part 1: non-scan BIST of the Paulin data path

### Test registers

Every test register advances by the same internal-XOR (Galois) LFSR step:

    next = {s[W-2:0], 1'b0} ^ (s[W-1] ? POLY : 0)

At W = 32 the polynomial is x^32 + x^22 + x^2 + x + 1. It is primitive, so a
generator runs through all 2^32 − 1 non-zero states. A MISR applies the
same step and then XORs in its parallel input.

* **TPG** (`lfsr_tpg`): an autonomous LFSR at a primary input. It resets to 1
  and can be loaded with a seed. A zero seed is replaced by 1, so it can
  never lock up.
* **RA** (`misr_ra`): a MISR at a primary output. It resets to 0, and
  `clear` restarts the signature.
* **BILBO** (`bilbo_reg`): a data-path register that can also act as a TPG,
  a MISR or a shift register. Its mode comes from `bilbo_mode_e`:

  | mode | code | action |
  |---|---|---|
  | `BILBO_NORMAL` | 0 | load the functional input |
  | `BILBO_HOLD` | 1 | keep the value |
  | `BILBO_TPG` | 2 | step as an LFSR (an all-zero state is forced to 1) |
  | `BILBO_MISR` | 3 | compact the functional input |
  | `BILBO_SHIFT` | 4 | shift serially; `scan_in` enters bit 0, `scan_out` is the MSB |
  | `BILBO_RESET` | 5 | clear |
  | `BILBO_CONC` | 6 | CBILBO only: generate and compact together |

* **CBILBO** (`cbilbo_reg`): has two ranks. `q` is the generating rank and
  `signature` the compacting rank, so one register can drive and observe
  the same module at once. A plain BILBO cannot do that. It costs about
  twice the area.
* **Plain register**: load or hold only. Its serial input passes straight
  to its serial output.

`test_reg` picks the kind of each register from a parameter. The
`KIND` parameter of `paulin_nsbist` therefore selects, per register, what the
design-for-test step chose.

### Thru functions

A thru function lets a module pass one of its inputs to its output when
`thru = 1`. Two cheap forms are used:

* **adder**: `y = (a & ~thru) + b`. Masking the other operand to zero makes
  the adder pass `b`. This costs one AND gate per bit in front of the
  adder.
* **subtractor and multiplier**: `y = thru ? b : result`, a 2:1 mux after
  the operator.

All three thru functions pass the *right* operand `b`. The multiplier keeps
the low W bits of its product.

### Data path

Registers R1..R7 are W = 32 bits wide. Each multiplexer m1..m11 is 2:1.
`msel[k] = 0` selects the first input listed below. PI1' and PI2' are the
outputs of the test multiplexers (T_MUX) at the primary inputs. With
`tm = 1` each passes the pattern from its TPG instead of the pin.

| element | inputs (sel 0, sel 1) | drives |
|---|---|---|
| m5 | PI1', R6 | R5 |
| m4 | PI2', R2 | R4 |
| m6 | R3, R1 | Add.1 left |
| Add.1 | m6 + R5 (thru passes R5) | m3, m1 |
| m3 | Add.1, One | R3 |
| m1 | Add.1, One | R1 → PO1 → RA1 |
| m7 | R5, R3 | m8 |
| m8 | m7, R1 | Mult.1 left |
| Mult.1 | m8 × R4 (thru passes R4) | R6 (BILBO) |
| m9 | R5, R7 | Mult.2 left |
| m10 | R6, R2 | Mult.2 right |
| Mult.2 | m9 × m10 | R7 (BILBO) |
| m11 | R7, R2 | Sub.1 left |
| Sub.1 | m11 − R6 (thru passes R6) | m2 |
| m2 | Sub.1, One | R2 (BILBO) → PO2 → RA2 |

"One" is the constant 1. In normal operation the mux selects and the
load/hold of each register come from the data path's controller. In self-test
they come from a test sequencer, which also drives the TPGs, the RAs, the
T_MUXes, the BILBO modes and the thru lines. Neither controller is part of
this RTL. All of these lines form one packed struct,
`bist_pkg::paulin_ctrl_t`, which is a port of the data path and of the top.

For reading out BILBO signatures, R1..R7 are chained serially (R1 first, R7
last) between `bilbo_scan_in` and `bilbo_scan_out`. The chain is active when
the registers are set to `BILBO_SHIFT`.

### Test paths, and why the type-3 path is the subtle one

Every module under test needs a pattern source on each input and an
observation path from its output to a signature register. The test paths
fall into three types:

* **Type 1**: each input is fed by its own generator. This gives a full
  pattern every clock.
* **Type 2**: two inputs share one generator over paths of different
  sequential depth. The operands are then the same sequence shifted in time.
* **Type 3**: two inputs share one generator, and the path to one of them
  *loops through the module under test itself*, using its thru function.

Add.1 and Sub.1 are both tested over type-3 paths. The test alternates two
kinds of clock cycle:

| cycle | Add.1 | Sub.1 |
|---|---|---|
| thru (`thru_* = 1`) | passes the TPG1 pattern in R5 through m3 into R3 | passes the BILBO R6 pattern through m2 into R2 |
| compute (`thru_* = 0`) | `R3 + R5` through m1 into R1; R3 holds | `R2 − R6` (via m11) through m2 into R2 |

The generator advances every clock. So on a compute cycle the module sees
the previous pattern on one port (held in the feed-around register) and the
current pattern on the other. With the generator sequence p0, p1, … the
testbench checks, after every compute cycle j:

    PO1 = p[j-2] + p[j-1]
    PO2 = p[j-2] − p[j-1]

A new operand pair arrives only every second clock. That is why a type-3
test takes twice as long as a type-1 test of the same module. During the
feed-around cycles the feed-around register and the output register also
switch, which adds to the session's power.

### Test schedule

Under a 100-power-unit peak budget the modules are tested in two sessions.
The control words are the functions `ctrl_session1` and `ctrl_session2` in
`tb/paulin_ref.svh`:

| session | module | pattern sources | signature |
|---|---|---|---|
| 1 | Add.1 (type 3) | TPG1 through R5 | RA1 (PO1) |
| 1 | Sub.1 (type 3) | BILBO R6 | RA2 (PO2) |
| 2 | Mult.1 | TPG1 (R5 → m7 → m8), TPG2 (R4) | BILBO R6 |
| 2 | Mult.2 | TPG1 (R5 → m9), BILBO R2 (m10) | BILBO R7 |

The schedule is planned in abstract time units: 5 for an adder or
subtractor, 20 for a multiplier, and twice as long over a type-3 path. That
gives 10 units for session 1 and 20 for session 2, 30 in all. The two
sessions in the testbenches simply run a fixed number of clocks each.

After session 2 the BILBO signatures are shifted out serially. The RA
signatures are read on `sig1` and `sig2`. The budget and the power figures
of each element are design-time estimates that decide the schedule. The
hardware itself neither measures nor limits power.

### Timing

All registers, TPGs and RAs act on the rising edge of `clk`. The muxes and
modules are combinational, so a pattern launched from a register is
compacted at the next edge. `rst_n` is asynchronous and active low. It
clears every register and signature and sets the TPGs to 1.

## Part 2: scan chain disable

### Chains

`scan_disable_core` has NUM_FF flip-flops (default 32) split into N_CHAINS
(default 4) chains of LEN = ⌈NUM_FF / N_CHAINS⌉ cells. Flip-flop j sits in
chain j / LEN at position j % LEN. Grouping flip-flops into chains is a
design-time step: the circuit's flip-flops are wired to the `ppi`/`ppo`
indices in the grouped order. When N_CHAINS does not divide NUM_FF, the last
chain is padded with cells that capture 0, so every chain takes LEN clocks to
load. The combinational logic of the circuit under test sits outside the
core. It reads the flip-flop values on `ppi` and returns the next state on
`ppo`. In each chain, `scan_in` enters cell 0 and the last cell drives the
chain's output.

### Clock controller

`scan_clock_controller` makes one gated clock per chain:

    enable[k]   = !tc || (cs == k)        // decoder
    latch[k]    = enable[k] while clk is low, held while clk is high
    chain_clk[k] = clk & latch[k]

In normal mode (`tc = 0`) every chain is clocked, and the circuit behaves as
an ordinary full-scan design. In test mode (`tc = 1`) only chain `cs` gets
clock edges. This holds for shifting (`scan_en = 1`) and for capture
(`scan_en = 0`) alike. The other chains keep their contents, and the logic
they feed sees no change. The latch is the standard clock-gating latch. It
samples the enable only while the clock is low, so changing `tc` or `cs`
while `clk` is high cannot cut a clock pulse short or add a glitch. Change
`tc` and `cs` while `clk` is low; the new choice then applies from the next
rising edge. An assertion flags an out-of-range `cs` in test mode. Such a
value clocks no chain.

`scan_out_mux` puts the output of chain `cs` on `scan_out`.

### Test procedure and test time

The test vectors are grouped into *D-compatible subsets*. Within a subset,
consecutive vectors differ only in the bits of one chain, the subset's active
chain. A test runs as follows:

1. For the first vector of a subset, load all N chains, one after another
   (N·LEN shift clocks, `cs` stepping through the chains).
2. Select the subset's active chain and capture with `scan_en = 0`: one
   clock, only that chain captures.
3. For each further vector of the subset, shift only the active chain
   (LEN clocks). The captured response leaves on `scan_out` while the next
   vector's bits for that chain enter. Then capture again.
4. After the last capture, shift the active chain out (LEN clocks).

With F flip-flops, N chains, M subsets and n + r vectors in all (n original
vectors plus r added to build the subsets), the test takes

    TAT = M·⌈F/N⌉·(N−1) + (n + r + 1)·(⌈F/N⌉ + 1) − 1   clock cycles.

Two checks of the formula are run in the testbenches:

* F = 4, N = 2, three vectors in two subsets: 2·2·1 + 4·3 − 1 = 23 clocks
  (`tb_scan_disable_core`).
* F = 32, N = 4, seven vectors in three subsets: 3·8·3 + 8·9 − 1 = 143 clocks
  (`tb_pctest_top`).

Test time is traded against power. More chains mean fewer flip-flops switch
at once, but each subset's first vector costs the same N·LEN load. Choosing N
and the grouping belongs to test generation, not to the hardware.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and ends with `$finish`. Each has a
watchdog that counts a failure if the run does not finish in time.

* Test registers: compared bit for bit with a reference LFSR/MISR step
  (multiplication by x modulo the polynomial), including seed loading, the
  zero-seed rule, every BILBO mode and the CBILBO's concurrent mode.
* `tb_thru_unit`: all three operators, with and without thru, on random
  operands.
* `tb_paulin_nsbist`: normal operation, 400 clocks of random control words
  compared with the reference model in `paulin_ref.svh`, both test sessions
  with the type-3 results checked on every compute cycle, and the serial
  unload of the BILBOs.
* `tb_paulin_cbilbo`: builds the data path with R1 and R2 as CBILBOs and
  R4..R7 as BILBOs through the `KIND` parameter. It tests Add.1 with CBILBO R1
  both generating and compacting in the same clocks, then Sub.1, Mult.1 and
  Mult.2. It checks the outputs every clock and the serially shifted
  signatures bit by bit against a model in the testbench.
* Scan parts: shifting, the output multiplexer, the gated clocks (no clock
  on an unselected chain, no short pulses when `cs` changes), and the
  complete small test procedure, with its cycle count and a check that no
  flip-flop outside the active chain ever toggles in test mode.
* `tb_scan_workloads`: runs the scan core at 32, 29, 18, 74, 211 and 669
  flip-flops, the full-scan sizes of the ISCAS89 circuits s838 to s13207, each
  with 2, 3 and 4 chains (21 runs in parallel). The circuits' logic is
  replaced by a stand-in function. Each run uses a random 12-vector test set
  in 4 D-compatible subsets. It checks every output bit, the test-time
  formula, and that at most ⌈F/N⌉ flip-flops change per clock. At 32
  flip-flops that bound means 50.0 %, 65.6 % and 75.0 % lower peak
  flip-flop activity than a single chain.
* `tb_pctest_top`: runs the top at its default sizes (W = 32, 32 flip-flops,
  4 chains). The data path runs normal operation, random control, both
  sessions, a thru chain TPG2 → R4 → Mult.1 → R6 → Sub.1 → R2 → RA2, and the
  unload. Alongside it the scan core runs the seven-vector, three-subset
  test against a stand-in logic function, and the cycle count is checked
  against the formula. The testbench counts how often each mechanism occurs
  and fails on any that never does: shift clocks, one-chain captures,
  normal-mode captures, subset reloads, chain switches, TPG and RA clocks,
  BILBO pattern, signature and shift clocks, each of the three thru
  functions, and both T_MUXes.

## Simulating

With Verilator 5, for example the full-size end-to-end test:

    verilator --binary --timing -Irtl -Itb -y rtl -y tb \
        rtl/bist_pkg.sv tb/tb_pctest_top.sv --top-module tb_pctest_top
    ./obj_dir/Vtb_pctest_top

Any other testbench builds the same way: put its name in place of
`tb_pctest_top`. List `bist_pkg.sv` first, because the Paulin modules import
it. Every testbench finishes in well under a second.

## Choices made here, and where the design departs from its source

* **Multiplexer inputs.** The figure of the data path was the only source
  for the eleven multiplexers. Where its lines could not be traced with
  certainty, the inputs were chosen so that every test path named for the
  design exists. That covers the type-3 loops of Add.1 and Sub.1, TPG1 and
  TPG2 reaching Mult.1 with R6 as its signature register, and TPG1 and R2
  reaching Mult.2 with R7 as its signature register. The operand order of
  Sub.1 (m11 − R6) was chosen the same way.
* **Sub.1's thru port.** The source's drawing of the PI/PO-only variant of
  this data path marks Sub.1's thru arrow on the m11 side. Here the R6 port
  passes through instead, because with the multiplexer inputs above only
  that choice closes the type-3 loop R6 → Sub.1 → R2 → m11 → Sub.1.
* **Thru functions** on Add.1, Mult.1 and Sub.1 are kept in the BIST
  configuration, although its drawing does not label them: the type-3
  tests of Add.1 and Sub.1 need them. Mult.2 has none.
* **Polynomial, seeds and reset values** are this design's own choices (TPG2
  seed `32'h2F5A_11C3`).
* **Multiplier width**: the products keep the low 32 bits.
* **Serial BILBO read-out path** R1 → … → R7 is an addition of this design,
  made so that the internal signatures can be read.
* **Scan padding**: when F is not a multiple of N, this design pads the last
  chain. The test-time formula assumes equal chains of ⌈F/N⌉ cells, which
  padding provides.
* **Not built**: the data path's controller, the BIST test sequencer, the
  tester, and the algorithms that choose test registers, thru functions,
  the schedule, the flip-flop grouping and the vector subsets. Those are
  design-time or off-chip steps. Their results enter this RTL as the `KIND`
  parameter, the control word and the tester-driven scan pins. Solutions
  that put more T_MUXes or thru functions into the same data path need
  wiring this RTL does not have; only the register kinds can be changed
  by a parameter. The other
  data paths used to compare these techniques (filters and the like) are
  not included: only the Paulin data path's structure is specified fully
  enough to build.
