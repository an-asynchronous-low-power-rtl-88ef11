# Asynchronous QDI Viterbi decoder (rate 1/2, K = 4)

A hard-decision Viterbi decoder for a rate-1/2 convolutional code, organised
as an asynchronous, quasi-delay-insensitive (QDI) pipeline. There is no global
clock driving the datapath. Three stages work in a chain: branch metrics (BMU),
add-compare-select (ACS) and survivor memory (SMU). They pass each received
symbol on as a dual-rail token and hand it over with local request/acknowledge
handshakes. The stages follow the precharge half buffer (PCHB) template:
a stage computes once, holds its result until the next stage has taken it,
then returns to a spacer. A stage has no pipeline register; its output wires
are its storage. The decoded bits leave through a two-phase micropipeline of
capture-pass latches.

The architecture follows a published asynchronous QDI Viterbi decoder built
from PCHB and WCHB (weak-conditioned half buffer) templates in DCVS
(differential cascode voltage switch) logic. This RTL keeps its block
structure, handshakes, dual-rail coding and survivor scheme. It replaces
the transistor circuits with gate-level logic and a timing emulation (next
section). The departures are listed at the end.

## How the asynchrony is modelled

Everything that holds state in the original circuit is written as a
flip-flop on an emulation clock `clk`: a Muller C-element with its keeper, a
capture-pass latch, a T flip-flop, and the output keeper of a PCHB gate.
Everything else is combinational dual-rail logic. So every handshake
transition costs exactly one `clk` cycle, and the design simulates in any
two-state simulator and synthesises as ordinary logic. `clk` is not a
datapath clock. Nothing moves on it unless the handshakes allow it, and
a stage waits any number of cycles for its neighbours. Treat cycle counts as
transition counts, not as the speed of a real self-timed circuit.

### Dual-rail tokens

Each data bit between stages is a pair `{t, f}` (`vit_pkg::dr_t`):

| code | meaning |
|------|---------|
| `00` | spacer (null, precharged) |
| `10` | valid 1 |
| `01` | valid 0 |
| `11` | illegal (assertions flag it) |

A word is *valid* when all its bits are valid and *null* when all are spacers.
A completion detector (`completion_detector`) reports 1 once the word is
valid and 0 once it is null, and holds in between. It is an OR per bit joined by
a C-element.

### One PCHB stage

Each stage `i` has a left completion detector (LCD, on its input) and a
right completion detector (RCD, on its output), joined by a C-element
`C_i` with an inverted output (`pchb_ctrl`):

    en_i  = NOT C(LCD_i, RCD_i)     stage enable, and acknowledge to stage i-1
    pc_i  = en_(i+1)                precharge control from the next stage

The output keeper (`pchb_out_reg`) behaves like the series pc/en transistor
pairs of a PCHB gate:

* evaluate when `pc & en`: the output is still null and the function is
  fully valid, so the result is captured;
* precharge when `!pc & !en`: the output returns to null;
* otherwise hold.

One token therefore goes through this sequence: input valid, LCD rises, the
stage evaluates, RCD rises, `C_i` rises, `en_i` falls (acknowledge left). The
next stage evaluates and drops its own enable (`pc_i` falls). Stage `i`
precharges, and once its input is also null `C_i` falls and `en_i` rises
for the next token.

### Decoder pipeline

    rx (2 dual-rail bits) ──► BMU ──► ACS ──► SMU ──► WCHB ──► 4→2-phase bridge ──► latch shift register ──► dout/rout
                              ▲        │  ▲
                              │        ▼  │
                             C1/LCD1/RCD1   PMM (path metric memory)

* **BMU** (`bmu`): each of the 2^(K-1) states has two branch metric
  circuits, one for its upper branch and one for its lower branch.
  Dual-rail XOR gates compare the received symbol with the branch's code
  symbol. A 4-bit T flip-flop counter (`tff_counter`) counts the differing
  bits, stepping once per code bit, so a metric is ready 2 cycles after
  evaluation starts. The counters are cleared in the precharge phase.
* **ACS** (`acs_unit`, one per state): two dual-rail ripple-carry adders
  (`dr_ripple_adder`: a half adder and full adders, 4-bit operands, 5-bit
  result) form branch metric plus predecessor path metric for both branches.
  A 5-bit comparator (`dr_comparator`) sets the decision bit to 1 when the
  lower candidate is strictly smaller. Five dual-rail 2:1 selectors
  (`dr_mux2`) pass the winner on as the new metric `f`. The ACS stage holds
  `{decision, f}` for all states in one PCHB keeper.
* **PMM** (`pm_memory`): when the ACS output is captured, the new metrics
  minus their minimum are written back, clamped to 15, so they fit the 4-bit
  adder inputs. For K = 4 the spread between metrics never exceeds 6.
* **SMU** (`smu`): see the next section.

### Trellis convention

The state holds the last K-1 input bits, newest in the most significant bit.
State `s` is entered from `{s[K-3:0], 0}` (upper branch) and from
`{s[K-3:0], 1}` (lower branch). The encoder window on that branch is
`{s, b}`, and code bit `j` is the parity of the window ANDed with generator
`Gj`, whose most significant tap is the newest input. `rx[0]` carries the bit
of `G0`. The generators default to 17 and 15 (octal), a common optimal pair
for K = 4. The original design does not name its generators.

## Survivor memory: minimum-metric pointer instead of traceback

The survivor memory uses a modified register exchange. It does not trace
back and keeps no survivor register per state. A pointer (`min_pm_pointer`)
names the state with the smallest new path metric, ties going to the lowest
index. The decision bit of that state is the decoded bit: 1 if its lower
branch survived, 0 if the upper. A tree of K-1 levels of dual-rail 2:1
multiplexers, steered by the pointer bits, selects that bit. With the trellis
convention above, a state's decision is the oldest bit of its window, so:

> the decoded bit for received symbol *t* is the input bit of symbol
> *t*−(K−1) on the currently best path.

The first K-1 output bits therefore belong to the all-zero start state.
The decision depth is only K-1 symbols, much less than the 5K of a
conventional decoder. Error-free stretches decode exactly, but errors often get through. In the
end-to-end testbench, about 35 of 400 symbols are corrupted. Depending on the
seed, 12 to 35 of the 397 decoded bits then differ from the message. The
testbench checks the exact behaviour against a reference model of this
algorithm and prints that count. Use the decoder for the architecture. It
does not give textbook error rates.

The selected bit is held by the SMU stage's PCHB keeper. It then goes
through one WCHB buffer (`wchb_buffer`: one C-element per rail, gated by
the inverted right acknowledge) and a small bridge (`dr_to_bundled`) from
four-phase dual-rail to two-phase bundled data. From there it enters the
**latch shift register** (`smu_shift_register`). That is a Sutherland
micropipeline of 8 capture-pass latches (`capture_pass_latch`), each with a
C-element that joins the request from the left and the inverted pass-done
of its own latch. A latch is transparent while its capture and pass lines
agree. After a capture event it holds until the next stage's capture comes
back as its pass event. Up to 8 decoded bits wait there when the consumer is
slow, and then the whole pipeline stalls back to `lack`.

## Interface of `async_viterbi_decoder`

| port | dir | meaning |
|------|-----|---------|
| `clk` | in | emulation clock for all state elements |
| `rst_n` | in | asynchronous active-low reset: all handshakes idle, metrics 0 (state 0) and 8 (others) |
| `rx[1:0]` | in | received symbol, two dual-rail bits |
| `lack` | out | stage-1 enable: high = ready for a symbol |
| `dout` | out | decoded bit offered on the last `rout` transition |
| `rout` | out | toggles once per decoded bit |
| `aout` | in | set equal to `rout` to take the bit |

Input protocol (four-phase, return to zero): wait for `lack` high, drive a
valid `rx`, wait for `lack` low, drive `rx` to `00`/`00`, repeat. Output
protocol (two-phase): when `rout != aout`, read `dout`, then make
`aout = rout`.

With an environment that answers at once, the first decoded bit is offered
22 `clk` cycles after the first symbol was driven. After that the decoder
accepts one symbol every 9 cycles. The limit is the BMU stage's handshake
loop: input detection, 2 counting cycles, output detection, the C-element,
and the producer's return to null, each in both phases. Both numbers are
checked by the end-to-end testbench.

Parameters: `K` (constraint length, default 4), `PM_W` (metric width and
adder operand width, 4), `SR_DEPTH` (latches in the output shift register,
8), `G0`/`G1` (generators, 17/15 octal). K = 5, 6 and 7 (16 to 64 states)
work when given matching generators; the K-sweep testbench runs them with
23/35, 53/75 and 171/133.

## Files

`rtl/` holds one unit per file:

* `vit_pkg.sv`: dual-rail type and helpers, default constants.
* Handshake primitives: `c_element`, `completion_detector`, `pchb_ctrl`,
  `pchb_out_reg`, `wchb_buffer`, `capture_pass_latch`, `dr_to_bundled`.
* Dual-rail gates: `dcvs_xor2`, `dcvs_and2`, `dr_mux2`, `dr_full_adder`,
  `dr_ripple_adder`, `dr_comparator`.
* Units: `tff_counter`, `bmu`, `acs_unit`, `pm_memory`, `min_pm_pointer`,
  `smu_shift_register`, `smu`.
* Top: `async_viterbi_decoder`.

`tb/` holds one self-checking testbench per unit (`tb_<unit>.sv`), the
end-to-end test `tb_async_viterbi_decoder.sv` (default parameters, 400
symbols with injected errors, random output back-pressure, and the
22-cycle latency), and `tb_viterbi_k_sweep.sv` with its harness
`viterbi_k_run.sv` (K = 5, 6, 7), and `tb_example_sequence.sv`, which feeds
the four-symbol example `00 00 11 10`. Each prints
`TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb rtl/vit_pkg.sv \
        tb/tb_async_viterbi_decoder.sv --top-module tb_async_viterbi_decoder
    ./obj_dir/Vtb_async_viterbi_decoder

Replace the testbench name to run any other test. All tests finish in well
under a second. Lint a unit with
`verilator --lint-only -Wall -Irtl rtl/vit_pkg.sv rtl/<unit>.sv`.
Some `UNUSEDSIGNAL` warnings on the LCD/RCD outputs remain: they are
brought out for observation only.

## Where this differs from the original design, and why

* **Timing.** The original is self-timed transistor logic. Here, state
  elements are flip-flops on an emulation clock. The protocol is the same,
  but the physical speed (the original reports about 475 MHz average over
  K = 4 to 7) and the power comparison with a synchronous decoder cannot
  be reproduced in RTL.
* **Gate internals.** The DCVS transistor stacks, precharge devices and
  keepers are replaced by the dual-rail logic equations, gated by the stage
  enable. The full adder's carry is written as (a·b) + c·(a⊕b).
* **Widths.** The source gives both "4-bit adder" and "5-bit ripple carry
  adder". This design uses 4-bit operands with a 5-bit result, which
  matches its 5-bit comparator. It likewise uses five selectors rather
  than the "4-bit selector" also mentioned.
* **Branch metric counting.** The XOR gates compare with each branch's code
  symbol. The counter steps once per code bit; the stepping order is this
  design's own.
* **Metric normalisation, reset values, tie rules, generator polynomials**
  are not given by the source and are this design's choices, as stated
  above.
* **WCHB placement.** The original draws WCHB buffers on the multiplexer's
  data and select inputs and in the latch control. Here one WCHB buffer sits
  on the multiplexer output, because the inputs are already held by the ACS
  stage. The four-to-two-phase bridge is added glue.
* **Shift register depth.** 8 latches, as drawn for the original SMU. The
  text also speaks of a "4 × 4" register. `SR_DEPTH` changes it.
* **Power gating of idle registers.** The original keeps the survivor
  registers of non-minimum states idle to save power. This design has no
  per-state survivor registers, so there is nothing to idle.
* **Worked example.** The original's four-symbol example cannot be
  checked, because its generators are unknown. The tests use a reference
  model instead.

## Verification

Each unit test compares against values computed independently in the
testbench: exhaustive truth tables for the gates and adders, random tests
against models for the rest. Every testbench has a watchdog. The end-to-end
test checks every decoded bit against a reference model of the algorithm.
On clean stretches it also checks the bit against the transmitted message.
It counts the mechanisms it exercises (nonzero branch metrics, lower- and
upper-branch survivors, ties, normalisations and back-pressure stalls) and
fails if one never happens. Concurrent assertions check the dual-rail codes
in the completion detectors and the WCHB buffer.
