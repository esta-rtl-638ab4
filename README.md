# Online self-testing datapath by reuse of idle resources (ESTA example)

A datapath that a high-level synthesis tool builds from a scheduled data flow
graph has idle resources in most clock cycles. In a given cycle an adder or
multiplier may be free while another unit of the same type is busy. This
design uses those *dead intervals* for concurrent online testing. In each
cycle a free unit recomputes the operation of a busy unit of the same type,
on the same operands, and an equality checker compares the two results. A
type with only one unit has nothing to pair with, so it gets LFSR/MISR test
logic instead. A type whose units are busy in every cycle gets one extra
unit. Faults are then found during normal operation, on the design's real
input data, and reported on a single `error` pin. There are no stored test
vectors, no test mode and no stop.

The RTL here implements the method (ESTA, *Efficient Self Testing
Algorithm*) applied to its worked example: a 17-operation graph scheduled in
four control steps on two adders, three multipliers and one subtractor. The
resources, the binding, the schedule and the pairing of checker and checked
unit all follow the method's example. The remaining details are this
design's own choices, listed under [Departures and choices](#departures-and-choices).

## The computation

Fifteen inputs `a`..`o` produce four results. The right-hand column gives
the unit each operation is bound to.

| step | operations (unit) |
|------|-------------------|
| C1 | `s1 = a - b` (S1), `p1 = c + d` (A1), `im0 = e + f` (A2), `im1 = g * h` (M1), `im2 = i * j` (M2) |
| C2 | `im3 = k + s1` (A1), `im4 = s1 * p1` (M1), `p6 = l + im0` (A2), `t6 = im0 * im1` (M2), `t8 = im1 * im2` (M3) |
| C3 | `t3 = im3 * im4` (M1), `p3 = p6 + t6` (A1), `p7 = t8 + m` (A2) |
| C4 | `p4 = n + t3` (A1), `p8 = t3 + p6` (A2), `t4 = p3 * t8` (M1), `t7 = p7 * o` (M2) |

`dout[0..3] = {p4, p8, t4, t7}`. All words are `WIDTH` bits (default 16).
All arithmetic wraps modulo 2^WIDTH, and a product keeps its low `WIDTH`
bits.

Which units are idle in which step (B = busy, F = free):

| unit | C1 | C2 | C3 | C4 |
|------|----|----|----|----|
| A1, A2 | B | B | B | B |
| M1 | B | B | B | B |
| M2 | B | B | F | B |
| M3 | F | B | F | F |
| S1 | B | F | F | F |

## The test schedule

The method's pairing rules give this for the example.

* **Adders.** A1 and A2 are busy in every step, so neither can ever check the
  other. One extra adder **EA** is added; that is ceil(n/m) = ceil(2/4) = 1,
  for n = 2 busy adders and a latency of m = 4 steps. In C1, EA repeats A1's
  `c + d`. In C2 it repeats A2's `l + im0`. A multiplexer routes the result
  of A1 or A2 to the checker.
* **Multipliers.** M3 runs one operation of its own, in C2. In C1 it repeats
  M2's `i * j`, and in C3 it repeats M1's `im3 * im4`. Two checkers compare
  M3 with M2 and with M1.
* **Subtractor.** S1 is the only unit of its type, so no other unit can
  repeat its work. Its three idle steps C2..C4 are filled with patterns from
  two LFSRs (`lfsr1` and `lfsr2`, one per operand). A MISR compresses its
  results.

So **every unit is tested in every flow, and no clock cycle is added**. The
adders and multipliers are tested on the flow's own operands. S1 is tested
on pseudo-random patterns between its real operations. The new hardware is
EA, M3's wider operand multiplexers, three equality checkers, two LFSRs, one
MISR, and a controller with more control outputs.

### How the subtractor's signature is judged

With real data, a checker knows the right answer because a second unit
computes it. With LFSR patterns, the right answer must be known in advance.
Test sessions make this possible:

1. A session begins with both LFSRs at their seeds (`SEED1`, `SEED2`) and the
   MISR at zero.
2. Each idle S1 step (C2, C3, C4 of each flow) applies one pattern
   `lfsr1 - lfsr2`. The MISR absorbs S1's result, and both LFSRs advance.
3. After `TEST_LEN` patterns (default 30, i.e. 10 flows), the controller
   spends one cycle comparing the MISR with `GOLDEN`. In that same cycle it
   reseeds the LFSRs and clears the MISR. If that cycle is an S1 idle step,
   no pattern is applied in it.

`GOLDEN` is a constant. `esta_pkg::golden_signature()` computes it at
elaboration time by replaying a fault-free session: `TEST_LEN` rounds of
`sig = step(sig) ^ (l1 - l2); l1 = step(l1); l2 = step(l2)`. Here `step` is
one right shift of a Galois LFSR with feedback mask `lfsr_taps(WIDTH)`,
which is 0xB400 (x^16 + x^14 + x^13 + x^11 + 1) at 16 bits. Changing the
seeds, the length or the width changes `GOLDEN` automatically.

Each session repeats the same `TEST_LEN` patterns. A stuck-at fault in S1 is
therefore found only if one of those patterns exposes it, and only at the
end of a session, up to `TEST_LEN / 3` flows after the fault appears. A
fault in S1 that shows only on real operands in C1 goes unseen by this
logic. It still corrupts the results.

### What the error flag means

Four sources set the sticky register `err_src`:

| bit | source |
|-----|--------|
| 0 | EA disagreed with A1 (C1) or A2 (C2) |
| 1 | M3 disagreed with M1 (C3) |
| 2 | M3 disagreed with M2 (C1) |
| 3 | the S1 MISR signature differed from `GOLDEN` |

`error` is the OR of these bits. Only reset clears them. A mismatch says
that one of the two units is faulty, not which one: a fault in M3 raises
bit 1 or bit 2. Equal results do not prove that both units are fault-free.
The scheme covers the arithmetic units and their checked operand paths. It
does not cover the datapath registers, the control logic, or the checkers
themselves.

### Measured online fault coverage

`tb_esta_fault_coverage` injects one single stuck-at fault at a time, both
polarities on every bit. It then runs 200 random vectors and watches only
`error`:

| faulted word | detected |
|--------------|----------|
| outputs of A1, A2, EA, M2, M3, S1 | 32/32 each |
| output of M1 | 31/32 |
| registers `s1`, `p6`, `t8`, result `t4` | 0/32 each |

The one unit fault that escapes is M1 bit 0 stuck-at-0, and it masks
itself. M1 produces `im4` in C2, and M1 is checked in C3 on `im3 * im4`.
With the fault, `im4` is always even, so that product is always even and
the stuck bit never differs from M3's result. The register rows show the
limit of the scheme. A value that is corrupted after the unit that computed
it has been checked, and is then used only by unchecked operations, never
reaches a checker. These are RT-level word faults, so the percentages are
not gate-level coverage figures.

## Interface and timing

`esta_top` ports:

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset (clears every register) |
| `in_valid` / `in_ready` | in / out | 1 | input handshake |
| `din` | in | 15 × WIDTH | `a`..`o`, index 0 = `a` (`esta_pkg::IN_*`) |
| `out_valid` | out | 1 | `dout` holds one flow's results, for one cycle |
| `dout` | out | 4 × WIDTH | `p4, p8, t4, t7` (`esta_pkg::OUT_*`) |
| `error` | out | 1 | sticky online error flag |
| `err_src` | out | 4 | which check fired (table above) |

`din` is copied into input registers at a clock edge where `in_valid` and
`in_ready` are both high. The next four cycles are C1..C4. `out_valid` is
high in the cycle after C4, four edges after the accepting edge.
`in_ready` is high when the design is idle and during C4. A new vector can
therefore be taken every four cycles with no gap, and `din` need not be held
after the handshake.

Parameters of `esta_top`: `WIDTH` (16), `TEST_LEN` (30), `SEED1` (0xACE1) and
`SEED2` (0x5EED). The seeds must be non-zero in their low `WIDTH` bits.

## Structure of the RTL

```
esta_top                 datapath, registers, wiring of the test logic
├── esta_controller      step sequencer C1..C4, control word, S1 sessions, error flag
├── esta_mux      ×15    operand multiplexers (and the A1/A2 result mux for EA's checker)
├── esta_adder    ×3     A1, A2, EA
├── esta_multiplier ×3   M1, M2, M3
├── esta_subtractor      S1
├── esta_comparator ×3   EA vs A1/A2, M3 vs M1, M3 vs M2
├── esta_lfsr     ×2     pattern sources for S1
└── esta_misr            signature of S1
esta_pkg                 step enum, control-word struct ctrl_t, index constants,
                         LFSR/MISR step functions and golden_signature()
```

The controller drives the datapath through the packed struct
`esta_pkg::ctrl_t`. It holds the operand selects of each unit, the A1/A2
result select, the three check enables, `bist_step` and `bist_restart` for
the S1 logic, and one register-load strobe per control step. To see what
happens in a step, read the `unique case` in `esta_controller.sv`. Each
select value is commented there with the operation it routes.

The datapath has one register per intermediate value. Each is loaded in the
step that produces it. The checks use the units' combinational outputs in
the same cycle, so the test logic adds no register stage to any normal
path.

## Simulating

Each testbench in `tb/` is self-checking. It prints
`TB_RESULT checks=N failures=M` at the end, and a watchdog stops it if it
hangs. With Verilator 5:

```sh
verilator --binary --timing --assert -Irtl -Itb rtl/esta_pkg.sv tb/tb_esta_top.sv \
          --top-module tb_esta_top -Mdir obj_top -o sim
./obj_top/sim
```

Replace `tb_esta_top` with any other testbench name. The others are
`tb_esta_adder`, `tb_esta_subtractor`, `tb_esta_multiplier`, `tb_esta_mux`,
`tb_esta_comparator`, `tb_esta_lfsr`, `tb_esta_misr` and
`tb_esta_controller`.

* `tb_esta_top` runs the design at its default parameters. In a fault-free
  phase it runs 400 random flows, with both back-to-back runs and idle gaps.
  Every result is checked against a model of the graph written in the
  testbench, and so is the four-edge latency. `error` must stay low through
  about 40 signature checks. The testbench also checks that each adder and
  multiplier is checked exactly once per flow. In a second phase it forces
  a stuck-at-1 bit onto the output of each unit in turn (A1, A2, EA, M1,
  M2, M3, S1). It then waits for `error` and checks that the right
  `err_src` bit fired. It counts every mechanism and fails if one never
  happened: the four pairings, the LFSR patterns, the signature checks,
  back-to-back flows and idle cycles. It runs in a few seconds.
* `tb_esta_controller` compares the control word with a model of the
  schedule in every cycle. The model counts sessions on its own and
  computes the golden signature independently. It also feeds wrong
  signatures and mismatch pulses, and checks the sticky flags.
* `tb_esta_fault_coverage` runs the stuck-at experiment above, 352 faults
  with 200 vectors each, at the default parameters.
* `tb_esta_lfsr` checks every step of a full 65535-step period and that the
  period is maximal. `tb_esta_misr` checks the MISR against a model and
  checks that a flipped input word changes the signature. The unit
  testbenches compare the adder, subtractor, multiplier, multiplexer and
  comparator against arithmetic done in the testbench.

## Departures and choices

Taken from the method's example: the graph's operations and their order,
the binding of operations to A1, A2, M1, M2, M3 and S1, the four-step
schedule, the extra adder EA, the cycles in which EA and M3 repeat which
operation, the LFSR/MISR logic around S1 in C2..C4, the three checkers, and
a single error output.

This design's own choices:

* **Graph edges.** The published example does not pin down every operand
  edge of its graph. The operands of `+3`, `+7`, `*2` and `*4` were chosen
  to agree with the operand-multiplexer inputs of the example datapath. The
  table above is the graph this RTL computes. If your graph differs, edit
  the multiplexer lists in `esta_top.sv` and the `dfg()` model in
  `tb_esta_top.sv`.
* **Word width** of 16 bits, wrap-around arithmetic, and truncated
  products. The method gives no width.
* **Register allocation**: one register per value, plus registered inputs.
* **Handshake**: `in_valid`/`in_ready`, with a new flow accepted during C4.
* **S1 test logic**: the polynomial, the seeds, the session length, the
  golden-signature comparison, and skipping one pattern per session.
* **Error reporting**: a sticky flag cleared only by reset, plus the
  diagnostic `err_src` bits.

Not built:

* The *T-area* form of the example. It adds a fifth control step in which
  A1 and A2 check each other, instead of adding EA.
* The alternative of an extra subtractor in place of the LFSR/MISR logic.
* The design-time pairing algorithm itself. This RTL is its result for one
  graph and is not programmable.
* The benchmark circuits the method was evaluated on: FIR, IIR, DCT,
  wavelet, Paulin, and the differential-equation solver. Their scheduled
  graphs are not available, and this datapath is hard-wired to the example
  graph.
