# Low-power test-per-scan BIST: supply-gated first level and partitioned scan

Built-in self-test with scan chains wastes power in two places. Every shift
clock ripples new values through the scan flip-flops, and those transitions
spread into the combinational logic behind them, even though nothing in that
logic is observed until the capture cycle. The scan chain itself, with its
clock tree, also toggles as a whole on every shift.

This design attacks both:

* **First Level Supply gating (FLS).** Only the *first* level of gates
  behind the scan flip-flops is modified: each has its ground (or supply)
  path cut by a gating transistor while shifting, and a small pull-up (or
  pull-down) holds its output at a fixed value. The rest of the logic then
  sees a constant vector during the whole shift and does not switch. Unlike
  NOR/NAND/MUX blocking gates, nothing is inserted into the functional path,
  so the cost in normal mode is one series transistor.
* **Input vector control (IVC).** Because each gate can be gated on the
  ground side (output held at 1) or on the supply side (output held at 0),
  the held vector can be chosen to be the one that minimises leakage in the
  logic behind the first level.
* **Scan partitioning.** The scan flip-flops and the primary inputs are
  split into K partitions. Each scan partition has its own chain, scan-in,
  scan-out and gated clock. Only one partition is clocked in any test cycle,
  so at most one partition's flip-flops switch at a time, and the clocks of
  the others are stopped.

The RTL implements the digital side of this: the BIST controller, pattern
generators, partitioned scan chains with clock gating, the response
compactor, and a logic-level model of the FLS first level with IVC.

## Block diagram

```
               +-------------------+  cut_pi   +-------------------------------+
 func_pi ----->| PI mux            |---------->| fls_first_level (FLS + IVC)   |--> fl_out --> [rest of the
               |  pi_pattern_gen   |           |  gc = !shift_en               |                circuit under test,
               |  (LFSR, K parts)  |           +-------------------------------+                outside]
               +-------------------+                   ^ state_q                                   |     |
                         ^ pi_load[K]                  |                                   cut_po  |     | cut_next_state
 +------------+          |                  +----------+----------+                               |     |
 | bist_ctrl  |----------+---- shift_en --->| scan_chain[0] (CLK1)|<---- slice 0 ------------------|-----+
 |  partition_sel (mod-K counter+decoder)   | scan_chain[1] (CLK2)|<---- slice 1 ------------------|-----+
 +------------+-- part_ctrl[K] --> clk_gate[p] -> pclk[p]   ...   |                                |
        |                                   +---------------------+                                |
        |        scan LFSR --sout--> si of the active chain | so of the active chain               |
        |                                                   v                                      v
        +----- misr_en / misr_clear -------------------> MISR  <--------- cut_po (capture cycles) --+
```

The circuit under test is not part of the RTL. Its first level (the gates
that FLS modifies) is, and the rest of its logic attaches through ports:
`fl_out` and `cut_pi` go out, `cut_po` and `cut_next_state` come back.

## The FLS first level (`fls_gate`, `fls_first_level`)

`fls_gate` is a logic-level model of one gated gate. The real cell is a
transistor circuit, so the model captures only what the rest of the circuit
sees:

| `gc` | `GATING = GATE_GND` (footer cut, pull-up) | `GATING = GATE_VDD` (header cut, pull-down) |
|------|-------------------------------------------|---------------------------------------------|
| 1    | gate function of `a`, `b`                 | gate function of `a`, `b`                   |
| 0    | 1                                         | 0                                           |

Gating is active when `gc` is low. The pull-up in the ground-gated style is
a PMOS driven by the gating control, and a PMOS conducts when its gate is
low. The top drives `gc = !shift_en`, so the first level is gated exactly
during scan shift. In capture cycles and in normal mode it is transparent.

`fls_first_level` is one layer of `NUM_FL` such gates. The gates are driven
from `cin = {state_q, cut_pi}`, with the primary inputs at the low indices.
Only gates that touch a scan flip-flop are gated. A gate fed only by primary
inputs is left alone, because primary inputs change only when their
partition is reloaded. Bit g of `IVC_VEC` picks the held value of gate g:
1 gives ground gating (held at 1), 0 gives supply gating (held at 0). The
default, all ones, is the plain ground-gated scheme. A minimum-leakage vector
found offline for the target circuit turns it into the mixed scheme.

In silicon, all ground-gated gates share one NMOS footer and all
supply-gated gates share one PMOS header. The shared footer is sized at half
the sum of the individual ones, since about half of the gates switch at any
moment. In logic, that sharing is simply the common `gc`.

**The gate wiring is a placeholder.** No benchmark netlist is available, so
gate g uses an example wiring. Input A is `cin[g mod N]`. Input B is
`cin[(7g+3) mod N]`, or the next index if that equals A. Here
`N = NUM_PI + NUM_SFF`, and the gate type cycles AND, OR, NAND, NOR. To use
the design on a real circuit, replace the generate loop in
`fls_first_level.sv` with that circuit's first level. What the rest of the
design relies on is the gating rule and `IVC_VEC`, not this wiring.

## Partitioned scan and the test sequence (`bist_ctrl`, `partition_sel`, `clk_gate`, `scan_chain`)

`NUM_SFF` flip-flops are split into K contiguous slices of `state_q` /
`cut_next_state`. Partition p has `part_len(NUM_SFF, K, p)` cells: the first
`NUM_SFF % K` partitions get one more than the rest. The primary inputs are
split the same way. The partitioning heuristic balances the partitions by the
switching activity each input causes. It runs offline, and its result is
applied by ordering the flip-flops and inputs on the ports. Partitions do not
have to be equal in size.

`partition_sel` is a modulo-K counter with a decoder. Its one-hot output
(CtrlA, CtrlB, ...) enables one `clk_gate` per partition. `clk_gate` is a
latch-based glitch-free gate: the enable is latched while `clk` is low, then
ANDed with `clk`. The latch is intentional, and the tools report it.
`scan_chain` is a row of mux-plus-flip-flop scan cells. With `shift_en` set
it shifts (`si` into `q[0]`, `so = q[LEN-1]`); otherwise it captures `d`.
Each partition's scan-out is also brought out on `scan_out[p]`. Scan-in
always comes from the scan LFSR; there is no scan-in port for an external
tester.

One session, started by a `bist_start` pulse in test mode, runs these steps:

1. For each of `NUM_PATTERNS` patterns:
   * **Shift.** The partitions are shifted one after another, and only the
     active partition's clock runs. The scan LFSR's serial output feeds the
     active chain. The active chain's scan-out feeds the MISR. In the first
     cycle of partition p's shift, primary-input partition p takes new
     random bits, so inputs change one partition at a time too.
   * **Capture.** One cycle per partition, again one partition at a time.
     `shift_en` is low, so the first level is transparent. The partition
     loads its next state, and the MISR takes the primary outputs.
2. An **unload** pass (shift only) brings the last response out.
3. `bist_done` rises and stays high until the next start. `signature` then
   holds the MISR value, to be compared with a golden signature.

A session lasts `(NUM_PATTERNS+1)*NUM_SFF + NUM_PATTERNS*K` busy cycles. At
the defaults that is 1025·74 + 1024·2 = 77 898 cycles. The MISR is off during
the first load pass. That pass only unloads whatever the flip-flops held
before the session, and compacting it would make the signature depend on
that state.

Capturing partition by partition means partition 1 captures after
partition 0 has already taken its new state. The response is still
deterministic, and the golden model reproduces it. More partitions lower
peak power in both shift and capture, at the cost of K capture cycles per
pattern.

Normal mode (`test_mode = 0`) works like this:
* Every partition clock follows `clk`.
* The flip-flops load `cut_next_state`.
* `func_pi` reaches the logic.
* Nothing is gated.
* The BIST registers hold.

## Pattern generation and compaction (`lfsr`, `pi_pattern_gen`, `misr`)

Two LFSRs are used, one for the primary inputs and one for the scan data.
Both are Fibonacci LFSRs with x^32+x^22+x^2+x+1 (tap mask `0x8020_0003`).
`pi_pattern_gen` keeps one hold register per primary-input partition. When
`load[p]` is set, partition p takes LFSR stages 0.., and the LFSR steps.
`misr` steps with the same polynomial and XORs input i into stage i mod W.
Its inputs are `{cut_po, scan_out}`. During shift only the scan-out bit is
non-zero; during capture only the primary outputs are.

## Parameters of `lp_bist_top`

| parameter      | default | meaning |
|----------------|---------|---------|
| `K`            | 2       | number of partitions (scan chains A, B, ...) |
| `NUM_SFF`      | 74      | scan flip-flops (the size of ISCAS89 s1423) |
| `NUM_FL`       | 160     | first-level gates (s1423) |
| `NUM_PI`       | 17      | primary inputs (s1423) |
| `NUM_PO`       | 5       | primary outputs (s1423) |
| `NUM_PATTERNS` | 1024    | patterns per session |
| `LFSR_W`, `MISR_W` | 32  | register widths |
| `IVC_VEC`      | all ones | held value of each gated first-level gate |

All registers have an asynchronous active-low reset `rst_n`: they clear to
zero, and the LFSRs load their seeds.

## What is this design's own choice

These follow the architecture the design is based on:
* one partition clocked at a time;
* per-partition clocks from a counter and decoder;
* two LFSRs and a MISR;
* FLS gating with IVC.

These are choices made here:
* polynomials, widths and seeds;
* equal contiguous partition slices;
* shift order;
* one capture cycle per partition, partitions in turn;
* when the primary-input partitions are reloaded;
* the final unload pass;
* no compaction during the first load;
* the MISR input arrangement;
* reset values;
* the set of first-level gate types;
* the example first-level wiring.

These are not in the RTL:
* the circuit under test beyond its first level;
* the offline algorithms that pick the partition assignment and the IVC
  vector;
* the power switches as devices;
* any power estimate.

The RTL shows *what switches when*, not how much power that takes.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_lfsr` | 300 steps against the polynomial written term by term; hold; reset; period 15 of a 4-bit instance |
| `tb_misr` | random compaction against a reference, including input folding; clear |
| `tb_scan_chain` | shift, capture and unload order, LEN=5 and LEN=1 |
| `tb_clk_gate` | enable toggling at random points, including while `clk` is high; no glitches; one edge per enabled cycle |
| `tb_partition_sel` | K=3 and K=2 counting, wrap, clear, one-hot decode |
| `tb_bist_ctrl` | full cycle-by-cycle control sequence for K=3 with unequal partitions; session length; restart |
| `tb_pi_pattern_gen` | only the loaded partition changes, with the expected LFSR bits |
| `tb_fls_gate` | all gate types in both gating styles, exhaustively |
| `tb_fls_first_level` | every gate against the wiring rule, gated vs. ungated, mixed IVC |
| `tb_lp_bist_top` | end to end, K=2 and K=3 side by side at small sizes (see below) |
| `tb_lp_bist_full` | one complete session at the default parameters (about 4 s) |
| `tb_lp_bist_iscas` | sizes of six ISCAS89 circuits (74 to 1728 flip-flops, 160 to 2692 first-level gates), K=2 and K=3, 16 patterns each |

The end-to-end benches use three helpers:
* `lp_bist_env`: a small model of the logic behind the first level, plus an
  independent step-by-step model of a whole session that gives the expected
  signature and session length.
* `lp_bist_checker`: runs normal mode, one session, then normal mode again.
* `lp_bist_bench`: puts the top, the model and the checker together.

In every test cycle the checker verifies three things:
* exactly the selected partition received a clock edge;
* primary inputs changed only inside the active partition;
* while shifting, every gated first-level output showed its IVC value.

It also checks that each `scan_out[p]` is the last flip-flop of partition p.

It also counts each mechanism (shift, capture, partition switch, input
partition update, FLS hold, clock gating, normal mode, mode switch) and fails
if one never happened.

To run a testbench with Verilator (from the directory that holds `rtl/` and
`tb/`):

```
verilator --binary --timing --assert -Irtl -Itb rtl/lpbist_pkg.sv tb/tb_lp_bist_full.sv \
          --top-module tb_lp_bist_full -o sim && ./obj_dir/sim
```

Every parameter of every module has a default, so any module can be linted
as a top: `verilator --lint-only -Wall -Irtl rtl/lpbist_pkg.sv rtl/<module>.sv`.
Lint leaves some warnings: the `rst_n` used both as an asynchronous reset
and in an assertion's `disable iff`, unconnected LFSR outputs, and the
intended latch in `clk_gate`.
