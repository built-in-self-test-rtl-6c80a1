# Two-pattern built-in self-test for inter-layer vias

In a monolithic 3D IC the tiers are joined by nanoscale inter-layer vias
(ILVs), packed so densely that shorts between neighbouring vias, opens and
stuck-at faults are likely, and too many to give each via a scan cell at
both ends. This RTL implements a built-in self-test that checks a whole bus
of ILVs with only two test patterns and compresses the answer into two bits.

The idea in one paragraph: on the driving tier, every via of a bus is given
the opposite value of its neighbour, `1010...` in the first test cycle and
`0101...` in the second. On the receiving tier, an XOR between every pair
of neighbouring vias must then read 1, and an AND tree over those XORs
(signature bit **Y1**) must read 1. A short forces two neighbours equal in
both cycles; an open or stuck-at via holds one value and so equals its
neighbour in one of the two cycles. Either way some XOR reads 0 and Y1
drops. A second, dual compactor (XNOR gates into an OR tree, bit **Y2**)
watches the same vias, so that a stuck-at fault inside the first compactor
cannot hide a via fault. A bus and its BIST are good exactly when
**Y1 = 1 and Y2 = 0 in both cycles**.

## Structure

```
            Tier 1 (drives the vias)                      Tier 2 (receives)
   Vin ──► inverter chain ──► N_s-stage ──► launch ──► ILV ──┬──► func_rx
           (sub-chains)       buffers       mux  ▲     bus   │
                                       func_tx ──┘           └─► switches ─► XOR ─► AND tree ─► Y1
                                                                         └─► XNOR ─► OR tree ─► Y2
   controller: start ─► Launch, Vin, test_en ; captures {Y1,Y2} per cycle and per bus ─► pass / diagnosis
```

| Module | Role |
|---|---|
| `m3d_ilv_bist` | Top: `N_BUS` buses of `N_ILV` vias, one controller |
| `ilv_bist_tier1` | Driving-tier segment of one bus: chain, buffers, muxes |
| `ilv_inverter_chain` | Turns `vin` into `vin ^ i[0]` on via `i` |
| `ilv_delay_buffer` | Behavioural model of the N_s-stage inverter in each test path |
| `ilv_launch_mux` | 2:1 mux per via, functional or test data |
| `ilv_bist_tier2` | Receiving-tier segment of one bus: switches, BIST-A, BIST-B |
| `ilv_bist_isolation` | Switches between the vias and the compactors |
| `bist_a_compactor` | N-1 XORs into a balanced AND tree, Y1 |
| `bist_b_compactor` | N-1 XNORs into a balanced OR tree of the same shape, Y2 |
| `bist_reduce_tree` | Balanced 2-input AND/OR tree, depth ceil(log2(N-1)) |
| `ilv_bist_controller` | Two-cycle sequence, signature capture, grading |
| `ilv_bist_pkg` | Signature struct, diagnosis and state enums, grading function |

The vias themselves are not logic. The top brings out both ends: `ilv_tx`
(driving end, output) and `ilv_rx` (receiving end, input). In a real
design these are the two sides of the same via; in simulation connect them
directly or through `tb/ilv_channel_model.sv`, which injects faults.
`func_rx` is `ilv_rx` itself: the functional receivers sit ahead of the
switches, so the BIST adds nothing to the functional receive path, and the
only functional-path cell on the driving side is the launch mux.

## Why two patterns are enough, and what they miss

Each via can only short to its two neighbours when the vias of a bus are
placed in a row, so N-1 neighbour comparisons cover every possible short.
How faults show up (fault-free BIST):

| Fault | Vin=1 cycle | Vin=0 cycle | `bus_diag` |
|---|---|---|---|
| none | Y1=1, Y2=0 | Y1=1, Y2=0 | `DIAG_PASS` |
| hard short between neighbours | Y1=0 | Y1=0 | `DIAG_BOTH_CYCLE` |
| stuck-at / hard open (via holds one value) | Y1=0 in one cycle | | `DIAG_ONE_CYCLE` |
| several faults | at least one of the above | | failing class |
| fault hidden by a stuck-at-1 in BIST-A, or a stuck-at-1 in BIST-B | Y1=1, Y2=1 | | `DIAG_Y2_ONLY` |

A shorted pair behaves deterministically during test: the via nearer the
test source wins, because the other via is held only through its mux and
buffer, the weaker path. So a short reads as two equal neighbours in both
cycles.

One fault pattern escapes: if every via of the bus is stuck at the
alternating values of the test pattern (`1010...` or `0101...`), all
neighbours still differ in both cycles and the bus passes. The end-to-end
testbench shows this escape on purpose.

The diagnosis classes are this design's reading of the detection argument.
A `DIAG_Y2_ONLY` result means "something is wrong, either a via fault that
BIST-A failed to see or a fault in BIST-B"; it does not say which. A single
stuck-at fault inside the BIST never turns a faulty bus into a pass. The
exception is the alternating-stuck escape above.

## Resistive opens and the delay buffers

A hard open holds a value and is caught as above. A resistive open only
slows the via. The enhanced BIST puts an N_s-stage inverter (default
N_s = 2, an even count, so a buffer) in front of every via in the test
path. Its weak drive adds delay, so the total delay from `vin` to the via
output is pushed past the capture edge, and the XOR sees the previous
cycle's value. The condition for detection is `D_buffer + D_via + D_xor > T_clk`.
In silicon the same buffer also adds series resistance, which lets a
resistive short drag its neighbour below the XOR's threshold. That effect
is analog and is not represented here.

`ilv_delay_buffer` is therefore a **behavioural model**: its logic function
is one inversion per stage, and its delay is `NS * STAGE_DELAY` picoseconds
(`STAGE_DELAY` = 20 ps is an assumed value). Synthesis ignores the delay. In
a real flow, replace it with sized inverter cells.

`tb_ilv_bist_scenarios` runs the same resistive open (480 ps extra delay,
2 GHz clock) on two BISTs side by side. The enhanced BIST (40 ps of
buffers) flags it. The same BIST without buffers (`NS=0`) lets it pass.

## Inverter chain and sub-chains

One unbroken chain needs N-1 inverters and ripples through all of them
before the pattern settles, which limits how fast `vin` may toggle. For that
reason the chain is cut into sub-chains of `CHAIN_LEN` inverters (default
9). Each sub-chain serves `CHAIN_LEN+1` vias. Its head takes `vin`
directly when it sits on an even via, and through one extra inverter when
it sits on an odd via, so neighbours across a cut still differ. With the
defaults (32 vias, sub-chains of 10 vias) the heads fall on vias 0, 10, 20
and 30, and the bus uses 28 inverters. `CHAIN_LEN = 0` gives a single
chain of N-1 inverters. A chain of nine is well inside the 12-inverter
limit that holds at a 2 GHz test clock.

## Test sequence and timing

`ilv_bist_controller` (one per chip, shared by all buses):

| Edge | State after edge | Launch | Vin | test_en | Captured at this edge |
|---|---|---|---|---|---|
| k (start=1 sampled) | CYC1 | 1 | 1 | 1 | |
| k+1 | CYC2 | 1 | 0 | 1 | {Y1,Y2} of the Vin=1 cycle → `sig_c1` |
| k+2 | IDLE | 0 | 0 | 0 | {Y1,Y2} of the Vin=0 cycle → `sig_c2`, `done`=1 |

A test therefore takes two clock cycles, and the results are valid from
edge k+2 until the next start. `Launch`, `Vin` and `test_en` come straight
from flip-flops. `bus_pass[b]` and `bus_diag[b]` are decoded from the two
stored signatures of bus `b`, so a failing bus is located by its own
signature bits. Reset is asynchronous and active low. Assertions in the
controller check that Vin is high only during launch, that the switches are
closed while launching, and that every test lasts exactly two cycles.

In functional mode (`test_en = 0`) the switches park every compactor input
at `1010...`. The compactors then stop toggling with functional traffic and
rest at a passing signature. In silicon these switches are transmission
gates that simply open. A floating node has no two-state equivalent, so the
constant parking value is this design's choice.

## Parameters

| Parameter | Default | Where it comes from |
|---|---|---|
| `N_ILV` | 32 | 31 adjacent pairs, the smaller bus of the masking analysis |
| `N_BUS` | 1 | assumed; set it to cover a chip (e.g. 38 × 32 for 1200 vias) |
| `CHAIN_LEN` | 9 | inverter chain length used for benchmark insertion |
| `NS` | 2 | buffer stages of the enhanced BIST |
| `STAGE_DELAY` | 20 (ps) | assumed |

Bus direction: each bus runs from the tier holding `ilv_bist_tier1` to
the tier holding `ilv_bist_tier2`. For vias running the other way,
instantiate a second bus with the segments swapped. The counts of up and
down vias need not match.

## Departures and limits

- The controller, the diagnosis encoding, the reset and the multi-bus top
  are this design's. The method itself only fixes the two-cycle sequence and
  the pass rule.
- Resistive shorts are not modelled: in two-state logic a short is either
  hard or absent.
- The delay buffer is a behavioural model with an assumed delay.
- The isolation switches are gating with a parking value, not
  transmission gates.
- The top's `func_rx` output is a direct copy of the `ilv_rx` input.
  Synthesis reports those bits as wired to an input; this is intended.
- How a chip's vias are grouped into buses is not fixed. Covering a chip
  with 1200 vias needs `N_BUS = 38` at 32 vias per bus.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<n>`. Each testbench has a watchdog.

- Unit benches check against independent reference computations. The
  compactors get every single-bit error on both patterns plus random words.
  The trees are checked exhaustively at 7 inputs. The chain is checked with
  odd-placed sub-chain heads. The buffer model is checked 1 ps either side
  of its delay. The controller is checked over random signatures on three
  buses.
- `tb_m3d_ilv_bist`: three buses of 32 vias at 2 GHz through the fault
  model. It covers functional traffic, parked compactors, shorts
  (including one across a sub-chain cut), stuck-ats, hard and resistive
  opens and multiple faults. It forces stuck-at-1 faults on internal nodes of the
  BIST-A tree, where they hide a short and a stuck-at via from Y1, and
  checks that Y2 exposes both. It forces stuck-ats on the BIST-B output
  and shows the alternating-stuck escape. Each run is compared with
  a reference derived from the fault list, and each mechanism is counted.
- `tb_m3d_ilv_bist_full`: the top at its default parameters, through
  complete tests on good and faulty vias.
- `tb_ilv_bist_scenarios`: 11 vias at 2 GHz, fault-free / two shorts /
  two opens / resistive short plus open / lone resistive open, on the
  enhanced BIST and on one without buffers.

Each testbench also fails against a deliberately broken copy of its module.

## Simulating

With Verilator 5 (timing support is needed for the buffer delays and the
testbench clocks):

```
verilator --binary --timing --assert --timescale 1ns/1ps \
  --top-module tb_m3d_ilv_bist -y rtl -y tb +libext+.sv -Irtl \
  rtl/ilv_bist_pkg.sv tb/tb_m3d_ilv_bist.sv
./obj_dir/Vtb_m3d_ilv_bist
```

Substitute any other testbench name from `tb/`. Every run finishes in well
under a second.
