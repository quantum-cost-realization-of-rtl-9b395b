# Reversible logical barrel shifter

A barrel shifter moves an n-bit word left by any amount from 0 to 2^k − 1 in
one combinational pass. This design builds an (n, k) logical left shifter
(zero fill) entirely from **reversible gates**, gates whose output vector
determines their input vector. A circuit made only of such gates loses no
information, which is the premise of reversible low-power computing. Reversible
logic imposes two rules on the netlist:

* **every signal has a fan-out of exactly one**, so a value needed twice must
  be copied explicitly by a gate;
* **no feedback loops**.

The shifter uses two gates: the Fredkin gate serves as a 2:1 multiplexer and
the Feynman gate copies a bit. The structure is chosen to keep the Fredkin
count, the Feynman count and the number of *garbage outputs* small. Garbage
outputs are lines that carry no result and exist only to keep the circuit
reversible. The quantum cost is kept small too. At the default size, n = 8 and
k = 3, the circuit uses 24 Fredkin gates, 17 Feynman gates and 27 garbage
outputs, with a quantum cost of 137.

The RTL describes the gate network exactly, one gate per module instance. It
simulates and synthesizes like ordinary logic: a synthesis tool will simply
collapse it into a conventional shifter.

## The two gates

| gate | size | function | quantum cost | module |
|---|---|---|---|---|
| Feynman (CNOT) | 2×2 | P = A, Q = A ⊕ B | 1 | `feynman_gate` |
| Fredkin (controlled swap) | 3×3 | P = A, Q = A'B ⊕ AC, R = A'C ⊕ AB | 5 | `fredkin_gate` |

* **Fredkin gate as a multiplexer.** Q = A ? C : B, which is a 2:1 mux with A
  as the select. R gets the input that was *not* selected, and this becomes a
  garbage output. P repeats the select, and the design uses it to pass the
  select on to the next gate.
* **Feynman gate as a copier.** With B = 0 the gate gives P = Q = A: two copies
  of one signal, each with a fan-out of one.

Both gates are their own inverses. The testbenches check this by feeding each
gate's outputs into a second copy of the gate.

## One stage: the part that needs care

The shifter is logarithmic. Stage j (`rev_shift_stage`, parameter `J`) shifts
left by D = 2^J when its select bit s_j is 1, and passes the word unchanged
when s_j is 0. K stages in a row therefore shift by any amount from 0 to
2^K − 1. In a normal mux-based shifter, a stage needs n muxes, a broadcast
select and data bits that each drive two muxes. Every one of those fan-outs
has to be made explicit here:

```
            data_i[i] ──► Feynman (B=0) ──P──► Fredkin(bit i).B
 (only if i+D < N)                      └─Q──► Fredkin(bit i+D).C
 
 Fredkin(bit i):  A = select after bits 0..i-1   B = bit i   C = bit i-D, or 0 if i < D
                  P ──► A of Fredkin(bit i+1)    Q ──► data_o[i]    R ──► garb_o[i]
```

* **Select line, threaded rather than broadcast.** s_j enters the Fredkin gate
  of bit 0. It then goes from gate to gate through the P outputs, bit 0 to
  bit N−1. After the last gate it leaves the stage as a garbage output
  (`sel_o`). This costs no extra gates, but it is why the stage's gate depth
  grows with n.
* **Data copies only where needed.** Bit i feeds a second multiplexer, the
  one D places higher, only when i + D < N. The top D bits would shift out of
  the word, so they go straight to their own multiplexer without a copy. Each
  stage therefore has N − D Feynman gates.
* **Zero fill.** The multiplexers of the lowest D bits take a constant 0 as
  their shifted-in input. Constant inputs are not counted as a cost.

Per stage this gives N Fredkin gates, N − D Feynman gates and N + 1 garbage
outputs (N R outputs plus the select line). Summed over the stages, for
n = 2^k:

| quantity | formula | (4, 2) | (8, 3) | (16, 4) |
|---|---|---|---|---|
| Fredkin gates Fr | n(k−1) + n | 8 | 24 | 64 |
| Feynman gates Fe | n(k−1) + 1 | 5 | 17 | 49 |
| garbage outputs GO | nk + k | 10 | 27 | 68 |
| quantum cost | 5·Fr + Fe | 45 | 137 | 369 |

The package `rev_pkg` computes these figures with the same rule that the
generate loops use to place the gates (`fe_needs_copy`). The top module
exposes the results as `FR_GATES`, `FE_GATES`, `GARBAGE` and `QUANTUM_COST`.
The `garbage_o` port is `GARBAGE` bits wide by construction.

## The top: `rev_logical_shifter`

| port | dir | width | meaning |
|---|---|---|---|
| `data_i` | in | N | word to shift |
| `shamt_i` | in | K | shift amount; bit j selects the stage of 2^j |
| `data_o` | out | N | `data_i << shamt_i`, zero filled |
| `garbage_o` | out | N·K + K | `[j*N +: N]` = R outputs of stage j; `[N*K + j]` = select s_j after stage j |

Parameters: `N` (default 8) and `K` (default 3). K must satisfy 2^K ≤ N, and
an elaboration-time assertion checks this.

**Timing.** The circuit is purely combinational, with no clock and no reset.
The result is valid one propagation delay after the inputs change. If you
need registers, put them around it.

**Running it backwards.** `data_o` and `garbage_o` together determine the
inputs. The selects come back directly, because `garbage_o[N*K + j]` equals
s_j. Then undo the stages from last to first:

```
w = data_o
for j = K-1 downto 0:  if s_j: w = garbage_o[j*N +: N]   // the unselected (unshifted) inputs
data_i = w
```

The end-to-end testbench uses this reconstruction as a reversibility check.
Because the select garbage lines are copies of `shamt_i`, a synthesis report
lists them as outputs wired straight to inputs. This is inherent to the gate
network, not a wiring error.

## What follows the published design and what is this design's own

These points come from the published design:

* the Fredkin-multiplexer and Feynman-fan-out gate set;
* the one-stage-per-shift-bit logarithmic algorithm;
* the logical (zero-fill) left shift;
* the (8, 3) default size;
* the gate definitions and quantum costs;
* the cost table above.

These choices belong to this implementation:

* **Where the gates sit inside a stage.** The select is threaded from bit 0
  upward, with one Feynman copy per doubly used bit and R and final-P outputs
  as garbage. This placement is a reconstruction. It reproduces the published
  Fredkin, Feynman, garbage and quantum-cost figures exactly for all three
  sizes above, but other placements could too.
* **Gate depth.** The published comparison also lists a delay, the longest
  input-to-output path counted in gates: 9, 12 and 26 for (4, 2), (8, 3) and
  (16, 4). This netlist's longest path is 7, 13 and 23 gates, counting both
  gate types. The difference most likely comes from the select-threading
  order, which the description does not fix. Treat the delay figures as not
  reproduced.
* **No rotate mode.** The description's algorithm speaks of "shift/rotate",
  but the proposed circuit is the logical shifter, and only that is built.
  The earlier rotating shifter that it is compared against is not included.
* **Port names, the ordering of `garbage_o`, and the Feynman quantum cost of
  1.** The value 1 is the usual figure, and it is the one consistent with the
  published quantum costs.

## Verification

| testbench | what it does |
|---|---|
| `tb_feynman_gate` | all 4 inputs; truth table and self-inverse |
| `tb_fredkin_gate` | all 8 inputs; mux/swap behaviour and self-inverse |
| `tb_rev_shift_stage` | 8-bit stages with D = 1, 2, 4; all 256 words × both select values; result, garbage word and select pass-through |
| `tb_rev_logical_shifter` | default (8, 3) top with no parameter overrides. All 2048 cases are checked against the `<<` operator and against the backwards reconstruction, and all 2048 output vectors must be distinct. Also checks the 24/17/27/137 cost figures and counts that each stage both shifted and passed, that zero fill happened, that ones were pushed out into the garbage, and that shifts of 0 and of the maximum occurred |
| `tb_rev_shifter_workloads` | the three sizes (4, 2), (8, 3) and (16, 4) of the cost table, through the helper `rev_shifter_checker`. Each size runs exhaustively (the largest has 1,048,576 cases), checked against `<<`, the reconstruction and the table's cost figures |

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and has a watchdog.
To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/rev_pkg.sv tb/tb_rev_logical_shifter.sv --top-module tb_rev_logical_shifter
./obj_dir/Vtb_rev_logical_shifter
```

Every testbench finishes in a few seconds. To try another size, change `N`
and `K` on `rev_logical_shifter`, or add an instance of `rev_shifter_checker`
with the expected cost figures.

## Files

* `rtl/rev_pkg.sv`: gate quantum costs and the gate/garbage/cost counting functions
* `rtl/feynman_gate.sv`, `rtl/fredkin_gate.sv`: the two reversible gates
* `rtl/rev_shift_stage.sv`: one shift-by-2^J stage
* `rtl/rev_logical_shifter.sv`: the (N, K) shifter (top)
* `tb/`: the testbenches listed above and `rev_shifter_checker.sv`
