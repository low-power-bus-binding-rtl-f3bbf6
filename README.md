# Dynamic bit reordering for low-power bus transfers

Buses in a synthesized datapath spend a large share of dynamic power on
toggling wires. High-level synthesis normally fixes a *bus binding* (which
variable travels on which bus in which control step) and a *bit ordering*
(bit k of every variable on wire k). This design keeps the binding fixed but
changes the bit ordering at run time: for every pair of consecutive
transfers on a bus it measures, over a short window of real data, how often
each bit of the earlier variable differs from each bit of the later one, and
then chooses the wire assignment that minimizes the number of toggles. That
choice is a minimum-weight perfect bipartite matching (an assignment problem)
between the 16 bits of the two variables, solved in hardware once per window.

The example design moves the variables of a differential equation solver
(15 variables of 16 bits, 6 control steps, 4 buses). With random input data
the reordered buses toggle 18–41 % less than with the fixed ordering,
depending on the window length (see *Measured behaviour*).

## Block structure

```
             +--------------------------------------------+
 (u,dx,x,y)  |                 dbr_top                     |
 ---------> diffeq_dfg --rec--+--> bit_order_finder        |
             |                |     sam_accumulator        |
             |                |     mwbm_solver            |
             |                |        | done  | new order |
             |                |        v       v           |
             |                +--> window_memory --> bus_binder ==> bus[4] (16 b)
             +--------------------------------------------+    \=> bus_map[4]
```

| Module | Role |
|---|---|
| `dbr_pkg` | Word width, variable numbering, the fixed bus binding table, and functions that derive every transfer pair from the table |
| `diffeq_dfg` | The solver's data flow graph; produces one record (all 15 variables) per iteration |
| `sam_accumulator` | Short-term switching activity matrices: 17 matrices of 16 x 16 counters |
| `mwbm_solver` | 16 x 16 assignment solver (shortest augmenting paths with dual prices) |
| `bit_order_finder` | Windowing, sequencing of the solver over all transfer pairs, `done` / hand-over |
| `window_memory` | Holds each window of records until its ordering is known |
| `bus_binder` | Drives the buses cstep by cstep with the fixed binding and the current orderings |
| `dbr_top` | Connects everything |

## The bus binding and its transfer pairs

The binding (in `dbr_pkg::BINDING`, csteps 1–6; cstep 7 of the schedule is
cstep 1 of the next iteration):

| bus | c1 | c2 | c3 | c4 | c5 | c6 |
|---|---|---|---|---|---|---|
| 1 | 3 | 3 | t3 | t6 | – | y |
| 2 | u | t1 | t4 | t5 | – | y1 |
| 3 | x | t2 | u | – | u1 | x |
| 4 | dx | y | dx | – | dx | dx |

An empty cstep leaves the bus as it was, so each occupied slot has a
*predecessor*: the last occupied slot before it on the same bus, wrapping into
the previous iteration for the first slot. Each (predecessor, slot) is a
transfer pair whose toggles depend on the bit ordering. Of the 20 occupied
slots, 3 repeat the same value within one iteration (3→3, dx→dx twice); the
identity ordering already gives zero toggles there, so 17 pairs are solved.
All of this is computed from the table by package functions, so another
binding only needs a new table (and `N_VAR`, `N_BUS`, `N_STEP`).

The DFG (`diffeq_dfg`) evaluates, in 16-bit two's complement:
`t1=u*dx, t2=3*x, t3=3*y, t4=t1*t2, t5=t3*dx, t6=u-t4, u1=t6-t5, y1=u1*dx,
y'=y+y1, x'=x+dx`; `u1`, `x'`, `y'` are the next iteration's `u`, `x`, `y`.

## How an ordering becomes wires (bus_binder)

This is the part that needs the most care. An ordering for a pair is a
permutation `order[j] = i`: bit j of the later variable shares a wire with
bit i of the earlier one. Because bus wires are physical, the binder keeps,
per bus, a *wire map* `map[j]` = wire that carries bit j of the variable now on
the bus. Driving the next variable with ordering `order`:

```
map_new[j] = map_old[order[j]]        bus[map_new[j]] = value[j]
```

A wire then toggles exactly when the matched bits differ, so each pair costs
exactly its matching cost, independently of all other pairs. Maps chain from
transfer to transfer and across iterations, so they drift; that is harmless
because the current maps are outputs (`bus_map`) and any receiver recovers
bit j of bus b as `bus[b][bus_map[b][j]]`. Both ends of a real link would
keep the same map state; how the receiving side is built is outside this
design.

## Finding the orderings (bit_order_finder)

1. **Accumulate.** For `window_len` iterations, `sam_accumulator` counts, for
   every solved pair and every (i, j), the iterations in which earlier bit i
   and later bit j differ. Counts are used instead of averages; dividing by
   the window length would not change the optimum. Wrapping pairs use the
   previous iteration's record, kept in a register.
2. **Solve.** Input is paused. For each of the 17 pairs, `mwbm_solver` reads
   the matrix row by row and returns the optimal permutation.
3. **Hand over.** When the binder has finished the previous window
   (`hand_ok`: no released records left, binder idle), `done` pulses: the
   memory releases the window just measured and the binder loads the new
   orderings. Counting of the next window starts immediately.

So the ordering computed from a window is applied to that same window, which
is why the memory exists: records wait in `window_memory` (100 entries, two
windows) until their `done`.

### The assignment solver

`mwbm_solver` is the shortest-augmenting-path method with row prices u and
column prices v (the augmentation phase of the Jonker–Volgenant algorithm),
started from zero prices without its initialisation heuristics. Rows join one
at a time; a Dijkstra-like search over reduced costs `c(i,j) - u(i) - v(j)`
grows a tree of columns until it reaches a free column, then the matching is
flipped along the path. In hardware one search step takes one clock: all 16
reduced costs of the newest tree row are formed in parallel, the minimum over
columns outside the tree is found and all prices are updated together. The
flip takes one clock per column. Worst case N(2N+1) = 528 clocks per pair.
The final prices are outputs: `u(i)+v(j) <= c(i,j)` everywhere with equality
on matched edges proves optimality.

## Timing and flow control

* The DFG offers one record per clock while `run` is high; the scheme
  accepts it (`rec_accept`) while the finder is accumulating and the memory
  has room. It stalls while the finder solves or waits for the hand-over.
* Solving one window takes at most 17 x 530 + 24 clocks; in practice about
  2,500–5,000.
* The binder takes 6 clocks per record (one per cstep), back to back.
  `bus`, `bus_map`, `bus_step` are registered; `bus_valid` marks each cstep.
* `window_len` (1–50) is sampled when a window starts.
* Reset is asynchronous, active low. All parameters default to the example
  (`MAX_WINDOW = 50`).

## Measured behaviour

`tb/diffeq_iteration_sweep_tb.sv` runs 600 random-input iterations per window
length through the full design and compares the toggles with a model of the
same buses using the fixed ordering (TSA = toggles of all buses per
iteration):

| window (iterations) | 10 | 20 | 30 | 40 | 50 |
|---|---|---|---|---|---|
| TSA, fixed ordering | 129.4 | 130.3 | 129.7 | 130.5 | 129.9 |
| TSA, reordered | 76.5 | 92.2 | 99.2 | 103.6 | 106.4 |
| reduction | 40.9 % | 29.2 % | 23.5 % | 20.6 % | 18.1 % |

Shorter windows give larger reductions because the matching is fitted to the
very data it is applied to; the statistics of a short random window are far
from uniform. Conversely, a short window costs more solver activity per
transferred iteration, which is the trade-off that sets the window length.
The reported reduction does not include the power of the finder itself.

## Where the design departs from, or adds to, the method it implements

* The method as published solves a matching for every ordered pair of
  variables; here only the 17 pairs that actually meet on a bus under the
  fixed binding are measured and solved.
* The binding is the lower-TSA one of two example bindings of this DFG
  (TSA 104.15 with the fixed ordering on long random runs); the bindings
  from the optimal and heuristic binders the method is compared with are not
  available, and the offline binding step itself (long random simulation
  plus a binding algorithm) is not hardware and is not included.
* The Jonker–Volgenant initialisation heuristics are left out (optimality is
  unaffected, only speed).
* Flow control, the two-window memory, the wire-map chaining, the hold of
  idle buses, the pause during solving and the hand-over condition are this
  design's choices; the method only names the memory, the finder, the binder,
  `done` and the new bit ordering.
* The DFG is evaluated in one clock per iteration with 16-bit wrap-around
  arithmetic; only the bus transfers follow the 6-step schedule.

## Simulating

Every testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module dbr_top_tb \
    -y rtl rtl/dbr_pkg.sv tb/dbr_top_tb.sv
./obj_dir/Vdbr_top_tb
```

Replace the top module and testbench file for the others:

| Testbench | What it checks |
|---|---|
| `mwbm_solver_tb` | 16x16 optimality by dual certificate, 6x6 against exhaustive search, latency bound |
| `sam_accumulator_tb` | all counters against a model, wrap pairs, clear |
| `bit_order_finder_tb` | window length, pause while solving, hand-over, optimal cost of every pair vs a software Hungarian method |
| `window_memory_tb` | release rule, order, full |
| `bus_binder_tb` | wire-map chaining, decoding, idle hold, toggles = matching cost, 6 clocks/record |
| `diffeq_dfg_tb` | all variables vs a model, loop mode, stalls |
| `dbr_top_tb` | whole design at default size: lossless transfer, per-window toggles never above the fixed ordering, every mechanism exercised |
| `diffeq_iteration_sweep_tb` | switching activity vs window length (table above) |

## Changing it

* Another DFG or binding: edit `N_VAR`, `N_BUS`, `N_STEP`, `var_e` and
  `BINDING` in `dbr_pkg`, and supply the records (replace `diffeq_dfg`).
* Another word width: `WIDTH` in `dbr_pkg`; the solver is parameterized by
  `N`.
* Longer windows: `MAX_WINDOW` on `dbr_top` (counter width and memory depth
  follow).
* Area: the 17 x 256 counters (about 26 k flip-flops) dominate. Counting from
  the stored window, one pair at a time, would trade them for time.
