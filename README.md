# A Hamiltonian Cycle solver built from one state machine per vertex

A Hamiltonian cycle visits every vertex of a graph exactly once and returns to
where it started. Deciding whether one exists is NP-complete. The usual
software approach is depth-first backtracking, and on sparse random graphs it
can run for days. This design runs the same backtracking search in hardware,
and it does so in an unusual way. The circuit is built for one particular
graph, not for graphs in general. Every vertex becomes a small state machine,
and the machines are wired to each other only along the graph's edges. The
search stack is not stored in memory: it is the chain of machines that are
currently busy.

The graph is a compile-time parameter, so each graph produces its own
circuit. The cost of this is a fresh synthesis and place-and-route for every
graph. What you get back is a circuit with no memory, no instruction fetch and
no address arithmetic. Each step of the search takes one or two clock cycles.

## The vertex machine (`rtl/hc_vertex_fsm.sv`)

A vertex `R` with neighbours `NB_1 .. NB_d` has `d + 2` states:

| state   | meaning |
|---------|---------|
| Idle    | `R` is not on the current path |
| NB_k    | `R` is on the path and has handed control to neighbour `k` |
| Stuck   | `R` has no idle neighbour left to try; it backtracks next cycle |

Exactly one machine in the whole network is "in control" at any time. The
rules are:

* **Idle, activated:** go to the state of the first neighbour whose machine is
  Idle, and call that neighbour. If every neighbour is busy, go to Stuck.
* **NB_k, neighbour k idle again:** neighbour `k` has backtracked, so control
  is back with `R`. Move to the next neighbour after `k` (in order) that is
  Idle, and call it. If none is left, go to Stuck.
* **Stuck:** return to Idle on the next cycle. That return is the backtrack:
  the machine that called `R` sees `R` go Idle and takes control again.

Neighbours are tried in ascending vertex order, and a neighbour is tried at
most once per activation. A machine that is Idle again has forgotten
everything, so a later activation starts with its first neighbour.

### Passing control: the call pulse

This is the subtle part of the design. When `R` enters `NB_k`, it raises
`call_o[k]` for exactly one cycle. The activation input of a machine is the OR
of all call bits aimed at it, so the child leaves Idle one edge after the
parent chose it. During that cycle the child is still Idle, even though it has
not backtracked yet. The parent therefore ignores the child's idle flag while
its own call is fresh (`fresh_q`). From the next cycle on, "child is Idle"
means "child has backtracked". No separate return wire is needed.

The NB states are stored as a mode (`VX_IDLE`, `VX_NB`, `VX_STUCK`) plus a
one-hot vector `sel_q` that marks the current neighbour. The next candidate is
`NBRS & idle & (bits above sel_q)`, and the lowest set bit of that vector is
taken with `x & -x`. `NBRS` is the vertex's row of the adjacency matrix and is
a constant. Synthesis therefore removes every bit that does not belong to a
real neighbour, so a vertex of degree `d` needs about `d` state flip-flops. In a
coarse yosys synthesis of the default K35 circuit, the whole solver comes to
about 1,370 flip-flops and 3,100 word-level cells.

## Starting and stopping (`rtl/hc_control.sv`)

The search starts at an arbitrarily chosen initial vertex (`START`, default 0)
and ends in one of two ways:

* **noHamiltonian:** the initial vertex backtracks, which means it enters
  Stuck. Every path from it has been tried.
* **isHamiltonian:** no machine is Idle, so the busy chain is a path through
  all N vertices, and the machine in control is adjacent to the initial
  vertex. When the last vertex joins the path, all of its neighbours are
  already busy, so it goes straight to Stuck. The check is therefore "nothing
  Idle, and the vertex in Stuck is adjacent to `START`".

The controller states are `CTL_IDLE`, `CTL_LAUNCH`, `CTL_RUN` and `CTL_DONE`.
A `start_i` pulse, taken in `CTL_IDLE` or `CTL_DONE`, clears every machine on
the same edge. In the next cycle (`CTL_LAUNCH`) the controller activates the
initial machine. When an end condition holds, the controller drops `en_o` in
that same cycle, which freezes the network, and latches the answer. After
isHamiltonian, `vertex_active_o` stays all ones and the one machine in Stuck
is the last vertex of the cycle. A `start_i` pulse while busy is ignored.

## Top level (`rtl/hc_solver.sv`)

```
hc_solver #(
  parameter int unsigned N     = 35,                  // vertices
  parameter int unsigned START = 0,                   // initial vertex
  parameter hc_pkg::adj_t ADJ  = complete_graph(N)    // ADJ[i][j]=1: edge i-j
)
  input  clk, rst_ni (async, active low), start_i
  output busy_o, done_o, is_hamiltonian_o, no_hamiltonian_o
  output [N-1:0] vertex_active_o, vertex_stuck_o
```

`ADJ` is a 64 x 64 matrix (`hc_pkg::MAX_N = 64`, a limit chosen for this
design). Only its low `N x N` corner is used, and it should be symmetric with
a zero diagonal. Self loops are ignored anyway.

`hc_pkg` has two constant functions for building `ADJ`:

* `complete_graph(n)`.
* `random_graph(n, p_permille, seed)`. This generator uses the `drand48`
  recurrence `X' = (0x5DEECE66D·X + 0xB) mod 2^48`, seeded as `srand48` does.
  It adds edge `i-j` (for `i < j`) when `X'/2^48 < p/1000`. It rejects graphs
  that are trivially non-Hamiltonian (a vertex of degree below 2, or a
  disconnected graph) and moves on to the next seed.

### Timing

The search time is fully determined by the graph. The edge that samples
`start_i` also clears the network. Counting the edges after it, up to and
including the one at which `done_o` rises:

```
cycles = 1 (launch) + calls + 2 * backtracks + 1 (answer register)
```

Here `calls` is the number of times control moves forward, and `backtracks`
is the number of Stuck machines that return control to their caller. For the
default complete graph on 35 vertices this gives 36 cycles. Sparse random
graphs with 35 vertices and edge probability 0.12 to 0.15 are a different
matter. They need anywhere from about 10^6 to beyond 10^12 cycles, which is
seconds to days at 16 MHz. The hardware makes each search step cheap, but it
does not reduce the exponential number of steps.

Nothing in the circuit depends on the clock rate. Each machine's next state depends only on registered flags of its
neighbours plus one OR across the call bits aimed at it, so the critical path
is short and grows with vertex degree.

## Departures and open points

* **Graph as a parameter.** The original flow generated HDL for each graph
  from its adjacency matrix with scripts. Here SystemVerilog elaboration does
  the same job through the `ADJ` parameter. The default graph, `K35`, is this
  design's choice: no specific evaluated graph is available.
* **Neighbour order, call handshake, state encoding, and the
  reset/clear/enable inputs** are choices of this design. The state set, the
  "next idle neighbour" rule, the one-cycle Stuck and both end conditions
  follow the original algorithm.
* **Host interface.** On its original board, the solver sat behind a vendor
  PCI core and the board's interface logic. None of that is reproduced.
  Instead, the top level brings out plain `start_i`, `busy_o`, `done_o` and
  answer ports.
* The design reports only whether a cycle exists. On isHamiltonian the cycle
  can be read from the frozen machines, but no port brings out the vertex
  order.

## Verification

Each testbench checks its own results and ends with a
`TB_RESULT checks=N failures=M` line.

| testbench | what it does |
|-----------|--------------|
| `tb/tb_hc_vertex_fsm.sv` | First a directed walk through Idle, every NB state, Stuck and back to Idle, including the direct Idle-to-Stuck move. Then 20,000 random cycles compared against an index-based model. |
| `tb/tb_hc_control.sv` | Directed cases for both end conditions, a full path that does not close, a start ignored while busy, and a restart. Then random input patterns compared against a model. |
| `tb/tb_hc_solver.sv` | Twelve circuits side by side: small graphs with known answers (C4, K2,3, two triangles joined by a bridge, K5, a prism) and random graphs with 10 to 20 vertices. Each is checked against a software backtracking reference (`tb/hc_ref_pkg.sv`) for the answer, the exact cycle count, and the number of calls, backtracks and direct Stuck moves. Each is run twice. The test also counts every mechanism and fails if one never happens. |
| `tb/tb_hc_solver_full.sv` | The top level with all defaults (K35): isHamiltonian in 36 cycles, run twice. |
| `tb/tb_hc_workload_v35.sv` | Twenty 35-vertex random graphs, five each at edge probability 0.12, 0.13, 0.14 and 0.15. Each graph whose reference search ends within 3 million cycles is run and checked, and the others are reported as skipped. With the seeds in the file, 4 of the 20 run. The full set would need up to trillions of cycles. |

The helper `tb/hc_solver_check.sv` wraps one solver together with its
reference prediction and checks.

To simulate with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/hc_pkg.sv tb/hc_ref_pkg.sv tb/tb_hc_solver.sv --top-module tb_hc_solver
./obj_dir/Vtb_hc_solver
```

Substitute any other testbench name. `tb_hc_workload_v35` takes about a
minute to compile and a minute to run. The others finish within seconds.

To solve your own graph, instantiate `hc_solver` with `N` and `ADJ`. Either
call `hc_pkg::random_graph`, or write a constant function that sets the edges
you want, as `tb/tb_hc_solver.sv` does for its hand-made graphs.
