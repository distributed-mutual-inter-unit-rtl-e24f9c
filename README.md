# Mutual inter-unit test with round-robin collision resolution

A mesh of processor cores has to find its own faulty cores while it keeps
running. Letting each core test itself is cheap but unreliable: a broken
self-test unit either hides a fault or reports a healthy core as broken. In
this design every core is tested by **2d + 1 units** — its own self-test unit
and one check unit in each of its 2d direct neighbours of a d-dimensional
mesh — and a core is declared faulty only when the **majority** of those
verdicts says so. A single wrong verdict is outvoted.

Many testers sharing one core creates a second problem: two of them may start
testing it at the same time. Each node therefore carries a small
**round-robin arbiter**: a ring of 2d + 1 flip-flops holding one token. Only
the unit whose slot holds the token may start a test on that node, and the
ring stops moving while that test runs. No node is ever tested by two units
at once, and no schedule of test times has to be worked out in software.

All of this is plain synchronous logic, one clock, parameterised in the
dimension `D`. The default configuration is a 2-dimensional 4 x 4 mesh with
16-bit test signatures and 16-bit response tokens.

## The mesh and its neighbour numbering

`mit_mesh` builds `SIZE[0]·SIZE[1]·…·SIZE[D-1]` nodes; in two dimensions
`SIZE[0]` is the number of rows m and `SIZE[1]` the number of columns n. Node
`n` has coordinates given by the mixed-radix digits of `n` (digit 0 first,
digit k running over `0 .. SIZE[k]-1`), so in two dimensions
`n = y + m·x`. The mesh wraps around at its edges,
so every node has exactly 2d neighbours, and a node on an edge is tested by the
node on the opposite edge.

Directions are numbered 1 .. 2d:

| direction | neighbour                     | 2-D (`c[0]` = y, `c[1]` = x) |
|-----------|-------------------------------|------------------------------|
| i ≤ d     | coordinate `i-1` plus one     | 1 = up, 2 = right            |
| d + i     | coordinate `i-1` minus one    | 3 = down, 4 = left           |

The node in direction `i` sees this node in direction `opp(i) = ((i-1+d) mod 2d) + 1`.
`mit_pkg::nbr_index` and `mit_pkg::opp_dir` compute both. The tester link
`t_*[i]` of node `n` is wired to the tested link `s_*[opp(i)]` of its
neighbour in direction `i`.

## One node

`mit_node` holds the test hardware of one node:

```
              start, T(k), R0(k)                       healthy (generalized flag)
   tou  ───────────────┬────────────────┐                  ▲
    ▲ done[0..2d]      │                │               majority
    │            ┌─────┴─────┐   ┌──────┴──────┐           ▲  votes: own STU verdict
    │            │ STU (ncu) │   │ NCU1..NCU2d │ ── t_* ──► │  + s_phi[1..2d]
    │            └─────┬─────┘   └─────────────┘  links to the neighbours it tests
    │                  │ z = AF0, b
    │   cpg ─CLK1─► rr_arbiter  AF0 .. AF2d ◄── s_b[j] ; AFj ──► s_z[j]
    │                  │ token steers the core test port
    └──────────────  core_req / core_sig ──► core ──► core_resp ──► all testers
```

* **`tou`, test organisation unit.** Runs the outer loop: wait `TAU_LOOP`
  cycles, read signature `T(k)` and its expected response `R0(k)` from a
  constant table of `KMAX` entries, pulse `start` to all 2d + 1 threads at
  once, wait until every thread has reported `done`, increment `k` modulo
  `KMAX`, repeat. A node whose own generalized flag says *faulty* stops
  testing for good (`st_halted`).
* **`ncu`, test thread.** One instance per neighbour (NCU1 .. NCU2d) and one,
  wired to the own core, as the self-test unit (STU). It latches `T(k)` and
  `R0(k)`, spins until the tested node's arbitration flag `z` is high, then in
  that same cycle pulls its free flag `b` low and strobes `req` with the
  signature. After `TAU_RESP` cycles it samples the response lines, compares
  them with `R0(k)`, clears its verdict `phi` on a mismatch, raises `b` and
  pulses `done`. A missing response is a mismatch too.
* **`rr_arbiter`, collision resolution.** See below.
* **`cpg`, clock pulse generator.** A modulo-`CLK1_DIV` counter whose
  one-cycle pulse `clk1` steps the arbitration ring.
* **`majority`.** Votes over the own STU verdict and the verdicts of the 2d
  testers about this node; the result is the node's `healthy` flag.
* **Core test port.** Because exactly one unit holds the token, the port into
  the core is a multiplexer steered by the token; the core's response goes
  back on every link and only the token holder samples it.

### The test thread, cycle by cycle

```
cycle      t0-1   t0        t0+1 ...  t0+TAU_RESP   t0+TAU_RESP+1
state      SPIN   SPIN      TEST      TEST (tau=0)  IDLE
z          0      1         x         x             x
req        0      1         0         0             0
b (free)   1      0         0         0             1
done       0      0         0         1             0
response                    must be valid by the end of cycle t0+TAU_RESP
```

The core therefore has `TAU_RESP` cycles (16 by default) to answer and must
hold its answer until its next request. The tested node sees `b` low for
`TAU_RESP + 1` cycles.

## Round-robin collision resolution

The arbiter is the part that makes the scheme safe, and its timing is the one
thing to get right when changing the design.

**Slots.** Flag AF0 belongs to the node's own STU; flag AFj (j = 1 .. 2d)
belongs to the neighbour in direction j and leaves the node as that
neighbour's `z` input. Reset sets AF0 and clears the others, so every node
starts with a self-test permission.

**Stepping.** On every `clk1` pulse the token moves AF0 → AF1 → … → AF2d → AF0,
*unless* the unit in the token's slot has its free flag `b` low. Written as
the gate condition:

```
step = clk1 & AND over j of ( ~AF[j] | free[j] )
```

The token moves on whether or not the slot's unit wanted to test; a unit that
was not ready simply waits for the next time round.

**Why there is no collision.** A thread may start only in a cycle in which it
sees its `z` high, and it pulls `b` low *combinationally in that same cycle*.
So a `clk1` pulse that arrives in the start cycle already finds the holder
busy and cannot move the token away. From then on `b` stays low until the
response has been sampled. Since the token is unique, at most one unit can be
between "saw `z`" and "raised `b`" at any time. The combinational path runs
from the `af` register of one node through the thread's grant logic to the
ring enable of the same node; there is no loop, because `af` is a register.
`mit_node` asserts in every cycle that a busy unit holds the token, and
`rr_arbiter` asserts that the token is one-hot and does not move while its
holder is busy.

**Waiting time.** With an idle ring a slot comes round every
`(2d+1)·CLK1_DIV` cycles (20 at the defaults). Every other slot the token has
to pass may hold a test of `TAU_RESP + 1` cycles. A test loop, from the launch
of the threads to their join, therefore lasts at most
`(2d+1)·CLK1_DIV + (2d+1)·(TAU_RESP+1) + CLK1_DIV + 2` cycles: 111 at the
defaults (97 is the longest seen on the default mesh), 153 for d = 3 and 195
for d = 4. Loops are then `TAU_LOOP + 1` cycles apart. The arbiter is fair:
every slot gets the token once per turn of the ring.

Each arbitration flip-flop of the original scheme is a JK flip-flop with an
inverter from J to K, i.e. a D flip-flop loading its ring predecessor, clocked
through AND gates. Here it is a D register with a clock enable, which is the
same function without a gated clock.

## Verdicts and what happens to a faulty core

Every verdict `phi` starts at 1 (healthy) after reset. A thread clears it on
the first mismatch and never sets it again, so a detected fault is permanent
until the next reset. A core that returns wrong results or nothing is seen by
all 2d + 1 of its testers within one test loop (for a core that stops
answering, one loop later at most, because its last correct answer can still
be on the lines); its majority drops, its `healthy` output goes low and its
test organisation unit halts. A single faulty check unit that wrongly accuses
a healthy neighbour is outvoted 2d to 1.

The `healthy` flags are outputs of the mesh, and each node's flag is also
handed to its 2d direct neighbours: `nbr_healthy[n][i]` is the flag node `n`
receives from its neighbour in direction `i`. What a core does with a
neighbour's flag (isolation, rerouting, spare replacement) is outside this
design.

## Links and connection count

Per direction a node has one tester link and one tested link, each carrying

| signal | width | from → to          | meaning                                      |
|--------|-------|--------------------|----------------------------------------------|
| `req`  | 1     | tester → tested    | signature strobe                             |
| `sig`  | W_T   | tester → tested    | test signature `T(k)`                        |
| `b`    | 1     | tester → tested    | free flag, low while the tester tests        |
| `phi`  | 1     | tester → tested    | tester's verdict, input of the majority gate |
| `resp` | W_R   | tested → tester    | response token                               |
| `z`    | 1     | tested → tester    | arbitration flag AFj: permission to start    |

That is `W_T + W_R + 4` wires per link. Counting the generalized flag once for
each neighbour it goes to (the `nbr_healthy` wires), a node needs
`2d·(2·(W_R + W_T + 4) + 1)` test terminals: 292 for
the default d = 2 with 16-bit signatures and responses, 584 for d = 4. The
count grows linearly in d because only direct neighbours test each other.

## Parameters

| parameter  | default | meaning                                                  |
|------------|---------|----------------------------------------------------------|
| `D`        | 2       | mesh dimension d; 2d + 1 testers and flags per node      |
| `SIZE`     | 4 per dimension | nodes per dimension (`mit_mesh` only, ≥ 2 each), a packed `mit_pkg::dims_t`, e.g. `'{0: 3, 1: 5, default: 1}` for 3 rows × 5 columns |
| `W_T`      | 16      | test signature width                                     |
| `W_R`      | 16      | response token width                                     |
| `KMAX`     | 8       | number of test signatures in the table (≥ 2)             |
| `TAU_LOOP` | 64      | cycles between two test loops                            |
| `TAU_RESP` | 16      | response window of a test, cycles                        |
| `CLK1_DIV` | 4       | node clock cycles per arbitration pulse                  |

The signature table holds `T(k)` = low `W_T` bits of `v ^ (v >> 32)` with
`v = (k+1)·0xD1B54A32D192ED03` (64-bit), and `R0(k)` = low `W_R` bits of
`r ^ (r >> 29) ^ 0x5A5A` with `r = T(k)·0x9E3779B97F4A7C15`. The second formula
stands for "the result of the test routine a healthy core runs for signature
`T(k)`"; replace both functions in `mit_pkg` with the real routine table of
your cores.

## What follows the method and what is this design's choice

Taken from the method: testers are the 2d direct neighbours plus the self-test
unit; wrap-around at the edges; the neighbour numbering; the test loop with
its timer, signature counter and parallel threads joined before the next
signature; the thread sequence (spin on the flag, lower `b`, send, time out,
compare, clear the verdict on mismatch, raise `b`); the ring of 2d + 1
arbitration flip-flops with AF0 set by reset and its stepping blocked while
the holder tests; the majority over 2d + 1 verdicts; the terminal count per
link.

Chosen here, where the method leaves it open:

* one clock; CLK1 is an enable pulse from a counter, ratio 4;
* the fourth one-bit signal of a link is a request strobe;
* `b` drops in the same cycle the thread sees `z`, which closes the race
  between a starting thread and a stepping ring;
* the response is sampled once, at the end of a fixed window;
* verdicts are sticky; a node judged faulty stops testing;
* one expected-response table for all threads, since all cores are identical;
* one response time limit `TAU_RESP` for every thread and one table length
  `KMAX` for every node (the method allows a limit per tested node and a
  length per node; with identical cores one value each suffices);
* the signature table contents, all widths, `KMAX`, `TAU_LOOP`, `TAU_RESP`
  and the 4 x 4 default size;
* the token-steered core test port.

The processor cores and their test routines are not part of the design. The
mesh exposes each core's test port (`core_req`, `core_sig`, `core_resp`);
`tb/core_model.sv` is a behavioural stand-in with healthy, wrong-result and
no-response modes.

## Files

| file                    | content                                              |
|-------------------------|------------------------------------------------------|
| `rtl/mit_pkg.sv`        | defaults, neighbour arithmetic, signature/response functions |
| `rtl/mit_mesh.sv`       | top: the wrap-around mesh                             |
| `rtl/mit_node.sv`       | test hardware of one node                             |
| `rtl/tou.sv`            | test organisation unit                                |
| `rtl/ncu.sv`            | test thread (NCU and STU)                             |
| `rtl/rr_arbiter.sv`     | arbitration ring                                      |
| `rtl/cpg.sv`            | CLK1 pulse generator                                  |
| `rtl/majority.sv`       | majority gate                                         |
| `tb/core_model.sv`      | behavioural core with fault modes                     |
| `tb/tb_*.sv`            | self-checking testbenches                             |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends. With
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb rtl/mit_pkg.sv \
          tb/tb_mit_mesh.sv --top-module tb_mit_mesh
./obj_dir/Vtb_mit_mesh
```

`-Wno-fatal` is needed because the mesh testbenches `force` one thread's
verdict register to model a broken test unit, which Verilator reports as a
second driver.

| testbench          | what it exercises                                                    |
|--------------------|----------------------------------------------------------------------|
| `tb_mit_mesh`      | default 4 x 4 mesh, all parameters at their defaults: a full pass over the signature table, then a wrong-result core, a dead core and a forced false verdict; counts self-tests, neighbour tests, spins, ring holds, counter wraps, detections, halts, the outvoted false verdict and the faulty flag reaching the neighbours' `nbr_healthy`; checks the longest test loop against the bound above (about 8 s) |
| `tb_mit_mesh_rect` | same scenario on a rectangular mesh of 3 rows × 5 columns; also checks the neighbour rule against explicit row/column arithmetic |
| `tb_mit_mesh_3d`   | same scenario on a 3 x 3 x 3 mesh (d = 3, 7 flags per node)          |
| `tb_mit_mesh_4d`   | same scenario on a 3^4 mesh (d = 4, 9 flags per node, about 40 s)    |
| `tb_mit_node`      | one node with its links looped back onto itself: request order, signatures, test length, detection of wrong and missing responses |
| `tb_ncu`           | thread timing, `b` window, verdict on match, mismatch, late response |
| `tb_tou`           | loop timing, table contents, join, counter wrap, halting             |
| `tb_rr_arbiter`    | random pulses and free flags against a token model                   |
| `tb_cpg`, `tb_majority` | pulse spacing; exhaustive majority for 5 and 7 votes           |
| `tb_connectivity`  | terminal count of a node for d = 2, 3, 4 and two widths              |
| `tb_detection_probability` | Monte Carlo: majority gates of 5, 7 and 11 votes fed with test units that are right with probability pi, against the binomial detection probability |

The assertions in `rr_arbiter` and `mit_node` are active with `--assert` and
stop the simulation on a collision.

## How far to trust it

Every module passes lint and elaboration in two tools, and every testbench
passes. The end-to-end runs show collision freedom, detection of both fault
kinds and outvoting of one false verdict. Nothing here has been
synthesised for a particular technology or timed. The detection-probability
gain of the majority vote is checked only statistically, on the majority gate
with independent random verdicts; real test units are not independent in that
way.
