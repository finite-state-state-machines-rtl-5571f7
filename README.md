# Class AE finite state machine: state codes taken from the inputs

A Mealy FSM normally needs a transition-function circuit for every bit of its
state register. The class AE structure removes most of that circuit. It uses
the values of the input variables as part of the state code. If the next state
can be recognised from the input that caused the transition, the input itself
can be stored as the state code, and no logic has to compute it. Usually that
alone does not tell all states apart. In that case a few extra feedback bits,
formed the ordinary way, separate the states whose input-defined codes
overlap.

The code of the present state is the concatenation `a = {a', a''}`:

```
a'(t+1)  = z(t)               RG_E, L bits: just a register on the inputs
a''(t+1) = Phi(z(t), a(t))    RG_A, R bits: ordinary transition logic
w(t)     = Psi(z(t), a(t))    Mealy outputs
```

Two limiting cases are worth knowing:

* With `R = 0` this is a *class E* FSM. It has no transition logic at all, but
  few real FSMs can be built that way.
* With `L = 0` it is an ordinary Mealy (*class A*) FSM.

The method is aimed at FPGAs. It is reported to cut the LUT count of FSMs from
the MCNC benchmark set by a factor of 1.19 to 1.39 on average over several
Intel/Altera FPGA families, and by 3 for the `shiftreg` benchmark. The maximum
clock frequency sometimes goes up and sometimes goes down.

## Structure

```
 z ──┬──────────────────────────────────────────────┐
     ├──► RG_E ──► a' ──┬────────────────────────┐   ▼
     │                  │                        ├─► CL_Psi ──► w
     └──► CL_Phi ◄──────┤                        │
            ▲   │       │                        │
            │   └─► RG_A ──► a'' ──┬─────────────┘
            └────────────────────────┘  (a' and a'' fed back)
```

| Block | Module | What it does |
|---|---|---|
| RG_E | `rg_e` | `L`-bit register. It loads `z` on every clock edge. |
| RG_A | `rg_a` | `R`-bit register. It loads the transition functions `d1..dR`. |
| CL_Phi | `cl_phi` | Forms `d = Phi(z, {a', a''})`. |
| CL_Psi | `cl_psi` | Forms `w = Psi(z, {a', a''})`. |
| top | `fsm_ae` | Wires the four blocks together as shown above. |

`rtl/fsm_ae_pkg.sv` holds the default structure table (`shiftreg`).

CL_Phi and CL_Psi are not fixed circuits: their contents depend on the FSM.
In this RTL both are two-level AND-OR arrays driven by a *structure table*,
which is supplied through parameters. The synthesis tool flattens and
minimises the array for the table you give it. In the `shiftreg` default, for
example, CL_Phi reduces to two wires.

## From an FSM to a structure table

This is the part that needs care. The RTL does not perform these steps. You
perform them, by hand or with a script, and pass the result in as parameters.

### 1. Condition for an input-coded state

For every state `a_i`, collect `U(a_i)`: the set of distinct input conditions
(cubes over `x1..xL`, with don't-cares) on the transitions that enter `a_i`.
A state can be coded by its input condition alone when both of these hold:

* **(a)** `|U(a_i)| = 1`: every transition into `a_i` uses the same condition.
  Then the value left in RG_E identifies how the state was entered.
* **(b)** No other state is entered under that same condition. This keeps the
  machine deterministic.

### 2. Splitting states to satisfy (a)

A state entered under `Q > 1` different conditions is replaced by `Q` copies.
Copy `q` receives the transitions that use condition `q`. Every copy keeps all
of the original state's outgoing transitions. This is an equivalent
transformation: the input/output behaviour does not change. Repeat until every
state satisfies (a).

### 3. Ternary code matrix W

W has one row per (split) state and one column per input variable. Row `i`
is the single entry condition of state `a_i`:

* `1` or `0` where that condition tests the variable;
* `-` (don't care) where it does not.

When the FSM is in `a_i`, RG_E holds some input vector covered by this cube.

### 4. Orthogonalising the codes, which is where condition (b) fails

Two ternary rows are *orthogonal* if some column has `0` in one and `1` in
the other. No register value can then lie in both. The steps are:

1. Build the graph H: its vertices are the states, and an edge joins two
   states whose W rows are orthogonal.
2. Remove from H the vertices that are joined to all other vertices. These
   states are already unique.
3. Cover the remaining vertices with the minimum number `T` of cliques
   `H1..HT`. Inside a clique, the states are already told apart by their
   input part.
4. Give each clique a binary code of `R = ceil(log2 T)` bits. These are the
   feedback variables `e1..eR`.
5. Append the code to the W rows of the clique's states. The states removed
   in step 2 get zeros.

The full code of a state is its W row: the ternary input part over
`g1..gL` followed by the binary feedback part over `e1..eR`. Any two states
in different cliques now differ in the feedback part. Any two states in the
same clique differ in the input part. So every value of `{a', a''}` lies in
the code of at most one state.

### 5. Structure table

Each transition `a_m --X--> a_i / Y` becomes one row:

| field | width | content |
|---|---|---|
| `S_CARE[p]`, `S_VAL[p]` | `L+R` | code of the source state `a_m`. A CARE bit is 0 where the code has a dash. |
| `X_CARE[p]`, `X_VAL[p]` | `L` | the transition condition `X` as a cube |
| `D_VAL[p]` | `R` | feedback code of the target state `a_i` |
| `Y_VAL[p]` | `N` | outputs. Unspecified output bits are written as 0. |

The input part of the target's code needs no column: RG_E loads `z`
unconditionally.

### Worked example: `shiftreg` (the default)

`shiftreg` has 1 input, 1 output and 8 states. The state `st_k` is the last
three input bits. The transition is `st_k --x--> st_(4x + k/2)`, and the
output is `k[0]`, which is the input of three cycles ago.

* **Splitting.** None is needed: every transition into `st_k` has input
  `k[2]`.
* **Orthogonality graph.** The single W column is `0` for `st0..st3` and `1`
  for `st4..st7`. H is therefore the complete bipartite graph between the two
  halves.
* **Clique cover.** H is covered by `T = 4` pairs `{st_j, st_(j+4)}`, which
  gives `R = 2`.
* **Codes.** Pair `j` gets code `j`, so the code of `st_k` is exactly `k`.
* **Result.** `a'' <= {k[2], k[1]}` and `w = k[0]`.

### Worked example: a machine that needs splitting

`tb/ex_fsm_pkg.sv` has three states and two inputs. Every state is entered
under two or three different conditions:

* splitting turns the three states into 7;
* their input codes overlap (`0-`, `-0`, `10`, ...);
* H is covered by 3 cliques, so `R = 2`.

The package comment lists the codes, and the package holds the resulting
16-row table.

## Interface and timing (`fsm_ae`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock. Both registers load on the rising edge. |
| `rst_n` | in | 1 | asynchronous, active-low reset to `{RESET_E, RESET_A}` |
| `z` | in | `L` | input variables `x1..xL` |
| `w` | out | `N` | output functions `y1..yN`. They are combinational from `z` and the state (Mealy). |
| `a_e` | out | `L` | `a'`, the contents of RG_E |
| `a_a` | out | `R` | `a''`, the contents of RG_A |

**Parameters.** The sizes are `L`, `R`, `N` and `P` (the number of table
rows). The table itself is `X_CARE`, `X_VAL`, `S_CARE`, `S_VAL`, `D_VAL` and
`Y_VAL`. These are unpacked arrays of `P` entries, with entry 0 first. The
reset code is `RESET_E` and `RESET_A`. The defaults describe `shiftreg`.

**Timing.**

* The state changes once per clock.
* `w` is valid once `z` and the state have settled in a cycle.
* There is no pipelining and no handshake.

## Design choices beyond the method

* **Reset.** The reset is asynchronous, active low, to a chosen state code.
  The method itself says nothing about reset.
* **Table-driven CL_Phi and CL_Psi.** A hand-minimised circuit would behave
  the same. After synthesis the array is what a tool would build from the
  encoded table.
* **No matching row.** A state/input pair that matches no row drives `d` and
  `w` to zero. Register values that are the code of no state behave the same.
* **Determinacy check.** `cl_phi` contains an immediate assertion: at most
  one row may fire. If it fails, the table violates the orthogonality of the
  codes or describes a non-deterministic FSM.
* **Observation ports.** `a_e` and `a_a` are extra outputs for observation.
* **No pure class E build.** `R = 0` (zero-width vectors) is not supported.
  Use `R = 1` with all `D_VAL` zero instead.
* **Bit order.** `a'` sits in the upper bits of every state vector,
  `{g1..gL, e1..eR}`.

## Benchmarks

The method was evaluated on 11 MCNC benchmarks: dk15, dk16, dk17, dk27,
dk512, ex5, lion, lion9, shiftreg, train4 and train11.

* Only `shiftreg` is encoded here, as the default.
* Any of the others runs on this RTL once its class AE structure table has
  been worked out and passed in as parameters.
* Their standard MCNC sizes are 1 to 3 inputs, 1 to 5 outputs, 4 to 27 states
  and 11 to 108 transitions.

## Verification

Every testbench is self-checking. It ends by printing
`TB_RESULT checks=<n> failures=<m>` and has a watchdog.

| testbench | checks |
|---|---|
| `tb_rg_e`, `tb_rg_a` | Asynchronous reset code, load on each edge, and a reset in mid-run. Random data, 5-bit build. |
| `tb_cl_phi`, `tb_cl_psi` | Exhaustive over the default table, against the shift-register rule. Exhaustive over the example table, against the unsplit symbolic FSM and its code list. Unused codes must give zeros. |
| `tb_fsm_ae` | Runs the `shiftreg` build and the example build side by side on random inputs. It compares `w` every cycle and the state halves after every edge with reference models. It requires that every split state is entered, that overlapping input codes are resolved by `a''`, that every `shiftreg` state is entered, and that a mid-run reset occurs. |
| `tb_fsm_ae_shiftreg` | Default parameters only: 4000 random cycles. `w` must equal the input of three cycles earlier, and the state code must equal the last three inputs. |

To run one, for example the end-to-end test (the other testbenches only need
their own file in place of `tb/tb_fsm_ae.sv`):

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_fsm_ae \
    rtl/fsm_ae_pkg.sv tb/ex_fsm_pkg.sv tb/tb_fsm_ae.sv
./obj_dir/Vtb_fsm_ae
```

## Using it for another FSM

1. Work out the split states, the W matrix, the clique cover and the codes as
   described above.
2. Write the structure table in a package, as in `tb/ex_fsm_pkg.sv`.
3. Instantiate `fsm_ae` with `L`, `R`, `N` and `P`, the six table arrays, and
   the reset code of the initial state. The RG_E part of the reset code must
   lie inside the initial state's input cube.
4. Simulate with `--assert`. The determinacy assertion catches most encoding
   mistakes.
