# Asynchronous sequential circuits with flip-flops as the memory elements

In a classic asynchronous (Huffman-style) design the state lives in
combinational feedback loops. Every next-state equation must carry hazard
covers, and every loop is a place where a race can go wrong. This design
moves the state into flip-flops instead, and shows what that costs:

* An **RS flip-flop** can hold any state variable of any asynchronous flow
  table. Its set and reset inputs are read off the table with the
  characteristic equation `Q = S + !R·q`, under the single rule `S·R = 0`.
* The **transition flip-flops** are master-slave D, T and JK flip-flops
  built from two RS latches. Each holds *two* state variables, the master
  and the slave, so one of them can take two variables of the machine at
  once. Their own next-state equations then fix some next-state values. The
  state assignment must agree with these fixed values, or the flip-flop
  cannot be used.

The worked example is a counter with no clock. It produces one output pulse
for every three input pulses. The RTL gives it twice: once with three RS
flip-flops and once with a D flip-flop plus one RS flip-flop. The T and JK
flip-flops are provided as building blocks next to it.

Everything here is fundamental-mode asynchronous logic. It has latches and
combinational loops, and no clock anywhere.

## The counter's state table

The input `in` is a pulse train. The circuit steps through six stable
states, two per pulse (one with `in` high, one with it low):

| state | `{q1,q2,q3}` | next, in=0 | next, in=1 | out |
|---|---|---|---|---|
| 1 | 000 | 1 | 2 | 0 |
| 2 | 001 | 3 | 2 | 0 |
| 3 | 011 | 3 | 4 | 0 |
| 4 | 010 | 5 | 4 | 0 |
| 5 | 110 | 5 | 6 | 1 |
| 6 | 100 | 1 | 6 | 1 |

The output is `q1`. It rises when the input falls after the second pulse,
and falls when the input falls after the third pulse. Every transition
changes one state variable, so the table has no critical races. The codes are
the enum `cnt_state_e` in `counter_pkg`.

## The RS flip-flop (`rs_ff`)

`rs_ff` is a level-sensitive latch. A high `s` sets it, a high `r` clears
it, and with both low it holds. If the rule `S·R = 0` were broken, set
would win. In simulation, a deferred assertion reports any such violation.
Every circuit here drives the two inputs with terms that exclude each other
by construction. For example, `S3 = in·!q1·!q2` and `R3 = in·q2` can never
both be 1.

### Counter with three RS flip-flops (`counter_rs`)

There is one `rs_ff` per state variable:

```
S1 = !in·q2·!q3    R1 = !in·!q2
S2 = !in·q3        R2 = in·q1
S3 = in·!q1·!q2    R3 = in·q2
```

Each pair is found cell by cell. Where the table needs a 1, set it, or have
the variable already 1 and not reset. Where it needs a 0, reset it, or have
the variable already 0 and not set. Every other cell is a don't-care.

## The transition flip-flops

All four have the same skeleton: a master RS latch (`y1`) feeds a slave RS
latch (`q`). While the clock is low, the master responds to the data
inputs. While the clock is high, the slave copies the master:

| flip-flop | master set | master reset | module |
|---|---|---|---|
| D | `D·!C` | `!D·!C` | `d_ff` |
| non-clocked T | `!T·!q` | `!T·q` | `t_ff_nc` |
| clocked T | `T·!C·!q` | `T·!C·q` | `t_ff_clk` |
| JK | `J·!C·!q` | `K·!C·q` | `jk_ff` |

In all four the slave is set by `C·y1` and reset by `C·!y1`; for the
non-clocked T, T takes the place of C. The clock and T pins are active low,
as the circuits are drawn: `c_n = !C` and `t_n = !T`. Each module also
brings out the master state `y1`.

Behaviour at the pins:

* **`d_ff`** takes the value D had just before C rose.
* **`t_ff_nc`** toggles on every rising edge of T. It is a D flip-flop
  clocked by T whose D input is its own inverted output.
* **`t_ff_clk`** toggles at the rising edge of C if T was high while C was
  low.
* **`jk_ff`** sets, clears, toggles or holds at the rising edge of C,
  according to J and K while C was low.

The masters of the T and JK flip-flops catch ones. A pulse on T, J or K at
any time while C is low is stored and acted on at the next rising edge, even
if the input has returned to 0 by then. Keep those inputs stable, or low,
while the clock is low.

### Constraints a transition flip-flop puts on a state assignment

The slave equation of every transition flip-flop is `Q2 = !C·q2 + C·q1`.
Whatever C is, the slave must therefore go to 0 when master and slave are
both 0, and to 1 when both are 1. A pair of state variables can sit in a D
flip-flop only if the flow table already has those next-state values. The
T and JK flip-flops add a constraint on the master: it must stay 1 when
master=1 and slave=0, and stay 0 when master=0 and slave=1. The T
flip-flops are also harder to fit because a single input (T, or T with C)
must produce both next values. Where a table does not meet these
conditions, extra state variables and transition states have to be added.
Here the T and JK flip-flops are stand-alone building blocks, and only the
D flip-flop is used in a counter.

### Counter with a D flip-flop and an RS flip-flop (`counter_dff`)

With `q1` as the slave and `q2` as the master, the counter's table meets
the D flip-flop's constraints. `q3` stays in an `rs_ff`:

```
C  = !in·!q3          (drives c_n = in + q3)
D  = !in + !q1·q2
S3 = in·!q1·!q2,  R3 = in·q2
```

The circuit uses the master state `q2` directly. This is why `d_ff` brings
out `y1`.

The `!q1` factor in `D` matters. The original derivation of this counter
gives the simpler form `D = !in + q2`, which leaves the counter stuck in
state 5 (110). When the third pulse arrives, the master must clear, but
that form keeps it set, so the counter never reaches state 6. `D = !in + !q1·q2` agrees with every cell of
the state table.

## Top level (`async_ff_top`)

The top has one shared clear, `rst`, and plain-signal ports. It contains:

* `counter_dff` and `counter_rs`, both fed by `cnt_in`, so that they can be
  compared state by state.
* `t_ff_nc`, `t_ff_clk` and `jk_ff`, each with its own inputs and outputs
  (`tnc_*`, `tc_*`, `jk_*`). They are not connected to the counters.

`d_ff` and `rs_ff` are reached through the counters. The top has no
parameters.

## Departures and additions

* **Clear input.** Every latch has an asynchronous clear, `rst`, and the
  counters clear to state 1. The circuits as designed have no reset. Without
  one, a counter could power up in an unused code (101 or 111).
* **D equation** of `counter_dff`: see above.
* **JK hold case.** With C low, master=1, slave=0 and J=0, K=1, the JK
  master holds at 1. This follows the JK next-state equation and the gate
  structure. A textbook JK would clear the master in this case, and so does
  the original JK next-state map in this one cell. The map disagrees
  with its own equation and circuit here, and the RTL follows those two.
* **Hazard covers.** The consensus terms in the flip-flops' next-state
  equations (for example `q1·!q2`) exist only to cover hazards in a
  gate-level loop. They are not built, because the latches hold the state.
* **Latch primitive.** `rs_ff` is written as a behavioural latch
  (`always_latch`), not as cross-coupled gates.
* **Not built.** The more robust flip-flops that would change one or two
  next-state sequences against input glitches are only mentioned as an idea,
  and are not designed. The same goes for radiation-hardened versions of the
  flip-flops.

## Timing rules for users

* **Fundamental mode.** Change one input, then wait until the circuit has
  settled before changing the next. The testbenches wait 5 to 40 time units
  between input changes.
* **Counters.** Each input edge moves the counter exactly one state.
* **Transition flip-flops.** Keep D (and T, J, K) stable around the rising
  edge of C.
* **No delays.** The RTL has no delays. Real hazards and essential hazards
  depend on the gate delays of the final implementation, and zero-delay
  simulation does not show them.

## Tool warnings

Lint and synthesis report latches and combinational loops in every module
that uses `rs_ff` (Verilator `UNOPTFLAT`; yosys "logic loop"). These are the
circuit itself: asynchronous state machines. Verilator's `PINCONNECTEMPTY`
warnings mark complement outputs of `rs_ff` that are deliberately unused.

## Simulating

Each module has a self-checking testbench, `tb/tb_<module>.sv`. It prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. The
references in the testbenches are the flow tables and next-state maps, not
the gate equations. The end-to-end test `tb_async_ff_top` also counts the
mechanisms it exercises: counter wraps, T toggles, clocked-T toggle and
hold, and JK set, reset, toggle and hold. It runs the top unmodified.

```
verilator --binary --timing --assert -Wno-fatal -y rtl +libext+.sv \
    --top-module tb_async_ff_top rtl/counter_pkg.sv tb/tb_async_ff_top.sv \
    -Mdir obj -o sim
./obj/sim +verilator+rand+reset+2
```

To run another block, change the top module and the testbench file. The
package file has to come first on the command line, and `-y rtl` finds the
modules. `-Wno-fatal` is needed because Verilator stops on the expected
`UNOPTFLAT` loop warnings otherwise. `+verilator+rand+reset+2` starts
uninitialised state at random values. The clear input then has to bring
the design to a known state, and the testbenches check that it does.

## Files

| file | contents |
|---|---|
| `rtl/counter_pkg.sv` | state codes of the counter |
| `rtl/rs_ff.sv` | RS flip-flop (latch) |
| `rtl/d_ff.sv`, `rtl/t_ff_nc.sv`, `rtl/t_ff_clk.sv`, `rtl/jk_ff.sv` | transition flip-flops |
| `rtl/counter_rs.sv`, `rtl/counter_dff.sv` | the two counter realizations |
| `rtl/async_ff_top.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module |
