# Asynchronous dual-rail RSFQ 4-bit adder: cycle-accurate cell models

Rapid Single Flux Quantum (RSFQ) superconducting logic carries bits as
picosecond voltage pulses, not as levels. A synchronous RSFQ gate has to latch
its inputs and wait for a clock pulse. Distributing that clock at tens of GHz
is the hard part of RSFQ timing. The clock can be removed with **dual-rail
coding**. Every logical signal gets two lines: a pulse on one line means 1, a
pulse on the other means 0, and no pulse yet means "not arrived". A gate then
knows by itself when its inputs are complete. It holds what has arrived,
fires when the last input comes in, and passes its own result on as a pulse.

This RTL models such a circuit: the splitter, dual-rail AND and XOR cells, a
half adder, a full adder and a 4-bit ripple-carry adder built from them. Each
cell has the delays of the physical cell. A gate's delay can depend on which
input arrived last and on the input values. The point of the models is to run
timing studies of the whole adder (its total delay for a given bit pattern and
arrival schedule) in a digital simulator instead of an analog circuit
simulator.

## The time-step model

The models are synchronous SystemVerilog, but the clock is **not** a clock of
the circuit being modelled. It is the simulation time step. One cycle stands
for one picosecond, the resolution at which the cell delays are given. So:

* a pulse is a signal that is high for exactly one cycle;
* a delay of *d* ps is *d* cycles: a pulse entering a cell in cycle *t* leaves
  it in cycle *t + d*;
* `rst_n` (asynchronous, active low) clears every held value and every pulse
  in flight. The physical circuit has no such reset. It is there so that a
  simulation starts from a known state.

Delays are **transport** delays. A pulse already on its way is never
swallowed by a later one, even when pulses follow each other closer than the
cell delay. The helper `pulse_delay` does this with a shift register moving
toward its output. A pulse that must come out after *d* cycles is written into
stage *d−1*, so pulses with different delays can share one line.

A dual-rail signal is the packed struct `dr_pkg::dr_t` with fields `one` and
`zero` (the `_1` and `_0` lines). A valid datum is one single-cycle pulse on
exactly one of the two fields.

## The dual-rail gate (`dr_and`, `dr_xor`)

This is the cell that makes the circuit asynchronous. Each input has a
one-bit "held" flag and a value bit.

1. When a pulse arrives on an input whose partner has not arrived yet, its
   value (which rail pulsed) is stored and the flag is set.
2. In the cycle in which the second input arrives, or both arrive together,
   the gate computes its function from the stored and the arriving value. It
   writes one pulse, on `y.one` or `y.zero`, into its output delay line and
   clears both flags. It is then ready for the next datum.
3. The delay of that pulse is read from the parameter `T_OUT`, a table indexed
   `[order][{a, b}]`:
   * `order` is `ORD_A_FIRST` (a was held, b came last), `ORD_B_FIRST`
     (the reverse) or `ORD_SAME` (both in the same cycle);
   * `{a, b}` are the two input values.

   That gives 12 delays per gate, one for every arrival case. This mirrors
   how the cell is characterised: by analog simulation of every arrival
   order and input pattern.

Assertions check the dual-rail protocol: never both rails of one input at
once, and no second datum on an input before the other input has used the
first. What the gate does when the protocol is broken is not defined.

`dr_xor` is the same cell with XOR as its function.

## Splitter (`rsfq_splitter`)

An RSFQ line cannot simply fan out, so every branch point needs a splitter
cell. It has no state and a single delay, 11 ps by default. Every pulse on
`signal_in` appears on `out_a` and `out_b` `T_OUT` cycles later. It is a
single-rail cell: a dual-rail signal needs two splitters.

## Half adder, full adder and the carry OR

`dr_half_adder` puts a splitter on each of its four input lines (`a.one`,
`a.zero`, `b.one`, `b.zero`). One branch of each goes to a `dr_and`, which
gives the carry `c`, and the other to a `dr_xor`, which gives the sum `s`.
Both gates therefore see the inputs 11 ps after the half adder does.

`dr_full_adder` is the textbook arrangement:

```
a, b  --> HA1 --s1--> HA2 (a = s1, b = ci) --> s
              --c1--+
                    +--> carry OR --> co
     HA2 --c2-------+
```

There is no dual-rail OR cell. The carry OR is a `dr_and` whose two inputs and
whose output each have their rails swapped. Inverting a dual-rail signal
costs nothing, because it only exchanges its two lines, so
`c1 | c2 = ~(~c1 & ~c2)` takes no extra cells. The OR stage has its own delay
table `T_OR`. That table is indexed by the inverted values the AND cell
actually sees: its entry `{0,0}` is used when both carries are 1.

## The 4-bit ripple-carry adder (`dr_rca4`, top level)

`N = 4` full adders are chained. Bit 0 takes the carry in `ci`, and bit *i*
passes its carry out to bit *i+1*. `co` is the carry out of bit 3.

| port | width | meaning |
|------|-------|---------|
| `clk`, `rst_n` | 1 | time step (1 cycle = 1 ps), asynchronous reset |
| `a`, `b` | `dr_t [N-1:0]` | operands, bit 0 least significant |
| `ci` | `dr_t` | carry in |
| `s` | `dr_t [N-1:0]` | sum bits |
| `co` | `dr_t` | carry out (sum bit N) |

To add two numbers, send one pulse on each operand bit and on `ci`, at any
times and in any order. Each full adder fires as soon as its three inputs are
present. The addition is complete when all of `s` and `co` have pulsed once;
the rail that pulsed is the bit's value. A pulse on either rail is that
bit's completion signal. Start the next addition only after all outputs of
the previous one have come out.

Because every gate waits for all its inputs, the total delay is set by the
latest arrivals and by the delays along the path they take. With the
placeholder delays below, every table entry is the same. The delay then
depends only on the arrival schedule, not on the bit values. Data-dependent
delays appear as soon as the tables hold cell-specific values.

## Cell delays: what is given and what is a placeholder

| parameter | default | status |
|-----------|---------|--------|
| `T_SPLIT` / splitter `T_OUT` | 11 ps | the splitter's cell delay |
| `T_AND`, `T_XOR`, `T_OR` (12 entries each) | 20 ps in every entry | **placeholder** |

The AND/XOR delay values come from analog simulation of a specific cell
library and are not reproduced here. Treat any absolute delay this model
prints as a property of the placeholders. For real numbers, pass tables, for
example:

```systemverilog
localparam dr_pkg::delay_tab_t MY_AND = '{
  /* ORD_SAME    */ '{8'd27, 8'd25, 8'd25, 8'd24},   // {a,b} = 11,10,01,00
  /* ORD_B_FIRST */ '{8'd26, 8'd24, 8'd23, 8'd22},
  /* ORD_A_FIRST */ '{8'd26, 8'd23, 8'd24, 8'd22}};
dr_rca4 #(.T_AND(MY_AND), .T_XOR(MY_XOR), .T_OR(MY_AND)) u_add (...);
```

(The table is a packed array: the first element listed is index 2.) Every
entry must be between 1 and 255. Each gate's delay line is as deep as the
largest entry of its table.

## Departures and choices to be aware of

* **Time resolution.** Delays are whole picoseconds. Finer timing would need a
  shorter time step, that is, a new unit for every delay.
* **Arrival order is coarse.** A gate sees only "a first", "b first" or "same
  picosecond". It does not see how far apart the two inputs were, although a
  real cell's delay varies with that separation.
* **Which carry is which.** In the full adder, the first half adder's carry
  drives the OR stage's `a` input. This matters only for the order-dependent
  lookup.
* **Reset** exists only in the model (see above).
* **Protocol violations** are reported by assertions, not modelled.
* Only the parallel (ripple-carry) adder is provided. No dual-rail
  bit-serial adder is included.

## Verification

Each testbench is self-checking. Each computes the expected output values
and exact output times with an independent event-level timing model,
`tb/dr_ref_pkg.sv`. That model works on (time, value) events: a splitter
adds its delay, and a gate fires at the later input time plus its table
entry. The adders are composed from those functions.

| testbench | what it covers |
|-----------|----------------|
| `tb_rsfq_splitter` | single pulses and dense bursts (spacing below the delay); both outputs exact to the cycle |
| `tb_dr_and`, `tb_dr_xor` | all 4 input patterns in all 3 arrival orders, plus 600 random cases; a delay table with 12 distinct entries, so a wrong lookup shows as a wrong time |
| `tb_dr_half_adder` | random values and times; distinct splitter, AND and XOR delays |
| `tb_dr_full_adder` | all 8 input combinations with several arrival orders, plus 500 random cases; distinct delays, including for the OR stage |
| `tb_dr_rca4` | all 512 operand/carry combinations, each with four schedules (LSB first, MSB first, all together, random), at the default parameters. Counts each gate arrival order, full-length carry ripples and each schedule, and fails if any never occurs |
| `tb_dr_rca4_workloads` | A=1011 + B=0111 with LSBs first and with MSBs first, and the patterns 0111+1011, 1010+0101, 0000+0000, 1111+0000, 1111+1111. Prints each sum and its total delay |

In the workload test, the inputs of bit *i* arrive in a 40 ps slot: `a` at
its start, `b` half a slot later, the carry in at time 0. With the
placeholder delays, 1011 + 0111 gives 10010 after 255 ps with LSBs first
and 375 ps with MSBs first.

## Simulating

All files are plain SystemVerilog-2017. Packages must be read first:

```sh
verilator --binary --timing --assert --top-module tb_dr_rca4 \
  rtl/dr_pkg.sv tb/dr_ref_pkg.sv rtl/pulse_delay.sv rtl/rsfq_splitter.sv \
  rtl/dr_and.sv rtl/dr_xor.sv rtl/dr_half_adder.sv rtl/dr_full_adder.sv \
  rtl/dr_rca4.sv tb/tb_dr_rca4.sv -o sim
./obj_dir/sim
```

Each testbench ends by printing `TB_RESULT checks=<n> failures=<m>`. The full
4-bit test runs in about a second.

## Files

* `rtl/dr_pkg.sv`: the `dr_t` type, the `order_e` arrival-order enum, the
  delay-table type and its default values.
* `rtl/pulse_delay.sv`: the transport delay line.
* `rtl/rsfq_splitter.sv`, `rtl/dr_and.sv`, `rtl/dr_xor.sv`: the cells.
* `rtl/dr_half_adder.sv`, `rtl/dr_full_adder.sv`, `rtl/dr_rca4.sv`: the
  structural levels; `dr_rca4` is the top.
* `tb/`: the reference timing model and the testbenches listed above.
