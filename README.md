# IREN: a programmable arithmetic array for emulated digital neural networks

IREN computes neural networks with ordinary digital arithmetic instead of analog
neurons. The idea is to give up a fixed neuron circuit. The chip holds a grid of
8-bit multipliers, adders and registers, joined by a programmable interconnect,
plus a small programmable sequencer. A network is "downloaded" in two parts:

- an interconnect configuration, which wires some of the units into neuron cells;
- a control program, which steps those cells through the terms of each weighted sum.

This SystemVerilog model implements the architecture at its working
accuracy of 8-bit operands on 16-bit links. It includes an example mapping of a
4-neuron Hopfield network, which the end-to-end testbench runs.

```
                 array I/O (configuration, ext_in, r_out / y_out)
                                  |
        +------+        +--------------------------+
        | RAM  |------->|  programmable arithmetic  |--> hard limiter per column
        +------+        |  array (mul/add/mul/add/R)|
           ^            +--------------------------+
           |                         ^
  host <-> control and  ------>  +--------+
           timing unit           | Memory | <-- weight load port
                                 +--------+
```

The RAM holds the neuron states U and the Memory holds the weights W. Each
stores 16 words of 8 lanes, one byte per array column. The control unit sets
the RAM and Memory read addresses and drives the array's register controls.
It also passes host writes through to the RAM.

## The arithmetic array (`prog_arith_array`)

The array has 5 rows of `COLS` = 8 units. From top to bottom the rows are:

| row | unit | operation |
|-----|------|-----------|
| 0 | multiplier | signed 8 x 8 -> 16 (`mult8`), using the low byte of each operand link |
| 1 | adder | 16-bit add of programmable accuracy (`array_adder`, see below) |
| 2 | multiplier | as row 0 |
| 3 | adder | as row 1 |
| 4 | register | 16 bits; `r_clr` loads 0, `r_load` loads operand A |

Below each unit runs a *channel*: one 16-bit link per column, carrying that
unit's result. Each unit has two operand inputs, A and B. A 3-bit select at each
input (`iren_pkg::src_e`) chooses the source:

| code | source |
|------|--------|
| 0 `SRC_ZERO` | constant 0 |
| 1 `SRC_UP_LEFT` | channel above, column c-1 |
| 2 `SRC_UP` | channel above, column c |
| 3 `SRC_UP_RIGHT` | channel above, column c+1 |
| 4 `SRC_RAM` | RAM lane c (sign-extended) |
| 5 `SRC_MEM` | Memory lane c (sign-extended) |
| 6 `SRC_REG` | register of column c (feedback) |
| 7 `SRC_EXT` | array I/O input `ext_in[c]` |

Each unit also has a **bypass** bit. When it is set, the channel below the unit
carries the channel above it unchanged. A value can pass a row this way, but the
bypassed unit cannot be used. So how many units can be used depends on routing,
not only on how many units there are.

The configuration word is `{carry_left, split, bypass, sel_b, sel_a}` (9 bits).
It is written at `cfg_addr = row*COLS + col` and all words reset to zero.
`split` and `carry_left` matter only in the adder rows. In the register row
only `sel_a` matters.

**Timing.** Only the register row holds state. Everything above it is
combinational, so one array step is one clock cycle. The multiplier delay and the
adder delay add up within that cycle. A register that selects an adder which
itself reads `SRC_REG` forms an accumulator. Arithmetic is two's complement and
wraps at the adder's programmed width. There is no saturation.

## The configurable adder (`laca4`, `cfg_adder`, `cascade_adder`)

The basic adder is 8 bits wide. It is made of two 4-bit look-ahead carry slices
(`laca4`), each of which forms all its carries at once from generate/propagate
terms. Two multiplexers make the adder configurable:

- low slice carry-in: `Cin` or 0;
- high slice carry-in: the low slice's carry-out `Cout3`, 0, or a separate `Cin4`.

So one unit works as one 8-bit adder or as two independent 4-bit adders. Both
carry-outs, `Cout` (bit 7) and `Cout3` (bit 3), are brought out. Chaining units
`Cout -> Cin` gives adders of any multiple of 4 bits. When the width is an odd
number of nibbles, the last unit uses only its low nibble: its high carry-in is
forced to 0, and the cascade's carry-out is that unit's `Cout3`.
`cascade_adder` defaults to 20 bits: two full units plus one half unit.

In the array, the same mechanism makes accuracy a configuration choice. Each
array adder (`array_adder`) is a pair of 8-bit configurable adders, and two
configuration bits control its carries:

| `split` | `carry_left` | the adder computes |
|---------|--------------|--------------------|
| 0 | 0 | one 16-bit sum |
| 1 | 0 | two independent 8-bit sums (high byte gets carry 0) |
| 0 | 1 | the next 16 bits of a wider sum, taking the carry-out of the adder in column c-1 of the same row |

So adders in neighbouring columns combine into 32-, 48-, ... bit adders. The
register of each column then holds one 16-bit slice of the wide result.
Carries run only left to right, so this creates no combinational loop. The
ripple between columns lengthens the cycle.

## The control and timing unit (`control_unit`)

This is the hardest part to read from its block diagram. Here is how the parts
fit together.

**State chain.** There are `NSTATES` = 16 one-hot states. Reset, or a restart
command, enters state 1. Normally each step moves to the next state, and after
the last state it wraps to state 1.

**Upper OR array (`or_array`, 5 rows).** Each row is the OR of the states its
mask selects. The rows mean:

- rows 0-2: this is the end state of loop 1, 2 or 3;
- row 3: stop here (`done`);
- row 4: restart at state 1 after this state.

**Loop FSMs (`loop_fsm`, three of them).** Each FSM turns one backward edge of
the state graph into a counted loop. Leaving its end state, the FSM jumps to its
programmed target state `count` times. It then falls through once and rearms.
Because it rearms, an inner loop runs in full again on every pass of an outer
loop. FSM 1 has priority over FSM 2, and FSM 2 over FSM 3. The following graph
needs all three FSMs:

```
1 -> 2 -> 3 -> 4 -> 5 -> 6 -> 7 -> 8 -> 9 -> 10 -> 11 -> 12 (stop)
                    ^    ^    ^         |          |
                    n    |    +--- m ---+          |
                         +--------- k -------------+
```

Here state 5 repeats itself n times, 9 returns to 7 m times, and 11 returns to
6 k times.

**Lower OR array (8 rows).** This array forms the control signals. Each signal
is the OR of its programmed states:

| bit | signal | effect on the step that leaves the state |
|-----|--------|-------------------------------------------|
| 0 | `CTRL_R_CLR` | array registers load 0 |
| 1 | `CTRL_R_LOAD` | array registers load their source |
| 2 | `CTRL_ADDR_CLR` | RAM and Memory read addresses to 0 |
| 3 | `CTRL_RAM_INC` | RAM address + 1 |
| 4 | `CTRL_MEM_INC` | Memory address + 1 |
| 5 | `CTRL_OUT_STB` | `out_valid` (a level, high during the state) |
| 6, 7 | spare | brought out as `ctrl_spare` |

**Clock circuit (`clk_circuit`).** It produces `N_CLK` = 4 clock *enables*, not
separate clocks. Output k pulses every `div[k]+1` cycles while `run` is high.
Output 0 (Clk1) paces the sequencer: `step = run & Clk1 & !done`. All actions
take effect on the clock edge of a step.

**Host register map.** Writes only. `host_addr[15:12]` selects the region:

| region | write |
|--------|-------|
| 0 | lower OR array row `addr[3:0]` mask |
| 1 | upper OR array row `addr[3:0]` mask |
| 2 | loop FSM `addr[3:0]` target state (0 = state 1) |
| 3 | loop FSM `addr[3:0]` count (number of backward jumps) |
| 4 | clock divider `addr[3:0]` |
| 5 | RAM word `addr[11:4]`, lane `addr[3:0]`, data `wdata[7:0]` |
| 6 | `wdata[0]`: restart at state 1 and clear the addresses |

`host_rdata` is a status word: `{done, loop FSMs active, state index}`.

## Example: a 4-neuron Hopfield network

A Hopfield neuron j computes `Y_j = step(sum_i U_i * W_ij)`. One multiplier per
weight would need 16 multipliers and 4-input adders. An area-optimized cell
needs only **two multipliers and two adders per neuron**:

- column 2j, row 0: `RAM x Memory`; column 2j+1, row 0: `RAM x Memory`;
- column 2j, row 1: `UP + UP_RIGHT` (sum of the two products);
- column 2j, row 2: bypass (the multiplier there cannot be used);
- column 2j, row 3: `UP + REG` (accumulate);
- column 2j, row 4: register loads `UP`.

The data layout is:

- RAM word t, lane c holds `U(2t + c%2)`;
- Memory word t, lane c holds `W(2t + c%2, c/2)`.

The control program is three states:

1. clear the registers and addresses;
2. load the registers and step both addresses, repeated once by loop FSM 1;
3. `out_valid`, stop.

So one network update takes **3 steps**. All four neurons run in parallel in the
8 columns. `y_out[2j]` is neuron j's new state, ±1 from the hard limiter
(`hard_limiter`, where a sum of 0 gives +1). The host writes it back into the
RAM and restarts for the next update. The RAM has no path back from the array.

## Where this model departs from, or fills in, the source description

The architecture was described at block-diagram level. The following points
follow it:

- the four parts and their connections;
- the row pattern of the array;
- 8-bit accuracy and 16-bit two-operand links;
- the two-LACA configurable adder with its carry multiplexers;
- cascading to 4, 8, 12, ... bits;
- the OR arrays, three FSMs and clock circuit of the control unit;
- the Hopfield example and its optimized cell.

Everything else is this model's own choice:

- **Adder carries in the array.** Cascading along a row of adders, and the
  `split` / `carry_left` bits that control it, are this model's way of making
  accuracy programmable inside the array.
- **Interconnect reach and bypass.** Only programmable crossings were shown. The
  source set above (neighbouring columns of the row above, RAM/Memory lane of the
  own column, the register, the I/O lane) and the bypass bit are invented. They
  reproduce the optimized-cell routing, including one unusable multiplier per
  neuron.
- **Sizes.** These were not given: 8 columns (enough for sixteen multipliers),
  16-word RAM and Memory, 16 control states, 4 clock enables, 8-bit loop counts.
- **Number formats.** Signed two's-complement operands, 16-bit wrap-around sums,
  and a bipolar ±1 activation.
- **Control semantics.** The loop-count semantics, the FSM priority, the meaning
  of the OR array rows, the control-signal bits, the host register map and the
  address generators.
- **Clocks.** Clock enables instead of derived clocks.
- **Storage.** RAM and Memory are register arrays with asynchronous read, and
  they are not reset.
- **Index order.** The sources index the Hopfield weights two ways (`W21` and
  `W12` for the second input of neuron 1). This model follows `W_ij` = weight
  from input i to neuron j.

Not modelled: the FPGA the design was compiled into and the test board around it
(a CPLD, RAMs and converters). Neither is part of the architecture.

**Size.** Reported implementation costs on a Virtex XCV300 are 63 CLBs for one
compiled multiplier and 15 for one compiled adder. At the defaults, 16
multipliers and 32 8-bit adders come to about 1500 of the device's 3072 CLBs,
before registers and control.

## Simulating

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog. For example, with
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_iren_top \
    -y rtl -y tb +libext+.sv rtl/iren_pkg.sv tb/tb_iren_top.sv -o sim
./obj_dir/sim
```

| testbench | checks |
|-----------|--------|
| `tb_laca4`, `tb_mult8`, `tb_hard_limiter` | exhaustive over all inputs |
| `tb_cfg_adder` | all carry configurations against nibble arithmetic |
| `tb_cascade_adder` | 20-, 16-, 12- and 4-bit cascades |
| `tb_array_adder` | all four accuracy settings; two units chained into a 32-bit adder |
| `tb_prog_arith_array` | the optimized neuron cell; a 32-bit accumulator over two columns and a split accumulator; random full-array configurations against a behavioural model of the interconnect |
| `tb_or_array`, `tb_lane_mem`, `tb_clk_circuit` | masks, lane writes, pulse spacing |
| `tb_loop_fsm` | exact jump counts and rearming |
| `tb_control_unit` | the 12-state three-loop graph above for several n, m, k: state sequence, cycle count at two Clk1 rates, every control signal, address generators, restart row, RAM write forwarding |
| `tb_iren_top` | the Hopfield network at default sizes: stored-pattern recall from noisy states and random networks; every sum, output and the 3-step update latency checked. It also counts and requires loop jumps, bypass traffic, register clear and accumulate, stop, restart, a carry between adder bytes, both activation outcomes and a slowed Clk1. A last run sums sixteen products at 32-bit accuracy across two columns (9 steps) next to a split adder. |

To change the geometry, override `COLS`, `DEPTH`, `NSTATES` or `N_CLK` on
`iren_top`. The shared types and the control-signal bit assignment are in
`rtl/iren_pkg.sv`.
