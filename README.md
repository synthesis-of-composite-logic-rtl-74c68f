# A composite logic gate for Quantum-dot Cellular Automata, as clocked RTL

Quantum-dot Cellular Automata (QCA) computes with only two primitives: the
three-input majority voter `M(P,Q,R) = PQ + QR + RP` and the inverter. A voter
with one input tied to 0 is an AND gate. Tied to 1 it is an OR gate. Everything
else has to be built from these two primitives. The **composite gate** produces all the basic 2-input functions
of A and B in one unit:

| signal | built as                     | function    |
|--------|------------------------------|-------------|
| M1     | Maj(A, B, 0)                 | A·B (AND)   |
| M2     | Maj(A, B, 1)                 | A+B (OR)    |
| M3     | Maj(A, B', 0)                | A·B'        |
| M4     | Maj(A', B, 0)                | A'·B        |
| M5     | Maj(M3, M4, 1)               | A⊕B (XOR)   |

That is five majority voters and two input inverters. One inverter per output
adds NAND, NOR and XNOR. With the six outputs together, one gate produces every
symmetric function of two variables, and no output is left unused.

This repository models the gate at the register-transfer level, in
SystemVerilog. The model keeps the logic network and also the timing that QCA
clocking imposes: a signal takes one quarter of a clock period to cross each
clock zone. Two layouts of the gate are modelled. The first is compact and
uses 3 clock zones. The second sits on the RES regular clocking grid and uses
9 zones. The model also covers the clock generator, the RES tile grid and the
symmetric-function block. All of this synthesizes to ordinary flip-flops and
gates. The model does not simulate the cells.

## How QCA clocking becomes RTL

This is the part that needs care. In QCA, information is moved by clocking.
The cells are grouped into *clock zones*, and every zone goes through four
states in turn:

| state   | what the cells do                                   |
|---------|-----------------------------------------------------|
| Switch  | barrier rises; cells settle to the value their neighbours impose (the zone computes) |
| Hold    | barrier high; value frozen, and it drives the next zone |
| Release | barrier falls                                       |
| Relax   | barrier low; cells unpolarized                      |

Four clock signals 90° apart drive zones numbered 1, 2, 3 and 4. Zone *z*
switches while zone *z−1* holds, so a value moves one zone per quarter period,
in the order 1→2→3→4→1→…

The RTL maps this as follows:

* **One `clk` cycle is one quarter of a QCA clock period.** `qca_clock_gen` is
  a 2-bit phase counter. It gives the phase index 0..3 (0°, 90°, 180°, 270°),
  a one-hot `zone_switch`, and the state of each zone. Zone *z* is in Switch
  when `phase == z-1`.
* **A clock zone is a register that loads in its Switch phase**
  (`qca_clock_zone`, parameters `WIDTH`, `ZONE`, `RESET_VAL`). The logic that
  a zone's cells compute, such as a majority voter, sits in front of the
  register's `d` input. It reads the previous zone's registers, which are in
  Hold at that moment.
* A real zone loses its value in Release and Relax. The register keeps it
  instead. No correctly timed reader samples it then, so the difference cannot
  be seen from outside.
* Chains of zones that only carry a signal are written with `qca_zone_chain`.

As a result a gate that spans *N* consecutive zones has a latency of exactly
*N* clock edges, counting the edge that captures the inputs. It accepts a new
input pair once per QCA period (every 4 cycles). While the pair is in flight,
its inputs may change freely on the other three edges. Each stage loads only
on its own phase, so a 9-zone gate holds two or three input pairs in flight
at once.

## The two layouts of the gate

**`qca_composite_gate`: compact layout, no regular clocking.** 3 zones, a
latency of 0.75 QCA period. Outputs: AND, OR, XOR (`cg_out_t`).

| zone (from `ZONE_FIRST`, default 1) | contents |
|------|----------|
| 1 | input cells A, B |
| 2 | inverters, M1..M4 |
| 3 | M5; AND and OR carried along |

**`qca_res_composite_gate`: layout on the RES regular clocking grid.** The
same voter network. It uses 9 zones, a latency of 2.25 QCA periods. Its eight
outputs (`res_cg_out_t`) are AND, OR, NOR, A', NAND, XNOR, XOR and B'. The
grid forces longer routing, and that costs the extra zones. In exchange, every
cell lies on a fixed, repeating pattern of clock electrodes, which is the
point of regular clocking. The input A tile is a zone-4 tile, so
`ZONE_FIRST = 4` and the zones run 4,1,2,3,4,1,2,3,4:

| zone of 9 | contents |
|-----------|----------|
| 1 | input cells A, B |
| 2 | input inverters (A', B'), M1..M4 |
| 3 | M5 |
| 4 | output inverters: NAND, NOR, XNOR |
| 5–9 | routing to the output cells |

The published layouts give only the total zone count of each gate: 3 and 9.
The split of zones between logic and routing in both tables is this model's
choice. It moves no output by even one cycle, because all outputs of a gate
leave from the same last zone.

Reset is active-low and asynchronous. Every zone resets to the value it would
hold if A = B = 0 had been applied for a long time. After reset, the outputs
are therefore the functions of (0, 0), for example NAND = 1. They are never a
mix of cleared bits.

## The RES clocking grid

`qca_res_clock_grid` describes the clock-zone map under a regularly clocked
layout. The plane is cut into square tiles, and each tile is one clock zone.
The zone numbers follow a 4×4 pattern that is repeated in both directions:

```
        col 0  1  2  3
row 0:      4  1  2  3
row 1:      1  2  1  4
row 2:      2  3  4  1
row 3:      1  4  3  2
```

Data can pass from a tile to an edge neighbour only when the neighbour is the
next zone. With this pattern, many tiles have two ways in or two ways out.
This gives paths in opposite directions, which a feedback path needs. It also
lets a three-input voter collect all three inputs within one zone. Tile (1,0)
is zone 1: it is fed from the zone-4 corner and feeds two zone-2 tiles, a
three-way junction.

For a `ROWS × COLS` grid (default 9 × 8, the grid under the RES gate), the
block outputs:

* `zone_map`: the zone number of each tile (constant);
* `zone_switch`: whether each tile is switching at the current phase;
* `flow_out` and `flow_in`: the neighbours each tile may send to and receive
  from, as `{N,E,S,W}`. Row 0 is the top row. The grid does not wrap around.

The block is combinational. Its maps are constants of the layout, and
synthesis reduces them to tie-offs.

## Two-input symmetric functions

Leaving out the constants, two variables have 2^(2+1) − 2 = 6 symmetric
functions. `qca_sym2` produces all six from one composite gate and three
output inverters:

| out | function   | source             |
|-----|------------|--------------------|
| f1  | A·B        | gate AND           |
| f2  | A'+B'      | inverted AND       |
| f3  | A+B        | gate OR            |
| f4  | A'·B'      | inverted OR        |
| f5  | A·B'+A'·B  | gate XOR           |
| f6  | A·B+A'·B'  | inverted XOR       |

Timing is the compact gate's: 3 zones. The inverters come after the last zone
register, so all six outputs change on the same edge.

## Top level: `qca_cg_top`

One clock generator drives four blocks side by side:

* `u_cg`: the compact gate, zones 1–3;
* `u_sym2`: the symmetric-function block, zones 1–3;
* `u_res`: the RES gate, zones 4,1,2,…,4;
* `u_grid`: the 9 × 8 tile grid.

All three gates share the inputs `a` and `b`.

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | quarter-period clock, active-low async reset |
| `a`, `b` | in | 1 | gate inputs |
| `phase` | out | 2 | phase index 0..3 |
| `zone_switch` | out | 4 | one-hot, bit *z−1* = zone *z* in Switch |
| `zone_st` | out | 4 × `zone_state_e` | state of each zone |
| `cg_y` | out | `cg_out_t` (3) | AND, OR, XOR |
| `sym2_f` | out | `sym2_out_t` (6) | f1..f6 |
| `res_y` | out | `res_cg_out_t` (8) | AND, OR, NOR, A', NAND, XNOR, XOR, B' |
| `grid_zone`, `grid_switch`, `grid_flow_out`, `grid_flow_in` | out | 9 × 8 arrays | grid maps |

**Protocol and timing.** Change `a` and `b` just after an edge on which
`phase` was 0, and hold them for 4 cycles. Then every gate sees each input
pair exactly once:

Number the clock edges e0, e1, … with `phase` = 0 just before e0:

| event | edge |
|-------|------|
| `a`, `b` change | just after e0 |
| `u_res` captures them (its zone 4 switches, phase 3) | e3 |
| `u_cg`, `u_sym2` capture them (zone 1, phase 0) | e4 |
| `cg_y`, `sym2_f` show the result | after e6 |
| `res_y` shows the result | after e11 |

The compact gate's outputs are valid 2 cycles after its capture edge (3 edges
in all). The RES gate's outputs are valid 8 cycles after its capture edge
(9 edges in all).

## What comes from the published design and what does not

Taken from the published design:

* the voter network (M1..M5 and two inverters);
* the output sets of both layouts;
* the 3-zone and 9-zone latencies;
* the four clock states and their order, and the zone numbering 1–4;
* the RES 4×4 zone pattern and its replication;
* the 9 × 8 grid size;
* the zone of the RES gate's input tile;
* the six symmetric functions and how they are formed.

This model's own choices:

* one `clk` cycle per zone;
* a zone modelled as a register loaded in Switch and held through
  Release/Relax;
* the placement of logic among the zones inside each gate;
* the reset scheme (reset is not part of the published design);
* the flow masks of the grid, worked out from the zone numbers and the
  next-zone rule;
* sharing one clock generator and one input pair in the top.

Not modelled:

* the QCA cell itself and its polarization;
* wire crossings (neither layout uses one);
* the buried clock electrodes;
* the energy figures, which describe physical layouts.

The published layout drawings show the cells in detail. This model does not
reproduce them tile by tile. The RES gate reuses the compact gate's voter
network and takes only its latency and output set from the RES layout. A
change that depends on exact cell placement, such as a different input tile,
would have to start from the layout.

## Simulating

Every testbench is self-checking. It prints
`TB_RESULT checks=N failures=M` and ends with `$finish`. Build one with plain
Verilator 5:

```
verilator --binary --timing --assert --top-module tb_qca_cg_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/qca_pkg.sv tb/tb_qca_cg_top.sv
./obj_dir/Vtb_qca_cg_top
```

| testbench | checks |
|-----------|--------|
| `tb_qca_majority`, `tb_qca_inverter` | exhaustive truth tables |
| `tb_qca_clock_gen` | phase sequence, zone states, reset mid-period |
| `tb_qca_clock_zone` | loads only in its own phase, once per period |
| `tb_qca_composite_gate`, `tb_qca_sym2`, `tb_qca_res_composite_gate` | random inputs every cycle; expected outputs scheduled exactly 3 or 9 edges after each capture edge; an explicit latency measurement; pipelining in the RES gate |
| `tb_qca_res_clock_grid` | the zone map written out in full, the flow masks, switching per phase, the three-way tile |
| `tb_qca_cg_top` | end-to-end at default sizes: protocol, random inputs, a reset with data in flight; counts that every phase, input pair, output value, pipelined overlap and multi-way tile occurred |
| `tb_qca_truth_table` | prints the truth table of all 17 outputs and checks it |

To change the timing model, for example to give Release and Relax an
undefined output, edit `qca_clock_zone`. Every gate is built from it. To build
another gate on the RES grid, compute each zone's logic in front of a
`qca_clock_zone` whose `ZONE` is the tile's number from `qca_res_clock_grid`.
