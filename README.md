# Asynchronous neighborhood mechanism with a programmable triangular function for a Kohonen map

In a Kohonen self-organizing map, every training step picks a winning neuron. Then all neurons
near the winner move their weights towards the input. How far a neuron moves is scaled by a
*neighborhood function* G of its map distance d to the winner:

    W_j <- W_j + eta * G(R, d) * (X - W_j)

This RTL computes, for every neuron of the map at once, the distance d and the factor eta·G.
No clock is involved. The neighborhood function is triangular: it falls linearly with d,
as a cheap stand-in for a Gaussian:

    g = C + floor((R - d) * E / D)     for d <= R
    g = 0                              for d >  R

R (radius), C (bias), E (slope numerator) and D (a power of two) are set once per training
epoch and shared by the whole map. Setting C, E and D gives a triangle of any height and any
slope. The neighborhood flag `en` on its own gives the classic rectangular function.

The work is split into two parts:

1. A **distance wave**. It spreads outward from the winner, one ring of neurons at a time, and
   tells each neuron its `r = R - d`.
2. A **triangular-function (TNF) unit** in every neuron. It turns `r` into `g`.

## The distance wave

The hard part is working out d for every neuron with no central unit and no clock. Each neuron
talks only to its nearest neighbors. It sends each of them two things: a 1-bit enable (EN) and
the R_BITS-wide value r.

**Directions.** The eight neighbor directions are numbered clockwise from the upper left:
0 = NW, 1 = N, 2 = NE, 3 = E, 4 = SE, 5 = S, 6 = SW, 7 = W (`som_pkg`). `en_in[j]` and
`r_in[j]` arrive from the neighbor in direction j. `en_out[k]` and `r_out[k]` go to the
neighbor in direction k.

**Start.** The winner-selecting circuit raises `wsc` for one neuron. That neuron takes
`r = r_prog` (= R) and sends an enable in every direction, with `r - 1`.

**Propagation rule.** An enable that arrives from direction j keeps travelling away from j.
Which outputs it switches on is chosen so that every neuron is reached from exactly one side.
That is why a neuron never has to settle a conflict between two r values:

| topology | arrival travelling ... | outputs switched on | distance measured |
|---|---|---|---|
| Rect8 | horizontally or vertically | straight on only | Chebyshev, max(\|dx\|,\|dy\|) |
| Rect8 | diagonally | straight on, plus the two straight directions beside it (3 outputs) | |
| Rect4 | vertically | straight on, plus E and W (3 outputs) | Manhattan, \|dx\|+\|dy\| |
| Rect4 | horizontally | straight on only | |

In Rect8, a wave travelling NE feeds N, NE and E. One travelling N feeds only N. Ring k has 8k
neurons, and each one is reached once. In Rect4, the wave first runs up and down the winner's
column, and each neuron it passes starts a wave along its own row.

**Stopping.** Each ring passes on `r - 1`. A neuron that receives `r = 0` is still inside the
neighborhood (it is at distance exactly R), but its STOP signal goes low. STOP low blocks every
enable it would send and forces its outgoing r to 0. So `en = 1` for exactly the neurons with
d ≤ R, and each of them holds `r = R - d`. A neuron outside the neighborhood sees no enable and
reports `en = 0`, `r = 0`, `g = 0`. Map edges have no neighbors, and their inputs are tied low.

Example: Rect8, winner at row 3 / column 3, R = 2. The r values are shown below; `.` marks en = 0.

    .  .  .  .  .  .
    .  0  0  0  0  0
    .  0  1  1  1  0
    .  0  1  2  1  0
    .  0  1  1  1  0
    .  0  0  0  0  0

## The triangular-function unit

Each neuron's `tnf` is a three-stage combinational datapath:

1. **`tnf_mult`** computes r × E. It is a shift-and-add array: one addition per bit of r,
   giving a full-width product of R_BITS + E_BITS bits.
2. **`bit_shift`** divides by D. D is given one-hot: `d[k] = 1` divides by 2^k, from 1 up to
   2^(D_BITS-1) = 32. Each output bit picks the input bit k places above it. The k top bits,
   which no input reaches, are tied to 0. At most one bit of `d` may be set, and an assertion
   checks this. With `d = 0` the result is 0.
3. **Adder.** It adds C, and the result passes only while `en = 1`. The sum saturates at
   2^NB − 1. That value stands for 1.0 of the learning factor.

Dividing by a power of two after the multiplication replaces a true divider. This is why
E and D are two separate settings. Any ratio E/D with D a power of two is reachable. For
example, D = 32 with E ≤ 31 gives a slope below one step per ring.

Examples at the default widths:

| C | E | D | R | g at d = 0, 1, 2, 3, 4, 5, 6 |
|---|---|---|---|---|
| 0 | 3 | 4 | 5 | 3, 3, 2, 1, 0, 0, 0 |
| 6 | 3 | 8 | 10 | 9, 9, 9, 8, 8, 7, 7 … (6 at d = 10, 0 from d = 11) |

## Interface of `som_nbh_top`

| port | dir | width | meaning |
|---|---|---|---|
| `topo` | in | `som_pkg::topo_t` | `TOPO_RECT8` or `TOPO_RECT4` for the whole map; may change between epochs |
| `wsc` | in | [ROWS][COLS] | winner flag, at most one bit set (asserted) |
| `r_prog` | in | R_BITS | radius R for this epoch |
| `e` | in | E_BITS | slope numerator E |
| `d` | in | D_BITS | divisor D, one-hot |
| `c` | in | NB | bias C |
| `en` | out | [ROWS][COLS] | neuron is within radius R (rectangular function) |
| `r` | out | [ROWS][COLS][R_BITS] | R − d |
| `g` | out | [ROWS][COLS][NB] | eta·G (triangular function) |

All arrays are packed and indexed `[row][col]`, with row 0 at the top.

**Timing.** There are no registers, clocks or resets. Every output is a combinational function
of the inputs. The settling time grows with the number of rings the wave crosses, plus the
depth of the TNF datapath. To use the block in a clocked system, register the inputs. Then
allow enough cycles, or a multicycle path, for R rings plus one multiplication before
sampling `g`.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `ROWS`, `COLS` | 8, 8 | map size |
| `R_BITS` | 5 | width of r, so R ≤ 31 |
| `E_BITS` | 5 | width of E |
| `D_BITS` | 6 | number of shift settings, D = 1 … 32 |
| `NB` | 5 | output resolution of g (and width of C) |

The defaults follow the published test cases of this design:

- a 5-bit r and a 5-bit E, with a 10-bit product, divided by up to 32;
- an 8 × 8 map;
- an output resolution in the 3-to-6-bit range that was found to be enough for learning.

To reproduce wider example functions (E up to 255, R up to 63), set `R_BITS = 6`,
`E_BITS = 8`, `D_BITS = 7` and `NB = 9`. The TNF testbench does this.

## Files

Module hierarchy: `som_nbh_top` → `som_neuron` (one per map position) → `en_prop`, `r_prop` ×8
and `tnf` → `tnf_mult` and `bit_shift`. `som_pkg` holds the topology type, the direction
numbering and the propagation rule `en_activates()`.

| file | content |
|---|---|
| `rtl/som_pkg.sv` | types, directions, propagation rule |
| `rtl/r_prop.sv` | r − 1 and STOP |
| `rtl/en_prop.sv` | which output directions an arriving enable drives |
| `rtl/som_neuron.sv` | r input selection, direction logic, STOP gating, TNF |
| `rtl/tnf.sv`, `rtl/tnf_mult.sv`, `rtl/bit_shift.sv` | triangular function |
| `rtl/som_nbh_top.sv` | the map |

## Where this RTL departs from, or goes beyond, the published circuit

- **One r selector and one `r_prop` per output direction.** The published neuron has a single
  r selector (switches on the r inputs) and a single R_PROP. Here, each output direction has its
  own selector, over only the inputs that can drive that direction, and its own `r_prop`. The
  values are identical, because an enable only ever arrives from one side. But the netlist then
  has no combinational loop at the bit level. This costs eight small decrementers per neuron
  instead of one. Verilator still reports `UNOPTFLAT`, because it tracks whole vectors. The
  reason is explained in the header of `som_nbh_top.sv`.
- **Topology switch.** The published design has a programmable propagation block that switches
  the map between three grids at run time. This RTL switches between Rect8 and Rect4 with the
  `topo` input. Each propagation rule is evaluated as a constant, and `topo` only chooses
  between the two results. That keeps the netlist free of bit-level loops in either mode.
  **The hexagonal grid is not provided.** Its propagation rule is not stated, and the published
  drawings do not fix it.
- **The Rect4 rule** (vertical first, then along rows) is a reading of the published propagation
  drawings. The Rect8 rule is stated explicitly in the published design.
- **Saturation of g, the width of C, and the behaviour for D = 0** are choices of this design.
- **The ring at distance exactly R** belongs to the neighborhood: its `r` is 0, so it gets
  `g = C`, and it passes nothing on. A ring further out gets 0.
- **The divider is always present.** The published design notes that the shifter could be
  dropped in a map where the function never exceeds 1. This RTL keeps it.
- **Edges** of the map take no input, as if the neighbor were outside the neighborhood.
- The published circuit is transistor-level and asynchronous, with settling times in
  nanoseconds. This RTL is the same logic function with no timing model.

Not part of this RTL:

- the winner-selecting circuit (it drives `wsc`);
- the distance calculation between input and weights;
- the weight update that consumes `g`.

These belong to the surrounding neural network, which the published work takes from earlier,
analog designs.

## Verification

Every module has a self-checking testbench in `tb/`. Each one computes its expected values
independently, with integer arithmetic and hand-written propagation tables. Each ends by
printing `TB_RESULT checks=N failures=M`, and each has a watchdog.

| testbench | what it covers |
|---|---|
| `tb_r_prop` | all 32 r values |
| `tb_en_prop` | every single arrival, the winner, and all 256 arrival combinations, in both topologies |
| `tb_tnf_mult` | all 5 × 5-bit products, plus random 6 × 8-bit products |
| `tb_bit_shift` | every shift setting, plus D = 0 |
| `tb_tnf` | the full 512-point sweep r = 15…0 × E = 31…0 with D = 32; ten example triangles (five at the default widths, five on a wide instance); saturation; en = 0; 2000 random settings |
| `tb_som_neuron` | winner, R = 0, arrivals from each direction with r = 0, 1 and random values, junk on unused r inputs |
| `tb_som_nbh_top` | one map, switched between Rect8 and Rect4 for every configuration: every winner position with R = 0, 3, 6, 9, plus 300 random configurations. It counts, and requires at least once: a topology switch, a wave stopped inside the map, a wave cut by an edge, R = 0, no winner, the whole map enabled, diagonal fan-out, saturation, every divisor, and the corner-to-corner Rect4 case (14 rings on 8 × 8) |
| `tb_som_nbh_full` | the map at default parameters, in both topologies: every winner × every R = 0…31, all 64 neurons checked each time |

All testbenches pass. Each one was also run against a copy of its module with one deliberate
bug, and each one caught it. The faults were:

- STOP misread at r = 1;
- diagonal arrivals dropped in Rect8;
- the top bit of the multiplier left out;
- vacated bits not grounded;
- saturation removed;
- STOP gating removed;
- r wired from the wrong neighbor port.

Running a testbench with Verilator 5 (from the repository root):

    verilator --binary --timing --assert -Irtl -y rtl rtl/som_pkg.sv tb/tb_som_nbh_top.sv \
        --top-module tb_som_nbh_top -Wno-fatal
    ./obj_dir/Vtb_som_nbh_top

Replace the testbench name to run the others. Each one runs in well under a second.
