# Half-range CORDIC accelerator with DSP and block-RAM finishing

A CORDIC unit normally needs one add/shift stage per result bit: 32 stages for 32-bit
results. This design runs only the first 16. After 16 micro-rotations the angle that
is still left is so small (below about 2^-15 rad) that a single first-order correction
gets the remaining 16 bits right to within the last bit or two:

* in **rotation mode**, the last step is a small rotation done with two multipliers
  (`x - y·z`, `y + x·z`), which map onto FPGA DSP slices;
* in **vectoring mode**, the remaining quotient `y/x` is found by multiplying `y` by `1/x`,
  with `1/x` read from a block-RAM reciprocal table, plus one multiplier.

This gives a pipeline half as deep as a conventional one. It trades LUTs and flip-flops
for DSP slices and block RAM, which are otherwise often unused.

The arithmetic core is wrapped as a streaming accelerator for an ARM + FPGA board
(Zynq-7020, PYNQ-Z1 class), intended to serve matrix decompositions (Givens-rotation QR
and SVD) that run on the host:

* float32 operands stream in over 64-bit AXI-Stream, two per beat, at one beat per clock;
* a third operand is a constant held in an AXI-Lite register;
* multiplexers route the three operands to the CORDIC inputs x, y, z, and two of the
  results back out;
* an optional scale-factor multiply removes the CORDIC gain;
* results return as float32 on a second AXI-Stream.

Two accelerators are built:

| accelerator | mode / coordinates | finishing hardware | typical use |
|---|---|---|---|
| `rot_*` | rotation, circular | 2 multipliers | sine and cosine, rotating vectors by an angle |
| `vec_*` | vectoring, linear | reciprocal ROM (2^16 × 16 bit) + 1 multiplier | division; multiplication by a constant |

At 100 MHz, one 8-byte beat per cycle is 800 MB/s per accelerator. That is the ceiling of
the board's DMA path, so the arithmetic is never the bottleneck.

## Number format

Outside the cell everything is IEEE-754 single precision. Inside, each operand is a
signed fixed-point word:

* **Q2.30** (32 bits: sign, one integer bit, 30 fraction bits) at the converters.
  Representable values lie in (-2, 2).
* **Q4.30** (34 bits) in the CORDIC datapath. Two guard bits at the top absorb:
  * the circular CORDIC gain K ≈ 1.6468;
  * the quarter-turn pre-rotation;
  * growth of the linear z accumulator.

`cordic_pkg` holds these widths:

| constant | value | meaning |
|---|---|---|
| `DW` | 32 | external word width |
| `FRAC` | 30 | fraction bits |
| `GUARD` | 2 | guard bits |
| `IW` | 34 | internal width |

It also holds:

* the `cvec_t {x, y, z}` struct that travels down the pipeline;
* the mode and function enums;
* the per-stage constants. Arctangents are `round(atan(2^-i)·2^30)`, and the linear
  stages use `2^-i`. They are compiled into each stage as constants, not stored in a table.

Conversions (`float2fixed`, `fixed2float`) are three-stage pipelines and truncate toward
zero:

* float → fixed saturates for |value| ≥ 2, infinities and NaN. Denormals become 0.
* fixed → float normalises with a leading-zero count.

Float32 has a 24-bit significand, so the converters, not the CORDIC, set the final
precision.

## The cell pipeline (`gp_cordic`)

| cycles | stage | module |
|---|---|---|
| 3 | float → Q2.30 for b and c (a and the scale factor are converted continuously) | `float2fixed` |
| 1 | input MUX: (x, y, z) from (a, b, c) | `gp_cordic` |
| 1 | angle / sign correction | `cordic_angle_corr` |
| 16 | micro-rotations, shifts 0…15 | `half_range_cordic` → `cordic_microrotation` |
| 2 | first-order finishing step | `cordic_approx` (+ `recip_table`) |
| 1 | output MUX: two of (x, y, z) | `gp_cordic` |
| 1 | scale-factor multiply on selected outputs | `gp_cordic` |
| 3 | Q4.30 → float | `fixed2float` |

The latency is **28 cycles** (`12 + STAGES`) and the pipeline accepts one beat per cycle.

Parameters of the cell:

* `MODE` (`ROTATION`/`VECTOR`) and `FUNC` (`CIRCULAR`/`LINEAR`/`HYPERBOLIC`) are set at
  build time. The two modes need different finishing hardware, so each cell is built for
  one of them. The top uses rotation/circular and vectoring/linear cells. Hyperbolic cells
  (cosh, sinh, e^t, atanh, and through host identities ln and square root) can be built
  from the same RTL.
* `STAGES` (16…30) sets how many bits are computed by micro-rotations. The remaining
  `32 - STAGES` bits are approximated (see below).
* `EVAL` selects how the micro-rotations are evaluated. `PIPELINED` (the default) is a
  chain of `STAGES` registered stages. `COMBINATIONAL` is the same chain without the
  stage registers: latency drops from 28 to 12 cycles, but the clock period must cover
  16 adder stages. `ITERATED` uses one stage that is reused (`iterated_cordic`,
  described below).

### Angle correction (`cordic_angle_corr`)

Circular CORDIC only converges for angles up to about ±1.74 rad. One register stage in
front of the micro-rotations folds the input into range:

* **Circular rotation.** If z > π/2, rotate the vector by +π/2 (x, y ← −y, x) and
  subtract π/2 from z. If z < −π/2, do the opposite.
* **Circular vectoring.** If x < 0, turn the vector a quarter turn towards the right
  half-plane and account for it in z.
* **Linear vectoring.** If x < 0, negate x and y. The quotient y/x is unchanged, and the
  reciprocal table only has to cover positive divisors.
* **Linear rotation.** Values pass through unchanged.
* **Hyperbolic vectoring.** Same as linear: negate x and y if x < 0.
* **Hyperbolic rotation.** Values pass through unchanged. Hyperbolic angles have no
  quarter-turn identity, so the input must satisfy |z| < 1.118, the hyperbolic
  convergence limit.

Inputs are limited to |value| < 2 by the Q2.30 format. In circular mode, every angle
the format can carry (|z| < 2 rad) therefore ends up within the converging range.

### Micro-rotations (`half_range_cordic`, `cordic_microrotation`)

Each stage is a registered add/subtract step with a wired shift s. The direction d = ±1
comes from the sign of z (rotation mode) or the opposite sign of y (vectoring mode):

```
circular:    x' = x - d·y·2^-s    y' = y + d·x·2^-s    z' = z - d·atan(2^-s)
linear:      x' = x               y' = y + d·x·2^-s    z' = z - d·2^-s
hyperbolic:  x' = x + d·y·2^-s    y' = y + d·x·2^-s    z' = z - d·atanh(2^-s)
```

Circular and linear stage k uses shift s = k, so shifts run 0…15. Hyperbolic stages
start at shift 1 and repeat shifts 4, 13 and 40, without which the hyperbolic iteration
does not converge. The 16 hyperbolic stages therefore use shifts 1, 2, 3, 4, 4, 5, …,
13, 13, 14. `cordic_pkg::stage_shift` gives the sequence.

The shifts are arithmetic right shifts of the 34-bit words, with no rounding. There is no
gain correction inside the core. The 16-stage gain either goes into the constant operand
or is removed by the scale stage:

* circular: K16 = 1.646760…, so x = 1/K16 gives cos and sin directly;
* hyperbolic: Kh16 = 0.828159…

### Iterated evaluation (`iterated_cordic`)

With `EVAL = ITERATED`, a single stage replaces the 16-stage chain. It has:

* a barrel shifter;
* a small case table of angle constants;
* a counter.

`load` starts a vector with micro-rotation 0. Each following enabled cycle performs the
next micro-rotation, using the same shift sequence as the chain. After `STAGES` cycles,
the output holds exactly the bits the pipelined chain would give. The latency therefore
does not change, and everything downstream is shared.

The cell enforces the spacing between vectors. After taking a beat, it holds
`s_axis_tready` low for `STAGES - 1` enabled cycles. An iterated cell thus needs a fraction of
the chain's adders and registers, but takes only one beat per 16 cycles. The
round-robin scheduler makes that up: `NUM_CU` iterated cells give `NUM_CU/16` beats per
cycle, and 16 cells give the full rate again.

### Finishing the last bits (`cordic_approx`, `recip_table`)

This stage is what lets the pipeline stop after 16 micro-rotations. After stage 15 the
vector is within a small residual of its final value:

* **Rotation mode.** The remaining angle θ = z satisfies |θ| ≤ atan(2^-15) ≈ 3.05e-5. A
  rotation by θ is, to first order,
  ```
  x_f = x - y·θ       y_f = y + x·θ       (linear: x_f = x; hyperbolic: x_f = x + y·θ)
  ```
  The ignored second-order term is θ²/2 ≤ 4.7e-10, below 2^-30. The hyperbolic case is
  an exception: its last shift is 14, so θ can reach 6.1e-5 and the term about 2^-29.
* **Vectoring mode.** What remains of the quotient is y/x, with |y| small. So
  ```
  z_f = z + y · (1/x)
  ```
  `1/x` only needs as many good bits as y/x needs beyond bit 16. The same step serves
  circular and hyperbolic vectoring, because atan t, t and atanh t agree to first order
  for small t.

The multipliers are **truncated to 21 bits** (`MW = n/2 + log2 n`):

* the large operand (x or y) keeps its 21 leading bits;
* the small residual (z in rotation mode, y in vectoring mode) keeps its 21 low bits,
  which hold all of its significant bits.

These products are much narrower than full 34×34 ones. Each product is shifted back
to weight 2^-30 and added in the second cycle.

**Timing.**

* Cycle 1 is a hold register for the whole vector. In rotation mode both products are
  formed in it; in vectoring mode the reciprocal table is read in it (the block RAM's
  one-cycle read).
* Cycle 2 does the add (rotation), or the single multiply and the add (vectoring, as a
  DSP with its post-adder would).

**Reciprocal table.**

* There are 2^AW entries of 16 bits. AW = 32 − STAGES, so 65,536 entries and 1 Mbit for
  the default build.
* The address is the leading AW bits of x in [0, 2^XINT): XINT = 2 for circular and 1 for
  linear vectoring.
* Entry i holds the reciprocal of the **centre** of its x interval, rounded, as an
  unsigned number with 3 integer and 13 fraction bits:
  ```
  recip[i] = min(2^16 - 1, round(2^(14 + AW - XINT) / (2i + 1)))
  ```
  Using the centre halves the worst-case table error compared with the interval's
  lower edge.
* The table is computed by this formula in an `initial` loop. No data file is needed,
  and synthesis tools turn it into ROM contents.
* Entries saturate for x < 1/8, so **divisors must satisfy |b| ≥ 1/8** (see the limits below).

Setting `STAGES` from 16 up to 30 moves bits from the table to the micro-rotations. For
example, 19 stages leave 13 bits to approximate, with an 8 K-entry table. The
reciprocal entries stay 16 bits wide. `gp_cordic` rejects values outside 16…30 at
elaboration.

## Using the operand routing

The three 2-bit selections and the scale mask are AUX registers:

| `mapping_input` | x, y, z ← | | `mapping_output` | output a, output b ← |
|---|---|---|---|---|
| 0 | a, b, c | | 0 | x, y |
| 1 | b, c, a | | 1 | y, z |
| 2 | c, a, b | | 2 | z, x |
| 3 | as 0 | | 3 | as 0 |

`mapping_scale` bit 0 multiplies output a by `scale_factor`, and bit 1 does the same
for output b.

On the stream, input b is `tdata[31:0]` and input c is `tdata[63:32]`. Output a is
`tdata[31:0]` and output b is `tdata[63:32]`.

Recipes, each checked by the end-to-end testbench:

| operation | unit | a | map in | map out | stream b, c | result |
|---|---|---|---|---|---|---|
| cos θ, sin θ | rot | 1/K16 | 0 | 0 | 0, θ | a = cos θ, b = sin θ |
| rotate (b, c) by φ | rot | φ | 1 | 0 | b, c | rotated pair (scale = 1/K16, mask 3) |
| c / b | vec | 0 | 1 | 1 | b, c | b = c / b |
| b · m | vec | 1/m | 0 | 1 | b, 0 | b = b · m |
| b + a / c | vec | a | 2 | 2 | b, c | a = b + a/c |

Operands must stay within the limits below.

## Flow control, scheduler and registers

**Stream flow control.** Each cell is a single shift pipeline with one enable:

```
en = m_axis_tready || !m_axis_tvalid ;   s_axis_tready = en   (iterated: en && spacing met)
```

* When the output beat is refused, the whole pipeline freezes, so nothing is lost and
  no skid buffer is needed.
* The price is a combinational path from `m_axis_tready` to `s_axis_tready`.
* `tlast` travels alongside its beat.
* An assertion checks that an offered output beat holds still until taken.

**Round-robin scheduler (`axis_rr_sched`).** Up to `NUM_CU` cells sit behind one
stream.

* Input beat k goes to cell k mod NUM_CU.
* Outputs are collected in the same turn order, so results leave in input order.
* It has no storage and adds no latency.
* With pipelined cells, one cell already takes a beat per cycle, and the default is
  `NUM_CU = 1`.
* With iterated cells, beat i of a full-rate stream into 4 cells is taken at cycle
  16·⌊i/4⌋ + i mod 4, and 16 cells take one beat every cycle.

**AUX registers (`cordic_aux_regs`).** An AXI4-Lite slave with 5-bit byte addresses.

* Writes take AW and W together. Responses are always OKAY. Byte strobes are honoured.

| offset | register | reset |
|---|---|---|
| 0x00 | `input_a` (float32 constant operand) | 0.0 |
| 0x04 | `scale_factor` (float32) | 1.0 |
| 0x08 | `mapping_input` [1:0] | 0 |
| 0x0C | `mapping_output` [1:0] | 0 |
| 0x10 | `mapping_scale` [1:0] | 0 |

Write the registers before streaming. The float constants take three cycles to reach
the datapath.

**`gp_cordic_accel`** joins one register block, the scheduler and `NUM_CU` cells.
**`cordic_accel_top`** puts the rotation and the vectoring accelerator side by side:

* Each has its own AXI-Lite port and AXI-Stream pair.
* It runs from a single clock with a synchronous active-low reset.

The processing system, DMA engine, interconnect and reset block of the board are vendor
IP. They are not included: their connections are the top's ports.

## Accuracy and limits

Measured by `tb_cordic_accel_top` on 262,144 random operands per operation, comparing
with double-precision results of the float32-rounded inputs:

| operation | mean squared error |
|---|---|
| sin | 5.4e-15 |
| cos | 4.8e-15 |
| multiply | 2.9e-15 |
| divide | 2.6e-15 |

The error is dominated by truncating to float32 and by the 2^-30 fixed-point step. The
16-bit approximation contributes at or below that level.

Limits, from the Q2.30 format, the table range and (hyperbolic) the convergence range:

* operands and results must satisfy |value| < 2;
* angles must satisfy |θ| < 2 rad;
* quotients need |c/b| < 2 and |b| ≥ 1/8;
* hyperbolic rotation needs |t| < 1.118, and hyperbolic vectoring needs |y/x| < 0.8;
* inputs outside the range saturate rather than wrap.

## Where this departs from the original design

The design follows the 2022 KTU thesis *Research on Machine Learning Algorithm
Acceleration Using FPGAs*: the cell structure, 16 + 16 bit split, 21-bit truncated
multipliers, BRAM reciprocal table, 3-stage converters, input and output MUXes, AXI-Lite
AUX registers, 64-bit AXI-Stream and round-robin scheduling. The following are this
RTL's own choices or omissions:

* **Encodings and map** are this design's own: the MUX codes, the register offsets, the
  operand order inside a 64-bit beat, and the scale-mask meaning.
* **Angle correction** folds angles to ±π/2 with a quarter-turn pre-rotation. The
  original speaks of testing the quadrant against a 0…π/2 range without giving the
  mapping.
* **Linear rotation mode** (z-driven multiply) is available in the cell but gets no range
  correction. It is not one of the two built accelerators.
* **Reciprocal table format** (UQ3.13, centre-of-interval rounding, saturation below 1/8)
  is this design's choice. The original fills it numerically and gives only its size.
* **Stage count.** The original mentions "n/2 + 1" stages. Here that is read as the angle
  correction stage plus 16 micro-rotations.
* **Multiplier width.** The original describes both "n/2 × n/2" products and products
  truncated to n/2 + log2 n bits. The 21-bit truncation is used here.
* **Flow control**, reset behaviour and the exact cycle counts are not specified in the
  original. They are this design's.
* **Hyperbolic mode** is listed in the original as a cell parameter but not detailed.
  Here it follows the textbook hyperbolic CORDIC (repeated shifts 4, 13, 40) with the same
  first-order finishing step.
* **Evaluation modes.** The original only names the combinational and iterated modes.
  Both are built here with structures of this design's own choosing.
* **Not built:**
  * a separately settable guard-bit count (fixed at 2);
  * the template AXI master port of the register block;
  * the standard full-length CORDIC and vendor multiplier/divider cores, which the
    original uses only as comparison baselines.
* **Accuracy.** The original reports mean squared errors around 1e-23. This RTL does
  not reach that and gives the ~5e-15 above. One float32 step near 1.0 is 6e-8, so
  squared errors of truncated float32 results land near 1e-15.
* **Resource figures.** LUT/FF/DSP/BRAM percentages depend on vendor synthesis and are
  not reproduced.

## Simulating

Every testbench is self-checking and prints `TB_RESULT checks=<n> failures=<n>`. With
plain Verilator 5:

```sh
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/cordic_pkg.sv tb/tb_fp_pkg.sv tb/tb_cordic_accel_top.sv \
    --top-module tb_cordic_accel_top -o sim
./obj_dir/sim            # full size: 2 MiB per accelerator, a few seconds
./obj_dir/sim +N=4096    # quick run
```

Replace the testbench name to run any other testbench. The list below gives each
testbench's unit:

| testbench | unit under test |
|---|---|
| `tb_float2fixed`, `tb_fixed2float` | converters, against real-number conversions |
| `tb_cordic_microrotation`, `tb_half_range_cordic`, `tb_cordic_angle_corr`, `tb_cordic_core` | CORDIC stages: rotation and vectoring in circular, linear and hyperbolic coordinates |
| `tb_recip_table`, `tb_cordic_approx` | table contents against the formula; first-order step against exact values |
| `tb_gp_cordic` | one cell: all mappings, scaling, random back-pressure, 28-cycle latency |
| `tb_gp_cordic_sweep` | cells with 19 and 30 micro-rotations (13 and 2 approximated bits), and combinational cells |
| `tb_gp_cordic_hyperbolic` | hyperbolic cells: cosh, sinh, e^t and atanh |
| `tb_iterated_cordic` | single reused stage against the pipelined chain, bit for bit |
| `tb_gp_cordic_accel_iter` | accelerators of 16 and 4 iterated cells: results and acceptance timing |
| `tb_cordic_aux_regs`, `tb_axis_rr_sched`, `tb_gp_cordic_accel` | registers, scheduler with 3 cells, one accelerator |
| `tb_cordic_accel_top` | the full design at default parameters |

`tb_fp_pkg` supplies the float/real helpers.

`tb_cordic_accel_top` configures both accelerators over AXI-Lite, streams 2 MiB through
each at full rate and again under random back-pressure, and checks every result and the
800 MB/s rate. It also counts these mechanisms and fails if any never occurs: stalls,
angle corrections, divisor sign corrections, scaled outputs, `tlast`, register writes,
and each input and output mapping.
