# Floating point 3D vertex transformation and projection pipeline

This pipeline moves a 3D point and projects it onto a 2D screen. It works in
IEEE-754 single precision throughout. A homogeneous vertex (X, Y, Z, W) goes
in together with its settings:

- a rotation axis and angle;
- three scale factors;
- three translations;
- a projection mode and the distance d to the image plane.

The point is rotated, scaled and translated in a single matrix-vector
multiply, then projected. The central idea is to fold the three transforms
into **one combined 4x4 matrix**. That way a vertex needs only one pass through
the 16 multipliers and 12 adders.

The pipeline is fully pipelined. A new vertex, carrying its own settings, can
enter on every clock cycle. Its projected result appears 60 cycles later.

```
 alpha ──► rotation ──► matrix_builder ──► mult_stage ──► add_stage ──► display_stage ──► (xans,yans,zans,wans)
            (1)          (8)     ▲          (8)  ▲         (17)          (26)    ▲
 rvst, S, T ────────────────────┘               │                               │
 vertex (X,Y,Z,W) ── delayed 9 ─────────────────┘                               │
 mode, d ─────────── delayed 34 ────────────────────────────────────────────────┘
```

The top level is `gfx_top` (`rtl/gfx_top.sv`). Every unit is its own module
in `rtl/`. A second, much smaller top, `gfx_compact`, does the same transform
one vertex at a time on a single multiplier and a single adder. It is
described near the end.

## Interface of `gfx_top`

| Port | Width | Meaning |
|------|-------|---------|
| `clk`, `rst` | 1 | Clock. Synchronous active-high reset; it clears every pipeline register to zero. |
| `in_valid` | 1 | Marks a vertex. It only travels alongside the data; the datapath runs every cycle regardless. |
| `xin`, `yin`, `zin`, `win` | 32 | The vertex, as IEEE-754 single precision. |
| `sx`, `sy`, `sz` | 32 | Scale factors. Used when RVST bit S = 1. |
| `tx`, `ty`, `tz` | 32 | Translations. Used when RVST bit T = 1. |
| `alpha` | 10 | Rotation angle in whole degrees, unsigned. |
| `rvst` | 4 | `[3:2]` rotation axis (00 none, 01 X, 10 Y, 11 Z); `[1]` S (scale); `[0]` T (translate). |
| `mode` | 2 | Display mode. 00 orthographic, 01 perspective; 10 and 11 output a zero vector. |
| `d` | 32 | Eye-to-image-plane distance, used by the perspective projection. |
| `out_valid` | 1 | `in_valid` delayed by 60 cycles. |
| `xans` .. `wans` | 32 | The projected vector. |

Orthographic mode outputs (X', Y', 0, 0). Perspective mode outputs
(X'·d/Z', Y'·d/Z', d, 1). Here (X', Y', Z', W') is the transformed vertex.

## The combined matrix (`matrix_builder`, `matrix_select`)

This is the part that most needs explaining. Its behaviour is deliberately
*not* a general product R·S·T.

The matrix is indexed by rows A–D and columns 1–4. It is built like this:

1. Start from the identity.
2. If **S** = 1, put Sx, Sy and Sz on the diagonal (A1, B2, C3).
3. If **T** = 1, put Tx, Ty and Tz in column 4 (A4, B4, C4).
4. If an axis is chosen, overwrite the 2x2 block of the two rotated axes:
   - cos goes on the block's diagonal;
   - sin and −sin go off the diagonal, placed as in the standard right-handed
     rotation matrices.

   For the Z axis: A1 = cos, A2 = −sin, B1 = sin, B2 = cos.
   For the X axis: B2 = cos, B3 = −sin, C2 = sin, C3 = cos.
   For the Y axis: A1 = cos, A3 = sin, C1 = −sin, C3 = cos.
5. If S = 1 as well, the block's diagonal holds **cos·S** instead of cos, with
   the scale of that row's axis. The axis that is not rotated keeps its plain
   scale.
6. Row D is always (0, 0, 0, 1).

So with rotation and scale together, the sines are **not** scaled. The matrix
equals the true product R·S only in two cases:

- the scales of the two rotated axes are both 1; or
- the angle is a multiple of 180°, so that sin = 0.

When cos = 0 (90° or 270°), the scale of the rotated axes disappears
altogether. Translation sits in column 4, so it is applied *after* the rotation
and the scale.

The placement rules above are the combinational module `matrix_select`.
`matrix_builder` wraps it with arithmetic and timing:

- three floating point multipliers form cos·Sx, cos·Sy and cos·Sz;
- the other matrix inputs wait 7 cycles in a delay line, so they stay in step
  with those products;
- the matrix is registered at the output, giving 8 cycles in total.

### Angle handling (`rotation`, `mycossin`)

cos and sin come from a table; no CORDIC or series is used:

- `alpha` is reduced mod 360 and then rounded **down** to a multiple of 15°.
- Only cos(15°·r) for r = 0..6 is stored. Each entry is rounded to the nearest
  single precision value, and cos 90° = 0 exactly.
- The other quadrants come from symmetry. For an angle 90°·q + t, the cos and
  sin of t are swapped and negated as the quadrant q requires.
- A negated zero stays +0.

`rotation` registers cos, sin and −sin (1 cycle). The rounding down means
angles between the steps are not interpolated: 50° behaves as 45°.

## Multiply and add stages

`mult_stage` registers the matrix and the vertex. It then forms all 16
products `p[r][c] = m[r][c] · v[c]` in parallel. Latency: 1 + 7 = 8 cycles.

`add_stage` reduces each row with a two-level adder tree:

- (p1 + p2) and (p3 + p4) are summed in the first level;
- the two partial sums are added in the second level.

There are registers before, between and after the levels. Latency:
1 + 7 + 1 + 7 + 1 = 17 cycles. Together the two stages take 25 cycles.

## Projection (`display_stage`, `ortho_proj`, `persp_proj`, `z_divider`)

**Orthographic** (`ortho_proj`): registers the vector and outputs
(X, Y, 0, 0).

**Perspective** (`persp_proj`): the unit works out the projected vector
directly, rather than running a projection matrix through the multiply and
add stages again. The steps are:

1. Register X, Y, Z and d.
2. `z_divider` forms d/Z, and also Z/d, in 17 cycles.
3. Two multipliers scale X and Y by d/Z (7 cycles).
4. Register the result.

Total: 26 cycles. A Z of zero gives infinite or NaN coordinates; this unit
does no clipping.

`display_stage` runs both projections in parallel. It delays the
orthographic result by 25 cycles so that both modes take 26 cycles. That
keeps results in input order when the mode changes from one vertex to the
next. The mode is applied at the output.

## Number format (`fp32_pkg`, `fp_mul`, `fp_add`, `fp_div`)

The floating point operators are written for this design. Each one is a
combinational core followed by a register chain:

| Operator | Latency (cycles) |
|----------|------------------|
| multiply | 7 |
| add | 7 |
| divide | 16 |

The register chain lets synthesis retime the logic into the stages; the cores
themselves are not hand-pipelined.

Arithmetic rules:

- Rounding is to nearest, ties to even.
- Denormal inputs are read as zero, and denormal results are flushed to zero.
- Overflow gives ±infinity.
- Any invalid operation (0·∞, ∞−∞, 0/0, ∞/∞) and any NaN input give the quiet
  NaN 0x7FC00000.

The latencies are parameters (`LATENCY` on each operator). Their defaults
come from `gfx_pkg`.

## Timing and alignment

| Stage | Cycles | Cumulative |
|-------|--------|------------|
| rotation | 1 | 1 |
| matrix_builder | 8 | 9 |
| mult_stage | 8 | 17 |
| add_stage | 17 | 34 |
| display_stage | 26 | 60 |

Every setting is carried in a delay line to the unit that uses it:

- the scales, translations and RVST are delayed 1 cycle, to meet cos/sin at
  the matrix builder;
- the vertex is delayed 9 cycles, to meet its matrix;
- the mode and d are delayed 34 cycles, to meet the transformed vertex.

Because of this, each vertex is transformed with exactly the settings it
entered with. The cycle counts are derived in `gfx_pkg`, so changing an
operator latency there keeps the whole pipeline aligned.

## Compact variant (`gfx_compact`, `mult_handler`, `add_handler`)

The full pipeline uses 21 multipliers, 12 adders and 2 dividers. That is far
too large for a small FPGA. `gfx_compact` does the transform part with **one
multiplier and one adder**. It trades throughput for area.

It has no projection stage: the output is the transformed vector
(X', Y', Z', W'). Its results are bit-identical to the transform part of
`gfx_top`, because it performs the same float operations in the same order.

**Shared units.** Each shared unit sits between an operand multiplexer and
a result demultiplexer:

- `mult_handler` computes product number `sel`:
  - 0..15 are the matrix-vector products m[r][c]·v[c], with sel = 4r + c;
  - 16..18 are cos·Sx, cos·Sy and cos·Sz.
- `add_handler` computes sum number `sel`:
  - 0..7 are the first-level pair sums;
  - 8..11 are the second-level sums. These read the first-level results back
    through the multiplexer.

The `sel` of every issued operation travels beside the arithmetic unit in a
delay line of the same length. When the result comes out, the delayed `sel`
steers it into the right register. This makes the handlers correct for any
unit latency, so no cycle counting is needed.

**Sequencing.** `start` latches a vertex and all its settings. A controller
then runs four phases:

1. the 3 cos·S products;
2. the 16 matrix-vector products, using the matrix that `matrix_select` forms
   from the latched settings;
3. the 8 first-level sums;
4. the 4 second-level sums.

Each phase issues one operation per cycle. It ends only when all of its
results have been written back.

**Timing.** A phase of n operations takes n + L + 1 cycles, where L is the
unit latency. `done` pulses 65 cycles after `start` at the default latencies
of 7. A new vertex is accepted only once `busy` is low; a `start` while busy is
ignored.

## Forerunners: integer designs

The floating point pipeline grew out of three small integer designs. All are
included as separate tops. None is used by `gfx_top`.

**`behav_top`** transforms a point without any matrix. Three blocks work on
the same input point at once:

- `bh_adder` adds the translations;
- `bh_multiplier` multiplies by the scales;
- `bh_rotator` turns the point by 0, 90, 180 or 270 degrees about X, Y or Z.

`bh_mux_9_to_3` picks one of the three results by `mode_sel`:

| `mode_sel` | Result |
|------------|--------|
| 00 | translated |
| 01 | scaled |
| 10 | rotated |
| 11 | the input unchanged |

A register (`pipe_delay`) updates all three coordinates on the same clock
edge, so the latency is 1 cycle. Dropping Z gives an orthographic view.

Numbers are sign-magnitude integers, with the helpers in `sm_pkg`:

- inputs are 9 bits: a sign and 8 magnitude bits;
- results are 17 bits, enough that no sum or product overflows;
- zero is always +0.

A quarter turn needs no cos or sin. The two coordinates of the turned plane
swap places and one of them changes sign. The direction is fixed by one
worked example: (2, 2, 2) turned 90° about Z gives (2, −2, 2). That is
(x, y) → (y, −x), and the same sense is used for X and Y. Note that this is
the opposite direction to the matrices of the floating point design.

**`int_matmul`** is the first matrix datapath: a 4x4 matrix times a vertex,
in sign-magnitude integers. The matrix is an input; this design has no
matrix builder. It has two stages:

- `int_mult_stage` forms the 16 products (9-bit inputs, 17-bit products);
- `int_add_stage` sums each row as (p1 + p2) + (p3 + p4), giving 19-bit
  results.

Each stage is registered, so results arrive 2 cycles after the inputs. The
floating point `mult_stage` and `add_stage` keep the same structure.

**`bin_mult`** is the classic sequential shift-and-add multiplier for
unsigned N-bit numbers (N = 8). Its registers:

- B holds the multiplicand;
- A and its carry flip-flop C collect the upper half of the product;
- Q shifts the multiplier out while the lower half of the product shifts in;
- a counter P with a zero detect counts the N steps.

Each step is one add cycle (only when Q[0] is 1) and one shift cycle. `done`
pulses 2N clock edges after the edge that samples `go`. The product is
{A, Q}.

## Where this RTL departs from the reference design

This RTL follows a published student design of a floating point
transformation pipeline. It differs from that design in these ways:

- **Floating point operators.** The original used downloaded open-source
  units. These are written here from scratch, with the number rules given above. The
  original's 16-cycle divider count is this design's assumption; it is chosen
  so that the Z divider takes 17 cycles.
- **No multiplier enables.** The original had two multiplier enable inputs
  whose function is not described. They are left out, and the datapath runs
  every cycle.
- **Alignment delays and `in_valid`/`out_valid`.** These are added. The
  original held its inputs steady and switched modes late during a test,
  rather than streaming vertices with their own settings.
- **Display modes 10 and 11** output zero. They are free in the original.
- **Angle.** Whole degrees in 10 bits, taken mod 360 and floored to 15° steps.
  The original's table step is 15°, but what it does between the steps is
  not given.
- **Multiply plus add takes 25 cycles**, the sum of the 8 and 17 stated for the
  two stages. The original reports 26 for the pair. The stage counts are
  followed here.
- **Compact variant.** The original version of this variant never worked. It
  drove its multiplexers from free-running counters and lost a cycle
  somewhere. Here it is rebuilt with:
  - tag-steered results, so each result finds its own register;
  - a controller that waits for each phase to finish.

  Its multiplier defaults to 7 cycles, like the main design; the original's
  answered in the same cycle. Both settings are tested.
- **Behavioural design.** The original's source for it was lost; only its
  function and block diagram survive. Several details here are this design's
  choice:
  - the result width;
  - the zero rule;
  - the select codes;
  - the coordinate swap in the rotator. The original describes only sign
    changes, and those alone are a rotation only when the two coordinates
    are equal.
- **Binary multiplier.** The original stopped before its control unit. The
  three-state control used here is the standard one for this datapath.
- **Not built:**
  - block RAM storage of matrices, which the original considered for
    `int_matmul` and then dropped;
  - the 4-bit `count` input of the original integer multiply stage. The
    original does not say what it does;
  - the improvements it proposed as future work, namely clipping, general
    R·S products and more projections.
- **Device fit.** The design has 21 multipliers, 12 adders and 2 dividers.
  That is far more than a small FPGA's 24 hard 18x18 multipliers can hold: at
  about four per single precision product, roughly 84 would be needed. This
  RTL is not tuned for any device.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog timer.

- `fp_mul_tb`, `fp_add_tb` and `fp_div_tb` compare 3000 random operands plus
  edge cases against a real-arithmetic reference (`tb/fp_ref_pkg.sv`), bit
  for bit.
- The unit testbenches check every mode of their unit, and check the latency
  exactly.
- `matrix_select_tb` checks every matrix element against an independent
  model, for all 16 mode words.
- `mult_handler_tb` and `add_handler_tb` issue operations in random order with
  random gaps. They check every result register and the timing of every
  `done` pulse, at unit latency 7 and at latency 1.
- `gfx_compact_tb` runs 150 random transforms and the two worked transform
  examples, comparing each with the pipelined chain bit for bit. It also
  checks the latency, that a start while busy is ignored, and a reset while
  busy.
- `bh_*_tb` and `behav_top_tb` compare the behavioural design with an
  integer model. The rotation model uses the integer rotation matrices at
  −90°·k.
- `int_mult_stage_tb`, `int_add_stage_tb` and `int_matmul_tb` stream a new
  random input every cycle against integer arithmetic.
- `bin_mult_tb` multiplies every pair of 8-bit operands, and every pair of
  3-bit operands on a 3-bit copy.
- `transform_chain_tb` runs the multiply and add stages on their own, and the
  rotation-to-add chain on its own, on hand-worked examples.
- `gfx_top_tb` runs the complete design at its default sizes:
  - five worked examples, checked bit for bit;
  - 600 random vertices sent back to back, each with its own settings,
    compared with a real-number model;
  - a reset in the middle of the run.

  It also counts that every mode actually occurred.

## Simulating with Verilator

Packages must come before the modules that import them. This command builds
any testbench, here the full-pipeline test `gfx_top_tb`:

```
verilator --binary --timing -Wno-fatal \
  rtl/*_pkg.sv tb/*_pkg.sv $(ls rtl/*.sv | grep -v '_pkg.sv') \
  tb/gfx_top_tb.sv --top-module gfx_top_tb
./obj_dir/Vgfx_top_tb
```

For any other testbench, replace `gfx_top_tb` with its name: for example
`gfx_compact_tb`, `behav_top_tb` or `bin_mult_tb`. Modules the chosen test
does not use are compiled but not elaborated. A run ends with a line like

```
TB_RESULT checks=<number of checks> failures=0
```

Latencies are parameters with defaults in `gfx_pkg`:

- `LATENCY` on each operator;
- `MUL_LATENCY`, `ADD_LATENCY` and `DIV_LATENCY` on the stages.

To retime the whole pipeline consistently, change the package constants; the
alignment delays in `gfx_top` follow them. The testbenches expect the default
latencies, so their cycle-count checks must be updated with any change. The
exceptions are `mult_handler_tb`, `add_handler_tb` and `gfx_compact_tb`, which
already run two latency settings.
