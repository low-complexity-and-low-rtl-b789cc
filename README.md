# Multistandard 2-D DCT/IDCT with shared, multiplierless 1-D units

Video and image codecs each use their own block transform: the scaled
integer DCT of JPEG and MPEG-1/2/4, the 4x4 and 8x8 integer transforms of
H.264/AVC (plus its 4x4 and 2x2 Hadamard transforms of DC coefficients),
the 4x4 and 8x8 transforms of VC-1 and the 8x8 transform of AVS. A decoder
or encoder that handles all of them could hold one transform core per
standard. This design holds one. All eight transforms are written in a
common form. One pipelined 1-D data path computes all of them, using
shifts and additions only. Two such 1-D units and a 64-word transpose
buffer make a row-column 2-D transform. One 2-D core does forward
transforms and a second one does inverse transforms. The top, `mdct_top`,
holds both cores side by side.

Throughput is one row (or column) vector per clock in every mode. That is
8 samples per cycle for 8x8 blocks, 4 for 4x4 and 2 for 2x2, with no
bubbles between blocks of a continuous stream. A block's first output
vector appears 16 clocks after its first input vector for 8x8, 10 for
4x4 and 4 for 2x2.

## The operation modes

A 3-bit `sel` chooses the mode. It has the same meaning in every block
(`mdct_pkg::sel_e`):

| sel | mode                         | block |
|-----|------------------------------|-------|
| 0   | Hadamard (H.264 chroma DC)   | 2x2   |
| 1   | Hadamard (H.264 luma DC)     | 4x4   |
| 2   | H.264/AVC integer transform  | 4x4   |
| 3   | VC-1 integer transform       | 4x4   |
| 4   | H.264/AVC integer transform  | 8x8   |
| 5   | AVS integer transform        | 8x8   |
| 6   | VC-1 integer transform       | 8x8   |
| 7   | JPEG/MPEG-1/2/4 DCT (scaled) | 8x8   |

## The common matrix form

Every 8-point matrix above has the same sign pattern and uses seven
numbers `a b c d e f g`. Written as the matrix the hardware applies to a
row vector (`y = x * T8`):

    T8 = | a  b  f  c  a  d  g  e |
         | a  c  g -e -a -b -f -d |
         | a  d -g -b -a  e  f  c |
         | a  e -f -d  a  c -g -b |
         | a -e -f  d  a -c -g  b |
         | a -d -g  b -a -e  f -c |
         | a -c  g  e -a  b -f  d |
         | a -b  f -c  a -d  g -e |

| standard   | a   | b   | c   | d   | e   | f   | g   |
|------------|-----|-----|-----|-----|-----|-----|-----|
| JPEG/MPEG  | 362 | 502 | 426 | 284 | 100 | 473 | 196 |
| H.264 8x8  | 8   | 12  | 10  | 6   | 3   | 8   | 4   |
| AVS 8x8    | 8   | 10  | 9   | 6   | 2   | 10  | 4   |
| VC-1 8x8   | 12  | 16  | 15  | 9   | 4   | 16  | 6   |

The 4-point matrices use only `a f g`. H.264 forward uses 1, 2, 1 and
H.264 inverse uses 1, 1, 1/2. The Hadamard matrices use 1, 1, 1 and VC-1
uses 17, 22, 10.

T8 is factored as `A8*B8*C8*D8*E8`:

- **A8** is the 8-point butterfly: `x_i + x_(7-i)` and `x_i - x_(7-i)`.
- **B8** is a 4-point butterfly on the sums. On the differences it applies
  a 4x4 "odd" matrix, B84, that holds all of b, c, d and e.
- **C8** is a 2-point butterfly plus a 2x2 rotation, B42 = `[g -f; f g]`.
- **D8** scales the first two outputs by `a`.
- **E8** is a permutation, which costs only wiring.

The 4-point matrix T4 is exactly the upper half of this chain, and the 2x2
Hadamard is its first butterfly. So one flow graph serves all three block
sizes. Smaller blocks enter it further downstream through multiplexers.

Products are cheap for two reasons:

- **The 2x2 rotation B42 costs three products, not four.** It is computed
  as `f*(I0+I1) - (f-g)*I0` and `(f+g)*I1 - f*(I0+I1)`.
- **B84 is split into four 2x2 pieces.** Each piece has the same
  three-product structure. This gives 12 products instead of 16.

This leaves eleven kinds of coefficient blocks: `a, f+g, f, f-g, b+e, e,
b-e, c+d, c, c-d, b`. The inverse transform uses the transposed chain.
`idct1d` runs the same graph backwards, with the mirrored forms of the
rotation and of the four B84 pieces.

## Coefficient blocks (`coef_mul`)

Each coefficient block multiplies by the value of the current mode, for
example 8, 8, 12 or 362 for `a` in the 8x8 modes. It uses no multiplier.
The values for all modes are built from one shared set of shifted terms,
and a multiplexer picks one. The `a` block, for instance, works like this:

- It forms `6x = 8x - 2x`, then `12x = 6x << 1`.
- It reuses both to form `362x = (12x << 5) - 6x - 16x`.
- It forms `17x = 16x + x` for VC-1 4x4.

That is four adders for all eight modes. Every product is at most three
adders deep. The factorisation used for each coefficient is written next
to it in `rtl/coef_mul.sv`.

In the H.264 4x4 inverse, `g = 1/2`, so `f+g = 3/2` and `f-g = 1/2`. These
products are made with an arithmetic right shift. As a result, one odd
output becomes `w1 + w3 - (w3 >>> 1)` rather than the H.264 reference
`w1 + (w3 >>> 1)`. The two differ by one when `w3` is odd. This comes from
the shared rotation structure. **The H.264 4x4 inverse is not bit-exact
with the standard decoder.**

## The 1-D units (`dct1d`, `idct1d`)

Both units have four pipeline stages. The stages are cut so that a
coefficient block is never chained with another adder in the same stage.

| stage | forward (`dct1d`)                                      | inverse (`idct1d`)                                       |
|-------|--------------------------------------------------------|----------------------------------------------------------|
| 1     | A8 butterfly                                           | 4x4 input mux, `a` blocks, pre-sums                      |
| 2     | 4x4 input mux, 4-point butterfly, odd-part pre-sums    | 2x2 input mux and butterfly, all other coefficient blocks |
| 3     | 2x2 input mux and butterfly, coefficient blocks        | rotation and odd-part final sums, 4-point butterfly      |
| 4     | `a` blocks, rotation and odd-part final sums           | A8 butterfly                                             |

Smaller blocks enter at a later stage and may leave earlier. Latency is
4 cycles for 8x8, 3 for 4x4 and 1 for 2x2. Ports are 8 lanes wide: 4x4
data uses lanes 0-3 and 2x2 data lanes 0-1. Outputs are exact (32 bits
for 16-bit inputs). The forward unit gives `y_k = sum_n C[k][n] x_n` and
the inverse unit `x_n = sum_k C[k][n] w_k`, where C is the standard's
transform matrix. `sel` must not change while vectors are in flight. The
2-D core takes care of that.

## The transpose buffer (`transpose_buffer`, `tbuf_ctrl`)

The buffer is a single 8x8 array of 16-bit registers. It does not use
ping-pong memories. Vectors enter from one edge and every word moves one
place per accepted vector. The direction alternates:

- For n vectors, rows enter at the bottom and leave at the top (vertical
  flow).
- For the next n vectors, columns enter at the right and leave at the left
  (horizontal flow).

A block that entered as rows therefore sits in the array so that the next
horizontal phase pushes it out column by column. The next block enters
in its place during those same cycles. The control unit counts vectors
and flips the demux/mux direction every n = 8, 4 or 2 vectors. In 4x4
and 2x2 modes only the upper-left corner is used. The array shifts only
when the row unit delivers a vector. So at start-up it waits exactly the
row unit's latency: 4, 3 or 1 cycles.

Two additions of this implementation handle the end of a stream:

- **Drain.** When input stops at a block boundary and the row unit is
  empty, the control unit runs one phase with no input. This pushes the
  last block out. `in_ready` is low during the drain.
- **Stall.** If input stops in the middle of a block, the buffer waits
  for the rest of it.

## The 2-D core (`dct2d`) and the top (`mdct_top`)

The datapath runs row unit → rounding → transpose buffer → column unit →
rounding. A block of n x n samples enters as n row vectors on
`din[0..n-1]`, one per clock while `in_valid && in_ready`. It leaves as n
column vectors: output vector k carries column k of the result. The
forward core computes `C X C^T`. The inverse core computes `C^T W C`.
Each 1-D pass is followed by rounding.

The data path keeps 16-bit words between the stages. After each 1-D pass
the exact result is divided by 2^s, rounded half up and saturated to 16
bits. Here s is the worst-case word growth of the mode:

| sel | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7  |
|-----|---|---|---|---|---|---|---|----|
| s   | 1 | 2 | 3 | 7 | 6 | 6 | 7 | 12 |

This scaling is this implementation's choice. It is not the normative
scaling of any standard, which belongs to quantisation. It also replaces
the /2 of the forward 4x4 Hadamard. To get other scaling, change
`mdct_pkg::growth_bits` or `mdct_scale`.

`sel` goes into the mode register only when the core is empty. If a
different `sel` is presented, `in_ready` stays low until every block in
flight has left, and then the new mode starts.

`mdct_top` has two independent cores, each with its own ports:

- `dct_*` is the forward transform.
- `idct_*` is the inverse transform.

## Trust and departures

Every block has a self-checking testbench. All pass. Each testbench was
also run against a deliberately broken copy of its block, and each one
failed there.

The reference model (`tb/mdct_ref_pkg.sv`) works from the integer
matrices of each standard by plain matrix products. It does not use the
factorised form. The following has been checked:

- **Coefficient blocks:** every product, in every mode.
- **1-D units:** every output and the latency of every mode.
- **2-D cores:** full streams in all eight modes, with mode switches,
  drains, gaps and unbroken runs of one vector per clock.
- **Throughput:** `tb_mdct_rate` sends 16 blocks back to back in each mode
  to both cores. Every vector is accepted at once, and the outputs leave
  in one unbroken run of 2, 4 or 8 samples per clock.

The following differs from the source design or was not verified:

- **Not bit-exact:** the H.264 4x4 inverse (see above).
- **Own choices, not from the source:** the rounding between stages, the
  drain, the ready/valid handshake and the lane packing.
- **Not measured:** clock frequency and area. The source reports about
  150 MHz and about 5.6k logic elements per 2-D core on a Cyclone II FPGA.
- **Adder count:** after generic synthesis, each 1-D unit
  (`dct1d`, `idct1d`) has 96 adders and subtractors, all coefficient
  blocks included. Shifts are wiring. The source reports 97 per unit.
- **Not matched:** the source's count of 19 multiplexers. Here the
  coefficient selection is one `case` per coefficient block, which
  synthesis turns into 17 parallel multiplexers per unit. The input
  multiplexers for 4x4 and 2x2 data come on top of those.

## Files and simulation

| file | contents |
|------|----------|
| `rtl/mdct_pkg.sv` | mode and coefficient enums, block size, growth table |
| `rtl/coef_mul.sv` | one shared-factorisation coefficient block |
| `rtl/dct1d.sv`, `rtl/idct1d.sv` | 4-stage shared 1-D forward / inverse units |
| `rtl/tbuf_ctrl.sv`, `rtl/transpose_buffer.sv` | transpose buffer control and array |
| `rtl/mdct_scale.sv` | rounding and saturation to 16 bits |
| `rtl/dct2d.sv` | row-column 2-D core (`INVERSE` parameter) |
| `rtl/mdct_top.sv` | forward and inverse cores side by side |
| `tb/mdct_ref_pkg.sv` | matrix-product reference model |
| `tb/mdct_stream_check.sv` | stimulus/checker for one 2-D core |
| `tb/tb_*.sv` | one testbench per block, `tb_mdct_top` end to end |
| `tb/tb_mdct_rate.sv` | throughput and latency of the top in every mode |

Each testbench prints `TB_RESULT checks=N failures=M`. For example:

    verilator --binary --timing --assert --top-module tb_mdct_top \
      -y rtl -y tb rtl/mdct_pkg.sv tb/mdct_ref_pkg.sv tb/tb_mdct_top.sv
    ./obj_dir/Vtb_mdct_top

The end-to-end test runs the top with its default parameters and
finishes in well under a second.
