# Low-power 8x8 inverse DCT with zero skipping and radix-4 serial multipliers

This is a 2-D inverse discrete cosine transform (IDCT) for the 8x8 blocks of
MPEG-style video decoding. It is built for low switching activity, not for
peak throughput. It rests on three ideas:

1. **No transposition memory.** The 2-D transform `X = C^T Z C` is computed
   as two matrix products. The first stage makes one row of `T = C^T Z` at a
   time, and one row of `T` is all the second stage needs to make one row of
   `X = T C`. So only one row of `T` (8 words) sits between the stages, not a
   64-word transposition RAM. The two stages also work on neighbouring rows at
   the same time.
2. **Zero masking.** Most coefficients of a coded block are zero. Every
   multiply-accumulate (MAC) lane checks the data operand of each term. If it
   is zero, the lane does not start its multiplier and moves on after one
   clock. A non-zero term costs six clocks.
3. **Radix-4 serial multiplier.** Each lane multiplies with a Modified-Booth
   serial multiplier. It takes two multiplier bits per clock, so an 8x8-bit
   product takes 5 clocks. A radix-2 serial design would take 10.

Outputs are deterministic and bit-exact to the integer model described
below. How long a block takes depends on its data: an all-zero block passes in
about a fifth of the time of a dense one.

## The arithmetic

The 8-point 1-D IDCT is

    x(n) = sum_{k=0..7} c(k)/2 * z(k) * cos((2n+1) k pi / 16),   c(0) = 1/sqrt(2), c(k>0) = 1

In matrix form this is `x = C^T z` with `C[k][n] = c(k)/2 cos((2n+1)k pi/16)`.
The 2-D transform of a block `Z` is `X = C^T Z C`.

Fixed-point format (all values are signed two's complement):

| quantity | width | notes |
|---|---|---|
| input coefficient `Z[r][c]` | 12 bits | MPEG-2 range -2048..2047 |
| constant `C[k][n]` | 8 bits | `round(C * 2^8)`, magnitudes 25..126 |
| stage-1 sum | 23 bits | exact: 12 + 8 + 3 bits |
| `T[i][j]` | 16 bits | `(sum + 128) >>> 8`; this never clips |
| stage-2 sum | 27 bits | exact |
| output `X[i][j]` | 9 bits | `(sum + 128) >>> 8`, saturated to -256..255 |

`coef_rom` does not store the 64 constants. The matrix has only eight
different magnitudes. The angle index `m = (2n+1)k mod 32` is folded into the
first quadrant, which gives both the table index and the sign. The nine
magnitudes `round(0.5 cos(m pi/16) 2^8)` and the DC value
`round(2^8 / (2 sqrt 2))` are worked out from the formula at elaboration time.

Accuracy: for sparse and moderate blocks, the test compares the output with
the exact real-valued transform. The largest error seen is about 1.2 LSB. The
8-bit constants are the precision limit. For dense full-scale blocks the
error can reach about 15 LSB before clipping. Widen `CW`/`FRAC` if that
matters. `CW` is the recoded multiplier operand, so a wider `CW` also makes
each multiply slower (`CW/2 + 1` clocks).

## How the stages share the work

Stage 1 computes row `i` of `T`:

    T[i][j] = sum_k C[k][i] * Z[k][j]          lane j walks down column j of Z

Stage 2 computes row `i` of `X`:

    X[i][j] = sum_k T[i][k] * C[k][j]          lane j walks along row i of T

Both stages are the same module, `idct_stage`, with eight `idct_mac` lanes.
One lane makes each output column. The only difference is the parameter
`CONST_BY_ROW`, which selects the constant index: the row (stage 1) or the
lane (stage 2). Each lane has its own read port into its data source and its
own `coef_rom` port. Because of this, lanes that meet zeros finish early, and
a row is done when its slowest lane is done.

Sequencing, all in `idct2d_top`:

- The input stream fills `coef_block_buffer` in row-major order. When 64
  words are in, the buffer is full and refuses more input.
- Stage 1 runs rows 0..7 one after another. A finished row waits in the
  stage's accumulators until `t_row_buffer` is empty (a *stall*). It is then
  copied in a single clock.
- Stage 2 starts as soon as a row is in `t_row_buffer`. It releases that row
  once every lane has read all its terms, before its own output has been
  taken. Stage 1 can therefore hand over the next row while stage 2 waits on
  the output handshake.
- After stage 1 hands over row 7, the input buffer is released and the next
  block can stream in. Stage 2 is still finishing the last rows at that
  point.

So while stage 2 computes row `i` of `X`, stage 1 already computes row `i+1`
of `T`. The whole of `T` is never held anywhere.

## The MAC lane and zero masking (`idct_mac`, `zero_mask`)

A lane is a small state machine: `IDLE -> TERM -> (MUL) -> ... -> DONE`.

- In `TERM` the lane drives the term index `k` and sees `d(k)` and `c(k)` in
  the same clock.
- `zero_mask` compares `d(k)` with zero.
  - Zero: `skip` is raised and the lane moves to the next term on the next
    clock. The multiplier's registers do not change.
  - Non-zero: `mult_en` starts `booth_mult`, with the data as multiplicand and
    the constant as the recoded multiplier operand. The lane then waits in
    `MUL`.
- When the multiplier signals `done`, the product is added to the
  accumulator.

Cost per term: 1 clock if the data is zero, 1 + 5 = 6 clocks otherwise. One
stage row takes `max over lanes (sum of term costs) + 2` clocks, including
the start and hand-over clocks. Examples:

- all-zero block: 10 clocks per row; about 97 clocks from the last input word
  to the last output row
- dense block: 50 clocks per row; about 457 clocks

In stage 2 the data operands are elements of `T`. A column of `Z` that is all
zero gives zero elements of `T`, so masking saves work there too.

Block throughput is set by stage 1 plus the 64 clocks needed to load the next
block, because there is only one input buffer. The sums below are the
throughput, not the latency from the last input word:

- dense block: about 64 + 8 x 50 = 464 clocks
- video-like blocks: about 237 clocks on average. In these blocks non-zero
  coefficients thin out with frequency, and about 85% of the 1024 multiply
  terms per block are skipped.

## The radix-4 serial multiplier (`booth_mult`)

`booth_mult` is built from two blocks:

- **`booth_control`** holds the multiplicand `A`. It recodes the bits
  `b(i+1) b(i) b(i-1)` into one of +0, +A, +2A, -A, -2A (table below) and
  drives the multiplexer. It also runs the sequence: one `load` clock, then
  `WB/2` `step` clocks, then a one-clock `done`.
- **`booth_adder_shifter`** holds the result register `{hi, lo, b(-1)}`.
  `load` puts `{0, B, 0}` in it. Each `step` adds the selected partial product
  to `hi` and shifts the whole register right by two bits, arithmetically. So
  the multiplier bits leave at the bottom while the product builds up from the
  top. The recoder always looks at the same three bits, `{lo[1:0], b(-1)}`.
  `hi` has two guard bits, because partial sums reach 8|A|/3.

| b(i+1) b(i) b(i-1) | 000 | 001 | 010 | 011 | 100 | 101 | 110 | 111 |
|---|---|---|---|---|---|---|---|---|
| add | +0 | +A | +A | +2A | -2A | -A | -A | -0 |

Latency is `WB/2 + 1` clocks from the start edge to `done`. This is 5 clocks
for 8x8 bits, which is `(n+m)/4 + 1` when both operands have the same width.
A start while the multiplier is busy is ignored; an assertion in `idct_mac`
checks that the lane never does this. The product stays valid until the next
start.

## Interface of `idct2d_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; active-low asynchronous reset |
| `in_valid` / `in_ready` | in / out | 1 | input handshake, one coefficient per transfer |
| `in_data` | in | 12 | `Z[0][0], Z[0][1], ..., Z[7][7]` (row-major) |
| `out_valid` / `out_ready` | out / in | 1 | output handshake, one row per transfer |
| `out_row_idx` | out | 3 | row number `i`; rows come out in order 0..7 |
| `out_row` | out | 8 x 9 | `X[i][0..7]`, element `j` in `out_row[j]` |

Parameters: `DW` (input width, 12), `CW` (constant width, 8; must be even),
`FRAC` (constant scaling, 8), `TW` (width of `T`, 16), `OW` (output width, 9).

`in_ready` is low from the moment a block is complete until stage 1 has
handed over the block's last row of `T`. An output row is held until
`out_ready`. Back-pressure on the output stalls stage 2, then stage 1, then
the input.

## Module hierarchy

    idct2d_top
      coef_block_buffer          64 x 12-bit input block, 8 column read ports
      idct_stage (stage 1)       8 lanes, T = C^T Z
        coef_rom x8
        idct_mac x8
          zero_mask
          booth_mult
            booth_control
            booth_adder_shifter
      t_row_buffer               one row of T, 8 read ports
      idct_stage (stage 2)       8 lanes, X = T C, 9-bit saturated output
    idct_pkg                     sizes, Booth operation enum and decoder, lane states

## Where this RTL makes its own choices

The architecture follows a published low-power IDCT design: the
decomposition, the one-row hand-over in place of a transposition memory, zero
masking, and the radix-4 serial multiplier with its recoding table and
5-clock latency. The following are this implementation's own decisions:

- **Lanes.** Eight lanes per stage, one per output column. Each lane is
  term-serial and runs independently of the others.
- **Widths and rounding.** All word widths except the 8x8-bit multiplier, the
  round-half-up rescaling, and the output saturation.
- **Multiplier register.** The multiplier operand, not the multiplicand, is
  loaded into the result register and shifted out as the product shifts in.
- **Zero masking in stage 2.** Elements of `T` are masked as well as the
  input coefficients, because both stages use the same lane.
- **Power saving.** The multiplier is disabled by withholding its start, not
  by clock gating. A synthesis flow can add clock gating on the multiplier's
  enable.
- **Input buffering.** A single input block buffer with no double buffering.
  The next block streams in only after stage 1 has finished with the current
  one.
- **Interfaces.** All handshakes and the reset.

Not included:

- the radix-2 serial-parallel multiplier that serves only as a comparison
  baseline for the radix-4 one
- any run-time reconfiguration: the design has no mode inputs
- system-level power management (frequency or voltage scaling)

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

- `tb_booth_mult`: all 65,536 signed 8x8 operand pairs (including 12 x 3 = 36),
  with the exact 5-clock latency; and random 12x8-bit products.
- `tb_booth_control`, `tb_booth_adder_shifter`: the recoding table, the
  sequence, and the register contents step by step.
- `tb_zero_mask`, `tb_coef_rom`: exhaustive. The ROM is compared with the
  cosine formula evaluated directly. The test also checks that its rows are
  close to orthonormal.
- `tb_idct_mac`: random dot products with a random share of zeros. Checks the
  exact clock count, the number of skipped terms and the number of
  multiplies.
- `tb_idct_stage`: both stage configurations against the reference model,
  with exact row timing and saturation.
- `tb_coef_block_buffer`, `tb_t_row_buffer`: stream and handshake behaviour,
  and every read port.
- `tb_idct2d_top`: 24 blocks at the default parameters, with random input
  gaps and random output back-pressure, compared bit-exactly with
  `idct_ref_pkg::idct2d_int`. It also counts each mechanism and fails if one
  never happens: zero skips, multiplies, both stages busy at once, stage 1
  waiting for the row buffer, input refused, output back-pressure and output
  saturation.

- `tb_idct2d_sparse_stats`: 200 video-like blocks streamed back to back.
  Checks bit-exact results and reports how many terms were skipped and the
  clocks per block.

`tb/idct_ref_pkg.sv` is the reference model. It computes the constants
straight from the cosine formula, without the ROM's symmetry folding, and it
models each stage as an exact sum, then add 128, shift right by 8 and
saturate.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/idct_pkg.sv tb/idct_ref_pkg.sv tb/tb_idct2d_top.sv \
        --top-module tb_idct2d_top
    ./obj_dir/Vtb_idct2d_top

Any other testbench runs the same way: put its file and top-module name in
place of `tb_idct2d_top`. The end-to-end test runs in well under a second.
