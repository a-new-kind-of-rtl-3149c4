# Quarter-pel interpolator with 4-tap half-pel filters

Motion compensation in an H.264-style decoder predicts a block from a
reference picture at a quarter-pixel offset. The standard builds the half
pixels with a 6-tap filter, so an M x N block needs an (M+5) x (N+5) window of
reference pixels. This design replaces the 6-tap filter with a **4-tap filter
whose coefficients can be changed at run time, as long as they sum to a
fixed power of two (2^n, n >= 4)**. With 4 taps the window shrinks to
(M+3) x (N+3): 11 x 11 instead of 13 x 13 for an 8 x 8 block. Quarter pixels
are still rounding averages of two neighbouring integer or half pixels.

The hardware streams the reference window in one line per clock. Every clock
it turns one line into a full row of half pixels. Three clocks after the
needed lines have arrived, it puts out one row of the block at the requested
quarter-pel position.

## The arithmetic

Pixel naming follows the usual H.264 picture of one integer pixel `D`, its
right neighbour `E`, the pixel below `H` and the diagonal `I`:

```
 D  a  b  c  E
 d  e  f  g
 h  i  j  k  m
 n  p  q  r
 H     s     I
```

Half pixels, with taps `a0..a3` (`a0+a1+a2+a3 = 2^n`):

| value | taps | formula |
|---|---|---|
| `b` (right of D) | row: C, D, E, F (columns -1..+2) | `(a0 C + a1 D + a2 E + a3 F + 2^(n-1)) >> n` |
| `h` (below D) | column: A, D, H, K (rows -1..+2) | same, but with the mirrored taps `a3, a2, a1, a0` |
| `j` (centre) | the four `h` values at columns -1..+2 | horizontal taps `a0..a3` |

Each result is clipped to 0..255. The shift is arithmetic, so a negative sum
rounds towards minus infinity. Note that `j` is built from the rounded,
clipped 8-bit `h` values.

Quarter pixels are `(x + y + 1) >> 1` of two of these. `X_Frac` runs
left to right and `Y_Frac` top to bottom:

| Y\X | 0 | 1 | 2 | 3 |
|---|---|---|---|---|
| 0 | D | a = (D,b) | b | c = (b,E) |
| 1 | d = (D,h) | e = (D,j) | f = (b,j) | g = (E,j) |
| 2 | h | i = (h,j) | j | k = (j,m) |
| 3 | n = (h,H) | p = (H,j) | q = (j,s) | r = (I,j) |

The four diagonal positions `e, g, p, r` average the nearest integer pixel
with `j`. H.264 averages two half pixels there instead, so outputs at these
four positions differ from the standard. Here `m` is the `h` one column to the
right, and `s` is the `b` one row down.

## The streaming structure

```
 in_line ──► input buffer: lines A B C D (BLK_W+3 pixels each, shift up per line)
               │ line C ──────────────┬──────────────► line 1  (D of row r+1)
               │                      └ operator 1 ──► line 2  (b of row r+1)
               └ lines A..D ─ operator 2 (vertical) ► line 3  (h of row r)
                                                         │
                                          operator 3 ◄───┘  (horizontal)
               stage A (lines 1-3) ─────────────────────┐
                                                        ▼
   stage B, the six-line register:  D  b  h  j  b'  D'   (all for output row r)
                                    │  │  │  │  │   │
                                    └──┴──┴──┴──┴───┴─► two MUXes (SEL1, SEL2)
                                                         │      │
                                                         ▼      ▼
                                              bilinear average, output register
```

**Input buffer** (`data_cache_unit`). Four line registers, each BLK_W+3 pixels
wide. Each accepted line shifts them up by one. After line `i` of the window
has entered (line 0 is the row above the block), the buffer holds window lines
`i-3 .. i`. These are block rows `r-1 .. r+2` with `r = i-3`.

**Operators.** All three are banks of the same 4-tap filter (`fir4`).
- Operator 1 (`half_h_operator`) runs along line C, which is block row `r+1`.
  It gives BLK_W `b` values: output `k` filters pixels `k..k+3`.
- Operator 2 (`half_v_operator`) runs down all BLK_W+3 columns of lines A..D.
  It gives the `h` values halfway between block rows `r` and `r+1`.
- Operator 3 is a second `half_h_operator`. It runs along the registered `h`
  line and gives the `j` values one clock later.

**Line registers** (`line_register_bank`). This is the hardest part to follow.
- Stage A holds three lines: line 1 = integer pixels of row `r+1`, line 2 =
  its `b`, line 3 = `h` of row `r`.
- Stage B holds line 4 = `j` (from line 3). It also holds lines 5 and 6, which
  are lines 1 and 2 moved down one clock. They become `D'` and `b'`: the next
  row's pixels that positions `n, p, q, r` need.

The `D` and `b` of row `r` itself were in lines 1 and 2 one line earlier. Also,
`h` of row `r` is in line 3 at the same moment `j` is being computed. So the
block keeps three more lines in stage B: the old contents of lines 5 and 6,
and a copy of line 3. With these, all six lines `D, b, h, j, b', D'` of output
row `r` are present on the same clock.

Stage B moves only when stage A has taken a new line. Gaps in the input
stream therefore never misalign the rows.

**Quarter-pel stage.**
- `qpel_ctrl` turns the fraction into two selects, SEL1 and SEL2. Each select
  is a line number plus a "one column to the right" bit. That bit supplies
  `E`, `m` and `I`.
- Each `line_mux` lines its chosen line up with the block columns. Integer
  and `h` lines carry BLK_W+3 samples that start one column left of the
  block. `b`-type lines carry BLK_W samples.
- `bilinear_filter` averages the two operands and registers the row.
- At full-pel and half-pel positions both selects name the same line, so the
  value passes through unchanged.

## Interface and timing (`subpel_interp_top`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `coef[4]` | in | signed 8-bit taps a0..a3; their sum must be `2^SHIFT` (an assertion checks this) |
| `in_valid` | in | `in_line` is accepted on this clock |
| `in_sop` | in | marks the first line of a block's window |
| `in_frac` | in | `{x, y}` quarter-pel fraction, 2 bits each; hold it for the whole block |
| `in_line[BLK_W+3]` | in | one line of the window, 8-bit pixels, leftmost first |
| `out_valid` | out | an output row is on `out_pix` |
| `out_row`, `out_last` | out | row index in the block; set on the last row |
| `out_pix[BLK_W]` | out | the interpolated row |

- Send the BLK_H+3 lines of each window in order. Gaps are allowed anywhere.
- Output row `r` is registered 3 clocks after window line `r+3` is accepted.
- With back-to-back input, a block takes BLK_H+3 clocks. The next block can
  follow right after it, so the latency of 3 is paid once per stream.
- `coef` is read by the operators without a register. Change it only while no
  block is in flight, meaning from 6 clocks after the last line until the
  first line of the next block.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `BLK_W`, `BLK_H` | 8, 8 | block size; the window is (BLK_W+3) x (BLK_H+3) |
| `SHIFT` | 4 | `n`; the coefficient sum is `2^n` (the method requires n >= 4) |

The block size is fixed when the design is built. The testbenches check 4x4,
8x8 and 16x16, and n = 4 and 5. `subpel_pkg` holds the shared types and an
example coefficient set `(-1, 9, 9, -1)`. The method fixes only the sum rule,
not the coefficient values.

## How this departs from the published description

- **The published description of this design**
  - uses the 8x8 block, 11 pixels per line, 8 results per operator, the line
    registers 1-6 with the one-clock shift from lines 1/2 to 5/6, and the
    three-clock pipeline delay;
  - says the filter coefficients change with the video content while their sum
    stays fixed;
  - builds F2 as the mirror of F1;
  - defines the diagonal quarter pels with `j`;
  - names the MUX with SEL1/SEL2 and the decoder-supplied fraction.
- **Choices made here.**
  - The three alignment lines in stage B.
  - The four-line depth of the input buffer. The published text also speaks of
    M+3 line registers, but its figure and its timing use four lines.
  - Clipping to 0..255 and floor rounding.
  - The valid/start-of-block handshake, the select encoding, the reset and the
    output register.
  - The example coefficient set.
- **Not reproduced.**
  - The published cycle counts per 16x16 macroblock are 352 for 4x4
    partitions, 152 for 8x8 and 70 for 16x16, which is 4M+6 clocks per MxM
    block. The pipeline here needs M+3 clocks per block plus 3 once, which is
    faster. The published figures cannot be derived from its structure.
  - An "HD frame in 676 clocks" figure is given without a unit and is not
    reproduced.
  - Changing the block size at run time is mentioned but not described. Here
    the size is a parameter.
- **Structure only, no arithmetic.** A shift-and-add 4-tap structure built
  from the outer-pair and inner-pair sums is shown, but not its signs. The
  filters here use general multipliers, because the coefficients are run-time
  inputs.
- **Outside this design.** The reference frame store and the entropy decoder
  that supplies `(X_Frac, Y_Frac)`. Their data enters through `in_line` and
  `in_frac`.

## Simulating

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`.
From the directory above `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/subpel_pkg.sv tb/subpel_ref_pkg.sv tb/tb_subpel_interp_top.sv \
    --top-module tb_subpel_interp_top -o sim && obj_dir/sim
```

Replace the last file and top name to run another testbench.

- `tb_subpel_interp_top`: the whole design at its default size. It runs 120
  blocks covering all 16 positions, coefficient changes, input gaps,
  back-to-back blocks and clipping at both ends. It checks every pixel and the
  clock each row appears on.
- `tb_subpel_block_sizes`: the same checks through `subpel_size_harness`, at
  4x4, 16x16, and 8x8 with n = 5.
- `tb_<block>`: unit tests for each module.
- `subpel_ref_pkg` is the reference model. It computes every position straight
  from the formulas above, not from the RTL structure.
