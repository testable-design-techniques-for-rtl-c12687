# Testable binary-feature motion estimator for H.264/AVC variable block sizes

This is the RTL of a motion estimator for H.264/AVC. It works on binary
features, one bit per pixel, and it is built so that it can test itself
exhaustively with only a few counter-generated patterns.

The matching side is simple. Once each frame has been reduced to one bit per
pixel (the "eFrame"), the absolute difference of two pixels is an XOR. The SAD
(sum of absolute differences) of a block is then a count of ones. For one 16x16
candidate, H.264/AVC needs 41 SADs: 16 of 4x4, 8 of 4x8, 8 of 8x4, 4 of 8x8,
2 of 8x16, 2 of 16x8 and 1 of 16x16. The design computes all 41 SADs for P+1
candidates every clock cycle.

The testing side is the main idea. The datapath is a regular array of small
combinational cells. Each cell gets a test mode (`tm = 1`) in which its
input-to-output function is **bijective**, meaning one-to-one. If every cell
is bijective, a cascade of cells is bijective too. A counter that sweeps all
inputs of the first cell then also sweeps all inputs of every later cell. The
whole array is therefore tested exhaustively with the pattern count of one
cell, whatever the array size. This is M-testability: 2^w patterns for a w-bit
cell. The expected output of the cascade can be computed in closed form, so an
on-chip comparator checks the response.

Default size: P = 8 (9 block matching modules), 9-bit accumulated SADs, and
8-bit test sub-lines for the register buffers.

## Block diagram

```
 cur_line ──► treg_buf 16x16  ─────────────┐ cur_lines[16]
 ref_line ──► treg_buf 16x(16+P) ──────────┤ ref_lines[16], BMM k sees bits k..k+15
                                           ▼
            ┌──── bmm 0 ──── bmm 1 ── ... ── bmm P ────┐   (test cascades run 0 → P)
            │  16 x tsad4x4_ha  ──►  taccsad_nw         │
            │  (XOR + HA array)      (5 x taccsad_module)│
            └──────────────────────────────────────────┘
                         │ 41 SADs per BMM, registered
                         ▼
                       sads[P+1][41]

 tme_test_ctrl: counters drive the test inputs and compare the responses
                with predictions (accsad_resp_pred)
```

| File | Role |
|---|---|
| `rtl/tme_pkg.sv` | SAD index layout, test phase enum, `mat_pow()` for the prediction constants |
| `rtl/tha.sv` | testable half adder |
| `rtl/tnha.sv` | n-bit half-adder incrementer whose top cell is a `tha` |
| `rtl/tsad4x4_ha.sv` | 4x4 SAD cell: 16 XORs and 16 incrementer stages |
| `rtl/taccsad_module.sv` | four adders and a subtractor: 5 larger SADs from 4 smaller ones |
| `rtl/taccsad_nw.sv` | five `taccsad_module`s giving the 25 SADs above 4x4 |
| `rtl/bmm.sv` | block matching module: 16 SAD cells and one AccSAD network |
| `rtl/treg_buf.sv` | line-shifting eMB buffer, used for both the current and the reference buffer |
| `rtl/accsad_resp_pred.sv` | expected output of the AccSAD cascade |
| `rtl/tme_test_ctrl.sv` | self-test sequencer and response checker |
| `rtl/tme_top.sv` | top level |

## Normal operation

**Buffers.** Both buffers are 16-line shift registers. On a cycle with
`*_shift = 1`, a new line enters at the bottom (line 15) and every line moves
up by one. Bit x of line y is pixel (x, y). The reference lines are 16+P bits
wide.

**Candidates.** BMM k compares the 16x16 current block with bits k..k+15 of
the 16 reference lines. This is horizontal displacement k. To cover vertical
displacements, keep streaming reference lines: each shift moves every
candidate down by one line. A search of P+1 columns by any number of rows
therefore takes one cycle per row.

**SAD layout.** The 41 SADs of one BMM come out as `sads[k][i]`. Sizes are
written width x height:

| index | block |
|---|---|
| 0..15 | 4x4, raster order (4*row + column) |
| 16+2q, 17+2q | 4x8, left and right, of 8x8 quadrant q (raster order) |
| 24+2q, 25+2q | 8x4, top and bottom, of quadrant q |
| 32+q | 8x8 of quadrant q |
| 36, 37 | 8x16, left and right |
| 38, 39 | 16x8, top and bottom |
| 40 | 16x16 |

**Timing.** Every SAD is combinational from the buffer contents and is
registered once at the output. `sads` therefore shows the window of the
previous cycle. `sad_valid` is 1 when, in that previous cycle, each buffer had
taken in at least 16 lines since reset or since the last self-test. The design
does not pick the best candidate. That choice, including the mode decision
across block sizes, is left to the encoder downstream.

## How the SADs are computed

**4x4 SAD (`tsad4x4_ha`).** The cell XORs the 16 current and reference bits.
Sixteen incrementer stages then add the 16 difference bits one at a time to a
5-bit running count (`tnha`, a ripple of half adders). The count starts at 0,
so the result is 0..16.

**Larger blocks (`taccsad_module`).** Given the SADs of four blocks `a b / c d`,
the module computes five outputs with four adders and one subtractor:

```
o_a = a + c          left half
o_b = b + d          right half
o_e = o_a + o_b      whole
o_c = a + b          top half
o_d = o_e - o_c      bottom half (= c + d, obtained by subtraction)
```

Four of these modules work on the four 8x8 quadrants and give the 4x8, 8x4
and 8x8 SADs. A fifth module takes the four 8x8 SADs and gives 8x16, 16x8 and
16x16. The adder depth is 3 in each module, so 6 in all. All arithmetic is
W-bit modulo 2^W. W = 9 is the smallest width that holds the 16x16 maximum of
256.

## Test architecture

This is the part that needs the most explanation.

### Register buffers

A shift register maps input to output one-to-one by nature. It is tested by
shifting patterns in at the bottom and reading them out at the top 16 shifts
later. A full line, 16 + 16 + P bits over both buffers, is far too wide to
test exhaustively. The columns are independent, though, so each line is cut
into N-bit sub-lines. All sub-lines receive the same N-bit counter value:
bit j of the line gets `pattern[j mod N]`. 2^N patterns (256 for N = 8) then
cover every sub-line exhaustively. In test mode `treg_buf` takes its input
from `tpat` instead of `line_in`.

### SAD cells

In test mode the accumulator of a `tsad4x4_ha` starts at the 5-bit test input
`ti` instead of 0. The cell then computes `to = ti + (number of differing
bits) mod 32`. With the difference bits held fixed, this is a one-to-one map
from `ti` to `to`. The design therefore chains `to` to the next cell's `ti`:

- through the 16 cells of a BMM in raster order;
- then through all P+1 BMMs, 144 cells at P = 8.

The current and reference buses are set to all-zeros or all-ones, 4 cases, by
filling the two buffers with constant lines. For each case `ti` sweeps 0..31.
That is 128 patterns for the entire SAD array. With constant buses, every
cell adds either 0 or 16, so the expected response is
`ti + 16 * cells * (tc xor tr) mod 32`.

Every incrementer stage is 5 bits wide. No carry is lost, so each stage stays
bijective. The highest half adder of each stage is a testable half adder. In
test mode it outputs the stage's increment bit as its carry, which makes the
(increment bit, count) → (carry, sum) map of a single stage one-to-one as
well. In normal mode the count never exceeds 16, so the stage carry outputs
are not used.

### AccSAD modules

In test mode the multiplexers in front of the adders change the module into a
two-input, two-output cell on {A, B} = {`ti_a`, `ti_b`}:

```
ia = B, ic = A, ib = A, id = o_c
o_a = A + B,  o_c = A + B,  o_b = 2A + B,
o_e = 3A + 2B   -> to_a
o_d = 2A + B    -> to_b
```

The map (A, B) → (3A + 2B, 2A + B) mod 2^W has determinant -1, so it is
bijective. All four adders and the subtractor lie on the observed path. The
modules form one cascade: the four quadrant modules, then the top module,
then on into the next BMM. That is c = 5(P+1) = 45 modules in all. Sweeping
{A, B} over all 2^(2W) values tests every module exhaustively at the same
time.

After c modules the response is

```
{A_c, B_c} = {p A_0 + q B_0, r A_0 + s B_0} mod 2^W,   [[p, q], [r, s]] = [[3, 2], [2, 1]]^c
```

`tme_pkg::mat_pow` computes p, q, r and s at elaboration by repeated squaring.
For c = 45 they are (139, 418, 418, 233) at W = 9 and (139, 162, 162, 233)
at W = 8. `accsad_resp_pred` is then four constant multipliers, which
synthesis reduces to shifts and adds.

### Self-test sequence (`tme_test_ctrl`)

A pulse on `test_start` runs these phases. `test_phase` shows the current one.

| phase | cycles | what happens |
|---|---|---|
| `PH_REGBUF` | 2^N + 16 | shift counter value k into both buffers; from cycle 16 on, compare each buffer's top line with pattern k-16 |
| `PH_SAD_FILL` | 16 (x4) | fill the current buffer with all-`tc` lines and the reference buffer with all-`tr` lines |
| `PH_SAD_APPLY` | 32 (x4) | datapath in test mode; sweep `ti`; compare with `ti + 16*cells*(tc^tr)` |
| `PH_ACC` | 2^(2W) | sweep {A, B}; compare with `accsad_resp_pred` |

After the last phase, `test_done` = 1. `test_pass` = 1 if `test_err_cnt`
(mismatching cycles, saturating at 65535) is 0. The whole run takes
`(2^N + 16) + 4*(16 + 32) + 2^(2W)` cycles:

- 262 608 cycles at the defaults;
- 65 872 cycles at W = 8.

During the test the external shift inputs are ignored. Afterwards the buffers
hold test data and `sad_valid` stays low until both buffers have been
reloaded.

## Ports of `tme_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, synchronous active-low reset |
| `cur_line`, `cur_shift` | in | 16, 1 | load one current-block line |
| `ref_line`, `ref_shift` | in | 16+P, 1 | load one reference line |
| `sads` | out | (P+1) x 41 x W | registered SADs; first index = horizontal displacement |
| `sad_valid` | out | 1 | `sads` come from full windows |
| `test_start` | in | 1 | start the self-test |
| `test_busy`, `test_done`, `test_pass` | out | 1 | self-test status |
| `test_err_cnt` | out | 16 | mismatching test cycles |
| `test_phase` | out | `test_phase_e` | current self-test phase |

Parameters: `P` (search width, default 8), `W` (SAD word, default 9) and `N`
(test sub-line width, default 8).

## Where this design makes its own choices

The cell functions, the normal-mode arithmetic, the cascades, the pattern
counts and the closed-form prediction are what the method prescribes. Gate-level
details of the test cells are not, and were filled in here:

- **Testable half adder.** The test-mode carry is an extra input
  (`tha.t`). In `tnha` this input is driven by the stage's increment bit. The
  original cell is a 4-transistor modification whose exact form is not
  reproduced. The method's tnHA also routes a signal from inside the lowest
  half adder to the top one; here that signal is the increment bit itself.
- **SAD cell word length.** Every stage is a uniform 5-bit word. A
  minimum-area version would grow the word stage by stage.
- **AccSAD test wiring.** The routing `ia=B, ic=A, ib=A, id=o_c` was chosen
  to give exactly the mapping {3A+2B, 2A+B}. It is not a copy of a known
  schematic. With an adder in place of the subtractor the same routing gives
  {3A+2B, 4A+3B}, which is still bijective.
- **Cascade order.** Inside the network the order is quadrants 0..3, then the
  top module. Across BMMs it is BMM 0 → P. For the SAD cells it is raster
  order.
- **Shared buffers.** All BMMs share one current buffer and one reference
  buffer. The method's figure gives each BMM its own pair; those copies would
  hold identical data.
- **Word width.** W defaults to 9, not the w = 8 used when counting test
  patterns, so that a 16x16 SAD of 256 does not wrap to 0.
- **Sequencer.** The test sequencer, its phase order, the error counter, the
  output register and `sad_valid` are this design's own.
- **Sequential phases.** The three tests run one after another, although the
  SAD and AccSAD cascades could run at the same time.

Not included:

- the extraction of the binary eFrame from video pixels; `cur_line` and
  `ref_line` expect binary features;
- the alternative test structures that trade fewer patterns for more area: a
  hybrid SAD cell, and an AccSAD network split into n-bit slices (528 patterns
  at w = 8, n = 4);
- hardware-overhead figures, which need a gate-count reference of the
  non-testable array.

Lint notes:

- In `tsad4x4_ha` the carry outputs of the incrementer stages are left
  unconnected on purpose. Verilator reports the empty pin.
- The 4x4 entries of `sads` are zero-extended, so their upper W-5 bits are
  constant 0.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=… failures=…` and stops itself with a watchdog.

| testbench | what it checks |
|---|---|
| `tb_tha`, `tb_tnha` | exhaustive, both modes, and one-to-one test-mode maps |
| `tb_tsad4x4_ha` | random SADs against a bit count; all 128 test patterns and bijectivity |
| `tb_taccsad_module` | the five sums; test map; exhaustive bijectivity of a 4-bit instance |
| `tb_taccsad_nw`, `tb_bmm` | all 41 SADs against per-pixel or per-block sums; both cascades |
| `tb_treg_buf` | shifting against a line model; 256-pattern test readback |
| `tb_accsad_resp_pred` | c = 1, 2, 4 against {3A+2B, 2A+B}, {13A+8B, 8A+5B}, {233A+144B, 144A+89B}; c = 45 against iteration |
| `tb_tme_test_ctrl` | sequencer against behavioural models; predicted cycle count; exactly 3 errors caught when one response per phase is corrupted |
| `tb_tme_top` | full default size: all 9 x 41 SADs every valid cycle, including exact-match (SAD 0) and full-mismatch (SAD 256) windows; full self-test (262 144 AccSAD patterns) passes in the predicted cycle count; reload after test |
| `tb_tme_selftest_w8` | self-test at P = 8, W = 8, N = 8; counts 256 / 128 / 65 536 patterns |

To run one with Verilator:

```
verilator --binary --timing -Irtl -y rtl rtl/tme_pkg.sv tb/tb_tme_top.sv --top-module tb_tme_top
./obj_dir/Vtb_tme_top
```

The full-size `tb_tme_top` runs in well under a minute.

How far to trust it:

- The normal-mode SAD arithmetic is checked against independent per-pixel
  models at full size.
- The test modes are checked against their closed-form predictions.
- Each testbench has been shown to fail on a deliberately broken copy of its
  module.
- Not checked: the fault coverage itself. There is no fault simulation of the
  cells, so the claim of 100% single-cell fault coverage rests on the
  bijectivity argument, not on a fault simulation of this RTL.
