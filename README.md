# HEVC luma fractional interpolation with filter skipping (PECR / PSCR)

Fractional motion estimation in an HEVC encoder needs, for every integer pixel of a
prediction unit (PU), all 15 sub-pixel samples around it: 3 horizontal half/quarter
positions, 3 vertical ones and 9 diagonal ones. Each is an 8-tap FIR filter result. That
takes a lot of arithmetic. This design computes all 15 planes for an 8x8 luma block in
48 clock cycles, and it can skip a filter whose inputs are correlated:

* **PECR** (pixel equality based computation reduction): if all pixels a filter
  multiplies are equal, the result is that pixel. The filter is not evaluated, and the
  output is bit-exact.
* **PSCR** (pixel similarity based computation reduction): the same test, but run after
  dropping 1 to 4 least significant bits. More filters are skipped. The output then
  differs slightly from the exact one.

A skipped filter keeps its input registers unchanged, so its adder tree does not switch.
A multiplexer puts the input pixel with the largest coefficient on the output. The gain
is dynamic power, not cycles: a PU always takes 48 cycles.

## Pixel naming and the three filters

For integer pixel `A(0,0)` the fractional samples are:

| | x + 1/4 | x + 1/2 | x + 3/4 |
|---|---|---|---|
| y | a | b | c |
| y + 1/4 | e | f | g |
| y + 1/2 | i | j | k |
| y + 3/4 | p | q | r |

The vertical-only samples `d`, `h`, `n` sit at y + 1/4, 1/2 and 3/4 below `A(0,0)`.
`a`, `b`, `c` are filtered horizontally from integer pixels. `d`, `h`, `n` are filtered
vertically from integer pixels. `e,i,p`, `f,j,q` and `g,k,r` are filtered vertically from
columns of `a`, `b` and `c` respectively.

Over the window `A(-3) .. A(4)` there are three filter types:

| type | coefficients on A(-3)..A(4) | makes | bypass pixel |
|---|---|---|---|
| A | -1 4 -10 58 17 -5 1 0 | a, d, e, f, g | A(0) |
| B | -1 4 -11 40 40 -11 4 -1 | b, h, i, j, k | A(0) |
| C | 0 1 -5 17 58 -10 4 -1 | c, n, p, q, r | A(1) |

Each set sums to 64. Every filter output is `clip((sum + 32) >> 6, 0, 255)`, so all
intermediate half-pixels are 8-bit again. This is what lets the same 8-bit comparators
check them before the quarter-pixel pass. It also means a window of equal pixels
reproduces that pixel exactly, which makes PECR lossless. The diagonal samples are
therefore computed from rounded 8-bit half-pixels, not from the 14-bit intermediates of
the HEVC reference decoder. Treat the output as an encoder's search interpolation, not a
bit-exact HEVC decoder prediction. The constant multiplications in `hevc_fir` are written
as shifts and adds.

## Datapath: a 15-pixel bus and eight interpolation units

```
 integer pixel buffer (15x15) --+
 transpose memory A (15x8) -----+--> source mux --> 15-pixel bus --+--> comparison unit (14 comparators)
 transpose memory B (15x8) -----+                                  |          | disable[8][3]
 transpose memory C (15x8) -----+                                  v          v
                                            8 x interpolation unit (filters A, B, C + bypass mux)
                                                       | 24 pixels / cycle
                          +----------------------------+---------------------------+
                          v (a/b/c phase, rows -3..11)                             v
              transpose memories A, B, C                     output buffers A, B, C (5 planes each)
```

* The **bus** carries 15 pixels: one row or one column of the 15x15 integer window
  (PU rows/columns -3..11), or one 15-high column of a transpose memory.
* **Interpolation unit k** (k = 0..7) sees bus pixels `k .. k+7` and produces the three
  filter results for output position k. There are 24 filters in all, and every one
  produces a result each cycle.
* The **comparison unit** compares neighbouring bus pixels (i with i+1, 14 comparators).
  Unit k's type A filter uses pixels k..k+6 and is disabled when comparators k..k+5 all
  match. Type C uses k+1..k+7 (comparators k+1..k+6). Type B uses all 8 (comparators
  k..k+6).
* **Transpose memories** A, B, C take the a, b, c half-pixels as rows of 8. They return
  them as columns of 15 for the vertical quarter-pixel pass.
* **Output buffers** A, B, C each hold the five planes produced by one filter type:

| plane | buffer A | buffer B | buffer C |
|---|---|---|---|
| 0 | a | b | c |
| 1 | d | h | n |
| 2 | e | i | p |
| 3 | f | j | q |
| 4 | g | k | r |

## Schedule of one PU

| cycle after start | source on the bus | results (one cycle later) |
|---|---|---|
| 0 | load the 15x15 integer window (one cycle) | results of the previous PU's last cycle |
| 1..15 | integer rows 0..14 (PU rows -3..11) | a, b, c rows. All 15 go to transpose memories; rows 0..7 also go to plane 0 |
| 16..23 | integer columns 3..10 (PU columns 0..7) | d, h, n columns to plane 1 |
| 24..31 | transpose memory A, columns 0..7 | e, i, p to plane 2 |
| 32..39 | transpose memory B, columns 0..7 | f, j, q to plane 3 |
| 40..47 | transpose memory C, columns 0..7 | g, k, r to plane 4 |

That is 1 + 15 + 8 + 24 = 48 cycles. The interpolation unit registers its window at the
end of the issue cycle, and results are written one cycle later. The horizontal a/b/c
pass therefore runs before the vertical d/h/n pass: the last a/b/c row lands in the
transpose memories while d/h/n is still running, so the quarter-pixel pass starts without
a bubble. The next PU's load cycle overlaps the write of the last results. Back-to-back
PUs take 48 cycles each.

At 125 MHz, 48 cycles per 8x8 block is 2160 x 1600 / 64 x 48 = 2.59 M cycles per quad-HD
frame, or 48 frames/s. A 1920x1080 frame takes 1.56 M cycles. Larger PUs are processed as
a sequence of 8x8 blocks; splitting them is left to the caller.

## Top-level interface (`hevc_frac_interp`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; synchronous active-low reset |
| `start` / `ready` | in / out | a PU starts in a cycle where both are high; `pix_in`, `mode`, `trunc_bits` are taken in that cycle |
| `pix_in[15][15]` | in | integer pixels, `[row][column]`, index 0 = PU row/column -3 |
| `mode` | in | `RED_OFF` (every filter computed), `RED_PECR`, `RED_PSCR` |
| `trunc_bits` | in | PSCR: LSBs ignored, 1..4 (larger values act as 4) |
| `done` | out | one-cycle pulse, 49 cycles after the start cycle: all 15 planes of the PU are in the output buffers |
| `rd_plane`, `rd_row` / `rd_a`, `rd_b`, `rd_c` | in / out | combinational read of one 8-pixel row of a plane from each buffer |
| `skip_cnt` | out | filter evaluations skipped in the last finished PU (of 47 x 24 = 1128), updated as `done` rises |

If a new PU starts as soon as `ready` returns, its first results overwrite output-buffer
rows two cycles after its start. The consumer must read the finished PU in the `done`
cycle, or hold off `start`.

## Modules

| module | role |
|---|---|
| `hevc_interp_pkg` | pixel type, sizes, filter / mode / phase / source enums, plane numbers |
| `hevc_fir` | one 8-tap filter (type by parameter), shift-add, round, clip |
| `interp_unit` | three filters with their own input registers, bypass registers and output mux |
| `comparison_unit` | 14 masked comparators and the 24 disable signals |
| `integer_pixel_buffer` | 15x15 window, one-cycle load, row or column read |
| `transpose_memory` | 15x8 half-pixels, row write, column read |
| `source_mux` | selects the bus source |
| `result_demux` | turns the delayed issue tag into transpose-memory and output-buffer writes |
| `output_buffer` | 5 planes x 8x8, row or column write, row read |
| `interp_controller` | the 48-cycle schedule, handshake, result tags, handshake assertions |
| `hevc_frac_interp` | top level; also the skipped-evaluation counter |

## Design choices beyond the published architecture

The block structure, the sizes, the filters, the 48-cycle phase lengths, the 14
comparators and the skip-by-holding-registers scheme come from the architecture this RTL
implements. The following are choices of this implementation:

* **Normalisation.** Each filter rounds, shifts by 6 and clips to 8 bits (see above).
* **Type C filter.** Its first tap is +1 on A(-2), the mirror of type A. With that sign
  the coefficients sum to 64, so equal inputs reproduce the pixel.
* **Comparator pairing.** The 14 comparators are read as adjacent-pair comparators. The
  FIHW, PECR and PSCR 1-4 bit variants were separate builds in the original work. Here
  they are one build, selected at run time: 8-bit comparators with low bits masked.
* **Type B bypass.** Type B has two equal largest coefficients; A(0) is used.
* **Phase order.** a/b/c comes before d/h/n (see the schedule). The total is unchanged.
* **Memories.** All buffers are register arrays with combinational reads. An FPGA
  mapping would put some of them into block RAM. That needs registered reads and a
  one-cycle change to the schedule.
* **Additions.** The handshake (`start`/`ready`/`done`), the output-buffer read port and
  `skip_cnt` are additions. Latching `mode`/`trunc_bits` per PU is also an addition.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M` and has a watchdog. The reference model `interp_ref_pkg`
computes the filters from the coefficient tables with plain multiply-accumulate. It also
models the skip rule and a whole 8x8 PU in the output-buffer layout.

`tb_hevc_frac_interp` runs the top at its default size. It sends 40 PUs with six
textures: random, flat, flat with 2-bit noise, gradient, hard 0/255 edges, and a step.
The PUs cover all three modes and truncations 1-4, mostly back to back, some after idle
gaps. After each `done` it compares all 960 output pixels and `skip_cnt` with the model,
and checks the 49-cycle latency and the 48-cycle period. It also checks that PECR output
equals the exact output. It fails unless each of these happened at least once: a PECR
skip, a PSCR skip of pixels that were not identical, a reduction-off PU, a back-to-back
start, and a clipped filter output.

`tb_workload_pu64` runs a 64x64 PU, the largest HEVC size, as 64 back-to-back 8x8 blocks.
The picture is synthetic: a gradient with a flat patch and 0..3 LSB noise. Each variant
runs in turn, and every output is checked. Each variant takes 3,072 cycles. Filter
evaluations skipped on that picture:

| variant | skipped |
|---|---|
| reduction off | 0 % |
| PECR | 13.4 % |
| PSCR, 1 bit truncated | 13.7 % |
| PSCR, 2 bits | 18.4 % |
| PSCR, 3 bits | 45.8 % |
| PSCR, 4 bits | 71.0 % |

These shares depend entirely on the picture content.

Run one testbench with Verilator from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/hevc_interp_pkg.sv tb/interp_ref_pkg.sv tb/tb_hevc_frac_interp.sv \
  --top-module tb_hevc_frac_interp -Mdir obj -o sim && obj/sim
```

Swap in another `tb_<module>.sv` for the other blocks. The other modules are found
through `-Irtl`.

Not covered: the skip percentages and energy savings of the original work. Those were
measured on real video sequences and on FPGA power estimates. Here `skip_cnt` lets the
computation reduction be measured on any pixel data fed to the design.
