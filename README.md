# Fixed-point DTW circuit for online signature verification

This is synthesizable SystemVerilog for the dynamic-time-warping (DTW) stage of an online
signature verifier. DTW is the stage that dominates the verifier's run time. The RTL follows
the fixed-point "custom computing system" of the article *Online Signature Verification
Systems on a Low-Cost FPGA* (2021). In that system a set of fixed-point arithmetic circuits
does the whole verification on a Spartan-3-class FPGA (XC3S2000) at 50 MHz, in place of a
soft processor.

The circuit compares the captured signature with the user's enrolled template. Both are 256
normalised x-y samples. It fills the DTW cost matrix G over a restricted region, producing one
matrix point per clock once its pipelines are full, and streams every point to an external
memory. There, a later feature-extraction stage follows the optimal warping path.

## The computation

Let `t(i) = {t_x(i), t_y(i)}` be the template samples and `s(j) = {s_x(j), s_y(j)}` the
signature samples, for `i, j = 0 .. N-1` with `N = 256`. The distance between two samples is

    d(i,j) = sqrt( (t_x(i) - s_x(j))^2 + (t_y(i) - s_y(j))^2 )

The cost matrix is defined by

    g(-1,-1) = 0
    g(i,j)   = infinity                               for (i,j) outside R
    g(i,j)   = min( g(i-1,j-2) + 2 d(i,j-1) + d(i,j),
                    g(i-1,j-1) + 2 d(i,j),
                    g(i-2,j-1) + 2 d(i-1,j) + d(i,j) )   for (i,j) in R

**The region R** is an Itakura parallelogram. Its sides have slopes 1/2 and 2 and pass
through (0,0) and (N-1,N-1). Row `i` of R covers the columns `j0(i) .. j1(i)`:

    j0(i) = max( ceil(i/2), 2i - (N-1) )
    j1(i) = min( 2i, floor((N-1+i)/2) )

For N = 256, R holds 21,846 points, one third of the matrix. The first and last rows hold a
single point, and the rows grow by about 1.5 points per row near both ends. A distance
`d(i,j-1)` or `d(i-1,j)` that falls outside R also counts as infinity, so that no path
leaves the region.

### Number formats

| quantity | format | bits | note |
|---|---|---|---|
| samples `t_x, t_y, s_x, s_y` | signed Q1.27 | 28 | as in the reference design |
| differences | signed Q2.27 | 29 | exact |
| sum of squares | Q5.54 | 59 | exact; always below 8 |
| square-root radicand | Q4.40 | 44 | sum truncated by 14 bits |
| distance `d` | Q2.20 | 22 | `floor(sqrt(radicand))` |
| cost `g` | Q12.20 | 32 | all ones = infinity, saturating |

The distance and cost formats are this design's own choices. The reference design gives only
the sample format. A cost never exceeds about 2,200 (256 steps of at most 3 × 2.83), so 12
integer bits are enough.

## Architecture

`dtw_top` holds two region ROMs, a controller, the D-matrix circuit and the G-matrix circuit.

```
            start/busy/done
                 |
   ROM_D --> controller <-- ROM_G
               |     |  ^      ^
    (i+1, j)   |     |  | d    | g written
               v     v  | wr   |
  samples --> D-matrix circuit --d(i+1,j)--> G-matrix circuit --> g_wr (external memory)
              (sample BRAMs,                 (d_a/d_b, g_a/g_b,
               distance unit, 26 cycles)      g unit, 3 cycles)
```

### D-matrix circuit (`dtw_d_circuit`)

There are two sample BRAMs. One holds `{t_x, t_y}` and is read at the row index. The other
holds `{s_x, s_y}` and is read at the column index. Both feed `dtw_dist_unit`, a pipeline of
subtract, square, add/truncate and a 22-stage square root (`dtw_sqrt`). It accepts one point
per clock. From issue to result takes 26 cycles: 1 for the BRAM read, 3 for the arithmetic
and 22 for the root. The reference design uses a vendor CORDIC core with the same 22-cycle
latency and throughput. Here it is replaced by a digit-by-digit square root with one stage
per result bit.

### G-matrix circuit (`dtw_g_circuit`)

Only two rows of D and two rows of G are kept on chip, in four dual-port row buffers
(`dtw_dpram`). Row parity picks the buffer. The "a" and "b" roles of each pair therefore swap
on every row without any copying. While the circuit computes row `i`:

| value | where it comes from |
|---|---|
| `d(i,j)` | `d_buf[i%2]`, port A |
| `d(i-1,j)` | `d_buf[(i+1)%2]`, port A (port B takes the new `d(i+1,j)` from the D circuit) |
| `d(i,j-1)` | register: the `d(i,j)` read for the previous column; infinity at `j = j0(i)` |
| `g(i-1,j-1)` | `g_buf[(i+1)%2]`, port A |
| `g(i-1,j-2)` | register: the previous column's `g(i-1,j-1)` |
| `g(i-2,j-1)` | register: `g_buf[i%2]` read at column `j-1` while the previous column was issued |
| new `g(i,j)` | written to `g_buf[i%2]`, port B, over `g(i-2,j)` |

The subtle part is the ordering. `g(i,j-1)` overwrites `g(i-2,j-1)` in the same buffer, and
`g(i,j)` still needs that old value. So `g(i-2,j-1)` is read one column early, when
`(i,j-1)` is issued, and always before the write. This stays safe however long the issue of
`(i,j)` is delayed.

**First column of a row.** Two operands have no previous column to come from:

* `g(i-2,j0(i)-1)` is read through port B of `g_buf[i%2]`. No write can use that port at this
  moment, because the controller starts a row only after row `i-2` is fully written.
* `g(i-1,j0(i)-2)` lies in a buffer that may still be taking the last writes of row `i-1`.
  Instead of reading it, the circuit catches it in a register while it is being written. The
  controller marks the point with column `j0(i)-2` of row `i-1` with a `cap` flag.

Each issued point carries a tag `gtag_t` (see `dtw_pkg`). The tag holds its row and column,
flags for the neighbours that lie outside R (replaced by infinity) and flags for the origin
`g(-1,-1) = 0`. `dtw_g_unit` then forms the three candidate sums with saturating adds in one
stage and takes their minimum in the next. A point issued in cycle `t` leaves on `g_wr_*` in
cycle `t+3`.

### Controller (`dtw_controller`)

The controller walks R twice at the same time. The D walk issues distance points; the G walk
issues cost points. Both go row-major, columns `j0..j1`, at most one point per clock each.
Each walk has its own region ROM (`dtw_region_rom`, contents computed at elaboration). Each
ROM is addressed from the walk's next-row value plus one, so the bounds of the following row
are ready by the time a row ends, even for a one-point row.

With only two row buffers of each kind, the two walks must be held in step. Three interlocks
do this:

1. **D waits for G.** D issues `(i,j)`, with `i >= 2`, only after G has issued `(i-1,j)`.
   `d(i,j)` overwrites `d(i-2,j)`, and point `(i-1,j)` still has to read that value.
2. **G waits for d.** G issues `(i,j)` only after `d(i,j)` has been written.
3. **G waits for g.** G issues `(i,j)` only after `g(i-1, min(j-1, j1(i-1)))` has been
   written. This covers every cost the point reads. It also makes row `i-2` complete before
   row `i` starts, which the port-B read above relies on.

In steady state the D walk runs about one row ahead of the G walk, as in the reference design
("D at row i+1 while G at row i"). The three interlocks are this design's way of keeping the
two circuits in step; the reference design does not describe its mechanism.

## Timing and performance

One g(i,j) is produced per clock, except for stalls. At N = 256, start to `done` takes
**22,393 cycles** for the 21,846 points, or 0.45 ms at 50 MHz. The reference implementation
reports 21,870 cycles for 21,845 points.

The roughly 520 extra cycles come from the short rows at both ends of the parallelogram. While
a row has fewer points than the 26-cycle distance pipeline is deep, interlocks 1 and 2
together limit the circuit to about one row per pipeline latency. How the reference design
avoids this is not known. It might use deeper distance buffers or a different region
boundary, but that is a guess. The run time does not depend on the sample values.

The design is parameterised by `N`. All widths and the ROM contents follow from it; `N` must
be a power of two. Simulated sizes: N = 16 and N = 256 (the default).

## Interface of `dtw_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; synchronous active-high reset |
| `t_we, t_addr, t_x, t_y` | in | 1, 8, 28, 28 | write one template sample (while idle) |
| `s_we, s_addr, s_x, s_y` | in | 1, 8, 28, 28 | write one signature sample (while idle) |
| `start` | in | 1 | one-cycle pulse starts a run (while `busy` is low) |
| `busy` | out | 1 | high from the cycle after `start` until the last point is written |
| `done` | out | 1 | one-cycle pulse after `g(N-1,N-1)` is written |
| `g_wr_valid` | out | 1 | a cost point is output this cycle |
| `g_wr_row`, `g_wr_col` | out | 12, 12 | its `(i, j)`; points come in row-major order |
| `g_wr_data` | out | 32 | `g(i,j)` in Q12.20; all ones = unreachable |

The final DTW score of the alignment is the last word written, `g(N-1,N-1)`. Keep at least
one clock cycle in idle after reset before pulsing `start`, because the ROMs need one read to
present row 0. The sample memories can be reloaded between runs.

## Where this RTL departs from the reference design

* **Region slopes.** 1/2 and 2 are used; the reference gives the region's point count
  (21,845), not its exact definition. These slopes give 21,846 points.
* **Reads of `d(i,j-1)`, `g(i-1,j-2)` and `g(i-2,j-1)`.** The reference reads two values from
  one buffer in a cycle. Here they come from registers, or from an early read, so that each
  buffer port does one thing per cycle and stalls are safe.
* **Synchronisation.** The two walks are kept in step by interlocks instead of a fixed
  schedule. The cost is the roughly 2.4% longer run time described above.
* **Square root.** A pipelined digit-by-digit root replaces the vendor CORDIC core, with the
  same latency.
* **Distance and cost widths**, the infinity encoding, the treatment of distances outside R,
  reset and the load/start/done/output handshakes are this design's own choices.

## What is not included

The full custom verifier also has a pre-processing circuit, a feature-extraction circuit
built into a GMM scoring circuit, a PicoBlaze microcontroller with an RS232 port, and an
external RAM for the G matrix. The source describes these only by name or purpose, without
their algorithms or circuits. They are therefore not in this RTL:

* the sample write ports stand in for the pre-processing stage;
* `start`/`done` stand in for the microcontroller;
* the `g_wr_*` stream is the interface to the external memory.

The two other implementations of the same verifier are not included either: a MicroBlaze
processor running C with a single-precision FPU, and a MicroBlaze with a programmable
floating-point vector accelerator. Both are built around processor cores whose internals
are not given.

## Files

| file | contents |
|---|---|
| `rtl/dtw_pkg.sv` | sizes, formats, region-bound functions, saturating add, G-point tag |
| `rtl/dtw_top.sv` | the DTW circuit |
| `rtl/dtw_controller.sv` | the two region walks and the interlocks |
| `rtl/dtw_region_rom.sv` | row-bounds ROM |
| `rtl/dtw_d_circuit.sv` | D-matrix circuit: sample RAMs and distance unit |
| `rtl/dtw_sample_ram.sv` | x-y sample BRAM |
| `rtl/dtw_dist_unit.sv` | fixed-point Euclidean distance pipeline |
| `rtl/dtw_sqrt.sv` | pipelined square root (22 stages) |
| `rtl/dtw_g_circuit.sv` | G-matrix circuit: row buffers, operand selection, infinity handling |
| `rtl/dtw_g_unit.sv` | three candidate sums and their minimum |
| `rtl/dtw_dpram.sv` | dual-port row buffer |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulation

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself; a watchdog ends a
hung run. Build and run one with Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl rtl/dtw_pkg.sv tb/tb_dtw_top.sv \
              --top-module tb_dtw_top -o sim
    ./obj_dir/sim

Replace `tb_dtw_top` with any other testbench name. What the testbenches check:

* `tb_dtw_top` runs the circuit at its default size (N = 256), three times:
  * random samples, including extreme corner values;
  * a smooth synthetic pen trace against a time-warped, slightly noisy copy of itself (a
    genuine signature);
  * the same trace against an unrelated one (a forgery).

  Each run compares all 21,846 costs with a plain software model of the same fixed-point
  recursion. The test also checks the output order and count and the cycle count (at most
  |R| + 3N). The genuine copy must score well below the forgery; it scores about 4.7 against
  about 353. Finally, each mechanism must act at least once: each of the three interlocks,
  the row-start register, the row-start port-B read, every row swap and the replacement of
  neighbours outside R by infinity. It runs in well under a second.
* `tb_dtw_controller` runs the controller against delay-line models of the two circuits. It
  checks the issue order, each interlock and every region flag.
* `tb_dtw_g_circuit` drives the G circuit row by row with random gaps, against the software
  recursion.
* `tb_dtw_d_circuit`, `tb_dtw_dist_unit` and `tb_dtw_sqrt` compare against integer reference
  models and check the 26-, 25- and 22-cycle latencies.
* `tb_dtw_g_unit`, `tb_dtw_region_rom`, `tb_dtw_sample_ram` and `tb_dtw_dpram` check the
  small blocks.

The reference models work in the same fixed-point formats, so the comparisons are exact. How
close these formats come to floating point was not measured here. The source reports that its
fixed-point version of the whole verifier keeps the single-precision biometric accuracy.
