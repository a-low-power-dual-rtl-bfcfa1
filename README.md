# Hold-and-go dual-CDS readout for a column-parallel CMOS image sensor

This is synthesizable SystemVerilog for the digital readout of a 320 × 240
CMOS image sensor. Each column has a single-slope ADC. The readout removes
the reset level of each pixel in the digital domain (digital correlated
double sampling, CDS) without a 10-bit up/down counter in every column.
Each column needs only:

* a 5- to 8-bit **hold-and-go counter**, and
* a 10-bit memory word.

One **global 10-bit counter** is shared by all columns. When a column's
short counter overflows, its memory word samples the global counter. At
that moment the global count is already the pixel's reset level minus its
signal level. The subtraction is done by timing alone: no column does any
arithmetic on 10-bit values.

An analog CDS stage (comparator auto-zero) sits in front of the ADC. It
removes most of the reset-level spread, so the reset conversion needs only
32 ramp steps at unity gain. The column counter length follows the analog
gain: 5 bits at 1×, 6 at 2×, 7 at 4× and 8 at 8×. Unused counter stages
never toggle.

The design follows the architecture of Cho, Kim and Song, "A Low Power Dual
CDS for a Column-Parallel CMOS Image Sensor". Where that description leaves
something open, this RTL makes its own choice. Those choices are listed in
*Where this RTL makes its own choices* below.

## How one conversion works

All voltages are measured in ramp steps (LSB). The ramp falls one step per
clock cycle. Let N be the counter length in bits (5 to 8). One row is
converted like this:

1. **Reset conversion (first ramp, 2^N cycles).** The comparator output is
   high while the ramp is above the pixel's reset level. While the
   *Enable CDS* window is open, the column counter counts those cycles and
   reaches **a**. Then it holds a.
2. **Signal conversion (second ramp, 2^N + 1024 cycles).** The global
   counter stays at 0 for the first 2^N cycles. After that it counts one
   per cycle. At cycle k of the ramp (k ≥ 2^N) it holds k − 2^N. The
   comparator of a column flips at cycle **t**, when the ramp passes the
   signal level.
3. **Go.** From the cycle after the flip, the column counter counts again
   from a. It is full (all enabled bits high) at cycle t + 2^N − a.
4. **Write.** In that cycle the word line **WL** is raised, and the column
   word stores the global count:

       (t + 2^N − a) − 2^N  =  t − a

   t − a is the signal crossing minus the reset crossing, which is the
   CDS result. The same offset appears in both crossings, so it cancels.
5. The reset timing control clears the counter. The column then stays idle
   until the next row.

Four edge cases have defined results:

| Situation | Behaviour | Result |
|---|---|---|
| Reset crossing beyond the window (a would reach 2^N) | The count stops at all ones | a = 2^N − 1 |
| Signal above the reset level (t < a): the counter fills before the global counter runs | The column waits at all ones and writes in the global counter's first cycle | 0 |
| t − a > 1023 | The global counter stops at 1023 | 1023 |
| Comparator never flips in the second ramp | During the 2^N-cycle flush after the ramp, the column starts as if it had flipped | 1023 |

So in every case the stored value is `clamp(t − a, 0, 1023)`, with
a = min(reset count, 2^N − 1) and t capped at 2^N + 1024. The testbenches
compute their expected values from this formula and from the pixel data,
not from the RTL.

## Counter length and analog gain

`counter_control` turns the gain setting (`gain_e`: 1×, 2×, 4×, 8×) into
three things:

* **C6, C7, C8.** These are thermometer-coded: 1× gives none, 2× gives C6,
  4× gives C6 + C7, 8× gives all three.
* **The window length 2^N.** It sets the length of the first ramp, the
  Enable CDS window, the global counter start delay and the flush tail.
* **The Enable CDS and global-counter-enable windows**, timed against the
  row sequence.

Inside `hag_count_chain`, the stage for bit i takes part only if its own
C bit and all lower C bits are set. A stage that does not take part is held
at 0 and reads as a one in the AND chain that produces WL.

The gain is sampled at every row start. The analog ramp slope must be
changed to match the setting; that happens outside this RTL.

## Row sequence and the partial pipeline

`row_control` runs each row through these phases:

| Phase | Length (cycles) | What happens |
|---|---|---|
| RSTART | 1 | `row_start` clears column counters and the global counter |
| T1 | 16 | `phi_rst` for 4 cycles, then S1 and S2 for 8: the reset level is sampled and the comparator auto-zeroed |
| RAMP1 | 2^N | reset conversion |
| T4 | ≥ 16 | `phi_tx` for 4 cycles, then S1 for 8: the signal level is sampled |
| RAMP2 | 2^N + 1024 | signal conversion |
| FLUSH | 2^N | columns that never crossed are started |
| NEXT | 1 | `row_done` starts the horizontal readout of this row |

No second set of memories is used. The readout of row N−1 overlaps row N's
T1, RAMP1, T4 and the first 2^N cycles of RAMP2. Column words cannot be
written before the global counter starts, so the readout has until then to
finish.

The readout takes 320 cycles (one word per clock). At 8× the window before
the global counter starts is about 545 cycles, which is enough. At 1× it is
about 97 cycles, which is not. So T4 is stretched until no more than 2^N
words are left to read; the `stall` signal shows this. An assertion in
`cis_readout` checks that no column word is written while a scan is running.

Row period without stretching: 2 + T1 + T4 + 3·2^N + 1024 cycles, which is
1826 cycles at 8×. Whole frames at the default size, measured in simulation:

| Gain | Cycles per frame | Clock needed for 80 frame/s |
|---|---|---|
| 8× | 438,561 | 35.1 MHz |
| 4× | 354,049 | 28.3 MHz |
| 2× | 338,561 | 27.1 MHz |
| 1× | 330,817 | 26.5 MHz |

## Two-side columns and output

The columns are split the same way as in the sensor: even columns on one
side of the array and odd columns on the other, 160 slices each
(`column_bank`). Each side has its own `column_control`. Both column
controls scan columns 0..319 together, one per clock, and each one reads
only when the column has its parity. So in every cycle exactly one side
drives its 10-bit bus. `output_mux` registers the word and its column and
row numbers, so pixels leave in raster order, one per clock.

## Blocks and files

| File | Block |
|---|---|
| `rtl/cis_pkg.sv` | shared sizes, `gain_e`, gain → C6..C8 and gain → bits |
| `rtl/cis_readout.sv` | top: wires everything below |
| `rtl/row_control.sv` | row sequence, pixel/analog-CDS controls, T4 stretch |
| `rtl/counter_control.sv` | gain → counter length, Enable CDS and global counter windows |
| `rtl/global_counter.sv` | shared 10-bit counter, saturating at 1023 |
| `rtl/column_bank.sv` | one side: NCOL/2 column slices and the read bus |
| `rtl/hag_counter.sv` | one column's hold-and-go counter |
| `rtl/hag_clock_timing_control.sv` | when the column counter counts; WL |
| `rtl/hag_count_chain.sv` | 5-bit basic and 3 configurable counter stages, AND chain |
| `rtl/hag_reset_timing_control.sv` | counter clear after WL and at row start |
| `rtl/column_sram.sv` | 10-bit column word |
| `rtl/column_control.sv` | horizontal scan of one side |
| `rtl/output_mux.sv` | merges the two sides into the 10-bit output |

## Top-level interface (`cis_readout`)

Parameters: `NCOL` (default 320), `NROW` (default 240), `T1_LEN` and
`T4_LEN` (default 16 each).

| Port | Dir | Meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock (one ramp step per cycle); asynchronous active-low reset |
| `frame_start` | in | pulse: convert rows 0..NROW−1 and read them out |
| `gain` | in | `gain_e`, sampled at each row start |
| `comp_out[NCOL]` | in | column comparator outputs, high while the ramp is above the held pixel level |
| `row_addr`, `phi_sel`, `phi_rst`, `phi_tx`, `s1`, `s2` | out | row address, pixel and analog-CDS switch controls |
| `ramp_run` | out | the ramp generator falls one step per clock while high and restarts from the top at each rise |
| `dout[9:0]`, `dout_valid`, `dout_col`, `dout_row` | out | one corrected pixel per clock during readout |
| `busy`, `frame_done` | out | frame status; `frame_done` pulses after the last word |

## What is outside the RTL

The following parts are analog or off-chip, so they have no RTL:

* the pixel array (4T, two-shared pinned photodiode);
* the analog CDS switches and capacitors;
* the comparators;
* the ramp DAC.

`tb/cis_frontend_model.sv` models them behaviourally, in integer LSB, for
simulation. `phi_rst` sets the column line to the reset level plus a
per-column offset, and `phi_tx` lowers it by the pixel signal. S1 copies
the column line to the hold capacitor, and S2 takes the held level as the
comparator's zero. The comparator then compares how far the ramp has fallen
with how far the held level has fallen, plus a small residual offset.

## Where this RTL makes its own choices

These follow the published architecture in function but are not taken
from it:

* **Counter style.** The counters are synchronous with count enables. The
  published circuit uses toggle-flip-flop ripple counters with a gated
  "CDS clock". The count sequences are the same.
* **Timing alignment.** The go phase starts one cycle after the comparator
  is seen low. This makes the stored value exactly t − a, with no constant
  offset.
* **Edge cases.** The reset count saturates, a full counter waits for the
  global counter (result 0), the global counter saturates, and a flush tail
  of 2^N cycles follows the second ramp. None of these is specified by the
  source.
* **Readout.** The T4 stretch rule, the scan order and rate (one word per
  clock in column order), the output register and its column/row tags are
  this design's own.
* **Sharing.** One global counter and one counter control serve both sides.
* **Unspecified timing.** The pulse lengths in T1 and T4 (parameters
  `RST_W`, `TX_W`, `SMP_W`, `T1_LEN`, `T4_LEN`), the 2-bit gain encoding,
  sampling the gain at row start, and the asynchronous reset.
* **Memory.** The column memory is a flip-flop register. Its read bus is an
  OR of gated outputs.

## Simulating

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/cis_pkg.sv tb/tb_cis_readout.sv --top-module tb_cis_readout -o sim
./obj_dir/sim
```

Replace the testbench name to run another one:

| Testbench | What it covers | Run time |
|---|---|---|
| `tb_cis_readout` | 128 × 4 array, one frame at each gain, every mechanism above at least once | well under a second |
| `tb_cis_readout_full` | default 320 × 240 array, one frame at each gain, every pixel checked | about 20 s |
| `tb_hag_counter` | one column counter against the t − a formula for every gain and the edge cases | short |
| `tb_hag_clock_timing_control`, `tb_hag_reset_timing_control`, `tb_column_sram`, `tb_global_counter`, `tb_counter_control`, `tb_row_control`, `tb_column_control`, `tb_output_mux` | the remaining blocks one by one | short |

Both end-to-end testbenches also check the row period against the formula
above.

All testbenches pass with zero failures. For each block, a version with one
deliberate bug was also run, and its testbench reported failures.

The design was linted with Verilator `-Wall` and elaborated with the slang
front end of Yosys. The remaining lint warnings are unused observation
signals, such as each column's count and the `going` flag.
