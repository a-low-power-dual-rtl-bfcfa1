// Configurable hold-and-go counter of one column (digital CDS and sync block).
//
// One per column. It holds the column's single-slope conversion of the reset
// level and later decides when the column memory samples the shared global
// 10-bit counter. In the reset conversion it counts the a cycles from the
// start of the first ramp until the comparator flips, then holds a. In the
// signal conversion it goes on counting, from a, once the comparator has
// flipped on the second ramp, at cycle t of that ramp. Its bits are all ones
// at cycle t + 2^N - a, with N = 5..8 the configured length. The global
// counter starts 2^N cycles into the second ramp, so at that moment it holds
// t - a: the signal count minus the reset count, the correlated-double-
// sampled result, without a subtractor. WL is raised in that cycle.
//
// Structure (as drawn in the published block diagram): clock timing control
// -> counting stages (5-bit basic counter and three configurable 1-bit
// stages) -> AND chain -> WL -> reset timing control, which clears the
// stages. The configuration C6..C8 comes from the counter control and
// follows the analog gain (1x: none, 2x: C6, 4x: C6+C7, 8x: all).
//
// Timing: synchronous to clk; wl is a 1-cycle pulse, combinational from the
// count and the control inputs of the same cycle.
module hag_counter
  import cis_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [CFG_W-1:0]  cfg,
  input  logic              row_start,
  input  logic              enable_cds,
  input  logic              comp_out,
  input  logic              conv_win,
  input  logic              conv_flush,
  input  logic              gcnt_run,
  output logic              wl,
  output logic [HAG_W-1:0]  q,
  output logic              going
);

  logic cnt_en, cnt_clr, all_ones;

  hag_clock_timing_control u_ctc (
    .clk, .rst_n, .row_start, .enable_cds, .comp_out, .conv_win, .conv_flush,
    .gcnt_run, .all_ones, .cnt_en, .wl, .going
  );

  hag_count_chain u_chain (
    .clk, .rst_n, .cfg, .cnt_en, .cnt_clr, .q, .all_ones
  );

  hag_reset_timing_control u_rtc (
    .clk, .rst_n, .row_start, .wl, .cnt_clr
  );

endmodule
