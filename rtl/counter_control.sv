// Configurable counter control.
//
// Turns the analog gain setting into the length of the column hold-and-go
// counters and times the two counting windows that depend on that length:
//   * C6..C8: 1x -> 5-bit, 2x -> 6-bit, 4x -> 7-bit, 8x -> 8-bit counter
//     (the published gain-to-length rule);
//   * Enable CDS: high for the first 2^N cycles of the first (reset) ramp,
//     the window in which the columns count the reset level;
//   * gcnt_en: starts the global counter 2^N cycles after the second
//     (signal) ramp begins and keeps it counting to the end of the signal
//     conversion.
// win_len = 2^N is also given to the row control, which sizes the ramps with
// it. The gain is sampled at each row start, so a gain change takes effect
// at a row boundary (this design's choice).
//
// Interface: ramp1 and ramp2 are levels from the row control, high for the
// whole first ramp and for the whole second ramp plus its flush tail;
// outputs are combinational from a registered cycle count.
module counter_control
  import cis_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  gain_e             gain,
  input  logic              row_start,
  input  logic              ramp1,
  input  logic              ramp2,
  output logic [CFG_W-1:0]  cfg,
  output logic [HAG_W:0]    win_len,
  output logic              enable_cds,
  output logic              gcnt_en,
  output gain_e             gain_q
);

  logic [11:0] k;   // cycles since the current ramp window began

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)         gain_q <= GAIN_8X;
    else if (row_start) gain_q <= gain;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)               k <= '0;
    else if (ramp1 || ramp2)  k <= k + 1'b1;
    else                      k <= '0;

  assign cfg        = gain_to_cfg(gain_q);
  assign win_len    = (HAG_W+1)'(1) << gain_to_bits(gain_q);
  assign enable_cds = ramp1 & (k < 12'(win_len));
  assign gcnt_en    = ramp2 & (k >= 12'(win_len));

endmodule
