// Global 10-bit counter shared by all columns.
//
// During the signal conversion it counts ramp steps, starting 2^N cycles
// after the second ramp begins (N = configured hold-and-go counter length),
// so its value is the ramp level below V_REF = V_TOP - 2^N LSB. Every column
// memory samples it when that column's word line fires. It is cleared at the
// start of each row. At its top value 1023 it stops (saturates) rather than
// wrapping, so columns that finish late store full scale; the saturation is
// this design's own choice.
//
// Interface: en (level) counts one step per clock; run equals en and tells
// the columns that the count is valid; clr is a synchronous clear.
module global_counter
  import cis_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clr,
  input  logic              en,
  output logic [GCNT_W-1:0] cnt,
  output logic              run
);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)                 cnt <= '0;
    else if (clr)               cnt <= '0;
    else if (en && (cnt != '1)) cnt <= cnt + 1'b1;

  assign run = en;

endmodule
