// Reset timing control of one column's hold-and-go counter.
//
// Returns the column counter to zero after its word line has fired, and at
// the start of every row, as in the published counter where this block
// drives the reset of every counter stage. The clear is issued one cycle
// after WL, so that the memory write and the counter value that caused it
// stay stable for the whole WL cycle; at a row start the clear is issued
// one cycle after the row-start pulse. The one-cycle spacing is this
// design's own choice.
//
// Interface: wl and row_start are 1-cycle pulses; cnt_clr is a registered
// 1-cycle synchronous clear for the counter stages.
module hag_reset_timing_control (
  input  logic clk,
  input  logic rst_n,
  input  logic row_start,
  input  logic wl,
  output logic cnt_clr
);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) cnt_clr <= 1'b1;
    else        cnt_clr <= wl | row_start;

endmodule
