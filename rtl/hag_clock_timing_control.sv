// Clock timing control of one column's hold-and-go counter.
//
// Decides in which clock cycles the column counter advances (the "CDS clock"
// of the column) and when its word line WL fires. One conversion of a row
// has three parts:
//   * reset conversion: while Enable CDS is high the counter counts every
//     cycle in which the comparator output is high, i.e. from the start of
//     the first ramp until the ramp crosses the reset level; then it holds;
//   * signal conversion: during the second ramp window (conv_win) the
//     counter starts again ("go") in the cycle after the comparator output
//     is first seen low, i.e. once the ramp has crossed the signal level,
//     and runs until all its enabled bits are high;
//   * WL: when the counter is all ones and the global counter is running,
//     WL is raised for one cycle; the column memory stores the global count
//     in that cycle and this block stops the column until the next row.
// Following the published scheme, the column counts the reset period in the
// first ramp and only the remainder of it in the second ramp, so the global
// count stored at WL is the signal minus the reset level.
//
// The paper's circuit gates the clock itself; here the gated clock is an
// enable (cnt_en) for a synchronous counter. Three behaviours are this
// design's own choices: the count saturates at all ones in the reset
// conversion instead of wrapping; a column whose counter is full before the
// global counter runs waits at all ones and writes at the global counter's
// first cycle (the result is clamped to 0); and conv_flush starts the count
// of a column whose comparator never flipped, so that every column writes
// (a saturated value) before the row ends.
//
// Timing: all inputs are sampled on the rising clock edge; cnt_en and wl are
// combinational from the state and the inputs of the current cycle.
module hag_clock_timing_control (
  input  logic clk,
  input  logic rst_n,
  input  logic row_start,   // 1-cycle pulse: new row, back to reset conversion
  input  logic enable_cds,  // reset conversion window (first ramp)
  input  logic comp_out,    // comparator: 1 while ramp is above the pixel level
  input  logic conv_win,    // signal conversion window (second ramp and flush)
  input  logic conv_flush,  // end of the second ramp: start all idle columns
  input  logic gcnt_run,    // global counter is counting
  input  logic all_ones,    // all enabled counter bits are high
  output logic cnt_en,      // counter advances at the end of this cycle
  output logic wl,          // word line: store global count in this cycle
  output logic going        // column is in its "go" phase (observation)
);

  typedef enum logic [1:0] {S_RESET_CONV, S_GO, S_DONE} ctc_state_e;
  ctc_state_e state, state_n;

  always_comb begin
    state_n = state;
    cnt_en  = 1'b0;
    wl      = 1'b0;
    unique case (state)
      S_RESET_CONV: begin
        cnt_en = enable_cds & comp_out & ~all_ones;
        if (conv_win && (!comp_out || conv_flush)) state_n = S_GO;
      end
      S_GO: begin
        cnt_en = ~all_ones;
        wl     = all_ones & gcnt_run;
        if (wl) state_n = S_DONE;
      end
      S_DONE: ;
      default: state_n = S_DONE;
    endcase
    if (row_start) state_n = S_RESET_CONV;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) state <= S_DONE;
    else        state <= state_n;

  assign going = (state == S_GO);

endmodule
