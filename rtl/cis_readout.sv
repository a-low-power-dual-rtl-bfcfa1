// Digital readout of a column-parallel CMOS image sensor with dual CDS and
// configurable hold-and-go counters.
//
// Every column has a single-slope ADC: an auto-zeroed comparator (analog
// CDS, outside this RTL) compares the pixel level held on a capacitor with
// a shared falling ramp. comp_out[c] is that comparator's output. Instead of
// a 10-bit up/down counter per column, each column has a 5..8-bit
// hold-and-go counter and a 10-bit memory word; one global 10-bit counter is
// shared. The column counter counts the reset level on the first ramp,
// holds, resumes on the second ramp when the comparator flips, and fires its
// word line when it is full, at which point the global counter holds
// exactly reset minus signal. The memory then keeps that word until the
// horizontal readout, which overlaps the next row's conversion.
//
// Blocks: row_control (sequence per row), counter_control (gain -> counter
// length and counting windows), global_counter, two column_bank sides (even
// and odd columns, NCOL/2 slices each) with a column_control each, and the
// output_mux. Column c is in the even side at position c/2 if c is even,
// in the odd side otherwise.
//
// The split into blocks, the two-side column structure, the shared global
// counter and the 10-bit output follow the published design; sharing one
// global counter and one counter control between both sides, the readout
// order and the output tags are this design's choices.
//
// Interface:
//   frame_start : 1-cycle pulse; converts rows 0..NROW-1 and reads them out.
//   gain        : analog gain setting (1x/2x/4x/8x), sampled at each row start.
//   comp_out    : comparator outputs, 1 while the ramp is above the pixel.
//   phi_sel, phi_rst, phi_tx, s1, s2, row_addr : pixel and analog CDS controls.
//   ramp_run    : ramp generator runs (falls one step per clock) when high;
//                 it restarts from the top at each rising edge.
//   dout/dout_valid/dout_col/dout_row : one 10-bit result per clock during
//                 the horizontal readout.
//   frame_done  : 1-cycle pulse after the last word of the frame.
// Row length: 1 + T1_LEN + 2^N + T4 + (2^N + 1024) + 2^N + 1 cycles, with T4
// stretched when the previous row's readout needs it.
module cis_readout
  import cis_pkg::*;
#(
  parameter int unsigned NCOL   = 320,
  parameter int unsigned NROW   = 240,
  parameter int unsigned T1_LEN = 16,
  parameter int unsigned T4_LEN = 16,
  localparam int unsigned NS = NCOL / 2,
  localparam int unsigned CW = $clog2(NCOL + 1),
  localparam int unsigned AW = (NS > 1) ? $clog2(NS) : 1,
  localparam int unsigned RW = $clog2(NROW)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              frame_start,
  input  gain_e             gain,
  input  logic [NCOL-1:0]   comp_out,
  output logic [RW-1:0]     row_addr,
  output logic              phi_sel,
  output logic              phi_rst,
  output logic              phi_tx,
  output logic              s1,
  output logic              s2,
  output logic              ramp_run,
  output logic [GCNT_W-1:0] dout,
  output logic              dout_valid,
  output logic [CW-1:0]     dout_col,
  output logic [RW-1:0]     dout_row,
  output logic              busy,
  output logic              frame_done
);

  // ---- row sequence and counter control --------------------------------
  logic [HAG_W:0]    win_len;
  logic [CW-1:0]     rd_left;
  logic              ramp1, ramp2, conv_flush, row_start, row_done, stall;
  logic [CFG_W-1:0]  cfg;
  logic              enable_cds, gcnt_en, gcnt_run;
  logic [GCNT_W-1:0] gcnt;
  gain_e             gain_q;

  row_control #(
    .NROW(NROW), .NCOL(NCOL), .T1_LEN(T1_LEN), .T4_LEN(T4_LEN)
  ) u_row (
    .clk, .rst_n, .frame_start, .win_len, .rd_left, .row_addr,
    .phi_sel, .phi_rst, .phi_tx, .s1, .s2, .ramp_run, .ramp1, .ramp2,
    .conv_flush, .row_start, .row_done, .stall, .busy, .frame_done
  );

  counter_control u_cctl (
    .clk, .rst_n, .gain, .row_start, .ramp1, .ramp2,
    .cfg, .win_len, .enable_cds, .gcnt_en, .gain_q
  );

  global_counter u_gcnt (
    .clk, .rst_n, .clr(row_start), .en(gcnt_en), .cnt(gcnt), .run(gcnt_run)
  );

  // ---- two column sides -------------------------------------------------
  logic [NS-1:0]     comp_even, comp_odd;
  logic [NS-1:0]     wl_even, wl_odd, going_even, going_odd;
  logic              rd_en_even, rd_en_odd, busy_even, busy_odd;
  logic [AW-1:0]     rd_addr_even, rd_addr_odd;
  logic [CW-1:0]     col_even, col_odd, left_odd;
  logic [RW-1:0]     rd_row_even, rd_row_odd;
  logic [GCNT_W-1:0] bus_even, bus_odd;

  for (genvar i = 0; i < NS; i++) begin : g_split
    assign comp_even[i] = comp_out[2*i];
    assign comp_odd[i]  = comp_out[2*i+1];
  end

  column_control #(.NCOL(NCOL), .NROW(NROW), .SIDE(1'b0)) u_colctl_even (
    .clk, .rst_n, .rd_start(row_done), .row_in(row_addr),
    .busy(busy_even), .rd_en(rd_en_even), .rd_addr(rd_addr_even),
    .col_idx(col_even), .rd_row(rd_row_even), .rd_left
  );

  column_control #(.NCOL(NCOL), .NROW(NROW), .SIDE(1'b1)) u_colctl_odd (
    .clk, .rst_n, .rd_start(row_done), .row_in(row_addr),
    .busy(busy_odd), .rd_en(rd_en_odd), .rd_addr(rd_addr_odd),
    .col_idx(col_odd), .rd_row(rd_row_odd), .rd_left(left_odd)
  );

  column_bank #(.NS(NS)) u_even (
    .clk, .rst_n, .cfg, .row_start, .enable_cds,
    .conv_win(ramp2), .conv_flush, .gcnt_run, .gcnt,
    .comp_out(comp_even), .rd_en(rd_en_even), .rd_addr(rd_addr_even),
    .rd_data(bus_even), .wl(wl_even), .going(going_even)
  );

  column_bank #(.NS(NS)) u_odd (
    .clk, .rst_n, .cfg, .row_start, .enable_cds,
    .conv_win(ramp2), .conv_flush, .gcnt_run, .gcnt,
    .comp_out(comp_odd), .rd_en(rd_en_odd), .rd_addr(rd_addr_odd),
    .rd_data(bus_odd), .wl(wl_odd), .going(going_odd)
  );

  output_mux #(.W(GCNT_W), .CW(CW), .RW(RW)) u_mux (
    .clk, .rst_n,
    .even_en(rd_en_even), .even_data(bus_even),
    .odd_en(rd_en_odd),   .odd_data(bus_odd),
    .col_in(rd_en_even ? col_even : col_odd),
    .row_in(rd_en_even ? rd_row_even : rd_row_odd),
    .dout, .dout_valid, .dout_col, .dout_row
  );

  // No memory word may be written while the readout is still scanning.
  property p_no_write_during_read;
    @(posedge clk) disable iff (!rst_n)
      (busy_even || busy_odd) |-> !((|wl_even) || (|wl_odd));
  endproperty
  a_no_write_during_read: assert property (p_no_write_during_read);

endmodule
