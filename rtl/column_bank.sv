// One side of the two-side column readout: NS column slices, each a
// configurable hold-and-go counter and a 10-bit memory word, plus the read
// path that puts the word chosen by the column control on the side's
// 10-bit bus.
//
// All slices share the control broadcasts (Enable CDS, C6..C8, the row
// timing and the global count). Each slice has its own comparator input.
// The read path selects one word by rd_addr and ORs the words' gated
// outputs onto the bus.
//
// The slices and the shared control broadcasts follow the published block
// diagram; the OR-combined read bus is this design's stand-in for the
// memories' shared bit lines.
//
// Timing: writes happen on a slice's WL cycle; reads are combinational.
module column_bank
  import cis_pkg::*;
#(
  parameter int unsigned NS = 160,
  localparam int unsigned AW = (NS > 1) ? $clog2(NS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [CFG_W-1:0]  cfg,
  input  logic              row_start,
  input  logic              enable_cds,
  input  logic              conv_win,
  input  logic              conv_flush,
  input  logic              gcnt_run,
  input  logic [GCNT_W-1:0] gcnt,
  input  logic [NS-1:0]     comp_out,
  input  logic              rd_en,
  input  logic [AW-1:0]     rd_addr,
  output logic [GCNT_W-1:0] rd_data,
  output logic [NS-1:0]     wl,
  output logic [NS-1:0]     going
);

  logic [GCNT_W-1:0] word_out [NS];

  for (genvar c = 0; c < NS; c++) begin : g_col
    logic [HAG_W-1:0] q;

    hag_counter u_hag (
      .clk, .rst_n, .cfg, .row_start, .enable_cds,
      .comp_out   (comp_out[c]),
      .conv_win, .conv_flush, .gcnt_run,
      .wl         (wl[c]),
      .q,
      .going      (going[c])
    );

    column_sram #(.W(GCNT_W)) u_sram (
      .clk, .rst_n,
      .wl     (wl[c]),
      .wdata  (gcnt),
      .rd_sel (rd_en && (rd_addr == AW'(c))),
      .rdata  (word_out[c])
    );
  end

  always_comb begin
    rd_data = '0;
    for (int c = 0; c < int'(NS); c++) rd_data |= word_out[c];
  end

endmodule
