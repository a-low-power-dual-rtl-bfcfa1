// Column control of one side of the two-side column readout.
//
// The columns are split between two readout rows, even columns on one side
// of the pixel array and odd columns on the other. Each side has its own
// column control. After a row has been converted (rd_start), both column
// controls step through the column numbers 0..NCOL-1, one per clock, and
// each selects its own side's memory word when the column number has its
// parity: rd_en is high on every other cycle and rd_addr is the word's
// position within the side. The output MUX then sees exactly one side
// reading in each cycle, so the row leaves the chip as NCOL words in column
// order, one per clock. The scan order and rate are this design's choices;
// the paper names the block only.
//
// rd_left (words still to come, 0 when idle) lets the row control hold back
// the next write to the memories until the scan is nearly done.
//
// Timing: rd_start is a 1-cycle pulse; the first word is selected in the
// cycle after it; all outputs are registered or decoded from registers.
module column_control #(
  parameter int unsigned NCOL = 320,
  parameter int unsigned NROW = 240,
  parameter bit          SIDE = 1'b0,   // 0: even columns, 1: odd columns
  localparam int unsigned CW  = $clog2(NCOL + 1),
  localparam int unsigned AW  = $clog2(NCOL / 2),
  localparam int unsigned RW  = $clog2(NROW)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          rd_start,
  input  logic [RW-1:0] row_in,
  output logic          busy,
  output logic          rd_en,
  output logic [AW-1:0] rd_addr,
  output logic [CW-1:0] col_idx,
  output logic [RW-1:0] rd_row,
  output logic [CW-1:0] rd_left
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      col_idx <= '0;
      rd_row  <= '0;
    end else if (rd_start) begin
      busy    <= 1'b1;
      col_idx <= '0;
      rd_row  <= row_in;
    end else if (busy) begin
      if (col_idx == CW'(NCOL - 1)) busy <= 1'b0;
      else                          col_idx <= col_idx + 1'b1;
    end
  end

  assign rd_en   = busy && (col_idx[0] == SIDE);
  assign rd_addr = AW'(col_idx >> 1);
  assign rd_left = busy ? CW'(NCOL) - col_idx : '0;

endmodule
