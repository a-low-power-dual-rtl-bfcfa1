// Row control: selects the pixel rows one after another and runs the
// conversion sequence of each row.
//
// Per row the sequence is (phase names follow the published timing diagram):
//   RSTART  1 cycle: row_start pulse clears column counters and the global
//           counter; row select goes high.
//   T1      pixel reset (phi_rst), then S1 and S2 closed together: the
//           holding capacitor takes the reset level and the comparator is
//           auto-zeroed (analog CDS).
//   RAMP1   T2+T3: first ramp, win_len = 2^N cycles; columns count the
//           reset level while Enable CDS is high.
//   T4      charge transfer (phi_tx), then S1 again to sample the signal.
//           T4 is stretched while the previous row's horizontal readout has
//           more words left than the 2^N cycles before the global counter
//           starts (rd_left > win_len), so that no column memory is written
//           before it has been read (the partial pipeline).
//   RAMP2   T5+T6: second ramp, 2^N + 1024 cycles.
//   FLUSH   T7: 2^N more cycles with conv_flush high, so every column
//           finishes its count and writes.
//   NEXT    1 cycle: row_done pulse starts the horizontal readout of this
//           row, which then runs in parallel with the next row's T1..RAMP2.
// After the last row, DRAIN waits for the readout to finish and raises
// frame_done.
//
// Follows the paper: the order of the phases, which switch closes in which
// phase, the 2^N and 2^N+1024 ramp lengths, the overlap of readout with the
// next row. This design's own choices: the pulse lengths inside T1 and T4
// (parameters), the flush tail, the T4 stretch rule, and row select staying
// high up to the end of T4.
//
// Interface: frame_start is a 1-cycle pulse accepted when idle; win_len and
// rd_left are levels; all outputs are registered state decodes.
module row_control
  import cis_pkg::*;
#(
  parameter int unsigned NROW   = 240,
  parameter int unsigned NCOL   = 320,
  parameter int unsigned RST_W  = 4,    // phi_rst pulse length
  parameter int unsigned TX_W   = 4,    // phi_tx pulse length
  parameter int unsigned SMP_W  = 8,    // S1 / S2 pulse length
  parameter int unsigned T1_LEN = 16,   // >= RST_W + SMP_W + 2
  parameter int unsigned T4_LEN = 16,   // >= TX_W + SMP_W + 2
  localparam int unsigned RW = $clog2(NROW),
  localparam int unsigned CW = $clog2(NCOL + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            frame_start,
  input  logic [HAG_W:0]  win_len,
  input  logic [CW-1:0]   rd_left,
  output logic [RW-1:0]   row_addr,
  output logic            phi_sel,
  output logic            phi_rst,
  output logic            phi_tx,
  output logic            s1,
  output logic            s2,
  output logic            ramp_run,
  output logic            ramp1,
  output logic            ramp2,
  output logic            conv_flush,
  output logic            row_start,
  output logic            row_done,
  output logic            stall,
  output logic            busy,
  output logic            frame_done
);

  typedef enum logic [3:0] {
    R_IDLE, R_START, R_T1, R_RAMP1, R_T4, R_RAMP2, R_FLUSH, R_NEXT, R_DRAIN
  } row_state_e;

  row_state_e state;
  logic [11:0] cnt;          // cycles spent in the current state
  logic        last_row;

  assign last_row = (row_addr == RW'(NROW - 1));

  logic t4_min_done, rd_ok;
  assign t4_min_done = (cnt >= 12'(T4_LEN - 1));
  assign rd_ok       = (12'(rd_left) <= 12'(win_len));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= R_IDLE;
      cnt      <= '0;
      row_addr <= '0;
    end else begin
      cnt <= cnt + 1'b1;
      unique case (state)
        R_IDLE:  if (frame_start) begin state <= R_START; row_addr <= '0; cnt <= '0; end
        R_START: begin state <= R_T1; cnt <= '0; end
        R_T1:    if (cnt == 12'(T1_LEN - 1)) begin state <= R_RAMP1; cnt <= '0; end
        R_RAMP1: if (cnt == 12'(win_len) - 1'b1) begin state <= R_T4; cnt <= '0; end
        R_T4:    if (t4_min_done) begin
                   cnt <= cnt;
                   if (rd_ok) begin state <= R_RAMP2; cnt <= '0; end
                 end
        R_RAMP2: if (cnt == 12'(win_len) + 12'(GCNT_SPAN) - 1'b1) begin
                   state <= R_FLUSH; cnt <= '0;
                 end
        R_FLUSH: if (cnt == 12'(win_len) - 1'b1) begin state <= R_NEXT; cnt <= '0; end
        R_NEXT:  begin
                   cnt <= '0;
                   if (last_row) state <= R_DRAIN;
                   else begin state <= R_START; row_addr <= row_addr + 1'b1; end
                 end
        R_DRAIN: if (cnt != '0 && rd_left == '0) begin state <= R_IDLE; cnt <= '0; end
        default: state <= R_IDLE;
      endcase
    end
  end

  always_comb begin
    phi_sel    = state inside {R_START, R_T1, R_RAMP1, R_T4};
    phi_rst    = (state == R_T1) && (cnt < 12'(RST_W));
    s2         = (state == R_T1) && (cnt >= 12'(RST_W + 1)) && (cnt < 12'(RST_W + 1 + SMP_W));
    phi_tx     = (state == R_T4) && (cnt < 12'(TX_W));
    s1         = s2 || ((state == R_T4) && (cnt >= 12'(TX_W + 1)) && (cnt < 12'(TX_W + 1 + SMP_W)));
    ramp_run   = state inside {R_RAMP1, R_RAMP2};
    ramp1      = (state == R_RAMP1);
    ramp2      = state inside {R_RAMP2, R_FLUSH};
    conv_flush = (state == R_FLUSH);
    row_start  = (state == R_START);
    row_done   = (state == R_NEXT);
    stall      = (state == R_T4) && t4_min_done && !rd_ok;
    busy       = (state != R_IDLE);
    frame_done = (state == R_DRAIN) && (cnt != '0) && (rd_left == '0);
  end

endmodule
