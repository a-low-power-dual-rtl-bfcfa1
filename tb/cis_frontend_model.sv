// Behavioural model of the analog side of the sensor, for simulation only:
// pixel array, analog CDS (sampling switch S1, holding capacitor, coupling
// capacitor, auto-zero switch S2), column comparators and the off-chip ramp
// DAC. Voltages are integers in LSB of the ramp.
//
// Per column c of the selected row r:
//   * phi_rst puts the reset level VRST0 + fpn[c] on the column line, phi_tx
//     lowers it by the photo signal sig[r][c] (may be negative in tests);
//   * S1 copies the column line to the holding capacitor;
//   * S2 auto-zeroes the comparator: the held level at that moment becomes
//     its reference, so column offsets (fpn) cancel in the analog domain;
//   * the ramp falls one LSB per clock while ramp_run is high and restarts
//     from the top when ramp_run rises;
//   * comp_out[c] is high while the ramp is running and its drop is still
//     smaller than the held level's drop since auto-zero plus the column's
//     residual offset res[c] (what analog CDS leaves for the digital CDS).
// The reset conversion therefore lasts res[c] steps and the signal
// conversion res[c] + sig[r][c] steps.
module cis_frontend_model #(
  parameter int NCOL = 16,
  parameter int NROW = 4,
  parameter int RW   = 2
) (
  input  logic            clk,
  input  logic [RW-1:0]   row_addr,
  input  logic            phi_sel,
  input  logic            phi_rst,
  input  logic            phi_tx,
  input  logic            s1,
  input  logic            s2,
  input  logic            ramp_run,
  output logic [NCOL-1:0] comp_out
);

  localparam int VRST0 = 2000;

  int sig  [NROW][NCOL];   // photo signal of each pixel, LSB
  int fpn  [NCOL];         // column / pixel reset offset, LSB
  int res  [NCOL];         // residual comparator offset after auto-zero, LSB

  int vline [NCOL];
  int vhold [NCOL];
  int vaz   [NCOL];
  int k;                   // ramp drop below the top, LSB

  initial begin
    k = 0;
    foreach (vline[c]) begin vline[c] = VRST0; vhold[c] = VRST0; vaz[c] = VRST0; fpn[c] = 0; res[c] = 0; end
    foreach (sig[r, c]) sig[r][c] = 0;
  end

  always_ff @(posedge clk) begin
    if (ramp_run) k <= k + 1;
    else          k <= 0;
    for (int c = 0; c < NCOL; c++) begin
      if (phi_sel && phi_rst)     vline[c] <= VRST0 + fpn[c];
      else if (phi_sel && phi_tx) vline[c] <= VRST0 + fpn[c] - sig[int'(row_addr)][c];
      if (s1) vhold[c] <= vline[c];
      if (s2) vaz[c]   <= vhold[c];
    end
  end

  always_comb
    for (int c = 0; c < NCOL; c++)
      comp_out[c] = ramp_run && (k < (vaz[c] - vhold[c]) + res[c]);

endmodule
