// Full-size end-to-end testbench: the readout with all its default
// parameters (320 x 240 pixels, 10-bit), one complete frame at each analog
// gain: 1x (5-bit counters, where the readout of each row stretches the
// next row's T4), 8x, 2x and 4x.
//
// Connects the readout to the behavioural analog front end.
// Pixel signals, column offsets and residual comparator offsets are random,
// with forced corner cases. Each output word is compared with the value
// computed here from the pixel data alone:
//   a = min(res, 2^N - 1)                       reset count
//   t = clamp(res + sig, 0, 2^N + 1024)         signal crossing (or flush)
//   result = clamp(t - a, 0, 1023)
// which is the pixel signal sig whenever nothing saturates (column offsets
// cancel). It also checks that every pixel comes out exactly once, in
// column order, and that each mechanism happened at least once: the counter
// lengths, odd and even sides, reset-count saturation, a column
// waiting for the global counter (result clamped to 0), global counter
// saturation, the flush of a column that never crossed, the T4 stretch
// while the previous row is still being read, and readout overlapping the
// next row's conversion.
module tb_cis_readout_full;
  import cis_pkg::*;

  localparam int NCOL = 320;
  localparam int NROW = 240;
  localparam int RW   = $clog2(NROW);
  localparam int CW   = $clog2(NCOL + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  logic frame_start;
  gain_e gain;
  logic [NCOL-1:0] comp_out;
  logic [RW-1:0] row_addr;
  logic phi_sel, phi_rst, phi_tx, s1, s2, ramp_run;
  logic [GCNT_W-1:0] dout;
  logic dout_valid, busy, frame_done;
  logic [CW-1:0] dout_col;
  logic [RW-1:0] dout_row;

  int checks = 0, failures = 0;
  int exp_val [NROW][NCOL];
  int seen    [NROW][NCOL];
  // mechanism counters
  int n_mode [4];
  int n_stall_row = 0;
  int n_even, n_odd, n_rst_sat, n_clamp0, n_gsat, n_flush, n_stall, n_overlap;

  always #5 clk = ~clk;

  cis_readout dut (.*);

  cis_frontend_model #(.NCOL(NCOL), .NROW(NROW), .RW(RW)) afe (
    .clk, .row_addr, .phi_sel, .phi_rst, .phi_tx, .s1, .s2, .ramp_run, .comp_out
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // mechanisms visible inside the design
  // row period: 1 + T1 + 2^N + T4 + (2^N + 1024) + 2^N + 1 cycles when T4
  // is not stretched; longer (never shorter) when it is
  int cyc = 0, last_rs = -1, frame_cycles = 0, n_rows_timed = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (dut.row_start) begin
      if (last_rs >= 0 && !dut.u_row.last_row) begin
        int n, nominal;
        n = int'(dut.win_len);
        nominal = 2 + 16 + 16 + 3 * n + 1024;
        checks++;
        if (cyc - last_rs < nominal || (n_stall_row == 0 && cyc - last_rs != nominal)) begin
          failures++;
          $display("FAIL: row period %0d, nominal %0d, stalled %0d", cyc - last_rs, nominal, n_stall_row);
        end
        n_rows_timed++;
      end
      last_rs = cyc;
      n_stall_row = 0;
    end
    if (dut.stall) n_stall_row++;
    if (dut.stall) n_stall++;
    if (dout_valid && (phi_sel || ramp_run)) n_overlap++;
  end

  task automatic run_frame(gain_e g);
    int n, r2, a, t, got, last_col, last_row, words;
    n  = 1 << gain_to_bits(g);
    r2 = n + 1024;
    for (int c = 0; c < NCOL; c++) begin
      afe.fpn[c] = int'($urandom_range(0, 300)) - 150;
      afe.res[c] = int'($urandom_range(0, 19));
    end
    afe.res[5] = n + 3;          // reset level beyond the window
    afe.res[6] = n - 1;
    for (int r = 0; r < NROW; r++)
      for (int c = 0; c < NCOL; c++) begin
        afe.sig[r][c] = int'($urandom_range(0, 1000));
        seen[r][c] = 0;
      end
    afe.sig[0][1] = 1023 + 40;   // saturates the global counter
    afe.sig[0][2] = 5000;        // never crosses: flushed
    afe.sig[1][3] = -6;          // signal above reset: clamped to 0
    afe.sig[1][4] = 0;
    afe.sig[2][7] = 1023;
    for (int r = 0; r < NROW; r++)
      for (int c = 0; c < NCOL; c++) begin
        a = afe.res[c] < n - 1 ? afe.res[c] : n - 1;
        t = afe.res[c] + afe.sig[r][c];
        if (t < 0) t = 0;
        if (t >= r2) begin t = r2; n_flush++; end
        exp_val[r][c] = t - a;
        if (afe.res[c] >= n - 1 && afe.res[c] > 0) n_rst_sat++;
        if (exp_val[r][c] < 0) begin exp_val[r][c] = 0; n_clamp0++; end
        if (exp_val[r][c] > 1023) begin exp_val[r][c] = 1023; n_gsat++; end
      end
    gain = g;
    @(negedge clk); frame_start = 1; last_rs = -1;
    frame_cycles = cyc;
    @(negedge clk); frame_start = 0;
    last_col = -1; last_row = 0; words = 0;
    while (!frame_done) begin
      @(negedge clk);
      if (dout_valid) begin
        int rr, cc;
        rr = int'(dout_row); cc = int'(dout_col);
        words++;
        got = int'(dout);
        check(got == exp_val[rr][cc], $sformatf("gain %0d row %0d col %0d got %0d exp %0d (sig %0d res %0d)",
              int'(g), rr, cc, got, exp_val[rr][cc], afe.sig[rr][cc], afe.res[cc]));
        seen[rr][cc]++;
        if (cc % 2 == 0) n_even++; else n_odd++;
        if (last_col == NCOL - 1) begin
          check(cc == 0 && rr == last_row + 1, "next row starts at column 0");
          last_row = rr;
        end else
          check(cc == last_col + 1 && rr == last_row, $sformatf("column order %0d after %0d", cc, last_col));
        last_col = cc;
      end
    end
    check(words == NROW * NCOL, $sformatf("words %0d", words));
    $display("gain %0dx: frame of %0d x %0d took %0d cycles", 1 << int'(g), NCOL, NROW, cyc - frame_cycles);
    foreach (seen[r, c]) check(seen[r][c] == 1, $sformatf("pixel %0d,%0d seen %0d times", r, c, seen[r][c]));
    check(dut.u_cctl.gain_q == g, "mode switched");
    n_mode[int'(g)]++;
    repeat (5) @(negedge clk);
  endtask

  initial begin
    frame_start = 0; gain = GAIN_1X;
    n_even = 0; n_odd = 0; n_rst_sat = 0; n_clamp0 = 0; n_gsat = 0;
    n_flush = 0; n_stall = 0; n_overlap = 0;
    foreach (n_mode[i]) n_mode[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_frame(GAIN_1X);
    run_frame(GAIN_8X);
    run_frame(GAIN_2X);
    run_frame(GAIN_4X);
    foreach (n_mode[i]) check(n_mode[i] > 0, $sformatf("gain mode %0d used", i));
    check(n_even > 0 && n_odd > 0, "both column sides read");
    check(n_rst_sat > 0, "reset count saturated");
    check(n_clamp0 > 0, "column waited for the global counter");
    check(n_gsat > 0, "global counter saturated");
    check(n_flush > 0, "flush of a column that never crossed");
    check(n_stall > 0, "T4 stretched for the readout");
    check(n_overlap > 0, "readout overlapped the next row");
    check(n_rows_timed > 0, "row periods measured");
    $display("mechanisms: modes %0d/%0d/%0d/%0d even %0d odd %0d rst_sat %0d clamp0 %0d gsat %0d flush %0d stall %0d overlap %0d",
             n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_even, n_odd, n_rst_sat, n_clamp0, n_gsat, n_flush, n_stall, n_overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2500000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
