// Self-checking testbench of the configurable hold-and-go counter.
//
// Plays one row conversion at a time against the counter: a first ramp of
// 2^N cycles in which the comparator is high for the first d1 cycles, then a
// second ramp of 2^N + 1024 cycles (comparator high for the first d2 cycles)
// followed by a 2^N-cycle flush. The testbench models the global counter
// itself (0 at cycle 2^N of the second ramp, +1 per cycle, stopping at 1023)
// and checks, for every gain setting and many (d1, d2) pairs:
//   * the count held after the first ramp is min(d1, 2^N - 1);
//   * exactly one WL pulse per row, at cycle max(t + 2^N - a, 2^N), where t
//     is the comparator flip cycle (or the flush start) and a the held count;
//   * the global count sampled at WL is clamp(t - a, 0, 1023), i.e. the
//     correlated-double-sampled result;
//   * the counter is back to zero two cycles after WL.
module tb_hag_counter;
  import cis_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [CFG_W-1:0] cfg;
  logic row_start, enable_cds, comp_out, conv_win, conv_flush, gcnt_run;
  logic wl, going;
  logic [HAG_W-1:0] q;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  hag_counter dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic idle_inputs();
    row_start = 0; enable_cds = 0; comp_out = 0; conv_win = 0;
    conv_flush = 0; gcnt_run = 0;
  endtask

  task automatic run_row(gain_e g, int d1, int d2);
    int n, w, r2, a, t, exp_val, exp_cyc, n_wl, wl_cyc, got_val, gval;
    n  = 1 << gain_to_bits(g);
    r2 = n + 1024;
    a  = (d1 < n - 1) ? d1 : n - 1;
    t  = (d2 < r2) ? d2 : r2;
    exp_val = t - a;
    if (exp_val < 0) exp_val = 0;
    if (exp_val > 1023) exp_val = 1023;
    exp_cyc = t + n - a;
    if (exp_cyc < n) exp_cyc = n;
    cfg = gain_to_cfg(g);
    // row start and a few idle cycles
    @(negedge clk); idle_inputs(); row_start = 1;
    @(negedge clk); row_start = 0;
    repeat (3) @(negedge clk);
    check(q == 0, "counter cleared at row start");
    // first ramp: reset conversion
    for (int k = 0; k < n; k++) begin
      enable_cds = 1; comp_out = (k < d1);
      @(negedge clk);
    end
    idle_inputs();
    repeat (4) @(negedge clk);
    check(int'(q) == a, $sformatf("held reset count g=%0d d1=%0d q=%0d exp=%0d", g, d1, q, a));
    // second ramp and flush
    n_wl = 0; wl_cyc = -1; got_val = -1;
    for (int k = 0; k < r2 + n; k++) begin
      conv_win   = 1;
      comp_out   = (k < d2);
      conv_flush = (k >= r2);
      gcnt_run   = (k >= n);
      gval       = (k >= n) ? ((k - n > 1023) ? 1023 : k - n) : 0;
      #1;
      if (wl) begin
        n_wl++; wl_cyc = k; got_val = gval;
      end
      @(negedge clk);
      if (wl_cyc >= 0 && wl_cyc == k - 2) check(q == 0, $sformatf("counter reset after WL q=%0d g=%0d d1=%0d d2=%0d", q, g, d1, d2));
    end
    idle_inputs();
    check(n_wl == 1, $sformatf("one WL per row (g=%0d d1=%0d d2=%0d got %0d)", g, d1, d2, n_wl));
    check(wl_cyc == exp_cyc, $sformatf("WL cycle g=%0d d1=%0d d2=%0d got %0d exp %0d", g, d1, d2, wl_cyc, exp_cyc));
    check(got_val == exp_val, $sformatf("stored value g=%0d d1=%0d d2=%0d got %0d exp %0d", g, d1, d2, got_val, exp_val));
    w = 0;
  endtask

  initial begin
    idle_inputs();
    cfg = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int gi = 0; gi < 4; gi++) begin
      gain_e g;
      int n;
      g = gain_e'(gi);
      n = 1 << gain_to_bits(g);
      // corner cases: zero reset, full reset window, signal below reset,
      // signal at top of range, comparator never flips
      run_row(g, 0, 0);
      run_row(g, 3, 200);
      run_row(g, n - 1, n + 10);
      run_row(g, n + 5, 700);
      run_row(g, 10, 5);
      run_row(g, 7, 1030);
      run_row(g, 2, 5000);
      for (int i = 0; i < 6; i++)
        run_row(g, int'($urandom_range(0, n + 2)), int'($urandom_range(0, n + 1100)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
