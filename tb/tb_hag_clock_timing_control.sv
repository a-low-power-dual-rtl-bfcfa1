// Self-checking testbench of the hold-and-go clock timing control.
//
// Drives the control inputs cycle by cycle together with a small counter
// model (so all_ones follows the counter the block enables) and compares
// cnt_en and wl with a reference model written from the rules:
//   reset conversion: count while Enable CDS and comparator are high, stop
//   at all ones; go: start after the comparator is seen low (or flush) in
//   the second-ramp window, count to all ones; WL when all ones and the
//   global counter runs; afterwards nothing until the next row start.
// Random stimulus over many rows, plus a check that every row's WL happens.
module tb_hag_clock_timing_control;

  logic clk = 1'b0, rst_n = 1'b0;
  logic row_start, enable_cds, comp_out, conv_win, conv_flush, gcnt_run, all_ones;
  logic cnt_en, wl, going;

  int checks = 0, failures = 0;
  int cnt;                 // counter model, 5 bits
  int mstate;              // 0 reset conv, 1 go, 2 done
  bit exp_en, exp_wl, en_s;
  int rows_with_wl = 0, rows = 0;

  always #5 clk = ~clk;

  hag_clock_timing_control dut (.*);

  assign all_ones = (cnt == 31);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    {row_start, enable_cds, comp_out, conv_win, conv_flush, gcnt_run} = '0;
    cnt = 0; mstate = 2;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 60; r++) begin
      int d1, d2;
      bit saw_wl;
      d1 = int'($urandom_range(0, 40));
      d2 = int'($urandom_range(0, 120));
      saw_wl = 0;
      rows++;
      // row start
      @(negedge clk);
      row_start = 1; #1;
      check(!cnt_en && !wl, "quiet during row start");
      @(posedge clk); mstate = 0; cnt <= 0;
      @(negedge clk); row_start = 0;
      // reset conversion, 32-cycle window
      for (int k = 0; k < 32 + 4; k++) begin
        enable_cds = (k < 32); comp_out = (k < 32) && (k < d1);
        #1;
        exp_en = enable_cds && comp_out && (cnt != 31);
        check(cnt_en == exp_en && !wl, $sformatf("reset conv k=%0d en=%0b exp=%0b", k, cnt_en, exp_en));
        en_s = cnt_en;
        @(posedge clk); if (en_s) cnt <= cnt + 1;
        @(negedge clk);
      end
      enable_cds = 0;
      // second ramp window (32 + 64) and flush (32)
      for (int k = 0; k < 128; k++) begin
        conv_win = 1; comp_out = (k < d2); conv_flush = (k >= 96); gcnt_run = (k >= 32);
        #1;
        exp_en = 0; exp_wl = 0;
        if (mstate == 0) exp_en = 0;
        else if (mstate == 1) begin exp_en = (cnt != 31); exp_wl = (cnt == 31) && gcnt_run; end
        check(cnt_en == exp_en && wl == exp_wl, $sformatf("conv k=%0d st=%0d en=%0b/%0b wl=%0b/%0b", k, mstate, cnt_en, exp_en, wl, exp_wl));
        check(going == (mstate == 1), "going flag");
        if (wl) saw_wl = 1;
        en_s = cnt_en;
        @(posedge clk);
        if (en_s) cnt <= cnt + 1;
        if (mstate == 0 && (!comp_out || conv_flush)) mstate = 1;
        else if (mstate == 1 && exp_wl) mstate = 2;
        @(negedge clk);
      end
      {conv_win, conv_flush, gcnt_run, comp_out} = '0;
      if (saw_wl) rows_with_wl++;
    end
    check(rows_with_wl == rows, "every row wrote once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
