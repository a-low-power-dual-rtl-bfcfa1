// Self-checking testbench of the row control.
//
// Runs frames of NROW rows at two counter lengths (2^N = 32 and 256) with a
// model of the horizontal readout (rd_left reloads to NCOL at each row_done
// and counts down one per cycle). It checks, for every row:
//   * the phase order: row start, pixel reset, S1+S2 sampling, first ramp,
//     transfer, S1 sampling, second ramp, flush, row done;
//   * first ramp = 2^N cycles, second ramp = 2^N + 1024 cycles, flush = 2^N;
//   * S2 only with S1, and row select high around reset, S1/S2 and transfer;
//   * the second ramp never starts while the readout has more than 2^N
//     words left, and the stretch (stall) happens when it must (32) and
//     not when it need not (256);
//   * row addresses 0..NROW-1, and frame_done after the last word.
module tb_row_control;
  import cis_pkg::*;

  localparam int NROW = 3;
  localparam int NCOL = 100;

  logic clk = 1'b0, rst_n = 1'b0;
  logic frame_start;
  logic [HAG_W:0] win_len;
  logic [6:0] rd_left;
  logic [1:0] row_addr;
  logic phi_sel, phi_rst, phi_tx, s1, s2, ramp_run, ramp1, ramp2, conv_flush;
  logic row_start, row_done, stall, busy, frame_done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  row_control #(.NROW(NROW), .NCOL(NCOL)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // readout model
  int left_m;
  always_ff @(posedge clk)
    if (row_done)        left_m <= NCOL;
    else if (left_m > 0) left_m <= left_m - 1;
  assign rd_left = 7'(left_m);

  task automatic run_frame(int wl_len, bit expect_stall);
    int phase, r1, r2, fl, rows, stalls, cyc;
    bit p_ramp1, p_ramp2, p_flush, done;
    win_len = (HAG_W+1)'(wl_len);
    phase = 0; r1 = 0; r2 = 0; fl = 0; rows = 0; stalls = 0; done = 0;
    p_ramp1 = 0; p_ramp2 = 0; p_flush = 0; cyc = 0;
    @(negedge clk); frame_start = 1;
    @(negedge clk); frame_start = 0;
    while (!done && cyc < 20000) begin
      #1;
      cyc++;
      if (s2) check(s1, "S2 closes only together with S1");
      if (phi_rst || phi_tx || s1) check(phi_sel, "row selected while reset/transfer/sample");
      if (stall) stalls++;
      // phase order: 0 start,1 rst,2 s2,3 ramp1,4 tx,5 s1,6 ramp2,7 flush,8 done
      if (row_start) begin
        check(phase == 0, $sformatf("row start in phase %0d", phase));
        check(int'(row_addr) == rows, $sformatf("row address %0d exp %0d", row_addr, rows));
        phase = 1;
      end
      if (phi_rst) check(phase == 1, "pixel reset after row start");
      if (s2 && phase == 1) phase = 2;
      if (ramp1 && phase == 2) phase = 3;
      if (phi_tx) begin check(phase == 3 || phase == 4, "transfer after first ramp"); phase = 4; end
      if (s1 && !s2 && phase == 4) phase = 5;
      if (ramp2 && !conv_flush && phase == 5) begin
        phase = 6;
        check(left_m <= wl_len, $sformatf("second ramp started with %0d words left", left_m));
      end
      if (conv_flush && phase == 6) phase = 7;
      if (row_done) begin
        check(phase == 7, $sformatf("row done in phase %0d", phase));
        phase = 0; rows++;
      end
      if (ramp1) begin check(ramp_run, "ramp runs in first ramp"); r1++; end
      if (ramp2 && !conv_flush) begin check(ramp_run, "ramp runs in second ramp"); r2++; end
      if (conv_flush) begin check(!ramp_run && ramp2, "flush after ramp"); fl++; end
      if (p_ramp1 && !ramp1) begin check(r1 == wl_len, $sformatf("first ramp %0d", r1)); r1 = 0; end
      if (p_ramp2 && !(ramp2 && !conv_flush)) begin check(r2 == wl_len + 1024, $sformatf("second ramp %0d", r2)); r2 = 0; end
      if (p_flush && !conv_flush) begin check(fl == wl_len, $sformatf("flush %0d", fl)); fl = 0; end
      p_ramp1 = ramp1; p_ramp2 = ramp2 && !conv_flush; p_flush = conv_flush;
      if (frame_done) begin
        done = 1;
        check(rows == NROW, $sformatf("rows %0d", rows));
        check(left_m == 0, "frame done after the readout");
      end
      @(negedge clk);
    end
    check(done, "frame finished");
    check(expect_stall ? (stalls > 0) : (stalls == 0), $sformatf("stall cycles %0d", stalls));
    @(negedge clk);
    check(!busy, "idle after frame");
  endtask

  initial begin
    frame_start = 0; win_len = 32;
    @(negedge clk); rst_n = 1;
    run_frame(32, 1'b1);
    run_frame(256, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
