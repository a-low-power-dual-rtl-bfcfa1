// Self-checking testbench of the configurable counter control.
//
// For every gain setting (1x, 2x, 4x, 8x) it checks the configuration bits
// C6..C8 (none, C6, C6+C7, all), the window length 2^N with N = 5..8, that
// Enable CDS is high for exactly the first 2^N cycles of the first ramp,
// and that the global counter enable starts exactly 2^N cycles into the
// second ramp and lasts to its end. Also checks that the gain only changes
// at a row start.
module tb_counter_control;
  import cis_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  gain_e gain, gain_q;
  logic row_start, ramp1, ramp2, enable_cds, gcnt_en;
  logic [CFG_W-1:0] cfg;
  logic [HAG_W:0] win_len;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  counter_control dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [2:0] exp_cfg [4];
    exp_cfg[0] = 3'b000; exp_cfg[1] = 3'b001; exp_cfg[2] = 3'b011; exp_cfg[3] = 3'b111;
    row_start = 0; ramp1 = 0; ramp2 = 0; gain = GAIN_1X;
    @(negedge clk); rst_n = 1;
    for (int gi = 0; gi < 4; gi++) begin
      int n, en_cnt, first_g, g_cnt;
      n = 32 << gi; en_cnt = 0; first_g = -1; g_cnt = 0;
      gain = gain_e'(gi);
      row_start = 1; @(negedge clk); row_start = 0;
      gain = gain_e'((gi + 1) % 4);   // change without a row start: must be ignored
      check(cfg == exp_cfg[gi], $sformatf("cfg gain %0d = %b", gi, cfg));
      check(int'(win_len) == n, $sformatf("win_len gain %0d = %0d", gi, win_len));
      repeat (3) @(negedge clk);
      for (int k = 0; k < n + 10; k++) begin
        ramp1 = (k < n); #1;
        if (enable_cds) begin
          en_cnt++;
          check(k < n, "Enable CDS only inside the window");
        end
        check(!gcnt_en, "no global count in first ramp");
        @(negedge clk);
      end
      ramp1 = 0;
      check(en_cnt == n, $sformatf("Enable CDS length %0d exp %0d", en_cnt, n));
      repeat (5) @(negedge clk);
      for (int k = 0; k < 2 * n + 1024; k++) begin
        ramp2 = 1; #1;
        if (gcnt_en) begin
          g_cnt++;
          if (first_g < 0) first_g = k;
        end
        check(!enable_cds, "no Enable CDS in second ramp");
        @(negedge clk);
      end
      ramp2 = 0; #1;
      check(!gcnt_en, "global count stops with the window");
      check(first_g == n, $sformatf("global start %0d exp %0d", first_g, n));
      check(g_cnt == n + 1024, $sformatf("global length %0d", g_cnt));
      check(gain_q == gain_e'(gi), "gain sampled only at row start");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
