// Self-checking testbench of the hold-and-go reset timing control.
//
// Random WL and row-start pulses; the counter clear must follow each of them
// by exactly one cycle and be low otherwise. Also checks that reset holds
// the clear active.
module tb_hag_reset_timing_control;

  logic clk = 1'b0, rst_n = 1'b0;
  logic row_start, wl, cnt_clr;
  int checks = 0, failures = 0;
  bit prev;

  always #5 clk = ~clk;

  hag_reset_timing_control dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    row_start = 0; wl = 0;
    @(negedge clk);
    check(cnt_clr == 1'b1, "clear active in reset");
    rst_n = 1;
    prev = 0;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      check(cnt_clr == prev, $sformatf("cycle %0d clear=%0b exp=%0b", i, cnt_clr, prev));
      row_start = ($urandom_range(0, 9) == 0);
      wl        = ($urandom_range(0, 5) == 0);
      prev      = row_start | wl;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
