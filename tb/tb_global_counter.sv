// Self-checking testbench of the global 10-bit counter.
//
// Counts with random enable gaps, checks every value against a model,
// checks that it stops at 1023 and that the clear returns it to 0.
module tb_global_counter;

  logic clk = 1'b0, rst_n = 1'b0;
  logic clr, en, run;
  logic [9:0] cnt;
  int model;
  int checks = 0, failures = 0;
  int sat_seen = 0;

  always #5 clk = ~clk;

  global_counter dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    clr = 0; en = 0; model = 0;
    @(negedge clk); rst_n = 1;
    for (int r = 0; r < 3; r++) begin
      clr = 1; @(negedge clk); clr = 0; model = 0;
      for (int i = 0; i < 1400; i++) begin
        en = (r == 0) ? 1'b1 : ($urandom_range(0, 7) != 0);
        #1;
        check(int'(cnt) == model && run == en, $sformatf("cnt %0d exp %0d", cnt, model));
        if (model == 1023) sat_seen++;
        @(posedge clk);
        if (en && model < 1023) model++;
        @(negedge clk);
      end
    end
    check(sat_seen > 0, "saturation reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
