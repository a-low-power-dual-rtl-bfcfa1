// Self-checking testbench of the 10-bit column memory word.
//
// Random writes (WL pulses with random data) and random reads; the read data
// must equal the last written word when selected and zero when not.
module tb_column_sram;

  logic clk = 1'b0, rst_n = 1'b0;
  logic wl, rd_sel;
  logic [9:0] wdata, rdata;
  logic [9:0] model;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  column_sram dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    wl = 0; rd_sel = 0; wdata = '0; model = '0;
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      wl     = ($urandom_range(0, 3) == 0);
      wdata  = 10'($urandom);
      rd_sel = $urandom_range(0, 1) == 1;
      #1;
      check(rdata == (rd_sel ? model : 10'd0), $sformatf("read %0d exp %0d", rdata, rd_sel ? model : 10'd0));
      @(posedge clk);
      if (wl) model = wdata;
      @(negedge clk);
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
