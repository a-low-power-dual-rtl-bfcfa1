// Self-checking testbench of the output multiplexer.
//
// Random one-hot (or idle) side selections with random data and tags; one
// cycle later dout/dout_col/dout_row must carry the selected side's values
// and dout_valid must be high exactly when a side was selected.
module tb_output_mux;

  logic clk = 1'b0, rst_n = 1'b0;
  logic even_en, odd_en;
  logic [9:0] even_data, odd_data, dout;
  logic [8:0] col_in, dout_col;
  logic [7:0] row_in, dout_row;
  logic dout_valid;
  logic       exp_v;
  logic [9:0] exp_d;
  logic [8:0] exp_c;
  logic [7:0] exp_r;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  output_mux dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    even_en = 0; odd_en = 0; even_data = '0; odd_data = '0; col_in = '0; row_in = '0;
    exp_v = 0; exp_d = '0; exp_c = '0; exp_r = '0;
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      int sel;
      sel = int'($urandom_range(0, 2));
      even_en = (sel == 1); odd_en = (sel == 2);
      even_data = 10'($urandom); odd_data = 10'($urandom);
      col_in = 9'($urandom); row_in = 8'($urandom);
      @(negedge clk);
      check(dout_valid == (sel != 0), "valid");
      if (sel != 0)
        check(dout == (sel == 1 ? even_data : odd_data) && dout_col == col_in && dout_row == row_in,
              $sformatf("data %0d side %0d", dout, sel));
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
