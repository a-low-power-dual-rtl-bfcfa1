// Self-checking testbench of the column control (both sides).
//
// Instantiates an even-side and an odd-side column control, starts a scan
// and checks cycle by cycle: exactly one side reads per cycle, columns come
// in order 0..NCOL-1, the side address is column/2, the row tag is the one
// given at the start, rd_left counts down to 0, and the scan takes NCOL
// cycles. Repeated for several rows.
module tb_column_control;

  localparam int NCOL = 12;
  localparam int NROW = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  logic rd_start;
  logic [2:0] row_in;
  logic busy_e, busy_o, en_e, en_o;
  logic [2:0] addr_e, addr_o;
  logic [3:0] col_e, col_o, left_e, left_o;
  logic [2:0] row_e, row_o;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  column_control #(.NCOL(NCOL), .NROW(NROW), .SIDE(1'b0)) dut_e (
    .clk, .rst_n, .rd_start, .row_in, .busy(busy_e), .rd_en(en_e),
    .rd_addr(addr_e), .col_idx(col_e), .rd_row(row_e), .rd_left(left_e));
  column_control #(.NCOL(NCOL), .NROW(NROW), .SIDE(1'b1)) dut_o (
    .clk, .rst_n, .rd_start, .row_in, .busy(busy_o), .rd_en(en_o),
    .rd_addr(addr_o), .col_idx(col_o), .rd_row(row_o), .rd_left(left_o));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    rd_start = 0; row_in = '0;
    @(negedge clk); rst_n = 1;
    @(negedge clk);
    check(left_e == 0 && !en_e && !en_o, "idle");
    for (int r = 0; r < NROW; r++) begin
      rd_start = 1; row_in = 3'(r);
      @(negedge clk);
      rd_start = 0; row_in = 3'(NROW - 1 - r);
      for (int c = 0; c < NCOL; c++) begin
        check(en_e == (c % 2 == 0) && en_o == (c % 2 == 1), $sformatf("side select col %0d", c));
        if (c % 2 == 0) check(int'(addr_e) == c / 2 && int'(col_e) == c && int'(row_e) == r, $sformatf("even addr col %0d", c));
        else            check(int'(addr_o) == c / 2 && int'(col_o) == c && int'(row_o) == r, $sformatf("odd addr col %0d", c));
        check(int'(left_e) == NCOL - c, $sformatf("rd_left %0d at col %0d", left_e, c));
        @(negedge clk);
      end
      check(!en_e && !en_o && left_e == 0 && !busy_e && !busy_o, "scan ends after NCOL cycles");
      repeat (3) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
