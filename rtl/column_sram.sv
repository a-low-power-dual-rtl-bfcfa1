// 10-bit column memory word.
//
// One per column. When the column's hold-and-go counter raises its word line
// WL, the word stores the value of the global counter, which at that moment
// is the column's corrected (reset minus signal) 10-bit result. The word is
// kept until the next write, so the horizontal readout of row N-1 can run
// while row N is being converted, until row N's first write.
//
// Read port: when rd_sel is high the word drives its value on the side's
// read bus, otherwise it drives zeros, so the words of one side can be
// OR-combined into one bus (a stand-in for a shared bit line). The word is
// written as a flip-flop register; the paper's cell design is not given.
//
// Timing: write at the rising edge of a cycle with wl high; read is
// combinational.
module column_sram #(
  parameter int unsigned W = 10
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wl,
  input  logic [W-1:0] wdata,
  input  logic         rd_sel,
  output logic [W-1:0] rdata
);

  logic [W-1:0] word;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  word <= '0;
    else if (wl) word <= wdata;

  assign rdata = rd_sel ? word : '0;

endmodule
