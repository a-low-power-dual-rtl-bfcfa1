// Output multiplexer of the two column sides.
//
// Merges the 10-bit read buses of the even-column side and the odd-column
// side into the single 10-bit data output, as in the published block
// diagram. In each cycle at most one side reads; the MUX registers that
// side's word together with its column and row numbers and raises
// dout_valid for one cycle. If both sides claim a cycle, which the column
// controls never do, the even side wins. The output register and the
// column/row tags are this design's choices.
//
// Timing: one cycle from rd_en to dout_valid.
module output_mux #(
  parameter int unsigned W  = 10,
  parameter int unsigned CW = 9,
  parameter int unsigned RW = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          even_en,
  input  logic [W-1:0]  even_data,
  input  logic          odd_en,
  input  logic [W-1:0]  odd_data,
  input  logic [CW-1:0] col_in,
  input  logic [RW-1:0] row_in,
  output logic [W-1:0]  dout,
  output logic          dout_valid,
  output logic [CW-1:0] dout_col,
  output logic [RW-1:0] dout_row
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dout       <= '0;
      dout_valid <= 1'b0;
      dout_col   <= '0;
      dout_row   <= '0;
    end else begin
      dout_valid <= even_en | odd_en;
      if (even_en || odd_en) begin
        dout     <= even_en ? even_data : odd_data;
        dout_col <= col_in;
        dout_row <= row_in;
      end
    end
  end

endmodule
