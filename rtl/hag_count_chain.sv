// Counting stages of the configurable hold-and-go counter.
//
// A 5-bit basic counter followed by three 1-bit configurable stages (bits
// 6, 7 and 8 of the counter). Configurable stage i is used only when its
// configuration bit C(6+i) and those of all stages below it are set: in the
// published circuit a NAND gate with the configuration bit forces the
// stage's contribution to the all-ones detector high and stops the clock of
// the stages above, so unused stages never toggle. Here an unused stage is
// held at zero and counted as a one by the detector.
//
// The paper chains toggle flip-flops as a ripple counter; this design uses a
// synchronous binary counter over the enabled bits, which gives the same
// count sequence. Interface: cnt_en advances the count at the clock edge,
// cnt_clr (synchronous, wins over cnt_en) returns it to zero; all_ones is
// combinational from the count and the configuration.
module hag_count_chain
  import cis_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [CFG_W-1:0]  cfg,      // C6, C7, C8 (bit 0 = C6)
  input  logic              cnt_en,
  input  logic              cnt_clr,
  output logic [HAG_W-1:0]  q,
  output logic              all_ones
);

  logic [HAG_W-1:0] used;   // stages that take part in counting

  always_comb begin
    used = '0;
    used[BASIC_W-1:0] = '1;
    for (int i = 0; i < int'(CFG_W); i++)
      used[BASIC_W+i] = cfg[i] & used[BASIC_W+i-1];
  end

  // AND chain towards WL: an unused stage counts as a one.
  assign all_ones = &(q | ~used);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)       q <= '0;
    else if (cnt_clr) q <= '0;
    else if (cnt_en)  q <= (q + 1'b1) & used;

endmodule
