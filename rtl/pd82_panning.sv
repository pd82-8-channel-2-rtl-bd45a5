// pd82_panning: the per-channel stereo panning control.
//
// The channel's output value (11-bit signed, the top bits of operator 1's amplitude) is
// multiplied by the 8-bit left and right panning registers, taken as unsigned, and bits
// 18:8 of each 20-bit product become the 11-bit signed left and right channel outputs.
// Panning $00 is silence and $FF the full level, as the document specifies; the product
// width and the bits kept follow the document's design.
//
// Purely combinational; the channel registers the results.
module pd82_panning
  import pd82_pkg::*;
(
  input  logic signed [FEED_W-1:0]  value,
  input  logic [7:0]                pan_l,
  input  logic [7:0]                pan_r,
  output logic signed [CHOUT_W-1:0] out_l,
  output logic signed [CHOUT_W-1:0] out_r
);

  logic signed [19:0] prod_l, prod_r;

  always_comb begin
    prod_l = value * $signed({1'b0, pan_l});
    prod_r = value * $signed({1'b0, pan_r});
    out_l  = prod_l[18:8];
    out_r  = prod_r[18:8];
  end

endmodule
