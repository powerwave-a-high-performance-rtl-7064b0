// master_gain: main volume of the stereo output.
//
// Multiplies the left and right signal (signed Q3.20) by their gain
// registers (signed Q1.17) and saturates to 24 bits: two multipliers and two
// adders (the adders do the rounding). Combinational. Separate left/right
// gains and the formats are this design's choice.
module master_gain
  import pw_pkg::*;
(
  input  s24_t in_l,
  input  s24_t in_r,
  input  s18_t gain_l,
  input  s18_t gain_r,
  output s24_t out_l,
  output s24_t out_r
);
  logic signed [41:0] pl, pr;
  always_comb begin
    pl    = in_l * gain_l;
    pr    = in_r * gain_r;
    out_l = sat24(64'(pl + 42'sd65536) >>> 17);
    out_r = sat24(64'(pr + 42'sd65536) >>> 17);
  end
endmodule
