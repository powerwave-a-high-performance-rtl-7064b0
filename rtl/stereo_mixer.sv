// stereo_mixer: panning of each voice and summation into the master
// left/right signals.
//
// Every voice output x arrives with its two pan gains (signed Q1.17); on
// valid the unit adds x*pan_l and x*pan_r to the left and right
// accumulators, saturating at the 24-bit Q3.20 range. clear (first clock of
// a sample frame) empties the accumulators. sum_l/sum_r are the
// accumulators themselves and hold the finished mix one clock after the
// last voice's valid. Two multipliers and two adders; formats and
// saturation are this design's choice.
module stereo_mixer
  import pw_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic valid,
  input  s24_t x,
  input  s18_t pan_l,
  input  s18_t pan_r,
  output s24_t sum_l,
  output s24_t sum_r
);
  logic signed [41:0] pl, pr;
  assign pl = x * pan_l;
  assign pr = x * pan_r;

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      sum_l <= '0;
      sum_r <= '0;
    end else if (valid) begin
      sum_l <= sat24(64'(sum_l) + 64'(pl >>> 17));
      sum_r <= sat24(64'(sum_r) + 64'(pr >>> 17));
    end
  end
endmodule
