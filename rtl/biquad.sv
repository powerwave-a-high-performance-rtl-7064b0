// biquad: two-pole IIR section (one band of the output equalizer).
//
// Direct form I with five coefficients:
//   y[n] = b0*x[n] + b1*x[n-1] + b2*x[n-2] - a1*y[n-1] - a2*y[n-2]
// Signals and coefficients are signed Q3.20 (coefficients in [-8, 8)); the
// result saturates to 24 bits. The section keeps separate state for the
// left (ch=0) and right (ch=1) channel so one set of five multipliers
// serves both in turn. On en the sample x of channel ch is processed and y
// is valid in the next clock. The coefficients come from the control
// software; the direct form I structure is this design's choice.
module biquad
  import pw_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         ch,
  input  s24_t         x,
  input  biquad_coef_t coef,   // [0]=b0 [1]=b1 [2]=b2 [3]=a1 [4]=a2
  output s24_t         y
);
  s24_t x1 [2], x2 [2], y1 [2], y2 [2];
  logic signed [63:0] acc;
  s24_t yc;

  always_comb begin
    acc = 64'(x * coef[0]) + 64'(x1[ch] * coef[1]) + 64'(x2[ch] * coef[2])
        - 64'(y1[ch] * coef[3]) - 64'(y2[ch] * coef[4]);
    yc  = sat24(acc >>> 20);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int c = 0; c < 2; c++) begin
        x1[c] <= '0; x2[c] <= '0; y1[c] <= '0; y2[c] <= '0;
      end
      y <= '0;
    end else if (en) begin
      x2[ch] <= x1[ch];
      x1[ch] <= x;
      y2[ch] <= y1[ch];
      y1[ch] <= yc;
      y      <= yc;
    end
  end
endmodule
