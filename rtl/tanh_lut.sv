// tanh_lut: interpolating hyperbolic-tangent table for the Moog ladder.
//
// Argument and result are signed Q3.20. The table holds tanh at 2^TAB_BITS+1
// equally spaced points over [-4, 4] (spacing 1/32 at the default); the
// result is the linear interpolation between the two points around x
// (one multiplier, two adders). Arguments outside [-4, 4) return the end
// points, tanh(+-4) = +-0.99933. The table contents are computed at
// elaboration from the tanh function. Purely combinational.
// The interpolated table follows the filter model; range, spacing and
// format are this design's choice.
module tanh_lut #(
  parameter int TAB_BITS = 8
) (
  input  pw_pkg::s24_t x,
  output pw_pkg::s24_t y
);
  localparam int N    = (1 << TAB_BITS) + 1;
  localparam int FRAC = 23 - TAB_BITS;   // fraction bits below the index

  typedef logic signed [23:0] tab_t [N];

  function automatic tab_t make_tab();
    tab_t t;
    for (int k = 0; k < N; k++)
      t[k] = 24'($rtoi($tanh((real'(k) * 8.0 / real'(N - 1)) - 4.0) * 1048576.0));
    return t;
  endfunction

  localparam tab_t TAB = make_tab();

  logic [23:0]             xo;      // x + 4.0, unsigned
  logic [TAB_BITS-1:0]     idx;
  logic [FRAC-1:0]         frac;
  logic signed [23:0]      t0, t1;
  logic signed [24+FRAC:0] prod;

  always_comb begin
    xo   = 24'(x) + 24'h400000;
    idx  = xo[22 -: TAB_BITS];
    frac = xo[FRAC-1:0];
    t0   = TAB[{1'b0, idx}];
    t1   = TAB[{1'b0, idx} + 1'b1];
    prod = (40'(t1) - 40'(t0)) * $signed({1'b0, frac});
    if (x >= 24'sh400000)       y = TAB[N-1];
    else if (x < -24'sh400000)  y = TAB[0];
    else                        y = t0 + 24'(prod >>> FRAC);
  end
endmodule
