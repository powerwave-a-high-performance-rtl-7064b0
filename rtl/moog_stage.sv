// moog_stage: one RC stage of the nonlinear Moog ladder.
//
// Implements the stage of the digital ladder model:
//   y[n] = y[n-1] + g * (tin - tanh(y[n-1]))
// where tin is the tanh of the stage input (for stages 2..4 it is the tanh
// of the previous stage's output) and tanh(y[n-1]) is kept from the last
// sample. The stage also returns w = tanh(y[n]) from its own interpolating
// table, which serves as the next stage's input and as this stage's
// feedback term in the next sample. All signals are signed Q3.20; g is
// Q3.20 as well. Combinational; the sum saturates to 24 bits (this design's
// choice).
module moog_stage (
  input  pw_pkg::s24_t tin,
  input  pw_pkg::s24_t y_prev,
  input  pw_pkg::s24_t w_prev,
  input  pw_pkg::s24_t g,
  output pw_pkg::s24_t y,
  output pw_pkg::s24_t w
);
  import pw_pkg::*;

  logic signed [24:0] diff;
  logic signed [48:0] prod;

  always_comb begin
    diff = 25'(tin) - 25'(w_prev);
    prod = diff * g;
    y    = sat24(64'(y_prev) + 64'(prod >>> 20));
  end

  tanh_lut u_tanh (.x(y), .y(w));
endmodule
