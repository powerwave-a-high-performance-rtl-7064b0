// param_eq: six-band parametric equalizer of the stereo output.
//
// Six biquad sections in series; each band's five coefficients (computed
// by the control software from the band's gain, centre frequency and
// bandwidth) come from registers. The left and right channel share the
// sections: the left sample enters the first section one clock after start,
// the right sample one clock later, and both move one section per clock.
// done pulses 9 clocks after start with out_l/out_r valid until the next
// start. The pipelined sharing is this design's choice.
module param_eq
  import pw_pkg::*;
#(
  parameter int BANDS = 6
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           start,
  input  s24_t                           in_l,
  input  s24_t                           in_r,
  input  biquad_coef_t [BANDS-1:0]       coef,
  output logic                           done,
  output s24_t                           out_l,
  output s24_t                           out_r
);
  logic [BANDS:0] vld;     // vld[k]: a sample enters section k this clock
  logic [BANDS:0] chp;     // its channel
  s24_t           in_l_q, in_r_q;
  s24_t [BANDS:0] xin;     // xin[k]: input of section k, xin[BANDS]: EQ output

  assign xin[0] = chp[0] ? in_r_q : in_l_q;

  for (genvar k = 0; k < BANDS; k++) begin : g_band
    biquad u_bq (.clk(clk), .rst_n(rst_n), .en(vld[k]), .ch(chp[k]), .x(xin[k]),
                 .coef(coef[k]), .y(xin[k+1]));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      vld <= '0; chp <= '0; in_l_q <= '0; in_r_q <= '0; done <= 1'b0; out_l <= '0; out_r <= '0;
    end else begin
      // first section: left in the start clock, right in the clock after
      vld[0] <= start || (vld[0] && !chp[0]);
      chp[0] <= vld[0] && !chp[0];
      if (start) begin in_l_q <= in_l; in_r_q <= in_r; end
      vld[BANDS:1] <= vld[BANDS-1:0];
      chp[BANDS:1] <= chp[BANDS-1:0];
      done <= 1'b0;
      if (vld[BANDS] && !chp[BANDS]) out_l <= xin[BANDS];
      if (vld[BANDS] &&  chp[BANDS]) begin out_r <= xin[BANDS]; done <= 1'b1; end
    end
  end
endmodule
