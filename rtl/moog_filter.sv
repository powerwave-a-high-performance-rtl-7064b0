// moog_filter: per-voice nonlinear Moog ladder filter with stage mixing.
//
// The ladder is four moog_stage instances in series. Resonance is fed back
// from the last stage output through a one-sample delay, the resonance
// coefficient fb, and a half-sample averager:
//   s[n] = fb * y4[n-1],   a[n] = 0.5 * (s[n] + s[n-1]),   u = x - a
// The ladder input is tanh(u) (fifth tanh table). The filter output is the
// mix  gain0*y1 + gain1*y2 + gain2*y3 + gain3*y4, so gain = {0,0,0,1} is the
// classic four-pole low-pass and other mixes give other responses.
// g and fb are computed by the control software from cutoff and resonance.
//
// The unit serves all voices in turn: the caller passes a voice's state in
// st_in with start and stores st_out when done pulses. One ladder stage is
// evaluated per clock: done pulses 6 clocks after start, with y and st_out
// valid until the next start. Signals and coefficients are signed Q3.20.
// The structure follows the published ladder model; the schedule and
// formats are this design's choice.
module moog_filter
  import pw_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  s24_t        x,
  input  s24_t        g,
  input  s24_t        fb,
  input  s24_t [3:0]  gain,
  input  moog_state_t st_in,
  output logic        done,
  output s24_t        y,
  output moog_state_t st_out
);
  logic [2:0]  step;        // 0 idle, 1..4 stage, 5 mix
  s24_t        g_q;
  s24_t [3:0]  gain_q;
  moog_state_t st_q;
  s24_t        t0_q;        // tanh of the ladder input
  s24_t [3:0]  yn_q, wn_q;  // new stage outputs and their tanh
  s24_t        s_q;

  // input path: resonance feedback and input tanh
  logic signed [47:0] s_p;
  s24_t s_c, u_c, t0_c;
  always_comb begin
    s_p = st_in.y[3] * fb;
    s_c = sat24(64'(s_p >>> 20));
    u_c = sat24(64'(x) - ((64'(s_c) + 64'(st_in.s_prev)) >>> 1));
  end
  tanh_lut u_tin (.x(u_c), .y(t0_c));

  // the four stages, each fed from registers
  s24_t [3:0] tin, ys, ws;
  assign tin = {wn_q[2], wn_q[1], wn_q[0], t0_q};
  for (genvar k = 0; k < 4; k++) begin : g_stage
    moog_stage u_stage (.tin(tin[k]), .y_prev(st_q.y[k]), .w_prev(st_q.w[k]), .g(g_q),
                        .y(ys[k]), .w(ws[k]));
  end

  // output mix
  logic signed [63:0] mix;
  always_comb begin
    mix = '0;
    for (int k = 0; k < 4; k++) mix += 64'(yn_q[k] * gain_q[k]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      step <= '0;
      done <= 1'b0;
      y    <= '0;
      g_q  <= '0; gain_q <= '0; st_q <= '0; t0_q <= '0; yn_q <= '0; wn_q <= '0; s_q <= '0;
      st_out <= '0;
    end else begin
      done <= 1'b0;
      if (step == 3'd0) begin
        if (start) begin
          g_q    <= g;
          gain_q <= gain;
          st_q   <= st_in;
          t0_q   <= t0_c;
          s_q    <= s_c;
          step   <= 3'd1;
        end
      end else if (step <= 3'd4) begin
        yn_q[step - 1] <= ys[step - 1];
        wn_q[step - 1] <= ws[step - 1];
        step <= step + 3'd1;
      end else begin
        y             <= sat24(mix >>> 20);
        st_out.y      <= yn_q;
        st_out.w      <= wn_q;
        st_out.s_prev <= s_q;
        done          <= 1'b1;
        step          <= 3'd0;
      end
    end
  end
endmodule
