// voice_engine: the shared datapath that computes all voices of a sample.
//
// One set of hardware (four oscillator units, one Moog filter, one panning
// mixer) is used by the VOICES voices in turn, one voice per slot of the
// sample frame. For the voice of a slot the engine:
//   1. runs oscillators 2 and 4 (the possible modulators) in parallel;
//   2. runs oscillators 1 and 3; with FM enabled in the mode register the
//      output of oscillator 2 (4) is added to the speed of oscillator 1 (3),
//      shifted left by FM_SHIFT bits, the result limited to the speed range;
//      with sync enabled oscillator 1 (3) restarts at phase 0 whenever
//      oscillator 2 (4) wrapped in this sample;
//   3. sums all four oscillator outputs (Q1.17) into the filter input
//      (Q3.20, scaled by 1/4) and runs the voice's Moog filter, whose state
//      the engine keeps per voice;
//   4. pans the filter output into the stereo mix and writes back each
//      oscillator's advanced phase, its speed plus delta_speed and its
//      amplitude plus delta_amp (both saturating).
// Each oscillator unit has its own copy of the wavetable RAM; the host
// write port loads all copies at once.
//
// Timing: regs must show the parameters of voice_idx (combinational
// register read). A voice takes 25 clocks from voice_start to the mixer
// update, so the slot must be at least 26 clocks long (64 at the defaults).
// mix_valid pulses when the last voice has been mixed, with mix_l/mix_r
// holding the finished stereo mix; sample_start clears the mix.
// The order of oscillators, the FM scaling, the mode bits and the 1/4
// scaling are this design's choices.
module voice_engine
  import pw_pkg::*;
#(
  parameter int VOICES     = pw_pkg::VOICES,
  parameter int WAVE_WORDS = pw_pkg::WAVE_WORDS,
  parameter int FM_SHIFT   = 6
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      sample_start,
  input  logic                      voice_start,
  input  logic [$clog2(VOICES)-1:0] voice_idx,
  input  voice_regs_t               regs,
  output logic                      wb_we,
  output osc_state_t [OSCS-1:0]     wb,
  input  logic                      wave_we,
  input  logic [WA-1:0]             wave_waddr,
  input  logic [15:0]               wave_wdata,
  output s24_t                      mix_l,
  output s24_t                      mix_r,
  output logic                      mix_valid,
  output logic                      fm_used,     // an FM-modulated voice was computed
  output logic                      sync_used    // a slave oscillator was reset by sync
);
  typedef enum logic [2:0] {E_IDLE, E_MOD, E_MODW, E_CAR, E_CARW, E_FILT, E_FILTW, E_MIX} est_t;
  est_t est;

  voice_regs_t               r_q;
  logic [$clog2(VOICES)-1:0] v_q;
  s18_t [OSCS-1:0]           smp_q;
  phase_t [OSCS-1:0]         nph_q;
  logic [OSCS-1:0]           wrap_q;
  moog_state_t               mstate [VOICES];

  // ---------------- oscillator units ----------------
  logic [OSCS-1:0]   o_start, o_done, o_wrap, o_sync;
  phase_t [OSCS-1:0] o_speed, o_nph;
  s18_t [OSCS-1:0]   o_smp;
  logic [OSCS-1:0][WA-1:0] ra_a, ra_b;
  logic [OSCS-1:0][15:0]   rd_a, rd_b;

  function automatic phase_t fm_speed(input phase_t base, input s18_t mod, input logic en);
    logic signed [PW+1:0] s;
    s = $signed({2'b00, base}) + (en ? (26'(mod) <<< FM_SHIFT) : 26'sd0);
    if (s < 0)                          return '0;
    else if (s > $signed({2'b00, {PW{1'b1}}})) return '1;
    else                                return s[PW-1:0];
  endfunction

  always_comb begin
    for (int o = 0; o < OSCS; o++) begin
      o_speed[o] = r_q.osc[o].speed;
      o_sync[o]  = 1'b0;
    end
    o_speed[0] = fm_speed(r_q.osc[0].speed, smp_q[1], r_q.mode.fm21);
    o_speed[2] = fm_speed(r_q.osc[2].speed, smp_q[3], r_q.mode.fm43);
    o_sync[0]  = r_q.mode.sync21 && wrap_q[1];
    o_sync[2]  = r_q.mode.sync43 && wrap_q[3];
    o_start    = '0;
    if (est == E_MOD) o_start = 4'b1010;
    if (est == E_CAR) o_start = 4'b0101;
  end

  for (genvar o = 0; o < OSCS; o++) begin : g_osc
    wave_ram #(.NUM_WAVES(NUM_WAVES), .WAVE_WORDS(WAVE_WORDS), .DW(16), .AW(WA)) u_ram (
      .clk(clk), .we(wave_we), .waddr(wave_waddr), .wdata(wave_wdata),
      .raddr_a(ra_a[o]), .raddr_b(ra_b[o]), .rdata_a(rd_a[o]), .rdata_b(rd_b[o]));
    wt_osc #(.WAVE_WORDS(WAVE_WORDS)) u_osc (
      .clk(clk), .rst_n(rst_n), .start(o_start[o]),
      .phase(r_q.osc[o].phase), .speed(o_speed[o]), .amp(r_q.osc[o].amp),
      .wave(r_q.mode.wave[o]), .sync_rst(o_sync[o]),
      .ram_addr_a(ra_a[o]), .ram_addr_b(ra_b[o]), .ram_data_a(rd_a[o]), .ram_data_b(rd_b[o]),
      .done(o_done[o]), .sample(o_smp[o]), .next_phase(o_nph[o]), .wrapped(o_wrap[o]));
  end

  // ---------------- filter ----------------
  logic        f_start, f_done;
  s24_t        f_x, f_y;
  moog_state_t f_st_out;
  always_comb begin
    logic signed [19:0] sum;
    sum = 20'(smp_q[0]) + 20'(smp_q[1]) + 20'(smp_q[2]) + 20'(smp_q[3]);
    f_x = 24'(sum) <<< 1;   // Q3.17 * 8 / 4 -> Q3.20
  end
  assign f_start = (est == E_FILT);

  moog_filter u_moog (
    .clk(clk), .rst_n(rst_n), .start(f_start), .x(f_x), .g(r_q.g), .fb(r_q.fb),
    .gain(r_q.gain), .st_in(mstate[v_q]), .done(f_done), .y(f_y), .st_out(f_st_out));

  // ---------------- panning mixer ----------------
  logic m_valid;
  assign m_valid = (est == E_MIX);
  stereo_mixer u_mix (
    .clk(clk), .rst_n(rst_n), .clear(sample_start), .valid(m_valid), .x(f_y),
    .pan_l(r_q.pan_l), .pan_r(r_q.pan_r), .sum_l(mix_l), .sum_r(mix_r));

  // ---------------- write-back ----------------
  always_comb begin
    for (int o = 0; o < OSCS; o++) begin
      logic signed [PW+1:0] sp;
      sp = $signed({2'b00, r_q.osc[o].speed}) + 26'(r_q.osc[o].dspeed);
      wb[o].phase = nph_q[o];
      wb[o].speed = (sp < 0) ? '0 : (sp > $signed({2'b00, {PW{1'b1}}})) ? '1 : sp[PW-1:0];
      wb[o].amp   = sat18(64'(r_q.osc[o].amp) + 64'(r_q.osc[o].damp));
    end
  end
  assign wb_we = (est == E_MIX);

  // ---------------- sequencer ----------------
  logic last_q;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      est <= E_IDLE;
      r_q <= '0; v_q <= '0; smp_q <= '0; nph_q <= '0; wrap_q <= '0;
      for (int v = 0; v < VOICES; v++) mstate[v] <= '0;
      mix_valid <= 1'b0; last_q <= 1'b0; fm_used <= 1'b0; sync_used <= 1'b0;
    end else begin
      mix_valid <= last_q;
      last_q    <= 1'b0;
      fm_used   <= 1'b0;
      sync_used <= 1'b0;
      unique case (est)
        E_IDLE: if (voice_start) begin
          r_q <= regs;
          v_q <= voice_idx;
          est <= E_MOD;
        end
        E_MOD:  est <= E_MODW;
        E_MODW: if (o_done[1]) begin
          smp_q[1] <= o_smp[1]; smp_q[3] <= o_smp[3];
          nph_q[1] <= o_nph[1]; nph_q[3] <= o_nph[3];
          wrap_q   <= o_wrap;
          est <= E_CAR;
        end
        E_CAR: begin
          fm_used   <= r_q.mode.fm21 || r_q.mode.fm43;
          sync_used <= o_sync[0] || o_sync[2];
          est <= E_CARW;
        end
        E_CARW: if (o_done[0]) begin
          smp_q[0] <= o_smp[0]; smp_q[2] <= o_smp[2];
          nph_q[0] <= o_nph[0]; nph_q[2] <= o_nph[2];
          est <= E_FILT;
        end
        E_FILT:  est <= E_FILTW;
        E_FILTW: if (f_done) begin
          mstate[v_q] <= f_st_out;
          est <= E_MIX;
        end
        E_MIX: begin
          last_q <= (32'(v_q) == VOICES - 1);
          est    <= E_IDLE;
        end
        default: est <= E_IDLE;
      endcase
    end
  end
endmodule
