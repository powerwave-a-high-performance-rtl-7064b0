// wt_osc: interpolating mip-mapped wavetable oscillator unit.
//
// Computes one output sample of one oscillator from its phase, speed,
// amplitude and waveform index by three fits:
//   1. The speed selects the mip level: level l = (position of the speed's
//      leading one) - 11, limited to 0..11, so the 2048-point table serves
//      speeds below 2^12 (about 23 Hz at 96 kHz) and every octave above
//      uses a table half as long (never shorter than 16 points).
//   2. In level l and in the next coarser level l+1 the phase picks two
//      neighbouring samples, read together over the two RAM ports, and the
//      value is linearly interpolated between them by the phase fraction.
//   3. The two level values are linearly interpolated by the position of
//      the speed inside its octave (the 16 bits below the leading one), so
//      the waveform blends smoothly from one table to the next as the pitch
//      changes. At the top level both taps use level 11.
// The blended value is scaled by the amplitude. One multiplier is used four
// times in sequence. The unit also returns the advanced phase (phase+speed,
// or 0 when sync_rst is set) and whether the phase wrapped.
//
// Timing: start is a one-clock pulse with all inputs valid; done pulses 7
// clocks later with sample, next_phase and wrapped valid (held until the
// next start). The wavetable RAM has one clock of read latency.
// The three fits follow the described method; the level rule, formats and
// the single time-shared multiplier are this design's choices.
module wt_osc
  import pw_pkg::*;
#(
  parameter int WAVE_WORDS = pw_pkg::WAVE_WORDS
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  phase_t        phase,
  input  phase_t        speed,
  input  s18_t          amp,
  input  logic [1:0]    wave,
  input  logic          sync_rst,
  output logic [WA-1:0] ram_addr_a,
  output logic [WA-1:0] ram_addr_b,
  input  logic [15:0]   ram_data_a,
  input  logic [15:0]   ram_data_b,
  output logic          done,
  output s18_t          sample,
  output phase_t        next_phase,
  output logic          wrapped
);
  typedef enum logic [2:0] {S_IDLE, S_RDA, S_RDB, S_LA, S_LB, S_MIX, S_AMP} state_t;
  state_t st;

  phase_t       ph_q;
  s18_t         amp_q;
  logic [WA-1:0] wbase_q;
  logic [3:0]   la_q, lb_q;
  logic [15:0]  wf_q;                  // weight between the two levels
  logic signed [15:0] a0_q, a1_q;
  logic signed [15:0] b0_q, b1_q;
  logic signed [15:0] va_q, vb_q;

  // leading-one position of the speed
  function automatic int lead_one(input phase_t s);
    int p;
    p = -1;
    for (int i = 0; i < PW; i++) if (s[i]) p = i;
    return p;
  endfunction

  // sample address pair and phase fraction inside level l
  function automatic void tap(input logic [3:0] l, input phase_t ph, input logic [WA-1:0] wb,
                              output logic [WA-1:0] a0, output logic [WA-1:0] a1,
                              output logic [15:0] fr);
    int lg;
    logic [PW-1:0] idx, nxt;
    logic [PW-1:0] sh;
    lg  = mip_log2(int'(l));
    idx = ph >> (PW - lg);
    nxt = (idx + 1) & ((PW'(1) << lg) - 1);
    sh  = ph << lg;
    fr  = sh[PW-1 -: 16];
    a0  = wb + WA'(mip_base(int'(l))) + WA'(idx);
    a1  = wb + WA'(mip_base(int'(l))) + WA'(nxt);
  endfunction

  // level selection from the speed
  logic [3:0]  la_c, lb_c;
  logic [15:0] wf_c;
  always_comb begin
    int p;
    phase_t n;
    p = lead_one(speed);
    n = (p >= 0) ? (speed << (PW - 1 - p)) : '0;
    if (p < 11) begin
      la_c = 4'd0;
      wf_c = '0;
    end else if (p - 11 >= LEVELS - 1) begin
      la_c = 4'(LEVELS - 1);
      wf_c = '0;
    end else begin
      la_c = 4'(p - 11);
      wf_c = n[PW-2 -: 16];
    end
    lb_c = (la_c == 4'(LEVELS - 1)) ? la_c : la_c + 4'd1;
  end

  // current read taps
  logic [WA-1:0] adA0, adA1, adB0, adB1;
  logic [15:0]   frA, frB;
  always_comb begin
    tap(la_q, ph_q, wbase_q, adA0, adA1, frA);
    tap(lb_q, ph_q, wbase_q, adB0, adB1, frB);
    ram_addr_a = (st == S_RDB) ? adB0 : adA0;
    ram_addr_b = (st == S_RDB) ? adB1 : adA1;
  end

  // the shared multiplier: lerp (v0 + (v1-v0)*f) or the amplitude product
  logic signed [16:0] m_d;
  logic signed [16:0] m_f;
  logic signed [33:0] m_p;
  logic signed [15:0] m_v0;
  always_comb begin
    unique case (st)
      S_LA:    begin m_v0 = a0_q; m_d = 17'(a1_q) - 17'(a0_q); m_f = {1'b0, frA}; end
      S_LB:    begin m_v0 = b0_q; m_d = 17'(b1_q) - 17'(b0_q); m_f = {1'b0, frB}; end
      default: begin m_v0 = va_q; m_d = 17'(vb_q) - 17'(va_q); m_f = {1'b0, wf_q}; end
    endcase
    m_p = m_d * m_f;
  end
  logic signed [15:0] lerp;
  assign lerp = 16'(32'(m_v0) + 32'(m_p >>> 16));

  logic signed [35:0] amp_p;
  assign amp_p = $signed({va_q, 2'b00}) * amp_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st   <= S_IDLE;
      done <= 1'b0;
      sample <= '0;
      next_phase <= '0;
      wrapped <= 1'b0;
      ph_q <= '0; amp_q <= '0; wbase_q <= '0; la_q <= '0; lb_q <= '0; wf_q <= '0;
      a0_q <= '0; a1_q <= '0; b0_q <= '0; b1_q <= '0; va_q <= '0; vb_q <= '0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          ph_q    <= phase;
          amp_q   <= amp;
          wbase_q <= WA'(int'(wave) * WAVE_WORDS);
          la_q    <= la_c;
          lb_q    <= lb_c;
          wf_q    <= wf_c;
          {wrapped, next_phase} <= {1'b0, phase} + {1'b0, speed};
          if (sync_rst) next_phase <= '0;
          st <= S_RDA;
        end
        S_RDA: st <= S_RDB;
        S_RDB: begin a0_q <= ram_data_a; a1_q <= ram_data_b; st <= S_LA; end
        S_LA:  begin b0_q <= ram_data_a; b1_q <= ram_data_b; va_q <= lerp; st <= S_LB; end
        S_LB:  begin vb_q <= lerp; st <= S_MIX; end
        S_MIX: begin va_q <= lerp; st <= S_AMP; end
        S_AMP: begin
          sample <= sat18(64'(amp_p >>> 17));
          done   <= 1'b1;
          st     <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
