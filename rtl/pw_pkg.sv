// pw_pkg: constants, number formats, register structures and small
// arithmetic helpers shared by the wavetable synthesizer.
//
// Number formats used throughout:
//   * phase and speed: 24-bit unsigned fraction of one waveform period
//     (speed = phase increment per 96 kHz sample).
//   * oscillator samples, amplitudes, pan and gain registers: signed Q1.17
//     (18 bits), one of the two fixed-point widths the control software
//     produces (1 + 17 bits).
//   * filter, mix and EQ signals and their coefficients: signed Q3.20
//     (24 bits, the other width, 1 + 23 bits) so that the resonance
//     feedback and the EQ boost have headroom up to +-8.
// The wavetable layout (12 mip levels per waveform, level l holding
// max(16, min(2048, 4096 >> l)) samples, 6176 words in all) is this
// design's reading of "12 wavetables", "2048 points per period", "16
// samples per period" and "12 kB per waveform".
package pw_pkg;

  localparam int VOICES     = 16;
  localparam int OSCS       = 4;
  localparam int NUM_WAVES  = 4;
  localparam int LEVELS     = 12;
  localparam int WAVE_WORDS = 6176;
  localparam int WA         = 15;   // wavetable word address width
  localparam int PW         = 24;   // phase / speed width

  typedef logic signed [23:0] s24_t;
  typedef logic signed [17:0] s18_t;
  typedef logic [PW-1:0]      phase_t;

  // State of one oscillator that the engine writes back every sample.
  typedef struct packed {
    phase_t phase;
    phase_t speed;
    s18_t   amp;
  } osc_state_t;

  // Host-visible registers of one oscillator.
  typedef struct packed {
    phase_t phase;    // "position"
    phase_t speed;
    s18_t   amp;
    s24_t   dspeed;   // added to speed once per sample
    s18_t   damp;     // added to amp once per sample
  } osc_regs_t;

  // Per-voice mode register.
  typedef struct packed {
    logic       sync43;   // oscillator 3 reset when oscillator 4 wraps
    logic       sync21;   // oscillator 1 reset when oscillator 2 wraps
    logic       fm43;     // oscillator 4 modulates the speed of oscillator 3
    logic       fm21;     // oscillator 2 modulates the speed of oscillator 1
    logic [3:0][1:0] wave; // waveform index per oscillator
  } mode_t;

  typedef struct packed {
    osc_regs_t [OSCS-1:0] osc;
    mode_t                mode;
    s24_t                 g;      // Moog cutoff coefficient
    s24_t                 fb;     // Moog resonance feedback coefficient
    s24_t [3:0]           gain;   // stage output mix gains
    s18_t                 pan_l;
    s18_t                 pan_r;
  } voice_regs_t;

  // Per-voice Moog ladder state.
  typedef struct packed {
    s24_t [3:0] y;       // stage outputs y_k[n-1]
    s24_t [3:0] w;       // tanh(y_k[n-1])
    s24_t       s_prev;  // previous resonance term
  } moog_state_t;

  typedef s24_t [4:0] biquad_coef_t;   // b0, b1, b2, a1, a2

  typedef struct packed {
    biquad_coef_t [5:0] eq;
    logic [11:0]        dly_len;
    s18_t               dly_fb;
    s18_t               gain_l;
    s18_t               gain_r;
  } glob_regs_t;

  // Register map (word addresses on the host bus).
  localparam int REG_MODE  = 20;
  localparam int REG_G     = 21;
  localparam int REG_FB    = 22;
  localparam int REG_GAIN0 = 23;
  localparam int REG_PANL  = 27;
  localparam int REG_PANR  = 28;
  localparam int GREG_DLEN  = 32;
  localparam int GREG_DFB   = 33;
  localparam int GREG_GAINL = 34;
  localparam int GREG_GAINR = 35;
  localparam int GREG_IRQ   = 36;

  // log2 of the number of samples in mip level l.
  function automatic int mip_log2(input int l);
    int s;
    s = 12 - l;
    if (s > 11) s = 11;
    if (s < 4)  s = 4;
    return s;
  endfunction

  // Word offset of mip level l inside one waveform.
  function automatic int mip_base(input int l);
    int b;
    b = 0;
    for (int k = 0; k < LEVELS; k++)
      if (k < l) b += 1 << mip_log2(k);
    return b;
  endfunction

  function automatic s24_t sat24(input logic signed [63:0] v);
    if (v > 64'sd8388607)       return 24'sh7FFFFF;
    else if (v < -64'sd8388608) return 24'sh800000;
    else                        return v[23:0];
  endfunction

  function automatic s18_t sat18(input logic signed [63:0] v);
    if (v > 64'sd131071)       return 18'sh1FFFF;
    else if (v < -64'sd131072) return 18'sh20000;
    else                       return v[17:0];
  endfunction

endpackage
