// tb_ref_pkg: floating-point reference models used by the testbenches.
//
// These models restate the synthesizer's arithmetic in real numbers,
// written independently of the RTL: the mip-mapped oscillator (table
// choice from the octave of the speed, linear interpolation in phase and
// between the two neighbouring tables), the Moog ladder with its averaged
// resonance feedback and stage mix, and the wavetable contents that the
// testbenches load. Results are compared with the RTL within tolerances
// that cover fixed-point truncation.
package tb_ref_pkg;
  import pw_pkg::*;

  localparam int LEVELS     = 12;
  localparam int WAVE_WORDS = 6176;

  function automatic int lvl_log2(input int l);
    return (l <= 1) ? 11 : ((12 - l) < 4 ? 4 : 12 - l);
  endfunction

  function automatic int lvl_base(input int l);
    int b = 0;
    for (int k = 0; k < l; k++) b += 1 << lvl_log2(k);
    return b;
  endfunction

  // Test waveform content: wave 0 sine, 1 saw, 2 square-ish, 3 pseudo-random,
  // each level holding the same shape at its own resolution.
  function automatic int wave_word(input int wave, input int l, input int i);
    int n = 1 << lvl_log2(l);
    real ph = real'(i) / real'(n);
    case (wave)
      0: return $rtoi(30000.0 * $sin(2.0 * 3.14159265358979 * ph));
      1: return $rtoi(30000.0 * (2.0 * ph - 1.0));
      2: return (ph < 0.5) ? 20000 + l * 100 : -20000 - l * 100;
      default: return ((i * 7919 + l * 104729 + wave * 31) % 60001) - 30000;
    endcase
  endfunction

  // value of table level l of a wave at a phase (0..2^24)
  function automatic real tab_val(input int wave, input int l, input longint phase);
    int n = 1 << lvl_log2(l);
    real pos = real'(phase) / 16777216.0 * real'(n);
    int i = $rtoi(pos);
    real f = pos - real'(i);
    real s0 = real'(wave_word(wave, l, i % n));
    real s1 = real'(wave_word(wave, l, (i + 1) % n));
    return s0 + (s1 - s0) * f;
  endfunction

  // oscillator output in Q1.17 units
  function automatic real osc_ref(input int wave, input longint phase, input longint speed, input int amp);
    int p = -1;
    int la, lb;
    real w = 0.0, va, vb;
    for (int b = 0; b < 24; b++) if (speed >= (longint'(1) << b)) p = b;
    if (p < 11)       la = 0;
    else if (p >= 22) la = 11;
    else begin
      la = p - 11;
      w  = real'(speed) / real'(longint'(1) << p) - 1.0;
    end
    lb = (la == 11) ? 11 : la + 1;
    va = tab_val(wave, la, phase);
    vb = tab_val(wave, lb, phase);
    return (va + (vb - va) * w) * 4.0 * real'(amp) / 131072.0;
  endfunction

  typedef struct {
    real y[4];
    real w[4];
    real s_prev;
  } moog_ref_t;

  // one sample of the ladder; x, g, fb, gains as real values
  function automatic real moog_ref(input real x, input real g, input real fb, input real gain[4],
                                   inout moog_ref_t st);
    real s = fb * st.y[3];
    real u = x - 0.5 * (s + st.s_prev);
    real t = $tanh(u > 4.0 ? 4.0 : (u < -4.0 ? -4.0 : u));
    real out = 0.0;
    for (int k = 0; k < 4; k++) begin
      real yn = st.y[k] + g * (t - st.w[k]);
      st.y[k] = yn;
      st.w[k] = $tanh(yn > 4.0 ? 4.0 : (yn < -4.0 ? -4.0 : yn));
      t = st.w[k];
      out += gain[k] * yn;
    end
    st.s_prev = s;
    return out;
  endfunction

  // Expected results of one voice for one sample, from the register set
  // the engine saw. FM speeds use the model's own modulator output.
  typedef struct {
    real    y;            // filter output
    longint phase [4];    // expected next phases
    bit     fm_osc [4];   // phase depends on an FM speed (checked loosely)
  } voice_out_t;

  function automatic voice_out_t voice_model(input voice_regs_t r, inout moog_ref_t st);
    voice_out_t o;
    real s [4];
    real sum, gains [4];
    bit wrap [4];
    longint sp [4];
    for (int k = 0; k < 4; k++) begin
      sp[k] = longint'(r.osc[k].speed);
      o.fm_osc[k] = 0;
    end
    for (int k = 1; k < 4; k += 2) begin
      s[k] = osc_ref(int'(r.mode.wave[k]), longint'(r.osc[k].phase), sp[k], int'(r.osc[k].amp));
      wrap[k] = (longint'(r.osc[k].phase) + sp[k]) >= 64'd16777216;
    end
    if (r.mode.fm21) begin
      sp[0] = sp[0] + $rtoi(s[1] * 64.0);
      o.fm_osc[0] = 1;
    end
    if (r.mode.fm43) begin
      sp[2] = sp[2] + $rtoi(s[3] * 64.0);
      o.fm_osc[2] = 1;
    end
    for (int k = 0; k < 4; k += 2) begin
      if (sp[k] < 0) sp[k] = 0;
      if (sp[k] > 16777215) sp[k] = 16777215;
      s[k] = osc_ref(int'(r.mode.wave[k]), longint'(r.osc[k].phase), sp[k], int'(r.osc[k].amp));
    end
    for (int k = 0; k < 4; k++) o.phase[k] = (longint'(r.osc[k].phase) + sp[k]) % 64'd16777216;
    if (r.mode.sync21 && wrap[1]) o.phase[0] = 0;
    if (r.mode.sync43 && wrap[3]) o.phase[2] = 0;
    sum = (s[0] + s[1] + s[2] + s[3]) * 2.0 / 1048576.0;
    for (int k = 0; k < 4; k++) gains[k] = real'(r.gain[k]) / 1048576.0;
    o.y = moog_ref(sum, real'(r.g) / 1048576.0, real'(r.fb) / 1048576.0, gains, st);
    return o;
  endfunction

  // A musically varied register set for voice v (used by several benches).
  function automatic voice_regs_t demo_voice(input int v);
    voice_regs_t r = '0;
    for (int k = 0; k < 4; k++) begin
      r.osc[k].phase  = 24'($urandom);
      r.osc[k].speed  = 24'($urandom_range(2000, 400000) << (v % 5));
      r.osc[k].amp    = 18'($urandom_range(10000, 30000));
      r.osc[k].dspeed = 24'($signed($urandom_range(200)) - 100);
      r.osc[k].damp   = 18'($signed($urandom_range(40)) - 20);
      r.mode.wave[k]  = 2'($urandom);
    end
    r.osc[1].speed = 24'($urandom_range(600000, 1200000));   // modulators wrap often
    r.osc[3].speed = 24'($urandom_range(600000, 1200000));
    r.mode.fm21   = (v % 4 == 1) || (v % 4 == 3);
    r.mode.fm43   = (v % 4 == 3);
    r.mode.sync21 = (v % 4 == 2);
    r.mode.sync43 = (v % 4 == 2) || (v % 8 == 5);
    r.g  = 24'($urandom_range(50000, 400000));
    r.fb = 24'($urandom_range(0, 2000000));
    r.gain[3] = 24'sd1048576;
    if (v % 3 == 1) begin r.gain[0] = 24'sd524288; r.gain[1] = -24'sd524288; end
    r.pan_l = 18'($urandom_range(20000, 120000));
    r.pan_r = 18'($urandom_range(20000, 120000));
    return r;
  endfunction

endpackage
