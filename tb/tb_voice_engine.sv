// tb_voice_engine: the shared voice datapath with all 16 voices, driven by
// a slot schedule of 64 clocks per voice and 1024 per sample. The bench
// plays the register file: it presents each voice's registers and applies
// the engine's write-back. Every sample it compares, per voice, the written
// back phases (exact unless the speed is frequency-modulated), speeds
// (+delta_speed) and amplitudes (+delta_amp), and finally the stereo mix,
// against the floating-point voice model. It counts FM voices, sync resets
// and delta updates and fails if any of them never happened.
module tb_voice_engine;
  import pw_pkg::*;
  import tb_ref_pkg::*;
  localparam int FRAMES = 40;
  logic clk = 0, rst_n = 0;
  logic sample_start = 0, voice_start = 0;
  logic [3:0] voice_idx = 0;
  voice_regs_t regs;
  logic wb_we;
  osc_state_t [3:0] wb;
  logic wave_we = 0;
  logic [14:0] wave_waddr = 0;
  logic [15:0] wave_wdata = 0;
  s24_t mix_l, mix_r;
  logic mix_valid, fm_used, sync_used;
  int checks = 0, failures = 0;

  voice_engine dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000 + 1024 * FRAMES) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  voice_regs_t vr [16];
  moog_ref_t   mst [16];
  voice_out_t  exp_o [16];
  voice_regs_t seen [16];
  real exp_l, exp_r;
  int n_fm = 0, n_sync = 0, n_delta = 0, n_mix = 0;

  assign regs = vr[voice_idx];

  // model: evaluated when the engine takes a voice
  always @(posedge clk) if (rst_n && voice_start) begin
    int v;
    v = int'(voice_idx);
    seen[v]  = vr[v];
    exp_o[v] = voice_model(vr[v], mst[v]);
    if (v == 0) begin exp_l = 0.0; exp_r = 0.0; end
    exp_l += exp_o[v].y * real'(vr[v].pan_l) / 131072.0;
    exp_r += exp_o[v].y * real'(vr[v].pan_r) / 131072.0;
  end

  // the register file's side of the write-back port
  always @(posedge clk) if (rst_n && wb_we) begin
    int v;
    v = int'(voice_idx);
    for (int k = 0; k < 4; k++) begin
      longint d;
      d = longint'(wb[k].phase) - exp_o[v].phase[k];
      if (d < 0) d = -d;
      if (d > 8388608) d = 16777216 - d;
      if (exp_o[v].fm_osc[k]) check(d < 4096, $sformatf("voice %0d osc %0d FM phase off by %0d", v, k, d));
      else                    check(d == 0, $sformatf("voice %0d osc %0d phase %h exp %h", v, k, wb[k].phase, exp_o[v].phase[k]));
      check(wb[k].speed == 24'(longint'(seen[v].osc[k].speed) + longint'(seen[v].osc[k].dspeed)), "speed delta");
      check(wb[k].amp == seen[v].osc[k].amp + seen[v].osc[k].damp, "amp delta");
      if (seen[v].osc[k].dspeed != 0 || seen[v].osc[k].damp != 0) n_delta++;
      vr[v].osc[k].phase <= wb[k].phase;
      vr[v].osc[k].speed <= wb[k].speed;
      vr[v].osc[k].amp   <= wb[k].amp;
    end
    if ((seen[v].mode.sync21 && exp_o[v].phase[0] == 0) || (seen[v].mode.sync43 && exp_o[v].phase[2] == 0)) n_sync++;
  end

  always @(posedge clk) if (rst_n) begin
    if (fm_used) n_fm++;
    if (mix_valid) begin
      real el, er;
      el = real'(mix_l) / 1048576.0 - exp_l;
      er = real'(mix_r) / 1048576.0 - exp_r;
      check(el < 5e-3 && el > -5e-3 && er < 5e-3 && er > -5e-3,
            $sformatf("mix %f/%f exp %f/%f", real'(mix_l) / 1048576.0, real'(mix_r) / 1048576.0, exp_l, exp_r));
      n_mix++;
    end
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      vr[v] = demo_voice(v);
      mst[v].s_prev = 0.0;
      for (int k = 0; k < 4; k++) begin mst[v].y[k] = 0.0; mst[v].w[k] = 0.0; end
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int w = 0; w < 4; w++)
      for (int l = 0; l < LEVELS; l++)
        for (int i = 0; i < (1 << lvl_log2(l)); i++) begin
          @(negedge clk);
          wave_we = 1; wave_waddr = 15'(w * WAVE_WORDS + lvl_base(l) + i); wave_wdata = 16'(wave_word(w, l, i));
        end
    @(negedge clk);
    wave_we = 0;
    for (int f = 0; f < FRAMES; f++)
      for (int c = 0; c < 1024; c++) begin
        @(negedge clk);
        sample_start = (c == 0);
        voice_start  = (c % 64 == 0);
        voice_idx    = 4'(c / 64);
      end
    @(negedge clk);
    sample_start = 0; voice_start = 0;
    repeat (100) @(negedge clk);
    check(n_mix == FRAMES, $sformatf("%0d mixes for %0d frames", n_mix, FRAMES));
    check(n_fm > 0, "FM never used");
    check(n_sync > 0, "sync never happened");
    check(n_delta > 0, "delta updates never happened");
    $display("FM voices %0d, sync resets %0d, delta updates %0d, mixes %0d", n_fm, n_sync, n_delta, n_mix);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
