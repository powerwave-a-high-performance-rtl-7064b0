// tb_powerwave_top: end-to-end run of the whole synthesizer at its default
// sizes (16 voices, 1024 clocks per sample, 96-sample interrupt period).
//
// The bench acts as the control processor: it loads the four test
// waveforms into the wavetables and all voice, EQ, delay and gain
// registers over the bus, then plays 110 samples. On every interrupt it
// writes new speeds for a few oscillators (the millisecond parameter
// update) and clears the interrupt. Every output sample is compared with a
// floating-point model of the chain: the voice model (fed with the register
// set the engine reads for each voice), the six EQ bands, the feedback
// delay and the main gain. The serial DAC stream is decoded and must carry
// exactly the previous sample's output words. The bench counts FM voices,
// sync resets, interrupts served, delayed feedback, EQ action and processor
// writes that landed inside their voice's slot (and so must survive the
// engine's write-back), and fails if any never happened.
module tb_powerwave_top;
  import pw_pkg::*;
  import tb_ref_pkg::*;
  localparam int FRAMES = 110;
  logic clk = 0, rst_n = 0;
  logic [15:0] bus_addr = 0;
  logic bus_we = 0;
  logic [31:0] bus_wdata = 0, bus_rdata;
  logic irq, dac_mclk, dac_bclk, dac_lrck, dac_sdata, out_valid;
  s24_t out_l, out_r;
  int checks = 0, failures = 0;

  powerwave_top dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  task automatic wr(input int a, input logic [31:0] d);
    @(negedge clk); bus_addr = 16'(a); bus_wdata = d; bus_we = 1;
    @(negedge clk); bus_we = 0;
  endtask

  initial begin
    repeat (1024 * (FRAMES + 80)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model of the chain ----------------
  moog_ref_t mst [16];
  real mix_l, mix_r;
  real eqc [6][5];
  real ex1 [6][2], ex2 [6][2], ey1 [6][2], ey2 [6][2];
  real dly_l[$], dly_r[$];
  real dfb, gl, gr;
  int  dlen;
  int  n_fm = 0, n_sync = 0, n_irq = 0, n_fbk = 0, n_eq = 0, n_out = 0, n_dac = 0;
  bit  started = 0;
  real max_abs = 0.0, max_err = 0.0;

  function automatic real eq_band(input int b, input int c, input real x);
    real y;
    y = eqc[b][0] * x + eqc[b][1] * ex1[b][c] + eqc[b][2] * ex2[b][c] - eqc[b][3] * ey1[b][c] - eqc[b][4] * ey2[b][c];
    ex2[b][c] = ex1[b][c]; ex1[b][c] = x; ey2[b][c] = ey1[b][c]; ey1[b][c] = y;
    return y;
  endfunction

  always @(posedge clk) if (started && dut.voice_start) begin
    voice_out_t o;
    int v;
    v = int'(dut.voice_idx);
    o = voice_model(dut.eng_rd, mst[v]);
    if (v == 0) begin mix_l = 0.0; mix_r = 0.0; end
    mix_l += o.y * real'(dut.eng_rd.pan_l) / 131072.0;
    mix_r += o.y * real'(dut.eng_rd.pan_r) / 131072.0;
  end

  real max_mix_err = 0.0;
  always @(posedge clk) if (started && dut.u_eng.mix_valid) begin
    real e;
    e = real'(dut.u_eng.mix_l) / 1048576.0 - mix_l;
    if (e < 0) e = -e;
    if (e > max_mix_err) max_mix_err = e;
  end

  int n_keep = 0;
  always @(posedge clk) if (started) begin
    if (dut.eng_we && dut.u_regs.dirty != '0) n_keep++;
    if (dut.u_eng.fm_used) n_fm++;
    if (dut.u_eng.sync_used) n_sync++;
  end

  s24_t last_l = 0, last_r = 0;
  always @(posedge clk) if (started && out_valid) begin
    real l, r, l0, r0, dl, dr, el, er;
    l = mix_l; r = mix_r;
    for (int b = 0; b < 6; b++) begin l = eq_band(b, 0, l); r = eq_band(b, 1, r); end
    l0 = mix_l; r0 = mix_r;
    if (l - l0 > 1e-3 || l - l0 < -1e-3) n_eq++;
    dl = dly_l[dly_l.size() - dlen] * dfb;
    dr = dly_r[dly_r.size() - dlen] * dfb;
    if (dl > 1e-3 || dl < -1e-3) n_fbk++;
    l = l + dl; r = r + dr;
    dly_l.push_back(l); dly_r.push_back(r);
    l = l * gl; r = r * gr;
    el = real'(out_l) / 1048576.0 - l;
    er = real'(out_r) / 1048576.0 - r;
    check(el < 3e-3 && el > -3e-3 && er < 3e-3 && er > -3e-3,
          $sformatf("sample %0d out %f/%f exp %f/%f", n_out, real'(out_l) / 1048576.0, real'(out_r) / 1048576.0, l, r));
    if (l > max_abs) max_abs = l;
    if (-l > max_abs) max_abs = -l;
    if (el > max_err) max_err = el;
    if (-el > max_err) max_err = -el;
    n_out++;
  end

  // ---------------- DAC receiver ----------------
  s24_t prev_l, prev_r, sent_l, sent_r;
  always @(posedge clk) if (started && out_valid) begin prev_l <= out_l; prev_r <= out_r; end
  always @(posedge clk) if (started && dut.sample_start) begin sent_l <= out_l; sent_r <= out_r; end
  initial begin
    logic pb = 0, plr = 0;
    int bitn = -1;
    logic [23:0] sh = 0;
    wait (started);
    forever begin
      @(posedge clk);
      if (dac_bclk && !pb) begin
        if (dac_lrck != plr) bitn = 0;
        else if (bitn >= 0) bitn++;
        if (bitn >= 1 && bitn <= 24) sh = {sh[22:0], dac_sdata};
        if (bitn == 24) begin
          check(sh == (dac_lrck ? sent_r : sent_l), $sformatf("DAC word %h exp %h", sh, dac_lrck ? sent_r : sent_l));
          n_dac++;
        end
        plr = dac_lrck;
      end
      pb = dac_bclk;
    end
  end

  // ---------------- control processor ----------------
  initial begin
    voice_regs_t vr;
    for (int v = 0; v < 16; v++) begin
      mst[v].s_prev = 0.0;
      for (int k = 0; k < 4; k++) begin mst[v].y[k] = 0.0; mst[v].w[k] = 0.0; end
    end
    for (int b = 0; b < 6; b++) begin
      eqc[b] = '{1.0, 0.0, 0.0, 0.0, 0.0};
      for (int c = 0; c < 2; c++) begin ex1[b][c] = 0; ex2[b][c] = 0; ey1[b][c] = 0; ey2[b][c] = 0; end
    end
    eqc[2] = '{1.2, -1.6, 0.7, -1.6, 0.9};     // a peaking band
    eqc[5] = '{0.5, 0.5, 0.0, 0.0, 0.0};       // a gentle low-pass
    dlen = 3; dfb = 0.5; gl = 0.9; gr = 0.7;
    for (int k = 0; k < 4096; k++) begin dly_l.push_back(0.0); dly_r.push_back(0.0); end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int w = 0; w < 4; w++)
      for (int l = 0; l < LEVELS; l++)
        for (int i = 0; i < (1 << lvl_log2(l)); i++) begin
          @(negedge clk);
          bus_addr = 16'h8000 | 16'(w * WAVE_WORDS + lvl_base(l) + i);
          bus_wdata = 32'(wave_word(w, l, i)); bus_we = 1;
        end
    @(negedge clk); bus_we = 0;
    for (int v = 0; v < 16; v++) begin
      vr = demo_voice(v);
      for (int k = 0; k < 4; k++) begin
        wr(v * 32 + 5 * k + 0, 32'(vr.osc[k].phase));
        wr(v * 32 + 5 * k + 1, 32'(vr.osc[k].speed));
        wr(v * 32 + 5 * k + 2, 32'(vr.osc[k].amp));
        wr(v * 32 + 5 * k + 3, 32'(vr.osc[k].dspeed));
        wr(v * 32 + 5 * k + 4, 32'(vr.osc[k].damp));
      end
      wr(v * 32 + REG_MODE, 32'(vr.mode));
      wr(v * 32 + REG_G, 32'(vr.g));
      wr(v * 32 + REG_FB, 32'(vr.fb));
      for (int k = 0; k < 4; k++) wr(v * 32 + REG_GAIN0 + k, 32'(vr.gain[k]));
      wr(v * 32 + REG_PANL, 32'(vr.pan_l));
      wr(v * 32 + REG_PANR, 32'(vr.pan_r));
    end
    for (int b = 0; b < 6; b++)
      for (int c = 0; c < 5; c++) wr(1024 + 5 * b + c, 32'($rtoi(eqc[b][c] * 1048576.0)));
    wr(1024 + GREG_DLEN, 32'(dlen));
    wr(1024 + GREG_DFB, 32'($rtoi(dfb * 131072.0)));
    wr(1024 + GREG_GAINL, 32'($rtoi(gl * 131072.0)));
    wr(1024 + GREG_GAINR, 32'($rtoi(gr * 131072.0)));
    wr(1024 + GREG_IRQ, 0);
    // start the model at a frame boundary
    @(negedge clk iff (dut.u_timer.cnt == 10'd1023));
    // the voices have been running while the registers were loaded: take
    // over the filter states and the output delay line as they are now
    for (int v = 0; v < 16; v++) begin
      for (int k = 0; k < 4; k++) begin
        mst[v].y[k] = real'(dut.u_eng.mstate[v].y[k]) / 1048576.0;
        mst[v].w[k] = real'(dut.u_eng.mstate[v].w[k]) / 1048576.0;
      end
      mst[v].s_prev = real'(dut.u_eng.mstate[v].s_prev) / 1048576.0;
    end
    started = 1;
    while (n_out < FRAMES) begin
      @(negedge clk);
      if (irq) begin
        // millisecond update: retune oscillator 1 of voices 0..3
        for (int v = 0; v < 4; v++) wr(v * 32 + 1, 32'($urandom_range(5000, 300000)));
        wr(1024 + GREG_IRQ, 0);
        check(!irq, "interrupt cleared");
        n_irq++;
      end
    end
    repeat (1100) @(negedge clk);
    check(n_fm > 0, "FM never used");
    check(n_sync > 0, "sync never happened");
    check(n_irq > 0, "no interrupt");
    check(n_fbk > 0, "delay feedback never contributed");
    check(n_eq > 0, "EQ never changed the signal");
    check(n_keep > 0, "no processor write ever fell inside its voice's slot");
    check(n_dac > 2 * (FRAMES - 5), "DAC words");
    $display("largest output %f, largest deviation %f, mix deviation %f", max_abs, max_err, max_mix_err);
    $display("samples %0d, DAC words %0d, FM %0d, sync %0d, irq %0d, delay feedback %0d, EQ %0d, writes kept over write-back %0d",
             n_out, n_dac, n_fm, n_sync, n_irq, n_fbk, n_eq, n_keep);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
