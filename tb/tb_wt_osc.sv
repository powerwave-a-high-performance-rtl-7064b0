// tb_wt_osc: one oscillator unit with its wavetable RAM, loaded with the
// four test waveforms. Random phases, speeds (across all mip levels),
// amplitudes and waveforms are compared with the floating-point model of
// the three interpolations; the latency (7 clocks), the phase advance, the
// wrap flag and the sync reset are checked exactly.
module tb_wt_osc;
  import pw_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start, sync_rst, done, wrapped;
  phase_t phase, speed, next_phase;
  s18_t amp, sample;
  logic [1:0] wave;
  logic [14:0] ra, rb, waddr;
  logic [15:0] da, db, wdata;
  logic we;
  int checks = 0, failures = 0;

  wave_ram u_ram (.clk(clk), .we(we), .waddr(waddr), .wdata(wdata), .raddr_a(ra), .raddr_b(rb),
                  .rdata_a(da), .rdata_b(db));
  wt_osc dut (.clk(clk), .rst_n(rst_n), .start(start), .phase(phase), .speed(speed), .amp(amp),
              .wave(wave), .sync_rst(sync_rst), .ram_addr_a(ra), .ram_addr_b(rb),
              .ram_data_a(da), .ram_data_b(db), .done(done), .sample(sample),
              .next_phase(next_phase), .wrapped(wrapped));
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; sync_rst = 0; phase = 0; speed = 0; amp = 0; wave = 0; we = 0; waddr = 0; wdata = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int w = 0; w < 4; w++)
      for (int l = 0; l < LEVELS; l++)
        for (int i = 0; i < (1 << lvl_log2(l)); i++) begin
          @(negedge clk);
          we = 1; waddr = 15'(w * WAVE_WORDS + lvl_base(l) + i); wdata = 16'(wave_word(w, l, i));
        end
    @(negedge clk);
    we = 0;
    for (int k = 0; k < 3000; k++) begin
      real e;
      int lat, sh;
      longint sum;
      sh = $urandom_range(23);
      phase    = 24'($urandom);
      speed    = 24'($urandom) >> sh;
      amp      = 18'($urandom_range(131071));
      if (k % 4 == 0) amp = -amp;
      wave     = 2'($urandom);
      sync_rst = ($urandom_range(9) == 0);
      e = osc_ref(int'(wave), longint'(phase), longint'(speed), int'(amp));
      sum = longint'(phase) + longint'(speed);
      start = 1;
      @(negedge clk);
      start = 0;
      phase = 24'($urandom); speed = 24'($urandom);   // inputs sampled at start only
      lat = 1;
      while (!done && lat < 30) begin @(negedge clk); lat++; end
      check(lat == 7, $sformatf("latency %0d", lat));
      check(real'(sample) - e < 24.0 && real'(sample) - e > -24.0,
            $sformatf("k=%0d wave %0d sample %0d exp %f", k, wave, sample, e));
      check(next_phase == (sync_rst ? 24'd0 : 24'(sum)) && wrapped == (sum >= 64'd16777216), "phase advance");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
