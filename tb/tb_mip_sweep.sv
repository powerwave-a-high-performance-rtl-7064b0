// tb_mip_sweep: pitch sweep through all mip levels on one oscillator unit.
//
// The oscillator's main promise is that the output changes smoothly when
// the pitch moves across the boundary between two mip tables. This bench
// holds the phase fixed and raises the speed in steps of 1/512 of its
// value from 2^10 to 2^23 (23 Hz below the first boundary to the Nyquist
// limit), on a waveform whose levels differ from each other. Between
// neighbouring speeds the output may change only by the slope of the
// level blend, never by a jump; the bench bounds every step by the
// difference between the two levels times the step of the blend weight
// (plus rounding), counts the level boundaries crossed and checks each
// output against the reference model.
module tb_mip_sweep;
  import pw_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start = 0, sync_rst = 0, done, wrapped;
  phase_t phase, speed, next_phase;
  s18_t amp, sample;
  logic [1:0] wave;
  logic [14:0] ra, rb, waddr;
  logic [15:0] da, db, wdata;
  logic we = 0;
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
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int lvl(input longint s);
    int p = -1;
    for (int b = 0; b < 24; b++) if (s >= (longint'(1) << b)) p = b;
    return (p < 11) ? 0 : (p >= 22 ? 11 : p - 11);
  endfunction

  initial begin
    longint sp;
    int prev, crossings, prev_lvl;
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
    for (int run = 0; run < 3; run++) begin
      phase = 24'($urandom);
      wave  = 2'd3;
      amp   = 18'sd131071;
      sp = 1024;
      prev = 0; prev_lvl = 0; crossings = 0;
      while (sp < 64'd8388608) begin
        int lat;
        real e, bound, da_b;
        int la, lb;
        speed = 24'(sp);
        start = 1; @(negedge clk); start = 0;
        lat = 1;
        while (!done && lat < 30) begin @(negedge clk); lat++; end
        e = osc_ref(3, longint'(phase), sp, 131071);
        check(real'(sample) - e < 24.0 && real'(sample) - e > -24.0, $sformatf("speed %0d sample %0d exp %f", sp, sample, e));
        la = lvl(sp);
        lb = (la == 11) ? 11 : la + 1;
        da_b = tab_val(3, la, longint'(phase)) - tab_val(3, lb, longint'(phase));
        if (da_b < 0) da_b = -da_b;
        if (la != prev_lvl) begin
          crossings++;
          // across the boundary the weight restarts at 0 on the next pair
          da_b = 0.0;
          for (int k = prev_lvl; k <= la + 1 && k < 12; k++) begin
            real d;
            d = tab_val(3, k, longint'(phase)) - tab_val(3, la, longint'(phase));
            if (d < 0) d = -d;
            if (d > da_b) da_b = d;
          end
        end
        bound = 4.0 * da_b * (2.0 / 512.0) + 64.0;
        if (sp > 1024) check(sample - prev <= bound && prev - sample <= bound,
                             $sformatf("jump %0d at speed %0d (level %0d), bound %f", sample - prev, sp, la, bound));
        prev = sample;
        prev_lvl = la;
        sp = sp + sp / 512 + 1;
      end
      check(crossings == 11, $sformatf("%0d level boundaries crossed", crossings));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
