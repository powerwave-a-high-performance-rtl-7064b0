// tb_moog_filter: runs the ladder as the engine does (state passed in and
// out) for two interleaved voices with different cutoff, resonance and
// stage mixes, driven by a saw and random input, and compares each output
// and state with the floating-point ladder model. Checks the 6-clock
// latency.
module tb_moog_filter;
  import pw_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, done;
  s24_t x, g, fb, y;
  s24_t [3:0] gain;
  moog_state_t st_in, st_out;
  int checks = 0, failures = 0;

  moog_filter dut (.*);
  always #5 clk = ~clk;

  function automatic s24_t q(input real v); return 24'($rtoi(v * 1048576.0)); endfunction
  function automatic real r(input s24_t v); return real'(v) / 1048576.0; endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    moog_state_t hw [2];
    moog_ref_t   sw [2];
    real gv[2], fv[2], gains[2][4];
    gv[0] = 0.2;  fv[0] = 3.2;  gains[0] = '{0.0, 0.0, 0.0, 1.0};
    gv[1] = 0.05; fv[1] = 1.0;  gains[1] = '{0.5, -1.0, 0.0, 1.5};
    for (int v = 0; v < 2; v++) begin
      hw[v] = '0;
      sw[v].s_prev = 0.0;
      for (int k = 0; k < 4; k++) begin sw[v].y[k] = 0.0; sw[v].w[k] = 0.0; end
    end
    x = 0; g = 0; fb = 0; gain = '0; st_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++)
      for (int v = 0; v < 2; v++) begin
        real xr, e;
        int lat;
        xr = (v == 0) ? 0.8 * (real'(n % 50) / 25.0 - 1.0) : (real'($urandom_range(2000)) / 1000.0 - 1.0);
        x = q(xr); g = q(gv[v]); fb = q(fv[v]);
        for (int k = 0; k < 4; k++) gain[k] = q(gains[v][k]);
        st_in = hw[v];
        e = moog_ref(r(x), r(g), r(fb), '{r(gain[0]), r(gain[1]), r(gain[2]), r(gain[3])}, sw[v]);
        start = 1;
        @(negedge clk);
        start = 0;
        lat = 1;
        while (!done && lat < 30) begin @(negedge clk); lat++; end
        check(lat == 6, $sformatf("latency %0d", lat));
        check(r(y) - e < 2e-3 && r(y) - e > -2e-3, $sformatf("n=%0d v=%0d y=%f exp %f", n, v, r(y), e));
        check(r(st_out.y[3]) - sw[v].y[3] < 2e-3 && r(st_out.y[3]) - sw[v].y[3] > -2e-3, "state y4");
        hw[v] = st_out;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
