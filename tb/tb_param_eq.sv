// tb_param_eq: six different biquad bands on random stereo samples, compared
// with an integer cascade model; also checks the 9-clock latency from start
// to done.
module tb_param_eq;
  import pw_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, done;
  s24_t in_l, in_r, out_l, out_r;
  biquad_coef_t [5:0] coef;
  int checks = 0, failures = 0;

  param_eq dut (.*);
  always #5 clk = ~clk;

  longint hx1[6][2], hx2[6][2], hy1[6][2], hy2[6][2];

  function automatic longint band(input int b, input int c, input longint xv);
    longint acc, yv;
    acc = longint'(coef[b][0]) * xv + longint'(coef[b][1]) * hx1[b][c] + longint'(coef[b][2]) * hx2[b][c]
        - longint'(coef[b][3]) * hy1[b][c] - longint'(coef[b][4]) * hy2[b][c];
    yv = acc >>> 20;
    yv = yv > 8388607 ? 8388607 : (yv < -8388608 ? -8388608 : yv);
    hx2[b][c] = hx1[b][c]; hx1[b][c] = xv; hy2[b][c] = hy1[b][c]; hy1[b][c] = yv;
    return yv;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < 6; b++) begin
      real r, c;
      r = 0.80 + 0.03 * b; c = 1.9 - 0.3 * b;
      coef[b][0] = 24'($rtoi((1.0 + 0.05 * b) * 1048576.0));
      coef[b][1] = 24'($rtoi(-r * c * 1048576.0));
      coef[b][2] = 24'($rtoi(r * r * 0.9 * 1048576.0));
      coef[b][3] = 24'($rtoi(-r * c * 1048576.0 * 0.98));
      coef[b][4] = 24'($rtoi(r * r * 0.95 * 1048576.0));
      for (int ch = 0; ch < 2; ch++) begin hx1[b][ch] = 0; hx2[b][ch] = 0; hy1[b][ch] = 0; hy2[b][ch] = 0; end
    end
    in_l = 0; in_r = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 300; k++) begin
      longint el, er;
      int lat;
      in_l = 24'($signed($urandom_range(400000)) - 200000);
      in_r = 24'($signed($urandom_range(400000)) - 200000);
      el = in_l; er = in_r;
      for (int b = 0; b < 6; b++) begin el = band(b, 0, el); er = band(b, 1, er); end
      start = 1;
      @(negedge clk);
      start = 0;
      in_l = 24'($urandom); in_r = 24'($urandom);   // inputs only sampled at start
      lat = 1;
      while (!done && lat < 40) begin @(negedge clk); lat++; end
      checks++;
      if (lat != 9) begin failures++; $display("FAIL latency %0d", lat); end
      checks++;
      if (longint'(out_l) != el || longint'(out_r) != er) begin
        failures++;
        if (failures < 5) $display("FAIL k=%0d %0d/%0d exp %0d/%0d", k, out_l, out_r, el, er);
      end
      repeat (3) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
