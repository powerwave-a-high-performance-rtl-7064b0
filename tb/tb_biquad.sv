// tb_biquad: runs a stable resonant section on interleaved left/right
// random input and compares every output with an integer direct form I
// model that keeps separate channel histories.
module tb_biquad;
  import pw_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, ch = 0;
  s24_t x, y;
  biquad_coef_t coef;
  int checks = 0, failures = 0;

  biquad dut (.*);
  always #5 clk = ~clk;

  longint hx1[2], hx2[2], hy1[2], hy2[2];

  function automatic longint step(input int c, input longint xv);
    longint acc, yv;
    acc = longint'(coef[0]) * xv + longint'(coef[1]) * hx1[c] + longint'(coef[2]) * hx2[c]
        - longint'(coef[3]) * hy1[c] - longint'(coef[4]) * hy2[c];
    yv = acc >>> 20;
    yv = yv > 8388607 ? 8388607 : (yv < -8388608 ? -8388608 : yv);
    hx2[c] = hx1[c]; hx1[c] = xv; hy2[c] = hy1[c]; hy1[c] = yv;
    return yv;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // peaking section: b = {1.1, -1.8, 0.85}, a = {-1.8, 0.95}
    coef[0] = 24'($rtoi(1.1 * 1048576.0));
    coef[1] = 24'($rtoi(-1.8 * 1048576.0));
    coef[2] = 24'($rtoi(0.85 * 1048576.0));
    coef[3] = 24'($rtoi(-1.8 * 1048576.0));
    coef[4] = 24'($rtoi(0.95 * 1048576.0));
    for (int c = 0; c < 2; c++) begin hx1[c] = 0; hx2[c] = 0; hy1[c] = 0; hy2[c] = 0; end
    x = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      longint e;
      int c;
      c  = (k % 5 == 4) ? 1 : (k & 1);   // irregular channel order
      x  = 24'($signed($urandom_range(1000000)) - 500000);
      ch = c[0];
      en = 1;
      e  = step(c, x);
      @(negedge clk);
      en = 0;
      checks++;
      if (longint'(y) != e) begin
        failures++;
        if (failures < 5) $display("FAIL k=%0d ch=%0d y=%0d exp %0d", k, c, y, e);
      end
      if (k % 7 == 0) @(negedge clk);   // idle clocks keep the state
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
