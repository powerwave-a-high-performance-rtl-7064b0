// tb_delay_fb: feeds impulses and random samples through the feedback
// delay at several lengths and compares with a model that keeps the whole
// output history, y[n] = x[n] + fb*y[n-D]. The buffer must read as zeros
// after the clearing sweep that follows reset (the first samples and the
// D = DEPTH run depend on it).
module tb_delay_fb;
  import pw_pkg::*;
  localparam int DEPTH = 4096;
  logic clk = 0, rst_n = 0, en = 0, done, busy_clr;
  s24_t in_l, in_r, out_l, out_r;
  logic [11:0] len;
  s18_t fb;
  int checks = 0, failures = 0;

  delay_fb dut (.*);
  always #5 clk = ~clk;

  longint hl[$], hr[$];

  function automatic longint sat(input longint v);
    return v > 8388607 ? 8388607 : (v < -8388608 ? -8388608 : v);
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n = 0;
    in_l = 0; in_r = 0; len = 0; fb = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // the unit clears its buffers after reset; en is ignored meanwhile
    for (int k = 0; k < DEPTH; k++) begin hl.push_back(0); hr.push_back(0); end
    checks++;
    if (!busy_clr) begin failures++; $display("FAIL: no clearing after reset"); end
    while (busy_clr) @(negedge clk);
    for (int phase = 0; phase < 3; phase++) begin
      len = (phase == 0) ? 12'd5 : (phase == 1) ? 12'd37 : 12'd0;   // 0 = DEPTH
      fb  = (phase == 1) ? -18'sd90000 : 18'sd100000;
      for (int k = 0; k < 300; k++) begin
        longint el, er;
        int d;
        in_l = (k == 0) ? 24'sd1000000 : ((k % 11 == 0) ? 24'($signed($urandom_range(200000)) - 100000) : 24'sd0);
        in_r = 24'($signed($urandom_range(200000)) - 100000);
        d  = (len == 0) ? DEPTH : int'(len);
        el = sat(in_l + ((hl[hl.size() - d] * fb) >>> 17));
        er = sat(in_r + ((hr[hr.size() - d] * fb) >>> 17));
        hl.push_back(el); hr.push_back(er);
        en = 1; @(negedge clk); en = 0;
        in_l = 24'($urandom);                 // sampled only with en
        @(negedge clk);
        checks++;
        if (!done || longint'(out_l) != el || longint'(out_r) != er) begin
          failures++;
          if (failures < 5) $display("FAIL len=%0d k=%0d done=%0d %0d/%0d exp %0d/%0d", len, k, done, out_l, out_r, el, er);
        end
        n++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
