// tb_stereo_mixer: accumulates random voices with random pan gains and
// compares both sums with an integer model, including the clear.
module tb_stereo_mixer;
  logic clk = 0, rst_n = 0, clear = 0, valid = 0;
  logic signed [23:0] x, sum_l, sum_r;
  logic signed [17:0] pan_l, pan_r;
  int checks = 0, failures = 0;

  stereo_mixer dut (.*);
  always #5 clk = ~clk;

  function automatic longint sat(input longint v);
    return v > 8388607 ? 8388607 : (v < -8388608 ? -8388608 : v);
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint el, er;
    x = 0; pan_l = 0; pan_r = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 50; s++) begin
      @(negedge clk); clear = 1; @(negedge clk); clear = 0;
      el = 0; er = 0;
      for (int v = 0; v < 16; v++) begin
        x = 24'($signed($urandom_range(8000000)) - 4000000);
        pan_l = 18'($urandom_range(131071));
        pan_r = 18'($urandom_range(131071));
        valid = 1;
        el = sat(el + ((longint'(x) * longint'(pan_l)) >>> 17));
        er = sat(er + ((longint'(x) * longint'(pan_r)) >>> 17));
        @(negedge clk);
        valid = 0;
        if (v % 3 == 0) @(negedge clk);   // gaps between voices
      end
      checks++;
      if (longint'(sum_l) != el || longint'(sum_r) != er) begin
        failures++;
        $display("FAIL sample %0d: %0d/%0d exp %0d/%0d", s, sum_l, sum_r, el, er);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
