// tb_master_gain: random signals and gains against a rounded integer model
// with saturation.
module tb_master_gain;
  logic signed [23:0] in_l, in_r, out_l, out_r;
  logic signed [17:0] gain_l, gain_r;
  int checks = 0, failures = 0;

  master_gain dut (.*);

  function automatic longint mref(input longint x, input longint g);
    longint v = (x * g + 65536) >>> 17;
    return v > 8388607 ? 8388607 : (v < -8388608 ? -8388608 : v);
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 3000; k++) begin
      in_l = 24'($urandom); in_r = 24'($urandom);
      gain_l = 18'($urandom); gain_r = 18'($urandom);
      if (k == 0) begin in_l = -24'sd8388608; gain_l = -18'sd131072; end   // saturation
      #1;
      checks++;
      if (longint'(out_l) != mref(in_l, gain_l) || longint'(out_r) != mref(in_r, gain_r)) begin
        failures++;
        if (failures < 5) $display("FAIL %0d*%0d=%0d exp %0d", in_l, gain_l, out_l, mref(in_l, gain_l));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
