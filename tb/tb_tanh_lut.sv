// tb_tanh_lut: compares the interpolated table with tanh over [-6, 6],
// including the saturated ends; the interpolation error of a 1/32 grid is
// below 1e-4, the tolerance is 2e-4.
module tb_tanh_lut;
  logic signed [23:0] x, y;
  int checks = 0, failures = 0;

  tanh_lut dut (.x(x), .y(y));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 5000; k++) begin
      real xr, er;
      if (k < 4000) xr = -6.0 + 12.0 * real'(k) / 4000.0;
      else          xr = (real'($urandom_range(1000000)) / 1000000.0 - 0.5) * 3.0;
      x = 24'($rtoi(xr * 1048576.0));
      #1;
      xr = real'(x) / 1048576.0;
      if (xr > 4.0) xr = 4.0;
      if (xr < -4.0) xr = -4.0;
      er = real'(y) / 1048576.0 - $tanh(xr);
      checks++;
      if (er > 2.0e-4 || er < -2.0e-4) begin
        failures++;
        if (failures < 5) $display("FAIL x=%f y=%f err=%g", xr, real'(y) / 1048576.0, er);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
