// tb_moog_stage: random operating points of one ladder stage against
// y = y_prev + g*(tin - w_prev), w = tanh(y).
module tb_moog_stage;
  logic signed [23:0] tin, y_prev, w_prev, g, y, w;
  int checks = 0, failures = 0;

  moog_stage dut (.*);

  function automatic real q(input logic signed [23:0] v); return real'(v) / 1048576.0; endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 3000; k++) begin
      real ye, we;
      tin    = 24'($signed($urandom_range(2097152)) - 1048576);          // +-1
      y_prev = 24'($signed($urandom_range(4194304)) - 2097152);          // +-2
      w_prev = 24'($rtoi($tanh(q(y_prev)) * 1048576.0));
      g      = 24'($urandom_range(1048576));                             // 0..1
      #1;
      ye = q(y_prev) + q(g) * (q(tin) - q(w_prev));
      we = $tanh(ye > 4.0 ? 4.0 : (ye < -4.0 ? -4.0 : ye));
      checks++;
      if ((q(y) - ye) > 1.0e-5 || (q(y) - ye) < -1.0e-5 || (q(w) - we) > 3.0e-4 || (q(w) - we) < -3.0e-4) begin
        failures++;
        if (failures < 5) $display("FAIL y=%f exp %f w=%f exp %f", q(y), ye, q(w), we);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
