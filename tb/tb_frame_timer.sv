// tb_frame_timer: checks the frame, voice-slot and interrupt timing at the
// default sizes: a sample_start every 1024 clocks, 16 voice slots of 64
// clocks with the voice index counting 0..15, and irq_pulse every 96
// frames (98304 clocks, 1 ms at 98.304 MHz).
module tb_frame_timer;
  logic clk = 0, rst_n = 0;
  logic sample_start, voice_start, irq_pulse;
  logic [3:0] voice_idx;
  int checks = 0, failures = 0;

  frame_timer dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint cyc = 0, last_ss = -1, last_vs = -1, last_irq = -1;
  int exp_voice = -1, n_irq = 0;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    forever begin
      @(posedge clk);
      cyc++;
      if (sample_start) begin
        if (last_ss >= 0) check(cyc - last_ss == 1024, $sformatf("frame length %0d", cyc - last_ss));
        last_ss = cyc;
        check(voice_start && voice_idx == 0, "frame starts with voice 0");
        exp_voice = 0;
      end
      if (voice_start && exp_voice >= 0) begin
        if (last_vs >= 0) check(cyc - last_vs == 64, $sformatf("slot length %0d", cyc - last_vs));
        last_vs = cyc;
        check(voice_idx == 4'(exp_voice), $sformatf("voice %0d expected %0d", voice_idx, exp_voice));
        exp_voice++;
      end
      if (irq_pulse) begin
        check(sample_start, "irq on frame start");
        if (last_irq >= 0) check(cyc - last_irq == 96 * 1024, $sformatf("irq period %0d", cyc - last_irq));
        last_irq = cyc;
        n_irq++;
        if (n_irq == 3) begin
          $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
          $finish;
        end
      end
    end
  end
endmodule
