// tb_dac_if: decodes the I2S stream like a DAC (data sampled on rising
// bclk, MSB one bit clock after the lrck edge) and checks the recovered
// words and the clock rates: mclk = clk/8, bclk = clk/16, lrck = clk/1024.
module tb_dac_if;
  import pw_pkg::*;
  logic clk = 0, rst_n = 0, load = 0;
  s24_t l, r;
  logic mclk, bclk, lrck, sdata;
  int checks = 0, failures = 0;

  dac_if dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  s24_t sent_l[$], sent_r[$];
  // clock and load generation: load once per 1024 clocks
  initial begin
    l = 0; r = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 30; f++) begin
      l = 24'($urandom); r = 24'($urandom);
      sent_l.push_back(l); sent_r.push_back(r);
      load = 1; @(negedge clk); load = 0;
      repeat (1023) @(negedge clk);
    end
  end

  // receiver
  initial begin
    logic prev_b = 0, prev_lr = 0;
    int bitn = -1, mper = 0, bper = 0, last_m = 0, last_b = 0, cyc = 0, frames = 0;
    logic [23:0] sh;
    logic mprev = 0;
    @(posedge rst_n);
    @(posedge clk);   // first load
    forever begin
      @(posedge clk);
      cyc++;
      if (mclk && !mprev) begin
        if (last_m > 0 && checks < 2000) check(cyc - last_m == 8, "mclk period");
        last_m = cyc;
      end
      mprev = mclk;
      if (bclk && !prev_b) begin
        if (last_b > 0 && checks < 4000) check(cyc - last_b == 16, "bclk period");
        last_b = cyc;
        if (lrck != prev_lr) bitn = 0;                 // first bit clock of a word slot
        else if (bitn >= 0) bitn++;
        if (bitn >= 1 && bitn <= 24) sh = {sh[22:0], sdata};
        if (bitn == 24) begin
          if (!lrck) check(sh == sent_l[frames], $sformatf("left word %h exp %h", sh, sent_l[frames]));
          else begin
            check(sh == sent_r[frames], $sformatf("right word %h exp %h", sh, sent_r[frames]));
            frames++;
            if (frames == 25) begin
              $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
              $finish;
            end
          end
        end
        prev_lr = lrck;
      end
      prev_b = bclk;
    end
  end
endmodule
