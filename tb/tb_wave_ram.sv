// tb_wave_ram: writes pseudo-random words to the wavetable RAM and reads
// them back over both ports at once, checking data and the one-clock read
// latency.
module tb_wave_ram;
  localparam int DEPTH = 4 * 6176;
  logic clk = 0;
  logic we;
  logic [14:0] waddr, raddr_a, raddr_b;
  logic [15:0] wdata, rdata_a, rdata_b;
  logic [15:0] model [DEPTH];
  int checks = 0, failures = 0;

  wave_ram dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; wdata = 0; raddr_a = 0; raddr_b = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1; waddr = 15'(i); wdata = 16'($urandom); model[i] = wdata;
    end
    @(negedge clk);
    we = 0;
    for (int k = 0; k < 4000; k++) begin
      int a, b;
      a = $urandom_range(DEPTH - 1);
      b = $urandom_range(DEPTH - 1);
      @(negedge clk);
      raddr_a = 15'(a); raddr_b = 15'(b);
      @(negedge clk);
      raddr_a = 15'($urandom_range(DEPTH - 1));   // next address must not matter
      checks++;
      if (rdata_a !== model[a] || rdata_b !== model[b]) begin
        failures++;
        if (failures < 5) $display("FAIL addr %0d/%0d got %h/%h exp %h/%h", a, b, rdata_a, rdata_b, model[a], model[b]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
