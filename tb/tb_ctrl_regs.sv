// tb_ctrl_regs: writes random values to every voice and global register,
// reads them back over the bus and through the engine port, checks the
// engine write-back, the priority of a host write over a simultaneous
// write-back, the survival of a host write made during the engine's slot,
// and the interrupt set/clear.
module tb_ctrl_regs;
  import pw_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [15:0] bus_addr;
  logic bus_we;
  logic [31:0] bus_wdata, bus_rdata;
  logic [3:0] eng_voice;
  logic eng_start;
  voice_regs_t eng_rd;
  logic eng_we;
  osc_state_t [3:0] eng_wb;
  glob_regs_t glob;
  logic irq_pulse, irq_pending;
  int checks = 0, failures = 0;

  ctrl_regs dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  task automatic wr(input int a, input logic [31:0] d);
    @(negedge clk); bus_addr = 16'(a); bus_wdata = d; bus_we = 1;
    @(negedge clk); bus_we = 0;
  endtask

  task automatic rd(input int a, output logic [31:0] d);
    @(negedge clk); bus_addr = 16'(a); bus_we = 0;
    @(negedge clk); d = bus_rdata;
  endtask

  function automatic int width_of(input int r);
    if (r < 20) return ((r % 5) == 2 || (r % 5) == 4) ? 18 : 24;
    if (r == 20) return 12;
    if (r == 27 || r == 28) return 18;
    return 24;
  endfunction

  function automatic logic [31:0] expect_rd(input int w, input logic [31:0] d, input bit signed_v);
    logic [31:0] m = (32'd1 << w) - 1;
    logic [31:0] v = d & m;
    if (signed_v && v[w-1]) v |= ~m;
    return v;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] shadow [16][29];
  initial begin
    logic [31:0] d;
    bus_addr = 0; bus_we = 0; bus_wdata = 0; eng_voice = 0; eng_start = 0; eng_we = 0; eng_wb = '0; irq_pulse = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int v = 0; v < 16; v++)
      for (int r = 0; r < 29; r++) begin
        shadow[v][r] = $urandom;
        wr(v * 32 + r, shadow[v][r]);
      end
    for (int v = 0; v < 16; v++)
      for (int r = 0; r < 29; r++) begin
        bit sg;
        sg = !(r < 20 && (r % 5) < 2) && r != 20;
        rd(v * 32 + r, d);
        check(d == expect_rd(width_of(r), shadow[v][r], sg), $sformatf("voice %0d reg %0d read %h exp %h", v, r, d, expect_rd(width_of(r), shadow[v][r], sg)));
      end
    // engine port
    for (int v = 0; v < 16; v++) begin
      eng_voice = 4'(v);
      #1;
      check(eng_rd.osc[1].speed == shadow[v][6][23:0], "engine speed");
      check(eng_rd.osc[3].damp == shadow[v][19][17:0], "engine damp");
      check(eng_rd.mode == shadow[v][20][11:0], "engine mode");
      check(eng_rd.gain[2] == shadow[v][25][23:0] && eng_rd.pan_r == shadow[v][28][17:0], "engine gain/pan");
      check(eng_rd.g == shadow[v][21][23:0] && eng_rd.fb == shadow[v][22][23:0], "engine g/fb");
    end
    // engine write-back
    @(negedge clk);
    eng_voice = 4'd5; eng_start = 1;
    @(negedge clk);
    eng_start = 0;
    for (int o = 0; o < 4; o++) begin
      eng_wb[o].phase = 24'($urandom); eng_wb[o].speed = 24'($urandom); eng_wb[o].amp = 18'($urandom);
    end
    eng_we = 1;
    @(negedge clk);
    eng_we = 0;
    for (int o = 0; o < 4; o++) begin
      check(eng_rd.osc[o].phase == eng_wb[o].phase && eng_rd.osc[o].speed == eng_wb[o].speed
            && eng_rd.osc[o].amp == eng_wb[o].amp, "write-back");
      check(eng_rd.osc[o].dspeed == shadow[5][5*o+3][23:0], "write-back leaves delta");
    end
    // host write beats write-back to the same word
    eng_voice = 4'd7;
    eng_wb[2].speed = 24'h123456;
    eng_we = 1; bus_addr = 16'(7 * 32 + 11); bus_wdata = 32'h00ABCDEF; bus_we = 1;
    @(negedge clk);
    eng_we = 0; bus_we = 0;
    check(eng_rd.osc[2].speed == 24'hABCDEF, "host priority");
    // a host write between the engine's read and its write-back survives it
    @(negedge clk);
    eng_voice = 4'd9; eng_start = 1;
    @(negedge clk);
    eng_start = 0;
    wr(9 * 32 + 5 * 1 + 2, 32'h00001234);        // amp of oscillator 1
    wr(9 * 32 + 5 * 3 + 0, 32'h00ABCDE0);        // phase of oscillator 3
    wr(8 * 32 + 5 * 1 + 1, 32'h00777777);        // other voice: not protected
    @(negedge clk);
    for (int o = 0; o < 4; o++) begin
      eng_wb[o].phase = 24'h111111; eng_wb[o].speed = 24'h222222; eng_wb[o].amp = 18'h3333;
    end
    eng_we = 1;
    @(negedge clk);
    eng_we = 0;
    check(eng_rd.osc[1].amp == 18'h1234 && eng_rd.osc[3].phase == 24'hABCDE0, "host update kept over write-back");
    check(eng_rd.osc[1].phase == 24'h111111 && eng_rd.osc[1].speed == 24'h222222 && eng_rd.osc[3].amp == 18'h3333,
          "other words written back");
    // the next slot of the voice writes back normally again
    eng_start = 1; @(negedge clk); eng_start = 0;
    eng_we = 1; @(negedge clk); eng_we = 0;
    check(eng_rd.osc[1].amp == 18'h3333 && eng_rd.osc[3].phase == 24'h111111, "protection ends with the slot");
    // global registers
    for (int g = 0; g < 36; g++) begin
      if (g == 30 || g == 31) continue;
      wr(1024 + g, 32'(g * 12345 + 7));
    end
    for (int g = 0; g < 36; g++) begin
      if (g == 30 || g == 31) continue;
      rd(1024 + g, d);
      check(d == ((g == 32) ? (32'(g * 12345 + 7) & 32'hFFF) : (g >= 33) ? expect_rd(18, 32'(g * 12345 + 7), 1) :
                 expect_rd(24, 32'(g * 12345 + 7), 1)), $sformatf("global %0d read %h", g, d));
    end
    check(glob.eq[3][2] == 24'(17 * 12345 + 7), "eq coefficient port");
    check(glob.dly_len == 12'(32 * 12345 + 7) && glob.gain_r == 18'(35 * 12345 + 7), "global port");
    // interrupt
    check(!irq_pending, "irq idle");
    @(negedge clk); irq_pulse = 1; @(negedge clk); irq_pulse = 0;
    check(irq_pending, "irq set");
    rd(1024 + 36, d);
    check(d == 1, "irq read");
    wr(1024 + 36, 0);
    check(!irq_pending, "irq cleared");
    // wavetable addresses are not registers
    wr(16'h8000 | 21, 32'h5555);
    rd(21, d);
    check(d == expect_rd(24, shadow[0][21], 1), "wavetable space ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
