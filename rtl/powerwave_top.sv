// powerwave_top: single-chip 16-voice interpolating wavetable synthesizer.
//
// Each of the 16 voices sums four mip-mapped, doubly interpolating
// wavetable oscillators (oscillators 2 and 4 can frequency-modulate or
// hard-sync oscillators 1 and 3), filters the sum in its own nonlinear Moog
// ladder and pans it into a stereo mix. The stereo mix passes a six-band
// parametric EQ, a feedback delay and the main gain, and leaves the chip as
// a 24-bit I2S stream for the 96 kHz DAC. All voices share one datapath,
// time-multiplexed over the 1024 clocks of a sample (98.304 MHz master
// clock).
//
// Control: an external processor writes the registers of ctrl_regs and the
// wavetables over the bus port (bus_addr bit 15 set: wavetable word
// bus_addr[14:0], written into all oscillator RAM copies). irq goes high
// every 96 samples (1 ms) and stays high until the processor writes the
// interrupt register, asking it to load the next set of parameters.
//
// Output timing: the stereo word of sample n is computed during frame n,
// appears on out_l/out_r with a one-clock out_valid pulse, and is shifted
// out on the serial port during frame n+1.
// The stereo path order (EQ, then delay, then main gain) is this design's
// choice.
module powerwave_top
  import pw_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] bus_addr,
  input  logic        bus_we,
  input  logic [31:0] bus_wdata,
  output logic [31:0] bus_rdata,
  output logic        irq,
  output logic        dac_mclk,
  output logic        dac_bclk,
  output logic        dac_lrck,
  output logic        dac_sdata,
  output s24_t        out_l,
  output s24_t        out_r,
  output logic        out_valid
);
  logic       sample_start, voice_start, irq_pulse;
  logic [3:0] voice_idx;

  frame_timer #(.CLKS_PER_SAMPLE(1024), .VOICES(VOICES), .SAMPLES_PER_IRQ(96)) u_timer (
    .clk(clk), .rst_n(rst_n), .sample_start(sample_start), .voice_start(voice_start),
    .voice_idx(voice_idx), .irq_pulse(irq_pulse));

  voice_regs_t           eng_rd;
  logic                  eng_we;
  osc_state_t [OSCS-1:0] eng_wb;
  glob_regs_t            glob;

  ctrl_regs #(.VOICES(VOICES)) u_regs (
    .clk(clk), .rst_n(rst_n), .bus_addr(bus_addr), .bus_we(bus_we), .bus_wdata(bus_wdata),
    .bus_rdata(bus_rdata), .eng_voice(voice_idx), .eng_start(voice_start), .eng_rd(eng_rd), .eng_we(eng_we),
    .eng_wb(eng_wb), .glob(glob), .irq_pulse(irq_pulse), .irq_pending(irq));

  s24_t mix_l, mix_r;
  logic mix_valid, fm_used, sync_used;
  logic wave_we;
  assign wave_we = bus_we && bus_addr[15];

  voice_engine #(.VOICES(VOICES)) u_eng (
    .clk(clk), .rst_n(rst_n), .sample_start(sample_start), .voice_start(voice_start),
    .voice_idx(voice_idx), .regs(eng_rd), .wb_we(eng_we), .wb(eng_wb),
    .wave_we(wave_we), .wave_waddr(bus_addr[WA-1:0]), .wave_wdata(bus_wdata[15:0]),
    .mix_l(mix_l), .mix_r(mix_r), .mix_valid(mix_valid), .fm_used(fm_used), .sync_used(sync_used));

  logic eq_done;
  s24_t eq_l, eq_r;
  param_eq #(.BANDS(6)) u_eq (
    .clk(clk), .rst_n(rst_n), .start(mix_valid), .in_l(mix_l), .in_r(mix_r),
    .coef(glob.eq), .done(eq_done), .out_l(eq_l), .out_r(eq_r));

  logic dl_done;
  s24_t dl_l, dl_r;
  delay_fb #(.DEPTH(4096)) u_dly (
    .clk(clk), .rst_n(rst_n), .en(eq_done), .in_l(eq_l), .in_r(eq_r), .len(glob.dly_len),
    .fb(glob.dly_fb), .done(dl_done), .out_l(dl_l), .out_r(dl_r), .busy_clr());

  s24_t g_l, g_r;
  master_gain u_gain (.in_l(dl_l), .in_r(dl_r), .gain_l(glob.gain_l), .gain_r(glob.gain_r),
                      .out_l(g_l), .out_r(g_r));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_l <= '0; out_r <= '0; out_valid <= 1'b0;
    end else begin
      out_valid <= dl_done;
      if (dl_done) begin
        out_l <= g_l;
        out_r <= g_r;
      end
    end
  end

  dac_if #(.CLKS_PER_SAMPLE(1024)) u_dac (
    .clk(clk), .rst_n(rst_n), .load(sample_start), .l(out_l), .r(out_r),
    .mclk(dac_mclk), .bclk(dac_bclk), .lrck(dac_lrck), .sdata(dac_sdata));
endmodule
