// dac_if: synchronous serial port to the 24-bit stereo audio DAC.
//
// Clocks derived from the master clock (1024 clocks per 96 kHz frame):
//   mclk = clk/8  (12.288 MHz, 256 fs, the DAC master clock)
//   bclk = clk/16 (6.144 MHz, 64 bit clocks per frame, 32 per channel)
//   lrck = fs, low for the left and high for the right channel
// The data format is I2S: each 24-bit word is sent MSB first, starting one
// bit clock after the lrck edge, changing on the falling edge of bclk; the
// 7 remaining bit slots carry zeros. load (a pulse once per frame) captures
// l and r and restarts the frame, so the words are sent in the frame that
// follows load. The I2S format is this design's choice; the rates follow the
// clocking of the synthesizer.
module dac_if
  import pw_pkg::*;
#(
  parameter int CLKS_PER_SAMPLE = 1024
) (
  input  logic clk,
  input  logic rst_n,
  input  logic load,
  input  s24_t l,
  input  s24_t r,
  output logic mclk,
  output logic bclk,
  output logic lrck,
  output logic sdata
);
  localparam int CW = $clog2(CLKS_PER_SAMPLE);   // 10: 6 bit-slot bits + 4
  logic [CW-1:0] cnt;
  s24_t          wl, wr;
  logic [4:0]    slot;                           // bit slot inside a channel

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt <= '0; wl <= '0; wr <= '0;
    end else if (load) begin
      cnt <= '0; wl <= l; wr <= r;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end

  assign mclk = cnt[2];
  assign bclk = cnt[3];
  assign lrck = cnt[CW-1];
  assign slot = cnt[CW-2 -: 5];

  always_comb begin
    s24_t w;
    w = lrck ? wr : wl;
    if (slot >= 5'd1 && slot <= 5'd24) sdata = w[5'd24 - slot];
    else                               sdata = 1'b0;
  end
endmodule
