// wave_ram: on-chip wavetable memory of one oscillator unit.
//
// 16-bit words, NUM_WAVES waveforms of WAVE_WORDS words each, stored one
// after the other. Inside a waveform the 12 mip tables follow each other
// from the most detailed (2048 samples per period) to the coarsest (16
// samples per period); see pw_pkg::mip_base. Two independent synchronous
// read ports return their words one clock after the address, so the
// oscillator obtains two neighbouring samples in one clock, as a dual-port
// block RAM does. A third, write-only port lets the host load the tables.
// Host loading and the separate write port are this design's choice.
module wave_ram #(
  parameter int NUM_WAVES  = 4,
  parameter int WAVE_WORDS = 6176,
  parameter int DW         = 16,
  parameter int AW         = 15
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic [AW-1:0] raddr_a,
  input  logic [AW-1:0] raddr_b,
  output logic [DW-1:0] rdata_a,
  output logic [DW-1:0] rdata_b
);
  localparam int DEPTH = NUM_WAVES * WAVE_WORDS;

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && waddr < AW'(DEPTH)) mem[waddr] <= wdata;
    rdata_a <= mem[raddr_a];
    rdata_b <= mem[raddr_b];
  end
endmodule
