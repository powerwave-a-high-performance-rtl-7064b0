// frame_timer: sample-frame and voice-slot timing of the synthesizer.
//
// The chip runs from one master clock of 98.304 MHz, which is 1024 times
// the 96 kHz output sample rate (and 8 times the 12.288 MHz DAC master
// clock). A free-running counter of CLKS_PER_SAMPLE clocks defines a sample
// frame; the frame is cut into VOICES equal voice slots (64 clocks each at
// the defaults), in which the shared voice datapath computes one voice after
// the other. Every SAMPLES_PER_IRQ frames (96, i.e. every millisecond) a
// one-clock irq_pulse asks the control processor to update the registers.
//
// Outputs (all registered, valid in the same clock):
//   sample_start  pulse in the first clock of each frame
//   voice_start   pulse in the first clock of each voice slot
//   voice_idx     voice of the current slot
//   irq_pulse     pulse in the first clock of every SAMPLES_PER_IRQ-th frame
// The equal-length slots are this design's choice.
module frame_timer #(
  parameter int CLKS_PER_SAMPLE = 1024,
  parameter int VOICES          = 16,
  parameter int SAMPLES_PER_IRQ = 96
) (
  input  logic                      clk,
  input  logic                      rst_n,
  output logic                      sample_start,
  output logic                      voice_start,
  output logic [$clog2(VOICES)-1:0] voice_idx,
  output logic                      irq_pulse
);
  localparam int SLOT = CLKS_PER_SAMPLE / VOICES;

  logic [$clog2(CLKS_PER_SAMPLE)-1:0] cnt;
  logic [$clog2(SLOT)-1:0]            slot_cnt;
  logic [$clog2(SAMPLES_PER_IRQ)-1:0] smp_cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt      <= '0;
      slot_cnt <= '0;
      smp_cnt  <= '0;
      voice_idx <= '0;
    end else begin
      if (cnt == $bits(cnt)'(CLKS_PER_SAMPLE - 1)) begin
        cnt       <= '0;
        slot_cnt  <= '0;
        voice_idx <= '0;
        smp_cnt   <= (smp_cnt == $bits(smp_cnt)'(SAMPLES_PER_IRQ - 1)) ? '0 : smp_cnt + 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
        if (slot_cnt == $bits(slot_cnt)'(SLOT - 1)) begin
          slot_cnt  <= '0;
          voice_idx <= voice_idx + 1'b1;
        end else begin
          slot_cnt <= slot_cnt + 1'b1;
        end
      end
    end
  end

  assign sample_start = rst_n && (cnt == '0);
  assign voice_start  = rst_n && (slot_cnt == '0);
  assign irq_pulse    = sample_start && (smp_cnt == '0);
endmodule
