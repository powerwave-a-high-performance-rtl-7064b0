// ctrl_regs: memory-mapped control registers of the synthesizer.
//
// The control processor writes all sound parameters here once per
// millisecond; the voice engine reads the set of the voice it is computing
// and writes back the values it advances every sample. Word map of the
// host bus (bus_addr, 16 bits; addresses with bit 15 set belong to the
// wavetable RAM and are ignored here):
//   bit 10 = 0: voice page, voice = addr[8:5], register = addr[4:0]
//      5*o+0 phase ("position") of oscillator o (0..3), 24 bits
//      5*o+1 speed, 24 bits          5*o+2 amplitude, Q1.17
//      5*o+3 delta_speed, signed 24  5*o+4 delta_amp, Q1.17
//      20 mode: [7:0] waveform of osc 1..4 (2 bits each, osc 1 lowest),
//               [8] FM 2->1, [9] FM 4->3, [10] sync 2->1, [11] sync 4->3
//      21 Moog g, 22 Moog feedback, 23..26 stage gains 1..4 (Q3.20)
//      27 pan left, 28 pan right (Q1.17)
//   bit 10 = 1: global page, register = addr[5:0]
//      0..29 EQ coefficients, band b at 5*b + {b0,b1,b2,a1,a2} (Q3.20)
//      32 delay length, 33 delay feedback (Q1.17), 34/35 main gain L/R
//      36 interrupt: reads 1 while pending, any write clears it
// Reads return the word one clock after the address. The engine port reads
// combinationally (eng_voice -> eng_rd) and writes phase, speed and
// amplitude of all four oscillators of eng_voice with eng_we; a host write
// to the same word since the engine latched the voice (eng_start) wins:
// such a word is marked and skipped by the write-back, so a processor update
// is never lost to the engine's copy. irq_pulse sets irq_pending.
// Register layout and bus protocol are this design's choice; the set of
// parameters is the one the synthesizer's software provides.
module ctrl_regs
  import pw_pkg::*;
#(
  parameter int VOICES = pw_pkg::VOICES
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [15:0]               bus_addr,
  input  logic                      bus_we,
  input  logic [31:0]               bus_wdata,
  output logic [31:0]               bus_rdata,
  input  logic [$clog2(VOICES)-1:0] eng_voice,
  input  logic                      eng_start,
  output voice_regs_t               eng_rd,
  input  logic                      eng_we,
  input  osc_state_t [OSCS-1:0]     eng_wb,
  output glob_regs_t                glob,
  input  logic                      irq_pulse,
  output logic                      irq_pending
);
  voice_regs_t vr [VOICES];
  // host writes to the engine's current voice since eng_start:
  // [o][0] phase, [o][1] speed, [o][2] amp
  logic [OSCS-1:0][2:0] dirty;

  logic       is_voice, is_glob;
  logic [3:0] a_voice;
  logic [4:0] a_reg;
  logic [5:0] a_greg;
  assign is_voice = !bus_addr[15] && !bus_addr[10];
  assign is_glob  = !bus_addr[15] &&  bus_addr[10];
  assign a_voice  = bus_addr[8:5];
  assign a_reg    = bus_addr[4:0];
  assign a_greg   = bus_addr[5:0];

  assign eng_rd = vr[eng_voice];

  function automatic logic [31:0] sx24(input s24_t v); return 32'(v); endfunction
  function automatic logic [31:0] sx18(input s18_t v); return 32'(v); endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int v = 0; v < VOICES; v++) vr[v] <= '0;
      glob        <= '0;
      irq_pending <= 1'b0;
      bus_rdata   <= '0;
      dirty       <= '0;
    end else begin
      // engine write-back first, so that a host write below overrides it
      if (eng_we)
        for (int o = 0; o < OSCS; o++) begin
          if (!dirty[o][0]) vr[eng_voice].osc[o].phase <= eng_wb[o].phase;
          if (!dirty[o][1]) vr[eng_voice].osc[o].speed <= eng_wb[o].speed;
          if (!dirty[o][2]) vr[eng_voice].osc[o].amp   <= eng_wb[o].amp;
        end
      if (eng_start) dirty <= '0;
      if (bus_we && is_voice && a_voice == 4'(eng_voice) && a_reg < 5'd20 && (a_reg % 5) < 3)
        dirty[a_reg / 5][a_reg % 5] <= 1'b1;
      if (irq_pulse) irq_pending <= 1'b1;
      if (bus_we && is_voice && 32'(a_voice) < VOICES) begin
        if (a_reg < 5'd20) begin
          unique case (a_reg % 5)
            0: vr[a_voice].osc[a_reg / 5].phase  <= bus_wdata[23:0];
            1: vr[a_voice].osc[a_reg / 5].speed  <= bus_wdata[23:0];
            2: vr[a_voice].osc[a_reg / 5].amp    <= bus_wdata[17:0];
            3: vr[a_voice].osc[a_reg / 5].dspeed <= bus_wdata[23:0];
            default: vr[a_voice].osc[a_reg / 5].damp <= bus_wdata[17:0];
          endcase
        end else begin
          case (a_reg)
            5'(REG_MODE): vr[a_voice].mode <= bus_wdata[11:0];
            5'(REG_G):    vr[a_voice].g    <= bus_wdata[23:0];
            5'(REG_FB):   vr[a_voice].fb   <= bus_wdata[23:0];
            5'(REG_PANL): vr[a_voice].pan_l <= bus_wdata[17:0];
            5'(REG_PANR): vr[a_voice].pan_r <= bus_wdata[17:0];
            default:
              if (a_reg >= 5'(REG_GAIN0) && a_reg < 5'(REG_GAIN0 + 4))
                vr[a_voice].gain[a_reg - 5'(REG_GAIN0)] <= bus_wdata[23:0];
          endcase
        end
      end
      if (bus_we && is_glob) begin
        if (a_greg < 6'd30) glob.eq[a_greg / 5][a_greg % 5] <= bus_wdata[23:0];
        else case (a_greg)
          6'(GREG_DLEN):  glob.dly_len <= bus_wdata[11:0];
          6'(GREG_DFB):   glob.dly_fb  <= bus_wdata[17:0];
          6'(GREG_GAINL): glob.gain_l  <= bus_wdata[17:0];
          6'(GREG_GAINR): glob.gain_r  <= bus_wdata[17:0];
          6'(GREG_IRQ):   irq_pending  <= 1'b0;
          default: ;
        endcase
      end
      // read-back
      bus_rdata <= '0;
      if (is_voice && 32'(a_voice) < VOICES) begin
        if (a_reg < 5'd20) begin
          unique case (a_reg % 5)
            0: bus_rdata <= 32'(vr[a_voice].osc[a_reg / 5].phase);
            1: bus_rdata <= 32'(vr[a_voice].osc[a_reg / 5].speed);
            2: bus_rdata <= sx18(vr[a_voice].osc[a_reg / 5].amp);
            3: bus_rdata <= sx24(vr[a_voice].osc[a_reg / 5].dspeed);
            default: bus_rdata <= sx18(vr[a_voice].osc[a_reg / 5].damp);
          endcase
        end else begin
          case (a_reg)
            5'(REG_MODE): bus_rdata <= 32'(vr[a_voice].mode);
            5'(REG_G):    bus_rdata <= sx24(vr[a_voice].g);
            5'(REG_FB):   bus_rdata <= sx24(vr[a_voice].fb);
            5'(REG_PANL): bus_rdata <= sx18(vr[a_voice].pan_l);
            5'(REG_PANR): bus_rdata <= sx18(vr[a_voice].pan_r);
            default:
              if (a_reg >= 5'(REG_GAIN0) && a_reg < 5'(REG_GAIN0 + 4))
                bus_rdata <= sx24(vr[a_voice].gain[a_reg - 5'(REG_GAIN0)]);
          endcase
        end
      end else if (is_glob) begin
        if (a_greg < 6'd30) bus_rdata <= sx24(glob.eq[a_greg / 5][a_greg % 5]);
        else case (a_greg)
          6'(GREG_DLEN):  bus_rdata <= 32'(glob.dly_len);
          6'(GREG_DFB):   bus_rdata <= sx18(glob.dly_fb);
          6'(GREG_GAINL): bus_rdata <= sx18(glob.gain_l);
          6'(GREG_GAINR): bus_rdata <= sx18(glob.gain_r);
          6'(GREG_IRQ):   bus_rdata <= 32'(irq_pending);
          default: ;
        endcase
      end
    end
  end
endmodule
