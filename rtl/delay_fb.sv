// delay_fb: variable-length stereo delay with feedback on the master path.
//
// A feedback comb per channel:  y[n] = x[n] + fb * y[n-D]
// D is set by the len register (1..DEPTH-1; 0 selects DEPTH), fb is signed
// Q1.17, signals are signed Q3.20 and the sum saturates. Each channel keeps
// its last DEPTH outputs in a circular buffer. On en the delayed words are
// read (synchronous RAM read); one clock later the outputs are computed,
// written to the buffer and done pulses, out_l/out_r holding the result
// until the next en. After reset the unit spends DEPTH clocks writing zeros
// into both buffers (busy_clr high, en ignored), so the delay starts
// silent. The comb structure and DEPTH are this design's choice.
module delay_fb
  import pw_pkg::*;
#(
  parameter int DEPTH = 4096
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  s24_t                     in_l,
  input  s24_t                     in_r,
  input  logic [$clog2(DEPTH)-1:0] len,
  input  s18_t                     fb,
  output logic                     done,
  output s24_t                     out_l,
  output s24_t                     out_r,
  output logic                     busy_clr
);
  localparam int AW = $clog2(DEPTH);

  s24_t mem_l [DEPTH];
  s24_t mem_r [DEPTH];
  logic [AW-1:0] wp;
  s24_t d_l, d_r, in_l_q, in_r_q;
  s18_t fb_q;
  logic busy;
  s24_t yl, yr;

  logic signed [41:0] pl, pr;
  always_comb begin
    pl = d_l * fb_q;
    pr = d_r * fb_q;
    yl = sat24(64'(in_l_q) + 64'(pl >>> 17));
    yr = sat24(64'(in_r_q) + 64'(pr >>> 17));
  end

  // clearing sweep after reset
  logic [AW-1:0] clr_addr;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy_clr <= 1'b1;
      clr_addr <= '0;
    end else if (busy_clr) begin
      clr_addr <= clr_addr + 1'b1;
      if (clr_addr == AW'(DEPTH - 1)) busy_clr <= 1'b0;
    end
  end

  // buffer: written with the new output, read D samples back
  always_ff @(posedge clk) begin
    if (busy_clr) begin
      mem_l[clr_addr] <= '0;
      mem_r[clr_addr] <= '0;
    end else if (en) begin
      d_l <= mem_l[wp - len];
      d_r <= mem_r[wp - len];
    end
    if (busy && !busy_clr) begin
      mem_l[wp] <= yl;
      mem_r[wp] <= yr;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp <= '0; busy <= 1'b0; done <= 1'b0; out_l <= '0; out_r <= '0;
      in_l_q <= '0; in_r_q <= '0; fb_q <= '0;
    end else begin
      done <= 1'b0;
      busy <= en && !busy_clr;
      if (en && !busy_clr) begin
        in_l_q <= in_l;
        in_r_q <= in_r;
        fb_q   <= fb;
      end
      if (busy) begin
        out_l <= yl;
        out_r <= yr;
        wp    <= wp + 1'b1;
        done  <= 1'b1;
      end
    end
  end
endmodule
