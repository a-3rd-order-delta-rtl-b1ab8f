// dsm3_ciff: third-order, 15-level delta-sigma modulator, cascade of integrators with
// feed-forward (CIFF) and one local resonator feedback.
//
// The modulator turns the 24-bit 2.8224 MHz interpolator output into a 15-level code
// (-7..+7) whose quantisation noise is pushed out of the 0..20 kHz band. Difference
// equations, in units of one quantiser step (x1..x3 are the three accumulators, u the scaled
// input, v the code):
//   y  = a1*x1 + a2*x2 + a3*x3 + b4*u,     v = clamp(round(y), -7, +7)
//   x1 <= x1 + c1*(b1*u - v)
//   x2 <= x2 + c2*x1 - g1*x3
//   x3 <= x3 + c3*x2
// with a1 = a2 = 1/2+1/16, a3 = 1/2-1/16, b1 = 1, b4 = 1/2, c1 = 2, c2 = 1/2, c3 = 1/4 and
// g1 = 1/256+1/512; every coefficient is a shift or a sum of two shifts. The -g1 path closes
// a resonator around the second and third accumulators and places a pair of noise-transfer
// zeros near 17 kHz, close to the band edge.
//
// Word lengths: accumulator 1 keeps N1 = 13 fraction bits, accumulator 2 N2 = 9 and
// accumulator 3 N3 = 6; each increment is truncated (floor) to its accumulator's LSB.
// Integer bits and saturation of the accumulators are this design's choice, sized from
// simulation with margin. The input scaling (full-scale 24-bit input = +-IN_GAIN steps, i.e.
// +-6 of the 7 levels each side) is also this design's choice.
// The coefficients, order, level count and fraction-bit counts are the source's; the exact
// placement of c1 and b1 in the first integrator's input is this design's reading.
//
// Timing: one input per clock, v registered (one clock of latency from u).
module dsm3_ciff
  import dac_pkg::*;
#(
  parameter int N1      = 13,  // fraction bits, accumulator 1
  parameter int N2      = 9,   // fraction bits, accumulator 2
  parameter int N3      = 6,   // fraction bits, accumulator 3
  parameter int I1      = 5,   // integer bits incl. sign, accumulator 1
  parameter int I2      = 4,
  parameter int I3      = 6,
  parameter int IN_GAIN = 6,   // quantiser steps per full-scale input
  parameter int VMAX    = 7    // largest code magnitude (15 levels)
) (
  input  logic    clk,
  input  logic    rst_n,
  input  sample_t u,
  output code_t   v,
  output logic    clip_evt,  // quantiser input beyond the outermost level
  output logic    acc_sat    // an accumulator hit its range limit
);
  localparam int W1 = N1 + I1;
  localparam int W2 = N2 + I2;
  localparam int W3 = N3 + I3;
  localparam int WY = N1 + 4 + 8;   // y at N1+4 fraction bits, 8 integer bits

  logic signed [W1-1:0] x1;
  logic signed [W2-1:0] x2;
  logic signed [W3-1:0] x3;

  logic signed [W1+2:0] u1;          // scaled input at N1 fraction bits
  logic signed [WY-1:0] y;           // quantiser input at N1+4 fraction bits
  logic signed [WY-1:0] yr;          // round(y)
  logic signed [4:0]    vq;
  logic signed [W1+3:0] x1_nx;
  logic signed [W1+N3+6:0] t2;       // c2*x1 - g1*x3 at N2+N3 fraction bits
  logic signed [W2+1:0] x2_nx;
  logic signed [W3+1:0] x3_nx;

  function automatic logic signed [W1-1:0] sat1(input logic signed [W1+3:0] a);
    if (a > (W1+4)'((1 <<< (W1 - 1)) - 1)) return W1'((1 <<< (W1 - 1)) - 1);
    if (a < -(W1+4)'(1 <<< (W1 - 1)))      return W1'(-(1 <<< (W1 - 1)));
    return W1'(a);
  endfunction
  function automatic logic signed [W2-1:0] sat2(input logic signed [W2+1:0] a);
    if (a > (W2+2)'((1 <<< (W2 - 1)) - 1)) return W2'((1 <<< (W2 - 1)) - 1);
    if (a < -(W2+2)'(1 <<< (W2 - 1)))      return W2'(-(1 <<< (W2 - 1)));
    return W2'(a);
  endfunction
  function automatic logic signed [W3-1:0] sat3(input logic signed [W3+1:0] a);
    if (a > (W3+2)'((1 <<< (W3 - 1)) - 1)) return W3'((1 <<< (W3 - 1)) - 1);
    if (a < -(W3+2)'(1 <<< (W3 - 1)))      return W3'(-(1 <<< (W3 - 1)));
    return W3'(a);
  endfunction

  always_comb begin
    // u1 = u * IN_GAIN / 2^(SAMPLE_W-1) in units of 2^-N1
    u1 = (W1+3)'((48'(u) * 48'(IN_GAIN)) >>> (SAMPLE_W - 1 - N1));
    // y = 9/16 x1 + 9/16 x2 + 7/16 x3 + 1/2 u, exact at N1+4 fraction bits
    y  = WY'(9) * WY'(x1)
       + ((WY'(9) * WY'(x2)) <<< (N1 - N2))
       + ((WY'(7) * WY'(x3)) <<< (N1 - N3))
       + (WY'(u1) <<< 3);
    yr = (y + (WY'(1) <<< (N1 + 3))) >>> (N1 + 4);
    if (yr > WY'(VMAX))       vq = 5'(VMAX);
    else if (yr < -WY'(VMAX)) vq = -5'(VMAX);
    else                      vq = 5'(yr);
    // x1 <= x1 + 2*(u - v)
    x1_nx = (W1+4)'(x1) + (((W1+4)'(u1) - ((W1+4)'(vq) <<< N1)) <<< 1);
    // c2*x1 at N2+N3 fraction bits: x1 * 2^(N2+N3-N1) / 2 ; g1*x3 = 3*x3 * 2^(N2+N3-N3) / 2^9
    t2    = ((W1+N3+7)'(x1) <<< (N2 + N3 - N1 - 1))
          - (((W1+N3+7)'(3) * (W1+N3+7)'(x3)) <<< (N2 - 9));
    x2_nx = (W2+2)'(x2) + (W2+2)'(t2 >>> N3);
    // x3 <= x3 + x2/4 : x2 at N2 bits -> /4 -> N2+2 bits -> truncate to N3
    x3_nx = (W3+2)'(x3) + (W3+2)'(x2 >>> (N2 + 2 - N3));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x1       <= '0;
      x2       <= '0;
      x3       <= '0;
      v        <= '0;
      clip_evt <= 1'b0;
      acc_sat  <= 1'b0;
    end else begin
      x1       <= sat1(x1_nx);
      x2       <= sat2(x2_nx);
      x3       <= sat3(x3_nx);
      v        <= code_t'(vq);
      clip_evt <= (yr > WY'(VMAX)) || (yr < -WY'(VMAX));
      acc_sat  <= (sat1(x1_nx) != W1'(x1_nx)) || (sat2(x2_nx) != W2'(x2_nx))
               || (sat3(x3_nx) != W3'(x3_nx));
    end
  end
endmodule
