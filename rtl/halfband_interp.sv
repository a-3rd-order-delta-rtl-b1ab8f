// halfband_interp: 2x interpolating half-band FIR filter in polyphase, transposed form.
//
// A half-band filter of 4K-1 taps has the centre tap 1/2 and, apart from it, non-zero taps
// only at odd distances from the centre; these 2K taps are symmetric, so K distinct
// coefficients COEF[0..K-1] (outermost first) describe the whole filter. For 2x
// interpolation the zero-stuffed input never needs a multiplication by a zero sample, so
// the filter splits into two phases computed at the input rate:
//   even output  y[2m]   = sum_{i=0}^{2K-1} c_i * x[m-i],  c = COEF[0..K-1], COEF[K-1..0]
//   odd output   y[2m+1] = 1/2 * x[m-K+1]
// Both are scaled by 2 so the interpolator keeps unity passband gain. The even phase is a
// transposed-form chain: each new sample is multiplied by the K coefficients only once and
// the products are added into a chain of 2K-1 partial-sum registers, the outer coefficient
// entering at both ends. The odd phase is a plain delay line of K samples (the centre tap is
// a one-bit shift).
//
// Interface and timing: x is taken when x_valid is high; input samples must be at least
// 2*OUT_SPACING clocks apart. The even output is registered in the clock of x_valid
// (y_valid high in the next clock), the odd output OUT_SPACING clocks later, giving an
// evenly spaced output stream at twice the input rate. Outputs are rounded to nearest and
// saturated to DW bits; the partial sums keep all COEF_FRAC fraction bits. Coefficient
// multiplications are by constants, which synthesis reduces to shift-and-add networks.
module halfband_interp #(
  parameter int DW          = 24,
  parameter int K           = 3,
  parameter int CF          = 16,
  parameter int COEF [K]    = '{738, -3997, 19669},
  parameter int OUT_SPACING = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 x_valid,
  input  logic signed [DW-1:0] x,
  output logic                 y_valid,
  output logic signed [DW-1:0] y,
  output logic                 y_phase,  // 0: even (filtered) output, 1: odd (centre tap)
  output logic                 sat_evt   // an output was clipped to the DW-bit range
);
  localparam int AW = DW + CF + 6;
  localparam int TW = $clog2(OUT_SPACING + 1);
  localparam logic signed [AW-1:0] YMAX = AW'((64'sd1 <<< (DW - 1)) - 1);
  localparam logic signed [AW-1:0] YMIN = -AW'(64'sd1 <<< (DW - 1));

  logic signed [AW-1:0] prod  [K];
  logic signed [AW-1:0] psum  [2*K-1];
  logic signed [DW-1:0] dline [K];
  logic signed [AW-1:0] even_full, even_rnd;
  logic [TW-1:0]        tmr;

  function automatic int tap_idx(input int i);
    return (i < K) ? i : 2 * K - 1 - i;
  endfunction

  always_comb begin
    for (int j = 0; j < K; j++) prod[j] = AW'(x) * AW'(COEF[j]);
    even_full = prod[0] + psum[0];
    // x2 gain and round-to-nearest: drop CF-1 fraction bits
    even_rnd  = (even_full + (AW'(1) <<< (CF - 2))) >>> (CF - 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 2 * K - 1; i++) psum[i] <= '0;
      for (int i = 0; i < K; i++) dline[i] <= '0;
      tmr     <= '0;
      y       <= '0;
      y_valid <= 1'b0;
      y_phase <= 1'b0;
      sat_evt <= 1'b0;
    end else begin
      y_valid <= 1'b0;
      sat_evt <= 1'b0;
      if (x_valid) begin
        for (int i = 0; i < 2 * K - 2; i++) psum[i] <= prod[tap_idx(i + 1)] + psum[i + 1];
        psum[2*K-2] <= prod[0];
        dline[0] <= x;
        for (int i = 1; i < K; i++) dline[i] <= dline[i - 1];
        if (even_rnd > YMAX) begin
          y <= DW'(YMAX);
          sat_evt <= 1'b1;
        end else if (even_rnd < YMIN) begin
          y <= DW'(YMIN);
          sat_evt <= 1'b1;
        end else begin
          y <= DW'(even_rnd);
        end
        y_valid <= 1'b1;
        y_phase <= 1'b0;
        tmr     <= TW'(OUT_SPACING);
      end else if (tmr != '0) begin
        tmr <= tmr - TW'(1);
        if (tmr == TW'(1)) begin
          y       <= dline[K-1];
          y_valid <= 1'b1;
          y_phase <= 1'b1;
        end
      end
    end
  end
endmodule
