// sinc_interp: 16x interpolating sinc^3 filter (cascaded integrator-comb), 176.4 kHz ->
// 2.8224 MHz.
//
// Realises H(z) = ((1 - z^-R) / (R (1 - z^-1)))^N on the zero-stuffed input without a
// multiplier: N comb stages (y = x - x[-1]) run at the input rate, the result is inserted
// once every R clocks (zeros in between), and N integrators run at the master clock. The
// wrap-around of the two's-complement integrators cancels, so they need only
// DW + N*log2(R) bits. The cascade has gain R^(N-1) for a zero-stuffed signal; the output is
// shifted right by (N-1)*log2(R), rounded and saturated so the passband gain is 1.
//
// The 16x factor and the sinc form are the source's; N=3 is read from the source's plotted
// response (first sidelobe at about -39.5 dB, three times the -13 dB of a single sinc).
// Interface and timing: x is taken when x_valid is high, which must happen exactly once
// every R clocks; y is a new registered sample on every clock.
module sinc_interp #(
  parameter int DW = 24,
  parameter int R  = 16,
  parameter int N  = 3
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 x_valid,
  input  logic signed [DW-1:0] x,
  output logic signed [DW-1:0] y,
  output logic                 sat_evt
);
  localparam int LR = $clog2(R);
  localparam int W  = DW + N * LR + 1;
  localparam int SH = (N - 1) * LR;
  localparam logic signed [W-1:0] YMAX = W'((64'sd1 <<< (DW - 1)) - 1);
  localparam logic signed [W-1:0] YMIN = -W'(64'sd1 <<< (DW - 1));

  logic signed [W-1:0] cdly  [N];     // comb delay registers
  logic signed [W-1:0] cval  [N+1];   // comb chain values
  logic signed [W-1:0] integ [N];
  logic signed [W-1:0] stuff;         // integrator input: comb output or zero
  logic signed [W-1:0] shaped;

  always_comb begin
    cval[0] = W'(x);
    for (int k = 0; k < N; k++) cval[k+1] = cval[k] - cdly[k];
    shaped = (integ[N-1] + (W'(1) <<< (SH - 1))) >>> SH;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) begin
        cdly[k]  <= '0;
        integ[k] <= '0;
      end
      stuff   <= '0;
      y       <= '0;
      sat_evt <= 1'b0;
    end else begin
      if (x_valid) begin
        for (int k = 0; k < N; k++) cdly[k] <= cval[k];
        stuff <= cval[N];
      end else begin
        stuff <= '0;
      end
      integ[0] <= integ[0] + stuff;
      for (int k = 1; k < N; k++) integ[k] <= integ[k] + integ[k-1];
      sat_evt <= 1'b0;
      if (shaped > YMAX) begin
        y <= DW'(YMAX);
        sat_evt <= 1'b1;
      end else if (shaped < YMIN) begin
        y <= DW'(YMIN);
        sat_evt <= 1'b1;
      end else begin
        y <= DW'(shaped);
      end
    end
  end
endmodule
