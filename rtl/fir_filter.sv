// Transversal (tapped-delay-line) FIR filter with Vedic multipliers.
//
// Computes y[n] = sum_{k=0}^{TAPS-1} h[k] * x[n-k]. The newest sample x[n]
// comes straight from x_in; the TAPS-1 older ones sit in a shift register
// that advances on every clock with in_valid set. Each tap has its own
// vedic_mul_signed, and the full 2*DATA_W-bit products are summed by a
// chain of 2*DATA_W-bit adders (wrapping on overflow), so the sum keeps all
// fractional bits until the single rescale at the output.
//
// Interface and timing: y and y_full are combinational in x_in, coeff and
// the delay line, so they are valid in the cycle the sample is presented;
// the sample is taken into the delay line at the rising clock edge with
// in_valid high. The tap-input vector u[n] (taps[0] = x[n], taps[k] =
// x[n-k]) is brought out for the LMS weight update. rst_n (active low,
// synchronous) clears the delay line.
//
// The filter equation and its tapped-delay-line structure are those of the
// reference design; the fixed-point format, the reset and the valid strobe
// are this design's choice.
module fir_filter #(
  parameter int unsigned DATA_W = lms_pkg::DATA_W,
  parameter int unsigned FRAC_W = lms_pkg::FRAC_W,
  parameter int unsigned TAPS   = lms_pkg::TAPS
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  logic signed [DATA_W-1:0]   x_in,
  input  logic signed [DATA_W-1:0]   coeff [TAPS],
  output logic signed [DATA_W-1:0]   taps  [TAPS],
  output logic signed [2*DATA_W-1:0] y_full,
  output logic signed [DATA_W-1:0]   y
);

  logic signed [DATA_W-1:0]   x_dly [TAPS];     // x_dly[k] = x[n-k], k >= 1
  logic signed [2*DATA_W-1:0] prod  [TAPS];
  logic signed [2*DATA_W-1:0] acc;

  // Tap-input vector: newest sample first.
  always_comb begin
    taps[0] = x_in;
    for (int k = 1; k < TAPS; k++) taps[k] = x_dly[k];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS; k++) x_dly[k] <= '0;
    end else if (in_valid) begin
      for (int k = 1; k < TAPS; k++) x_dly[k] <= taps[k-1];
      x_dly[0] <= '0;                           // unused slot, kept cleared
    end
  end

  for (genvar k = 0; k < TAPS; k++) begin : g_tap
    vedic_mul_signed #(.W(DATA_W)) u_mul (
      .a (coeff[k]),
      .b (taps[k]),
      .p (prod[k])
    );
  end

  always_comb begin
    acc = '0;
    for (int k = 0; k < TAPS; k++) acc = acc + prod[k];
  end

  assign y_full = acc;
  assign y      = acc[FRAC_W +: DATA_W];    // (acc >>> FRAC_W), low DATA_W bits

endmodule
