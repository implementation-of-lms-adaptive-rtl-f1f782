// Tap-weight register and LMS adaptation: w_k[n+1] = w_k[n] + mu*u[n-k]*e[n].
//
// One vedic_mul_signed scales the error by the step size (mu*e, rescaled to
// sample format) and one per tap multiplies that by the tap input u[n-k];
// each rescaled correction is added to its weight at the rising clock edge
// when update_en is high. Scaling the error once and sharing it across the
// taps costs TAPS+1 multipliers instead of 2*TAPS.
//
// Interface and timing: mu is a fixed-point step size in the same
// DATA_W/FRAC_W format as the data (it is expected to lie between 0 and
// 2/(TAPS*Smax), Smax being the largest spectral power of the input).
// weights shows the current w[n]; the new values appear one clock after
// update_en. rst_n (active low, synchronous) clears all weights, which is
// the start state of the adaptation. Weight additions wrap on overflow.
//
// The recursion is the reference design's; the once-shared mu*e product,
// the fixed-point format and the zero start are this design's choice.
module lms_weight_update #(
  parameter int unsigned DATA_W = lms_pkg::DATA_W,
  parameter int unsigned FRAC_W = lms_pkg::FRAC_W,
  parameter int unsigned TAPS   = lms_pkg::TAPS
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     update_en,
  input  logic signed [DATA_W-1:0] mu,
  input  logic signed [DATA_W-1:0] e,
  input  logic signed [DATA_W-1:0] taps    [TAPS],
  output logic signed [DATA_W-1:0] weights [TAPS]
);

  logic signed [2*DATA_W-1:0] mu_e_full;
  logic signed [DATA_W-1:0]   mu_e;
  logic signed [2*DATA_W-1:0] corr_full  [TAPS];
  logic signed [DATA_W-1:0]   corr       [TAPS];

  vedic_mul_signed #(.W(DATA_W)) u_mu_e (
    .a (mu),
    .b (e),
    .p (mu_e_full)
  );

  // Rescale to sample format: (full >>> FRAC_W), low DATA_W bits.
  assign mu_e = mu_e_full[FRAC_W +: DATA_W];

  for (genvar k = 0; k < TAPS; k++) begin : g_tap
    vedic_mul_signed #(.W(DATA_W)) u_corr (
      .a (taps[k]),
      .b (mu_e),
      .p (corr_full[k])
    );
    assign corr[k] = corr_full[k][FRAC_W +: DATA_W];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS; k++) weights[k] <= '0;
    end else if (update_en) begin
      for (int k = 0; k < TAPS; k++) weights[k] <= weights[k] + corr[k];
    end
  end

endmodule
