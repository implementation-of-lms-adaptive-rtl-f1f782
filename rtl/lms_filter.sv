// LMS adaptive FIR filter built on Vedic multipliers.
//
// Each clock with in_valid high takes one input sample x[n] and one desired
// response d[n] and runs one full step of the least-mean-squares algorithm:
//     y[n]     = sum_k w_k[n] * x[n-k]          (fir_filter)
//     e[n]     = d[n] - y[n]                    (lms_error, saturating)
//     w_k[n+1] = w_k[n] + mu * x[n-k] * e[n]    (lms_weight_update)
// The filter output, the error and the weight correction are all formed
// combinationally from the new sample, the delay line and the current
// weights, so the design accepts a new sample every clock; at the clock
// edge the delay line shifts, the weights take their new values and y[n]
// and e[n] are registered onto y_out and e_out, with out_valid one cycle
// after in_valid (latency 1, throughput 1 sample per clock). A clock with
// in_valid low changes nothing but clears out_valid.
//
// mu is the step size in the data's fixed-point format (DATA_W bits, FRAC_W
// of them fractional); setting it to zero freezes the weights and leaves a
// fixed FIR filter. weights shows the current tap weights, e.g. the
// identified impulse response in system identification. e_sat_out marks
// a registered error that was clipped. rst_n is active low and synchronous;
// it clears the delay line, the weights and the outputs.
//
// The algorithm, its three parts and the use of Vedic multipliers for every
// product are the reference design's; the fixed-point format, number of
// taps, single-cycle step, registered outputs and saturation of the error
// are this design's choices.
module lms_filter #(
  parameter int unsigned DATA_W = lms_pkg::DATA_W,
  parameter int unsigned FRAC_W = lms_pkg::FRAC_W,
  parameter int unsigned TAPS   = lms_pkg::TAPS
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] x_in,
  input  logic signed [DATA_W-1:0] d_in,
  input  logic signed [DATA_W-1:0] mu,
  output logic                     out_valid,
  output logic signed [DATA_W-1:0] y_out,
  output logic signed [DATA_W-1:0] e_out,
  output logic                     e_sat_out,
  output logic signed [DATA_W-1:0] weights [TAPS]
);

  logic signed [DATA_W-1:0]   taps [TAPS];
  logic signed [2*DATA_W-1:0] y_full;
  logic signed [DATA_W-1:0]   y, e;
  logic                       e_sat;

  fir_filter #(.DATA_W(DATA_W), .FRAC_W(FRAC_W), .TAPS(TAPS)) u_fir (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .x_in     (x_in),
    .coeff    (weights),
    .taps     (taps),
    .y_full   (y_full),
    .y        (y)
  );

  lms_error #(.DATA_W(DATA_W)) u_err (
    .d         (d_in),
    .y         (y),
    .e         (e),
    .saturated (e_sat)
  );

  lms_weight_update #(.DATA_W(DATA_W), .FRAC_W(FRAC_W), .TAPS(TAPS)) u_upd (
    .clk       (clk),
    .rst_n     (rst_n),
    .update_en (in_valid),
    .mu        (mu),
    .e         (e),
    .taps      (taps),
    .weights   (weights)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y_out     <= '0;
      e_out     <= '0;
      e_sat_out <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        y_out     <= y;
        e_out     <= e;
        e_sat_out <= e_sat;
      end
    end
  end

endmodule
