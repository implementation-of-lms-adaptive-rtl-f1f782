// Two's-complement W x W multiplier around the unsigned Vedic core.
//
// Both operands are turned into magnitudes (negated when their sign bit is
// set), the magnitudes are multiplied by vedic_mul, and the 2W-bit product
// is negated again when exactly one operand was negative. The magnitude of
// the most negative input, 2**(W-1), still fits the W-bit unsigned operand,
// so every input pair gives the exact product. Combinational, no registers.
//
// The filter's samples, weights and error are signed, which the Vedic core
// is not; this sign-magnitude wrapper is this design's choice.
module vedic_mul_signed #(
  parameter int unsigned W = lms_pkg::DATA_W
) (
  input  logic signed [W-1:0]   a,
  input  logic signed [W-1:0]   b,
  output logic signed [2*W-1:0] p
);

  logic [W-1:0]   mag_a, mag_b;
  logic [2*W-1:0] mag_p;
  logic           negative;

  always_comb begin
    mag_a    = a[W-1] ? W'(-a) : W'(a);
    mag_b    = b[W-1] ? W'(-b) : W'(b);
    negative = a[W-1] ^ b[W-1];
  end

  vedic_mul #(.N(W)) u_core (
    .a (mag_a),
    .b (mag_b),
    .p (mag_p)
  );

  assign p = negative ? -signed'(mag_p) : signed'(mag_p);

endmodule
