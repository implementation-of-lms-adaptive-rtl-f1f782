// Estimation error of the LMS filter: e[n] = d[n] - y[n].
//
// The difference is formed one bit wider than the operands and then
// saturated to the DATA_W-bit range, so that a filter output far from the
// desired response gives the largest error of the right sign instead of a
// wrapped value of the wrong sign (which would drive the weights away from
// the solution). `saturated` flags a clipped result. Combinational.
//
// The subtraction is the reference design's; saturation is this design's
// choice.
module lms_error #(
  parameter int unsigned DATA_W = lms_pkg::DATA_W
) (
  input  logic signed [DATA_W-1:0] d,
  input  logic signed [DATA_W-1:0] y,
  output logic signed [DATA_W-1:0] e,
  output logic                     saturated
);

  localparam logic signed [DATA_W-1:0] MAX_POS = {1'b0, {(DATA_W-1){1'b1}}};
  localparam logic signed [DATA_W-1:0] MAX_NEG = {1'b1, {(DATA_W-1){1'b0}}};

  logic signed [DATA_W:0] diff;

  always_comb begin
    diff = {d[DATA_W-1], d} - {y[DATA_W-1], y};
    saturated = diff[DATA_W] != diff[DATA_W-1];
    if (!saturated)      e = diff[DATA_W-1:0];
    else if (diff[DATA_W]) e = MAX_NEG;
    else                 e = MAX_POS;
  end

endmodule
