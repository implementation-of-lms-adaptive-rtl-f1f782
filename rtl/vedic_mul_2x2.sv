// 2 x 2 bit Vedic multiplier cell, the leaf of vedic_mul.
//
// Urdhva Tiryagbhyam ("vertically and crosswise") on two-bit operands: the
// vertical product a0*b0 gives bit 0, the two crosswise products a1*b0 and
// a0*b1 are added by a half adder for bit 1, and the second vertical product
// a1*b1 is added to that carry by a second half adder for bits 2 and 3.
// Four AND gates and two half adders; purely combinational.
module vedic_mul_2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);

  logic cross0, cross1, vert1, carry1;

  always_comb begin
    cross0 = a[1] & b[0];
    cross1 = a[0] & b[1];
    vert1  = a[1] & b[1];
    carry1 = cross0 & cross1;
    p[0]   = a[0] & b[0];
    p[1]   = cross0 ^ cross1;
    p[2]   = vert1 ^ carry1;
    p[3]   = vert1 & carry1;
  end

endmodule
