// Unsigned N x N Vedic multiplier (Urdhva Tiryagbhyam, hierarchical form).
//
// The operands are cut into 2-bit digits and every digit pair is multiplied
// by a vedic_mul_2x2 cell. Each following level doubles the digit size s:
// the product of two 2s-bit digits is formed from the four s-bit digit
// products of the level below as
//     lo*lo + ((hi*lo + lo*hi) << s) + (hi*hi << 2s),
// i.e. the vertical products at the ends and the two crosswise products in
// the middle, added by three adders. After log2(N) levels a single N x N
// product remains. The whole array works in parallel; there are no
// registers, so the product is valid in the same cycle as the operands.
//
// That the multiplier is a Vedic one is the reference design's; this
// particular power-of-two hierarchy is the common textbook construction and
// is this design's choice. N must be a power of two, at least 2.
module vedic_mul #(
  parameter int unsigned N = 64
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  localparam int unsigned LEVELS = $clog2(N);   // level 1 = 2x2 cells

  initial begin
    assert (N >= 2 && (1 << LEVELS) == N)
      else $fatal(1, "vedic_mul: N=%0d is not a power of two >= 2", N);
  end

  // g_lvl[l].prod[i][j] is the product of digit i of a and digit j of b,
  // digits being 2**(l+1) bits wide (l = 0 holds the 2x2 cell outputs).
  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    localparam int unsigned S = 2 << l;         // digit width at this level
    localparam int unsigned D = N / S;          // digits per operand
    logic [2*S-1:0] prod [D][D];

    for (genvar i = 0; i < D; i++) begin : g_i
      for (genvar j = 0; j < D; j++) begin : g_j
        if (l == 0) begin : g_leaf
          vedic_mul_2x2 u_cell (
            .a (a[2*i +: 2]),
            .b (b[2*j +: 2]),
            .p (prod[i][j])
          );
        end else begin : g_combine
          localparam int unsigned H = S / 2;    // digit width one level down
          logic [2*S-1:0] vert_lo, vert_hi, crosswise;
          always_comb begin
            vert_lo = {{S{1'b0}}, g_lvl[l-1].prod[2*i][2*j]};
            vert_hi = {g_lvl[l-1].prod[2*i+1][2*j+1], {S{1'b0}}};
            crosswise = ({{S{1'b0}}, g_lvl[l-1].prod[2*i+1][2*j]}
                       + {{S{1'b0}}, g_lvl[l-1].prod[2*i][2*j+1]}) << H;
            prod[i][j] = vert_lo + crosswise + vert_hi;
          end
        end
      end
    end
  end

  assign p = g_lvl[LEVELS-1].prod[0][0];

endmodule
