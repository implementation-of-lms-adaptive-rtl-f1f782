// Self-checking testbench of the signed (sign-magnitude) Vedic multiplier.
//
// Drives the 64-bit default instance with every sign combination of corner
// values (0, +-1, the most negative and most positive numbers) and with
// random operands, and an 8-bit instance with all operand pairs. The
// expected product is the simulator's signed multiplication.
module vedic_mul_signed_tb;

  localparam int unsigned W     = 64;
  localparam int unsigned W_SML = 8;
  localparam int unsigned P_SML = 2 * W_SML;

  logic clk = 1'b0;
  int   checks = 0;
  int   failures = 0;

  logic signed [W-1:0]       a, b;
  logic signed [2*W-1:0]     p;
  logic signed [W_SML-1:0]   as, bs;
  logic signed [P_SML-1:0]   ps;

  vedic_mul_signed dut (.a(a), .b(b), .p(p));
  vedic_mul_signed #(.W(W_SML)) dut_small (.a(as), .b(bs), .p(ps));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_big(input logic signed [W-1:0] x, input logic signed [W-1:0] y);
    logic signed [2*W-1:0] expected;
    a = x;
    b = y;
    #1;
    expected = (2*W)'(x) * (2*W)'(y);
    checks++;
    if (p !== expected) begin
      failures++;
      if (failures <= 10) $display("FAIL %0d x %0d: got %0d expected %0d", x, y, p, expected);
    end
  endtask

  initial begin
    logic signed [W-1:0] corner [7];
    corner[0] = '0;
    corner[1] = 64'sd1;
    corner[2] = -64'sd1;
    corner[3] = 64'sh8000_0000_0000_0000;
    corner[4] = 64'sh7fff_ffff_ffff_ffff;
    corner[5] = 64'sh0000_0001_0000_0000;     // 1.0 in Q32.32
    corner[6] = -64'sh0000_0000_8000_0000;    // -0.5 in Q32.32
    for (int i = 0; i < 7; i++)
      for (int j = 0; j < 7; j++) check_big(corner[i], corner[j]);
    for (int i = 0; i < 20000; i++) begin
      logic signed [W-1:0] x, y;
      x = {$urandom(), $urandom()};
      y = {$urandom(), $urandom()};
      if (i % 3 == 1) x = x >>> ($urandom() % W);
      if (i % 3 == 2) y = y >>> ($urandom() % W);
      check_big(x, y);
    end
    for (int i = -(1 << (W_SML-1)); i < (1 << (W_SML-1)); i++) begin
      for (int j = -(1 << (W_SML-1)); j < (1 << (W_SML-1)); j++) begin
        as = W_SML'(i);
        bs = W_SML'(j);
        #1;
        checks++;
        if (ps !== P_SML'(i * j)) begin
          failures++;
          if (failures <= 10) $display("FAIL small %0d x %0d: got %0d", i, j, ps);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
