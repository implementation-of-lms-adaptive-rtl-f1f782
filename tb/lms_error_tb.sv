// Self-checking testbench of the LMS error unit.
//
// Checks e = d - y against a 128-bit reference subtraction clipped to the
// 64-bit range, and the saturation flag, on random values of all sizes and
// on the four overflow corners. Both clipping directions must occur.
module lms_error_tb;

  localparam int unsigned W = 64;

  logic clk = 1'b0;
  int   checks = 0;
  int   failures = 0;
  int   sat_pos = 0;
  int   sat_neg = 0;

  logic signed [W-1:0] d, y, e;
  logic                saturated;

  lms_error dut (.d(d), .y(y), .e(e), .saturated(saturated));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic signed [W-1:0] dv, input logic signed [W-1:0] yv);
    logic signed [127:0] diff;
    logic signed [127:0] lim_hi, lim_lo;
    logic signed [W-1:0] expected;
    logic                exp_sat;
    d = dv;
    y = yv;
    #1;
    diff   = 128'(dv) - 128'(yv);
    lim_hi = 128'sd1 <<< (W-1);
    lim_lo = -lim_hi;
    lim_hi = lim_hi - 1;
    exp_sat = 1'b0;
    if (diff > lim_hi) begin
      expected = lim_hi[W-1:0]; exp_sat = 1'b1; sat_pos++;
    end else if (diff < lim_lo) begin
      expected = lim_lo[W-1:0]; exp_sat = 1'b1; sat_neg++;
    end else begin
      expected = diff[W-1:0];
    end
    checks++;
    if (e !== expected || saturated !== exp_sat) begin
      failures++;
      if (failures <= 10) $display("FAIL d=%0d y=%0d: e=%0d sat=%b expected %0d %b",
                                   dv, yv, e, saturated, expected, exp_sat);
    end
  endtask

  initial begin
    check(64'sh7fff_ffff_ffff_ffff, -64'sd1);
    check(64'sh8000_0000_0000_0000, 64'sd1);
    check(64'sh7fff_ffff_ffff_ffff, 64'sh8000_0000_0000_0000);
    check(64'sh8000_0000_0000_0000, 64'sh7fff_ffff_ffff_ffff);
    check(64'sh7fff_ffff_ffff_ffff, 64'sd0);
    check(64'sh8000_0000_0000_0000, 64'sd0);
    check(64'sd0, 64'sh8000_0000_0000_0000);
    check(64'sd5, 64'sd7);
    for (int i = 0; i < 20000; i++) begin
      logic signed [W-1:0] dv, yv;
      dv = {$urandom(), $urandom()};
      yv = {$urandom(), $urandom()};
      if (i % 2 == 1) begin
        dv = dv >>> ($urandom() % W);
        yv = yv >>> ($urandom() % W);
      end
      check(dv, yv);
    end
    if (sat_pos == 0 || sat_neg == 0) begin
      failures++;
      $display("FAIL saturation not exercised: pos=%0d neg=%0d", sat_pos, sat_neg);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
