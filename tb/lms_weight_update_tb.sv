// Self-checking testbench of the LMS weight register and update.
//
// Drives random tap vectors, errors and step sizes (Q32.32) into the
// default 4-tap unit with update_en random, and after every clock compares
// the weights with a reference that applies
//     mu_e = (mu*e) >>> 32,  w_k += (u_k*mu_e) >>> 32   (64-bit wrap)
// only on enabled clocks. Also checks that reset clears the weights, that
// mu = 0 leaves them unchanged, and that one update is visible exactly one
// clock after it is requested.
module lms_weight_update_tb;

  localparam int unsigned W    = 64;
  localparam int unsigned FRAC = 32;
  localparam int unsigned TAPS = 4;
  localparam logic signed [W-1:0] ONE = 64'sd1 <<< FRAC;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic update_en = 1'b0;
  logic signed [W-1:0] mu = '0;
  logic signed [W-1:0] e = '0;
  logic signed [W-1:0] taps    [TAPS];
  logic signed [W-1:0] weights [TAPS];
  logic signed [W-1:0] ref_w   [TAPS];

  int checks = 0;
  int failures = 0;
  int updates = 0;
  int holds = 0;

  lms_weight_update dut (
    .clk(clk), .rst_n(rst_n), .update_en(update_en), .mu(mu), .e(e),
    .taps(taps), .weights(weights)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [W-1:0] fx_mul(input logic signed [W-1:0] a,
                                                 input logic signed [W-1:0] b);
    logic signed [2*W-1:0] full;
    full = (2*W)'(a) * (2*W)'(b);
    full = full >>> FRAC;
    return full[W-1:0];
  endfunction

  task automatic compare(input string what);
    for (int k = 0; k < TAPS; k++) begin
      checks++;
      if (weights[k] !== ref_w[k]) begin
        failures++;
        if (failures <= 10) $display("FAIL %s w[%0d]: got %0d expected %0d", what, k, weights[k], ref_w[k]);
      end
    end
  endtask

  task automatic step(input logic en);
    logic signed [W-1:0] mu_e;
    update_en = en;
    #1;
    mu_e = fx_mul(mu, e);
    @(posedge clk);
    #1;
    if (en) begin
      for (int k = 0; k < TAPS; k++) ref_w[k] = ref_w[k] + fx_mul(taps[k], mu_e);
      updates++;
    end else begin
      holds++;
    end
    compare(en ? "update" : "hold");
  endtask

  initial begin
    for (int k = 0; k < TAPS; k++) begin
      taps[k] = '0;
      ref_w[k] = '0;
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    compare("after reset");

    // One exact update: mu = 0.5, e = 2.0, u = {1, -1, 0.25, 3} -> w = u.
    mu = ONE >>> 1;
    e = ONE <<< 1;
    taps[0] = ONE; taps[1] = -ONE; taps[2] = ONE >>> 2; taps[3] = 3 * ONE;
    update_en = 1'b1;
    @(posedge clk);
    #1 update_en = 1'b0;
    for (int k = 0; k < TAPS; k++) begin
      ref_w[k] = taps[k];
      checks++;
      if (weights[k] !== taps[k]) begin
        failures++;
        $display("FAIL one-clock update w[%0d]: got %0d", k, weights[k]);
      end
    end

    // Random updates.
    for (int n = 0; n < 3000; n++) begin
      mu = 64'(($urandom() % 65536)) <<< (FRAC - 16);          // 0 .. 1
      if (n % 100 == 7) mu = '0;
      e  = signed'({$urandom(), $urandom()}) >>> ($urandom() % 40 + 16);
      for (int k = 0; k < TAPS; k++)
        taps[k] = signed'({$urandom(), $urandom()}) >>> ($urandom() % 40 + 16);
      step(($urandom() % 4) != 0);
    end

    // mu = 0 leaves the weights untouched.
    mu = '0;
    e = ONE;
    for (int n = 0; n < 5; n++) step(1'b1);

    // Reset clears the weights.
    rst_n = 1'b0;
    @(posedge clk);
    #1 rst_n = 1'b1;
    for (int k = 0; k < TAPS; k++) ref_w[k] = '0;
    compare("reset");

    if (updates == 0 || holds == 0) begin
      failures++;
      $display("FAIL updates=%0d holds=%0d", updates, holds);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
