// Self-checking testbench of the transversal FIR filter.
//
// Runs the default filter (4 taps, Q32.32 samples) in three phases:
//  1. impulse response: coefficients h, a single 1.0 sample then zeros;
//     y must step through h[0], h[1], ... and then be 0;
//  2. random samples and random coefficients with in_valid low on some
//     clocks (the delay line must then hold), checking y, y_full and the
//     tap-input vector before every clock edge against a reference history;
//  3. reset, after which the delay line must read zero.
// The reference is y_full = sum_k h[k]*x[n-k] in 128-bit arithmetic and
// y = y_full >>> 32 truncated to 64 bits.
module fir_filter_tb;

  localparam int unsigned W    = 64;
  localparam int unsigned FRAC = 32;
  localparam int unsigned TAPS = 4;
  localparam logic signed [W-1:0] ONE = 64'sd1 <<< FRAC;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [W-1:0]   x_in = '0;
  logic signed [W-1:0]   coeff [TAPS];
  logic signed [W-1:0]   taps  [TAPS];
  logic signed [2*W-1:0] y_full;
  logic signed [W-1:0]   y;

  int checks = 0;
  int failures = 0;
  int holds = 0;

  logic signed [W-1:0] hist [TAPS];   // reference delay line, hist[0] = x[n-1]

  fir_filter dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x_in(x_in),
    .coeff(coeff), .taps(taps), .y_full(y_full), .y(y)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Compare the combinational outputs with the reference, then clock.
  task automatic step(input logic signed [W-1:0] x, input logic valid);
    logic signed [2*W-1:0] exp_full;
    logic signed [2*W-1:0] exp_shift;
    logic signed [W-1:0]   u [TAPS];
    x_in = x;
    in_valid = valid;
    #1;
    u[0] = x;
    for (int k = 1; k < TAPS; k++) u[k] = hist[k-1];
    exp_full = '0;
    for (int k = 0; k < TAPS; k++) exp_full += (2*W)'(coeff[k]) * (2*W)'(u[k]);
    exp_shift = exp_full >>> FRAC;
    checks++;
    if (y_full !== exp_full || y !== exp_shift[W-1:0]) begin
      failures++;
      if (failures <= 10) $display("FAIL y: got %0d expected %0d", y, exp_shift[W-1:0]);
    end
    for (int k = 0; k < TAPS; k++) begin
      checks++;
      if (taps[k] !== u[k]) begin
        failures++;
        if (failures <= 10) $display("FAIL tap %0d: got %0d expected %0d", k, taps[k], u[k]);
      end
    end
    @(posedge clk);
    #1;
    if (valid) begin
      for (int k = TAPS-1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = x;
    end else begin
      holds++;
    end
  endtask

  initial begin
    logic signed [W-1:0] h [TAPS];
    h[0] = ONE >>> 1;                 //  0.5
    h[1] = -(ONE >>> 2);              // -0.25
    h[2] = ONE + (ONE >>> 3);         //  1.125
    h[3] = -(ONE <<< 1);              // -2.0
    for (int k = 0; k < TAPS; k++) begin
      coeff[k] = h[k];
      hist[k] = '0;
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // 1. Impulse response.
    for (int n = 0; n < TAPS + 3; n++) begin
      x_in = (n == 0) ? ONE : '0;
      in_valid = 1'b1;
      #1;
      checks++;
      if (y !== ((n < TAPS) ? h[n] : '0)) begin
        failures++;
        $display("FAIL impulse response at n=%0d: got %0d", n, y);
      end
      step(x_in, 1'b1);
    end

    // 2. Random data and coefficients, with holds.
    for (int n = 0; n < 3000; n++) begin
      logic signed [W-1:0] x;
      if (n % 500 == 0)
        for (int k = 0; k < TAPS; k++) coeff[k] = 64'(signed'({$urandom(), $urandom()}) >>> ($urandom() % 40));
      x = {$urandom(), $urandom()};
      x = x >>> ($urandom() % 48);
      step(x, ($urandom() % 5) != 0);
    end

    // 3. Reset clears the delay line.
    rst_n = 1'b0;
    @(posedge clk);
    #1 rst_n = 1'b1;
    for (int k = 0; k < TAPS; k++) hist[k] = '0;
    for (int n = 0; n < 10; n++) step(64'(n) <<< FRAC, 1'b1);

    if (holds == 0) begin
      failures++;
      $display("FAIL no hold cycle exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
