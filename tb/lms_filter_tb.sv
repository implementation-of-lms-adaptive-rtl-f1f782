// End-to-end testbench of the LMS adaptive filter, at its default size
// (64-bit Q32.32 data, 4 taps, no parameter overrides).
//
// The filter identifies an unknown 4-tap FIR system: random input x in
// [-1, 1) goes to both the filter and a reference copy of the unknown
// system, whose output is the desired response d. Phases:
//   1. adapt from reset to plant A, with idle clocks (in_valid low) mixed in;
//   2. the plant changes to B and the filter must track it;
//   3. mu = 0 freezes the weights while d is driven to full scale, so the
//      error saturates in both directions;
//   4. a reset in the middle of operation clears the weights.
// Every clock is checked bit-exactly against a reference model of the
// fixed-point algorithm (y, e, saturation flag, weights, out_valid one
// clock after in_valid). At the end of phases 1 and 2 the weights must be
// within 2**-16 of the plant. Each mechanism (adaptation, idle clock,
// convergence, tracking, freeze, saturation both ways, reset) is counted,
// and one that never happened is a failure.
module lms_filter_tb;

  localparam int unsigned W    = lms_pkg::DATA_W;
  localparam int unsigned FRAC = lms_pkg::FRAC_W;
  localparam int unsigned TAPS = lms_pkg::TAPS;
  localparam logic signed [W-1:0] ONE     = 64'sd1 <<< FRAC;
  localparam logic signed [W-1:0] MAX_POS = {1'b0, {(W-1){1'b1}}};
  localparam logic signed [W-1:0] MAX_NEG = {1'b1, {(W-1){1'b0}}};
  localparam int unsigned SAMPLES = 800;   // per adaptation phase

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [W-1:0] x_in = '0;
  logic signed [W-1:0] d_in = '0;
  logic signed [W-1:0] mu = '0;
  logic                out_valid;
  logic signed [W-1:0] y_out, e_out;
  logic                e_sat_out;
  logic signed [W-1:0] weights [TAPS];

  // Reference model state.
  logic signed [W-1:0] ref_hist [TAPS];     // ref_hist[k] = x[n-1-k]
  logic signed [W-1:0] ref_w    [TAPS];
  logic signed [W-1:0] ref_y, ref_e;
  logic                ref_sat;
  logic signed [W-1:0] plant    [TAPS];
  logic signed [W-1:0] plant_hist [TAPS];   // input history of the unknown system

  int checks = 0;
  int failures = 0;
  int n_updates = 0, n_idle = 0, n_converged = 0, n_tracked = 0;
  int n_frozen = 0, n_sat_pos = 0, n_sat_neg = 0, n_reset = 0;

  lms_filter dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x_in(x_in), .d_in(d_in),
    .mu(mu), .out_valid(out_valid), .y_out(y_out), .e_out(e_out),
    .e_sat_out(e_sat_out), .weights(weights)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  function automatic logic signed [W-1:0] abs64(input logic signed [W-1:0] v);
    return v < 0 ? -v : v;
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures <= 20) $display("FAIL %s at t=%0t", what, $time);
    end
  endtask

  task automatic clear_ref();
    for (int k = 0; k < TAPS; k++) begin
      ref_hist[k] = '0;
      ref_w[k] = '0;
    end
  endtask

  // Desired response of the unknown system for input x (advances its history).
  function automatic logic signed [W-1:0] plant_out(input logic signed [W-1:0] x);
    logic signed [W-1:0] acc;
    acc = fx_mul(plant[0], x);
    for (int k = 1; k < TAPS; k++) acc += fx_mul(plant[k], plant_hist[k-1]);
    for (int k = TAPS-1; k > 0; k--) plant_hist[k] = plant_hist[k-1];
    plant_hist[0] = x;
    return acc;
  endfunction

  // One clock: present (x, d) with in_valid = valid, then compare.
  task automatic step(input logic signed [W-1:0] x, input logic signed [W-1:0] d,
                      input logic valid);
    logic signed [W-1:0]   u [TAPS];
    logic signed [2*W-1:0] yf, yfs;
    logic signed [W:0]     diff;
    logic signed [W-1:0]   mu_e;
    logic signed [W-1:0]   w_before [TAPS];
    x_in = x;
    d_in = d;
    in_valid = valid;
    if (valid) begin
      u[0] = x;
      for (int k = 1; k < TAPS; k++) u[k] = ref_hist[k-1];
      yf = '0;
      for (int k = 0; k < TAPS; k++) yf += (2*W)'(ref_w[k]) * (2*W)'(u[k]);
      yfs = yf >>> FRAC;
      ref_y = yfs[W-1:0];
      diff = (W+1)'(d) - (W+1)'(ref_y);
      ref_sat = 1'b0;
      ref_e = diff[W-1:0];
      if (diff > (W+1)'(MAX_POS)) begin ref_e = MAX_POS; ref_sat = 1'b1; end
      if (diff < (W+1)'(MAX_NEG)) begin ref_e = MAX_NEG; ref_sat = 1'b1; end
      mu_e = fx_mul(mu, ref_e);
      for (int k = 0; k < TAPS; k++) begin
        w_before[k] = ref_w[k];
        ref_w[k] = ref_w[k] + fx_mul(u[k], mu_e);
      end
      for (int k = TAPS-1; k > 0; k--) ref_hist[k] = ref_hist[k-1];
      ref_hist[0] = x;
    end
    @(posedge clk);
    #1;
    check(out_valid == valid, "out_valid is not in_valid delayed by one clock");
    if (valid) begin
      check(y_out == ref_y, "filter output y");
      check(e_out == ref_e, "error e");
      check(e_sat_out == ref_sat, "error saturation flag");
      n_updates++;
      if (ref_sat && ref_e == MAX_POS) n_sat_pos++;
      if (ref_sat && ref_e == MAX_NEG) n_sat_neg++;
      if (mu == 0) begin
        n_frozen++;
        for (int k = 0; k < TAPS; k++) check(ref_w[k] == w_before[k], "weights frozen at mu=0");
      end
    end else begin
      n_idle++;
    end
    for (int k = 0; k < TAPS; k++) check(weights[k] == ref_w[k], "weights");
  endtask

  function automatic logic signed [W-1:0] rand_x();
    logic signed [W-1:0] r;
    r = {$urandom(), $urandom()};
    return r >>> 31;                         // uniform in [-1, 1)
  endfunction

  task automatic adapt(input int samples);
    for (int n = 0; n < samples; n++) begin
      logic signed [W-1:0] x;
      if ($urandom() % 8 == 0) begin
        step(rand_x(), rand_x(), 1'b0);      // idle clock, ignored by the filter
      end else begin
        x = rand_x();
        step(x, plant_out(x), 1'b1);
      end
    end
  endtask

  function automatic bit near_plant();
    for (int k = 0; k < TAPS; k++)
      if (abs64(weights[k] - plant[k]) > (ONE >>> 16)) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    clear_ref();
    for (int k = 0; k < TAPS; k++) plant_hist[k] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int k = 0; k < TAPS; k++) check(weights[k] == '0, "weights zero after reset");

    // 1. Plant A, mu = 0.25.
    mu = ONE >>> 2;
    plant[0] = ONE >>> 1;                  //  0.5
    plant[1] = -(ONE >>> 2);               // -0.25
    plant[2] = ONE >>> 3;                  //  0.125
    plant[3] = ONE - (ONE >>> 2);          //  0.75
    adapt(SAMPLES);
    check(near_plant(), "converged to plant A");
    if (near_plant()) n_converged++;

    // 2. Plant B, tracking.
    plant[0] = -(ONE >>> 1) - (ONE >>> 3); // -0.625
    plant[1] = ONE - (ONE >>> 4);          //  0.9375
    plant[2] = '0;                         //  0
    plant[3] = -(ONE >>> 2);               // -0.25
    adapt(SAMPLES);
    check(near_plant(), "tracked plant B");
    if (near_plant()) n_tracked++;

    // 3. Freeze and saturate the error.
    mu = '0;
    for (int n = 0; n < 40; n++) step(rand_x(), (n % 2 == 0) ? MAX_POS : MAX_NEG, 1'b1);

    // 4. Reset in operation.
    rst_n = 1'b0;
    @(posedge clk);
    #1 rst_n = 1'b1;
    clear_ref();
    n_reset++;
    check(out_valid == 1'b0 && y_out == '0 && e_out == '0, "outputs cleared by reset");
    mu = ONE >>> 2;
    adapt(20);

    $display("mechanisms: updates=%0d idle=%0d converged=%0d tracked=%0d frozen=%0d sat+=%0d sat-=%0d reset=%0d",
             n_updates, n_idle, n_converged, n_tracked, n_frozen, n_sat_pos, n_sat_neg, n_reset);
    check(n_updates > 0, "adaptation happened");
    check(n_idle > 0, "idle clock happened");
    check(n_converged > 0, "convergence happened");
    check(n_tracked > 0, "tracking happened");
    check(n_frozen > 0, "freeze happened");
    check(n_sat_pos > 0, "positive saturation happened");
    check(n_sat_neg > 0, "negative saturation happened");
    check(n_reset > 0, "reset happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
