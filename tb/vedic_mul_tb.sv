// Self-checking testbench of the unsigned Vedic multiplier.
//
// Checks a 64-bit instance (the default size) on corner operands (0, 1,
// all ones, single set bits) and random operands, and an 8-bit instance
// exhaustively over all 65,536 operand pairs. The expected product is the
// simulator's own wide multiplication.
module vedic_mul_tb;

  localparam int unsigned N     = 64;
  localparam int unsigned N_SML = 8;
  localparam int unsigned N_RANDOM = 20000;
  localparam int unsigned P_SML = 2 * N_SML;

  logic clk = 1'b0;
  int   cycles = 0;
  int   checks = 0;
  int   failures = 0;

  logic [N-1:0]       a, b;
  logic [2*N-1:0]     p;
  logic [N_SML-1:0]   as, bs;
  logic [2*N_SML-1:0] ps;

  vedic_mul dut (.a(a), .b(b), .p(p));
  vedic_mul #(.N(N_SML)) dut_small (.a(as), .b(bs), .p(ps));

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  // Watchdog.
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_big(input logic [N-1:0] x, input logic [N-1:0] y);
    logic [2*N-1:0] expected;
    a = x;
    b = y;
    #1;
    expected = {{N{1'b0}}, x} * {{N{1'b0}}, y};
    checks++;
    if (p !== expected) begin
      failures++;
      if (failures <= 10) $display("FAIL %0d x %0d: got %h expected %h", x, y, p, expected);
    end
  endtask

  function automatic logic [N-1:0] rand64();
    return {$urandom(), $urandom()};
  endfunction

  initial begin
    logic [N-1:0] corner [6];
    corner[0] = '0;
    corner[1] = 64'd1;
    corner[2] = '1;
    corner[3] = 64'h8000_0000_0000_0000;
    corner[4] = 64'h0000_0001_0000_0000;
    corner[5] = 64'h5555_5555_5555_5555;
    for (int i = 0; i < 6; i++)
      for (int j = 0; j < 6; j++) check_big(corner[i], corner[j]);
    for (int i = 0; i < N; i++) check_big(64'd1 << i, '1);
    for (int i = 0; i < N_RANDOM; i++) begin
      logic [N-1:0] x, y;
      x = rand64();
      y = rand64();
      // Also exercise narrow operands, where the high digit products are 0.
      if (i % 4 == 1) x = x >> ($urandom() % N);
      if (i % 4 == 2) y = y >> ($urandom() % N);
      check_big(x, y);
    end
    for (int i = 0; i < (1 << N_SML); i++) begin
      for (int j = 0; j < (1 << N_SML); j++) begin
        as = N_SML'(i);
        bs = N_SML'(j);
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
