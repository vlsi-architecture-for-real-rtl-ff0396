// tb_fp_divider: self-checking test of fp_divider.
//
// Random normal operands (exponents kept so that the quotient stays in the
// normal range), operands with equal or near-equal significands, exact
// quotients, and the special cases (zeros, infinities, NaN). The expected
// quotient is computed in double precision and rounded here to single
// precision, ties to even; a double-precision quotient rounded once more to
// single gives the correctly rounded result. Each division must take exactly
// 26 cycles from start to done.
module tb_fp_divider;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, busy, done;
  logic [31:0] a, b, q;

  fp_divider dut (.clk, .rst_n, .start, .a, .b, .busy, .done, .q);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real f2r(input logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return f[31] ? -0.0 : 0.0;
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  // double -> single, round to nearest even, normal results only
  function automatic logic [31:0] r2f(input real x);
    logic [63:0] d;
    logic [23:0] m;
    logic [28:0] rest;
    int e;
    logic up;
    d    = $realtobits(x);
    e    = int'(d[62:52]) - 1023 + 127;
    m    = {1'b1, d[51:29]};
    rest = d[28:0];
    up   = rest[28] && ((rest[27:0] != '0) || m[0]);
    if (up) begin
      if (m == '1) begin m = 24'h800000; e++; end
      else m = m + 1'b1;
    end
    return {d[63], 8'(e), m[22:0]};
  endfunction

  task automatic divide(input logic [31:0] x, input logic [31:0] y, input logic [31:0] exp_q,
                        input string what);
    int n = 0;
    @(negedge clk);
    a = x; b = y; start = 1;
    @(negedge clk);
    start = 0;
    // n counts clock edges after the one that sampled start
    while (!done) begin @(negedge clk); n++; end
    check(n == 26, $sformatf("%s: latency %0d cycles", what, n));
    check(q == exp_q, $sformatf("%s: %h / %h got %h exp %h", what, x, y, q, exp_q));
  endtask

  function automatic logic [31:0] rnd_float(input int emin, input int emax);
    return {1'($urandom), 8'(emin + int'($urandom % (emax - emin + 1))), 23'($urandom)};
  endfunction

  initial begin
    a = '0; b = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      logic [31:0] x = rnd_float(60, 190), y = rnd_float(60, 190);
      divide(x, y, r2f(f2r(x) / f2r(y)), "random");
    end
    for (int i = 0; i < 100; i++) begin
      // equal fractions, and fractions one unit apart
      logic [31:0] x = rnd_float(100, 150), y;
      y = {1'b0, 8'(100 + $urandom % 50), x[22:0] + 23'(i % 3)};
      divide(x, y, r2f(f2r(x) / f2r(y)), "near-equal");
    end
    divide(32'h40c00000, 32'h40000000, 32'h40400000, "6/2");
    divide(32'h3f800000, 32'h40400000, r2f(1.0 / 3.0), "1/3");
    divide(32'hc2c80000, 32'h41200000, 32'hc1200000, "-100/10");
    divide(32'h3f800000, 32'h00000000, 32'h7f800000, "1/0");
    divide(32'h00000000, 32'h3f800000, 32'h00000000, "0/1");
    divide(32'h00000000, 32'h00000000, 32'h7fc00000, "0/0");
    divide(32'h7f800000, 32'h7f800000, 32'h7fc00000, "inf/inf");
    divide(32'hff800000, 32'h40000000, 32'hff800000, "-inf/2");
    divide(32'h40000000, 32'h7f800000, 32'h00000000, "2/inf");
    divide(32'h7fc00001, 32'h40000000, 32'h7fc00000, "NaN/2");
    divide(32'h7f000000, 32'h00800000, 32'h7f800000, "overflow");
    divide(32'h00800000, 32'h7f000000, 32'h00000000, "underflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
