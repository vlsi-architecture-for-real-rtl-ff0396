// tb_z_scaling: self-checking test of z_scaling.
//
// Random depth ranges over many magnitudes (including exact powers of two,
// values below 256, negative values and a zero Z_min). The expected shift is
// found here by searching the smallest power of two not below
// max(|Z_min|, |Z_max|) in real arithmetic, and the expected outputs are the
// inputs divided by 2^shift; after scaling both magnitudes must be at most
// 256 whenever a shift was applied.
module tb_z_scaling;
  logic [31:0] z_min, z_max, z_min_s, z_max_s;
  logic [7:0]  shift;

  z_scaling dut (.z_min, .z_max, .shift, .z_min_s, .z_max_s);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real f2r(input logic [31:0] f);
    if (f[30:23] == 8'd0) return 0.0;
    return $bitstoreal({f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0});
  endfunction

  function automatic logic [31:0] rnd(input int emin, input int emax);
    logic [31:0] f = {1'($urandom % 8 == 0), 8'(emin + int'($urandom % (emax - emin + 1))),
                      23'($urandom)};
    if ($urandom % 6 == 0) f[22:0] = '0;   // exact power of two
    return f;
  endfunction

  initial begin
    for (int i = 0; i < 3000; i++) begin
      real m, p;
      int c, k;
      z_min = rnd(110, 150);
      z_max = rnd(120, 170);
      if (i % 50 == 0) z_min = '0;
      #1;
      m = f2r(z_min) < 0 ? -f2r(z_min) : f2r(z_min);
      if ((f2r(z_max) < 0 ? -f2r(z_max) : f2r(z_max)) > m)
        m = f2r(z_max) < 0 ? -f2r(z_max) : f2r(z_max);
      c = -200; p = 2.0 ** c;
      while (p < m) begin c++; p = p * 2.0; end
      k = (c > 8) ? c - 8 : 0;
      check(int'(shift) == k, $sformatf("shift %0d exp %0d for %h %h", shift, k, z_min, z_max));
      check(f2r(z_min_s) == f2r(z_min) / (2.0 ** k) && f2r(z_max_s) == f2r(z_max) / (2.0 ** k),
            $sformatf("scaled %h %h from %h %h", z_min_s, z_max_s, z_min, z_max));
      if (k > 0)
        check(f2r(z_max_s) <= 256.0 && f2r(z_max_s) >= -256.0 &&
              f2r(z_min_s) <= 256.0 && f2r(z_min_s) >= -256.0, "range after scaling");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
