// tb_matrix_mult: random check of matrix_mult against eq. (2) evaluated in
// real arithmetic. Homographies near the identity (small rotation, scale,
// perspective terms and translations up to +-300 pixels) are applied to
// random positions of a 1920 x 1080 frame. The integer result may differ
// from the rounded real one by at most 1 (fixed-point coefficients); the
// in-frame flag must agree wherever the real position is not within one
// pixel of the frame border. Pure translations, which the fixed-point
// formats hold exactly, must give the exactly rounded position.
module tb_matrix_mult;
  import vs_pkg::*;
  hmat_t h;
  logic [10:0] u, v, ud, vd;
  logic inf;
  int checks = 0, failures = 0, outside = 0;
  matrix_mult dut (.h, .u_src(u), .v_src(v), .width(11'd1920), .height(11'd1080),
                   .u_dst(ud), .v_dst(vd), .in_frame(inf));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 2000; i++) begin
      real r00, r10, r01, r11, r20, r21, r02, r12, den, xu, xv;
      int eu, ev;
      h.h00 = 18'((1 << HA_FR) + int'($urandom % 4000) - 2000);
      h.h11 = 18'((1 << HA_FR) + int'($urandom % 4000) - 2000);
      h.h10 = 18'(int'($urandom % 4000) - 2000);
      h.h01 = 18'(int'($urandom % 4000) - 2000);
      h.h20 = 23'(int'($urandom % 600000) - 300000);
      h.h21 = 23'(int'($urandom % 100000) - 50000);
      h.h02 = 18'(int'($urandom % 8000) - 4000);
      h.h12 = 18'(int'($urandom % 8000) - 4000);
      u = 11'($urandom % 1920);
      v = 11'($urandom % 1080);
      #1;
      r00 = real'(h.h00) / 2.0**HA_FR; r10 = real'(h.h10) / 2.0**HA_FR;
      r01 = real'(h.h01) / 2.0**HA_FR; r11 = real'(h.h11) / 2.0**HA_FR;
      r20 = real'(h.h20) / 2.0**HT_FR; r21 = real'(h.h21) / 2.0**HT_FR;
      r02 = real'(h.h02) / 2.0**HP_FR; r12 = real'(h.h12) / 2.0**HP_FR;
      den = r02 * u + r12 * v + 1.0;
      xu = (r00 * u + r10 * v + r20) / den;
      xv = (r01 * u + r11 * v + r21) / den;
      eu = $rtoi($floor(xu + 0.5));
      ev = $rtoi($floor(xv + 0.5));
      if (xu > 1.0 && xu < 1918.0 && xv > 1.0 && xv < 1078.0) begin
        check(inf, $sformatf("in_frame low for (%f,%f)", xu, xv));
        check((int'(ud) - eu) inside {-1, 0, 1} && (int'(vd) - ev) inside {-1, 0, 1},
              $sformatf("(%0d,%0d) -> got (%0d,%0d) exp (%f,%f)", u, v, ud, vd, xu, xv));
      end else if (xu < -1.0 || xu > 1920.0 || xv < -1.0 || xv > 1080.0) begin
        outside++;
        check(!inf, $sformatf("in_frame high for (%f,%f)", xu, xv));
      end
    end
    // pure translations are exact in fixed point: the result must be the
    // real position rounded to nearest (halves upwards), with no tolerance
    for (int i = 0; i < 500; i++) begin
      int tu, tv;
      h = '0;
      h.h00 = 18'(1 << HA_FR);
      h.h11 = 18'(1 << HA_FR);
      tu = int'($urandom % 40000) - 20000;
      tv = int'($urandom % 40000) - 20000;
      h.h20 = 23'(tu);
      h.h21 = 23'(tv);
      u = 11'(100 + $urandom % 1700);
      v = 11'(100 + $urandom % 800);
      #1;
      check(int'(ud) == $rtoi($floor(real'(u) + real'(tu) / 1024.0 + 0.5)) &&
            int'(vd) == $rtoi($floor(real'(v) + real'(tv) / 1024.0 + 0.5)),
            $sformatf("translation (%0d,%0d)+(%0d,%0d)/1024 -> (%0d,%0d)", u, v, tu, tv, ud, vd));
    end
    check(outside > 10, "too few positions outside the frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
