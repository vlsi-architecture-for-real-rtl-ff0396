// tb_linear_interp: random check of linear_interp. Base and increment
// matrices are drawn in a range where no element overflows; every element of
// H must equal base + dweight * inc, computed here with integers.
module tb_linear_interp;
  import vs_pkg::*;
  hmat_t hb, hi, h;
  logic [4:0] dw;
  int checks = 0, failures = 0;
  linear_interp dut (.h_base(hb), .h_inc(hi), .dweight(dw), .h);

  task automatic chk(input int got, input int exp, input string n);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %0d exp %0d", n, got, exp);
    end
  endtask

  function automatic int rnd(input int lim);
    return int'($urandom % (2 * lim)) - lim;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 300; i++) begin
      int a [8], b [8];
      for (int j = 0; j < 8; j++) begin
        a[j] = rnd(j < 4 ? 60000 : (j < 6 ? 2000000 : 60000));
        b[j] = rnd(j < 4 ? 2000 : (j < 6 ? 60000 : 2000));
      end
      hb = '{h00: 18'(a[0]), h10: 18'(a[1]), h01: 18'(a[2]), h11: 18'(a[3]),
             h20: 23'(a[4]), h21: 23'(a[5]), h02: 18'(a[6]), h12: 18'(a[7])};
      hi = '{h00: 18'(b[0]), h10: 18'(b[1]), h01: 18'(b[2]), h11: 18'(b[3]),
             h20: 23'(b[4]), h21: 23'(b[5]), h02: 18'(b[6]), h12: 18'(b[7])};
      dw = 5'($urandom);
      #1;
      chk(int'(h.h00), a[0] + int'(dw) * b[0], "h00");
      chk(int'(h.h10), a[1] + int'(dw) * b[1], "h10");
      chk(int'(h.h01), a[2] + int'(dw) * b[2], "h01");
      chk(int'(h.h11), a[3] + int'(dw) * b[3], "h11");
      chk(int'(h.h20), a[4] + int'(dw) * b[4], "h20");
      chk(int'(h.h21), a[5] + int'(dw) * b[5], "h21");
      chk(int'(h.h02), a[6] + int'(dw) * b[6], "h02");
      chk(int'(h.h12), a[7] + int'(dw) * b[7], "h12");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
