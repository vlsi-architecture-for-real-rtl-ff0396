// tb_blending: self-checking test of blending.
// Drives every combination of the six hole/texture flags with random
// textures and alpha, under random back-pressure, and compares the output
// with the blending truth table evaluated here (real arithmetic for the
// weighted mean, rounded). Checks that all seven table cases occur.
module tb_blending;
  import vs_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [7:0] alpha;
  logic in_valid = 0, in_ready, out_valid, out_ready;
  logic [7:0] vl [NCH], vr [NCH], v [NCH];
  logic tex_l, tex_r, hole_l, hole_r, hole_dil_l, hole_dil_r, out_hole;
  logic [2:0] bcase;

  blending dut (.clk, .rst_n, .alpha, .in_valid, .in_ready, .vl, .vr, .tex_l, .tex_r,
    .hole_l, .hole_r, .hole_dil_l, .hole_dil_r, .out_valid, .out_ready, .v, .out_hole, .bcase);

  int checks = 0, failures = 0;
  int seen [8];
  localparam int N = 400;
  int exp_v [N][NCH];
  int exp_c [N];

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

  always @(posedge clk) out_ready <= ($urandom % 3) != 0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) begin
      automatic logic [5:0] fl = 6'(i);
      automatic bit nbl, nbr, nal, nar;
      automatic int a;
      @(negedge clk);
      in_valid = 1;
      a = (i % 64 == 0) ? 0 : int'($urandom % 256);
      alpha = 8'(a);
      {tex_l, tex_r, hole_l, hole_r, hole_dil_l, hole_dil_r} = fl;
      // a dilated map always covers the map it came from
      hole_dil_l = hole_dil_l | hole_l;
      hole_dil_r = hole_dil_r | hole_r;
      for (int ch = 0; ch < NCH; ch++) begin vl[ch] = 8'($urandom); vr[ch] = 8'($urandom); end
      nbl = tex_l && !hole_l; nbr = tex_r && !hole_r; nal = !hole_dil_l; nar = !hole_dil_r;
      for (int ch = 0; ch < NCH; ch++) begin
        if (nbl && nbr && (nal == nar)) begin
          exp_c[i] = (nal ? 1 : 2);
          exp_v[i][ch] = $rtoi($floor((1.0 - a / 256.0) * vl[ch] + (a / 256.0) * vr[ch] + 0.5));
        end else if (nbl && nbr && nal) begin exp_c[i] = 3; exp_v[i][ch] = vl[ch]; end
        else if (nbl && nbr)            begin exp_c[i] = 4; exp_v[i][ch] = vr[ch]; end
        else if (nbl)                   begin exp_c[i] = 5; exp_v[i][ch] = vl[ch]; end
        else if (nbr)                   begin exp_c[i] = 6; exp_v[i][ch] = vr[ch]; end
        else                            begin exp_c[i] = 7; exp_v[i][ch] = 0; end
      end
      while (!in_ready) @(negedge clk);
      @(posedge clk);
    end
    @(negedge clk);
    in_valid = 0;
  end

  initial begin
    @(posedge rst_n);
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      while (!(out_valid && out_ready)) @(negedge clk);
      check(int'(bcase) == exp_c[i], $sformatf("case %0d: got %0d exp %0d", i, bcase, exp_c[i]));
      check(out_hole == (exp_c[i] == 7), "hole flag");
      seen[bcase]++;
      for (int ch = 0; ch < NCH; ch++)
        check(int'(v[ch]) == exp_v[i][ch], $sformatf("pix %0d ch%0d: got %0d exp %0d", i, ch, v[ch], exp_v[i][ch]));
    end
    for (int c = 1; c <= 7; c++) check(seen[c] > 0, $sformatf("case %0d never seen", c));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
