// tb_hole_filling: self-checking test of hole_filling.
// A 10 x 12 three-channel frame with hole regions (a large block, single
// pixels, and a frame with no texture at all) streams in column by column
// with random gaps and back-pressure. The reference fills the holes in the
// same column-by-column, top-to-bottom order over a 9-row x 5-column window,
// weight 256 >> (|dy|+|dx|), rounded mean over non-hole pixels (filled ones
// included, outside the frame excluded).
module tb_hole_filling;
  import vs_pkg::*;
  localparam int MAXW = 10, MAXH = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [10:0] width, height;
  logic in_valid = 0, in_ready, out_valid, out_ready;
  logic [7:0] in_tex [NCH];
  logic in_hole;
  logic [7:0] out_tex [NCH];
  logic out_hole, out_filled;
  logic [10:0] out_col, out_row;

  hole_filling #(.MAX_H(MAXH)) dut (.clk, .rst_n, .width, .height, .in_valid, .in_ready,
    .in_tex, .in_hole, .out_valid, .out_ready, .out_tex, .out_hole, .out_filled,
    .out_col, .out_row);

  int fw [2] = '{10, 4};
  int fh [2] = '{12, 3};
  int tex [2][MAXW][MAXH][NCH];
  bit hole [2][MAXW][MAXH];
  int ref_t [MAXW][MAXH][NCH];
  bit ref_h [MAXW][MAXH];
  int checks = 0, failures = 0, filled = 0;
  bit checks_done_f0 = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic build_ref(input int f);
    for (int c = 0; c < fw[f]; c++)
      for (int r = 0; r < fh[f]; r++) begin
        ref_h[c][r] = hole[f][c][r];
        for (int ch = 0; ch < NCH; ch++) ref_t[c][r][ch] = hole[f][c][r] ? 0 : tex[f][c][r][ch];
      end
    for (int c = 0; c < fw[f]; c++)
      for (int r = 0; r < fh[f]; r++)
        if (ref_h[c][r]) begin
          automatic int sw = 0;
          automatic int st [NCH] = '{default: 0};
          for (int dc = -2; dc <= 2; dc++)
            for (int dr = -4; dr <= 4; dr++) begin
              automatic int cc = c + dc, rr = r + dr;
              if (cc >= 0 && cc < fw[f] && rr >= 0 && rr < fh[f] && !ref_h[cc][rr]) begin
                automatic int w = 256 >> ((dc < 0 ? -dc : dc) + (dr < 0 ? -dr : dr));
                sw += w;
                for (int ch = 0; ch < NCH; ch++) st[ch] += w * ref_t[cc][rr][ch];
              end
            end
          if (sw > 0) begin
            ref_h[c][r] = 0;
            for (int ch = 0; ch < NCH; ch++) ref_t[c][r][ch] = (st[ch] + sw / 2) / sw;
          end
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
    for (int c = 0; c < MAXW; c++)
      for (int r = 0; r < MAXH; r++) begin
        hole[0][c][r] = (c >= 3 && c <= 7 && r >= 4 && r <= 9) || ($urandom % 10 == 0);
        hole[1][c][r] = 1'b1;
        for (int ch = 0; ch < NCH; ch++) begin
          tex[0][c][r][ch] = $urandom % 256;
          tex[1][c][r][ch] = $urandom % 256;
        end
      end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      width = 11'(fw[f]); height = 11'(fh[f]);
      for (int c = 0; c < fw[f]; c++)
        for (int r = 0; r < fh[f]; r++) begin
          @(negedge clk);
          while ($urandom % 4 == 0) begin in_valid = 0; @(negedge clk); end
          in_valid = 1;
          in_hole = hole[f][c][r];
          for (int ch = 0; ch < NCH; ch++) in_tex[ch] = 8'(tex[f][c][r][ch]);
          while (!in_ready) @(negedge clk);
          @(posedge clk);
        end
      @(negedge clk);
      in_valid = 0;
      wait (f == 1 || checks_done_f0);
      repeat (4) @(posedge clk);
    end
  end

  initial begin
    @(posedge rst_n);
    for (int f = 0; f < 2; f++) begin
      build_ref(f);
      for (int c = 0; c < fw[f]; c++)
        for (int r = 0; r < fh[f]; r++) begin
          @(negedge clk);
          while (!(out_valid && out_ready)) @(negedge clk);
          check(out_col == 11'(c) && out_row == 11'(r), "output order");
          check(out_hole == ref_h[c][r], $sformatf("hole f%0d (%0d,%0d)", f, c, r));
          if (out_filled) filled++;
          for (int ch = 0; ch < NCH; ch++)
            check(int'(out_tex[ch]) == ref_t[c][r][ch],
                  $sformatf("tex f%0d (%0d,%0d) ch%0d got %0d exp %0d", f, c, r, ch,
                            out_tex[ch], ref_t[c][r][ch]));
        end
      checks_done_f0 = 1;
    end
    check(filled > 20, "too few holes filled");
    $display("filled=%0d", filled);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
