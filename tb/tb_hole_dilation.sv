// tb_hole_dilation: self-checking test of hole_dilation.
// Two random frames (9 x 7, then 5 x 4) stream in column by column with
// random input gaps and output back-pressure; every output pixel is checked
// against a reference computed here: 3x3 OR with edge repeat, and the centre flag.
// Output order (column by column) and the column/row tags are checked too.
module tb_hole_dilation;
  localparam int MAXW = 9, MAXH = 7;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [10:0] width, height;
  logic in_valid = 0, in_ready, out_valid, out_ready;
  logic [1-1:0] din;
  logic o1, o2;
  logic [10:0] out_col, out_row;

  hole_dilation #(.MAX_H(MAXH)) dut (.clk, .rst_n, .width, .height, .in_valid, .in_ready,
    .in_hole(din), .out_valid, .out_ready, .out_hole(o1), .out_hole_dil(o2), .out_col, .out_row);

  int fw [2] = '{9, 5};
  int fh [2] = '{7, 4};
  int img [2][MAXW][MAXH];
  int checks = 0, failures = 0;

  function automatic int px(int f, int c, int r);
    c = c < 0 ? 0 : (c >= fw[f] ? fw[f] - 1 : c);
    r = r < 0 ? 0 : (r >= fh[f] ? fh[f] - 1 : r);
    return img[f][c][r];
  endfunction

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
    for (int f = 0; f < 2; f++)
      for (int c = 0; c < fw[f]; c++)
        for (int r = 0; r < fh[f]; r++)
          img[f][c][r] = int'(1'($urandom % 9 == 0));
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      width = 11'(fw[f]); height = 11'(fh[f]);
      for (int c = 0; c < fw[f]; c++)
        for (int r = 0; r < fh[f]; r++) begin
          @(negedge clk);
          while ($urandom % 4 == 0) begin in_valid = 0; @(negedge clk); end
          in_valid = 1; din = 1'(img[f][c][r]);
          while (!in_ready) @(negedge clk);
          @(posedge clk);
        end
      @(negedge clk);
      in_valid = 0;
      wait (f == 1 || checks_done_f0);
      repeat (4) @(posedge clk);
    end
  end

  bit checks_done_f0 = 0;
  initial begin
    @(posedge rst_n);
    for (int f = 0; f < 2; f++) begin
      for (int c = 0; c < fw[f]; c++)
        for (int r = 0; r < fh[f]; r++) begin
          @(negedge clk);
          while (!(out_valid && out_ready)) @(negedge clk);
          check(out_col == 11'(c) && out_row == 11'(r),
                $sformatf("order: got (%0d,%0d) exp (%0d,%0d)", out_col, out_row, c, r));
          begin automatic bit any = 0; for (int dr=-1; dr<=1; dr++) for (int dc=-1; dc<=1; dc++) any |= (px(f, c+dc, r+dr) != 0); check(o2 == any, $sformatf("dil f%0d (%0d,%0d) got %0d exp %0d", f, c, r, o2, any)); check(o1 == (px(f, c, r) != 0), "centre flag"); end
        end
      checks_done_f0 = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
