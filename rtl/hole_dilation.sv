// hole_dilation: widens the filtered hole map by one pixel in every direction
// so that blending does not take texture from the unreliable rim of a hole.
//
// The filtered hole flags (1 = hole) stream in column by column into a
// circular column FIFO (column_window, 1-bit wide). The dilated flag is the
// OR of the 3x3 window, a plain Boolean function; the choice of a 3x3 OR is
// this design's reading of "dilation". The module also passes on the centre
// flag itself, so blending gets the hole map before and after dilation of
// the same pixel together. Frame edges repeat the edge flag.
module hole_dilation #(
  parameter int MAX_H = 1080
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [10:0]  width,
  input  logic [10:0]  height,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic         in_hole,
  output logic         out_valid,
  input  logic         out_ready,
  output logic         out_hole,       // before dilation (centre)
  output logic         out_hole_dil,   // after dilation
  output logic [10:0]  out_col,
  output logic [10:0]  out_row
);
  logic win [3][3];

  column_window #(.EW(1), .NCOL(3), .NROW(3), .MAX_H(MAX_H), .CLAMP(1'b1)) u_fifo (
    .clk, .rst_n, .width, .height,
    .in_valid, .in_ready, .in_data(in_hole),
    .out_valid, .out_ready, .win, .out_col, .out_row,
    .wb_en(1'b0), .wb_data(1'b0)
  );

  always_comb begin
    out_hole     = win[1][1];
    out_hole_dil = 1'b0;
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++)
        out_hole_dil = out_hole_dil | win[r][c];
  end
endmodule
