// depth_filtering: 3x3 median filter over a warped depth map, removing the
// small noisy holes left by forward warping.
//
// Depth pixels stream in column by column into a circular column FIFO
// (column_window, three column memories); each 3x3 window is reduced by a
// comparator network (median9) to its median. Frame edges repeat the edge
// pixel (this design's choice). Output is one filtered pixel per handshake,
// in the same column-by-column order, one column behind the input.
module depth_filtering #(
  parameter int MAX_H = 1080
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [10:0]  width,
  input  logic [10:0]  height,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [7:0]   in_depth,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [7:0]   out_depth,
  output logic [10:0]  out_col,
  output logic [10:0]  out_row
);
  logic [7:0] win [3][3];
  logic [7:0] flat [9];

  column_window #(.EW(8), .NCOL(3), .NROW(3), .MAX_H(MAX_H), .CLAMP(1'b1)) u_fifo (
    .clk, .rst_n, .width, .height,
    .in_valid, .in_ready, .in_data(in_depth),
    .out_valid, .out_ready, .win, .out_col, .out_row,
    .wb_en(1'b0), .wb_data(8'd0)
  );

  always_comb
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++)
        flat[3*r+c] = win[r][c];

  median9 u_med (.x(flat), .med(out_depth));
endmodule
