// hole_filtering: cleans the hole map of a warped depth map.
//
// A warped depth pixel of zero is a hole (the warped maps are cleared to zero
// before forward warping). The hole flag (1 = hole) of each pixel is pushed
// into a circular column FIFO (column_window, 1-bit wide); for every 3x3
// window the flags are added and the filtered flag is 1 when the sum is more
// than THRESH (5). Frame edges repeat the edge flag (this design's choice).
// Output order and timing are those of column_window: column by column, one
// column behind the input.
module hole_filtering #(
  parameter int MAX_H  = 1080,
  parameter int THRESH = 5
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
  output logic         out_hole,
  output logic [10:0]  out_col,
  output logic [10:0]  out_row
);
  logic win [3][3];
  logic [3:0] sum;

  column_window #(.EW(1), .NCOL(3), .NROW(3), .MAX_H(MAX_H), .CLAMP(1'b1)) u_fifo (
    .clk, .rst_n, .width, .height,
    .in_valid, .in_ready, .in_data(in_depth == 8'd0),
    .out_valid, .out_ready, .win, .out_col, .out_row,
    .wb_en(1'b0), .wb_data(1'b0)
  );

  always_comb begin
    sum = '0;
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++)
        sum = sum + 4'(win[r][c]);
    out_hole = (int'(sum) > THRESH);
  end
endmodule
