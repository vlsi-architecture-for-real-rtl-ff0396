// hole_filling: fills the holes left after blending by a distance-weighted
// ("bilinear") interpolation over a 9-row x 5-column window.
//
// Blended pixels (NCH channels plus a hole flag) stream in column by column
// into a circular column FIFO of five column memories (column_window). For a
// pixel that is not a hole the texture passes unchanged. For a hole, every
// non-hole pixel of the window at row offset dy and column offset dx is
// weighted by 256 >> (|dy| + |dx|) (256 at the centre, halving per step, as
// in the engine's weighting mask); the result is the weighted mean, rounded,
// per channel. The result is written back into the centre column memory and
// the window, so it counts as texture for the holes that follow. Pixels
// outside the frame count as holes. A hole with no texture in its window
// stays a hole and is output as 0 (this design's choice).
//
// Timing: column_window's: output one column per swept centre, two columns
// behind the input; out_hole marks a pixel that could not be filled.
module hole_filling
  import vs_pkg::*;
#(
  parameter int MAX_H = 1080
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [10:0]  width,
  input  logic [10:0]  height,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [7:0]   in_tex [NCH],
  input  logic         in_hole,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [7:0]   out_tex [NCH],
  output logic         out_hole,
  output logic         out_filled,     // the pixel was a hole and got filled
  output logic [10:0]  out_col,
  output logic [10:0]  out_row
);
  localparam int EW = 1 + 8*NCH;       // {hole, ch[NCH-1] .. ch[0]}
  localparam int WR = 9, WC = 5;

  logic [EW-1:0] in_pix, wb_pix;
  logic [EW-1:0] win [WR][WC];
  logic [16:0]   sum_w;
  logic [24:0]   sum_t [NCH];
  logic [24:0]   q;
  logic          centre_hole, can_fill;

  always_comb begin
    in_pix[EW-1] = in_hole;
    for (int ch = 0; ch < NCH; ch++) in_pix[8*ch +: 8] = in_tex[ch];
  end

  column_window #(.EW(EW), .NCOL(WC), .NROW(WR), .MAX_H(MAX_H), .CLAMP(1'b0),
                  .PAD({1'b1, {(EW-1){1'b0}}})) u_fifo (
    .clk, .rst_n, .width, .height,
    .in_valid, .in_ready, .in_data(in_pix),
    .out_valid, .out_ready, .win, .out_col, .out_row,
    .wb_en(can_fill), .wb_data(wb_pix)
  );

  always_comb begin
    sum_w = '0;
    for (int ch = 0; ch < NCH; ch++) sum_t[ch] = '0;
    for (int r = 0; r < WR; r++)
      for (int c = 0; c < WC; c++) begin
        int d;
        logic [8:0] w;
        d = (r > WR/2 ? r - WR/2 : WR/2 - r) + (c > WC/2 ? c - WC/2 : WC/2 - c);
        w = 9'(256 >> d);
        if (!win[r][c][EW-1]) begin
          sum_w = sum_w + 17'(w);
          for (int ch = 0; ch < NCH; ch++)
            sum_t[ch] = sum_t[ch] + 25'(w) * 25'(win[r][c][8*ch +: 8]);
        end
      end
    centre_hole = win[WR/2][WC/2][EW-1];
    can_fill    = centre_hole && (sum_w != '0);
    wb_pix      = '0;
    for (int ch = 0; ch < NCH; ch++) begin
      q = (sum_w != '0) ? (sum_t[ch] + 25'(sum_w >> 1)) / 25'(sum_w) : '0;
      wb_pix[8*ch +: 8] = 8'(q);
    end
    out_hole   = centre_hole && !can_fill;
    out_filled = can_fill;
    for (int ch = 0; ch < NCH; ch++)
      out_tex[ch] = !centre_hole ? win[WR/2][WC/2][8*ch +: 8]
                                 : (can_fill ? wb_pix[8*ch +: 8] : 8'd0);
  end
endmodule
