// blending: merges the two reverse-warped textures V_L and V_R of one pixel
// into the virtual-view texture V by the blending truth table.
//
// A view is "non-hole before dilation" when reverse warping found texture for
// the pixel and the filtered hole map does not mark it; it is "non-hole after
// dilation" when the dilated hole map does not mark it either. Then:
//   both non-hole before, and after dilation both or neither -> (1-a)V_L + aV_R
//   both non-hole before, only V_L (V_R) non-hole after     -> V_L (V_R)
//   only V_L (V_R) non-hole before                          -> V_L (V_R)
//   neither                                                  -> 0, still a hole
// The truth table is the engine's; alpha is an 8-bit fraction (a = alpha/256,
// this design's choice) and the weighted sum is rounded to nearest.
// All NCH colour channels are blended side by side.
//
// Timing: one pixel per in_valid/in_ready handshake, result registered, held
// until out_ready. `bcase` reports the table case (1..7) of the output pixel.
module blending
  import vs_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [7:0]        alpha,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [7:0]        vl [NCH],
  input  logic [7:0]        vr [NCH],
  input  logic              tex_l,        // reverse warping found texture
  input  logic              tex_r,
  input  logic              hole_l,       // filtered hole map (1 = hole)
  input  logic              hole_r,
  input  logic              hole_dil_l,   // dilated hole map (1 = hole)
  input  logic              hole_dil_r,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [7:0]        v [NCH],
  output logic              out_hole,
  output logic [2:0]        bcase
);
  logic       nb_l, nb_r, na_l, na_r;
  logic [2:0] c_d;
  logic [7:0] mix [NCH];

  always_comb begin
    nb_l = tex_l && !hole_l;
    nb_r = tex_r && !hole_r;
    na_l = !hole_dil_l;
    na_r = !hole_dil_r;
    if (nb_l && nb_r) begin
      if (na_l && na_r)       c_d = 3'd1;
      else if (!na_l && !na_r) c_d = 3'd2;
      else if (na_l)          c_d = 3'd3;
      else                    c_d = 3'd4;
    end else if (nb_l)        c_d = 3'd5;
    else if (nb_r)            c_d = 3'd6;
    else                      c_d = 3'd7;
    for (int ch = 0; ch < NCH; ch++)
      mix[ch] = 8'((16'(vl[ch]) * (16'd256 - 16'(alpha)) + 16'(vr[ch]) * 16'(alpha) + 16'd128) >> 8);
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_hole  <= 1'b0;
      bcase     <= '0;
      for (int ch = 0; ch < NCH; ch++) v[ch] <= '0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) begin
        bcase    <= c_d;
        out_hole <= (c_d == 3'd7);
        for (int ch = 0; ch < NCH; ch++) begin
          unique case (c_d)
            3'd1, 3'd2: v[ch] <= mix[ch];
            3'd3, 3'd5: v[ch] <= vl[ch];
            3'd4, 3'd6: v[ch] <= vr[ch];
            default:    v[ch] <= 8'd0;
          endcase
        end
      end
    end
  end
endmodule
