// linear_interp: builds the homography matrix of one depth level from the
// table entry that covers it, H = H_base + dweight * H_inc, element by element.
//
// H_base is the matrix of the first depth level of the entry and H_inc the
// change of every element per depth level, both in the vs_pkg::hmat_t format
// (the engine stores 154 bits for each of them). The products are truncated
// to the element widths. Purely combinational.
module linear_interp
  import vs_pkg::*;
(
  input  hmat_t            h_base,
  input  hmat_t            h_inc,
  input  logic [DW_W-1:0]  dweight,
  output hmat_t            h
);
  logic signed [DW_W:0] w;
  always_comb begin
    w     = signed'({1'b0, dweight});
    h.h00 = HA_W'(h_base.h00 + w * h_inc.h00);
    h.h10 = HA_W'(h_base.h10 + w * h_inc.h10);
    h.h01 = HA_W'(h_base.h01 + w * h_inc.h01);
    h.h11 = HA_W'(h_base.h11 + w * h_inc.h11);
    h.h20 = HT_W'(h_base.h20 + w * h_inc.h20);
    h.h21 = HT_W'(h_base.h21 + w * h_inc.h21);
    h.h02 = HP_W'(h_base.h02 + w * h_inc.h02);
    h.h12 = HP_W'(h_base.h12 + w * h_inc.h12);
  end
endmodule
