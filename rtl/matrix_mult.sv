// matrix_mult: maps a pixel position through a homography, eq. (2):
//   u_dst = (h00*u + h10*v + h20) / (h02*u + h12*v + 1)
//   v_dst = (h01*u + h11*v + h21) / (h02*u + h12*v + 1)
// rounded to the nearest integer. The projective division is the engine's
// equation; doing it as one fixed-point division per coordinate, with the
// vs_pkg element formats, is this design's choice. `in_frame` says whether the
// result lies in a WIDTH x HEIGHT image. Purely combinational.
module matrix_mult
  import vs_pkg::*;
(
  input  hmat_t               h,
  input  logic [COORD_W-1:0]  u_src,
  input  logic [COORD_W-1:0]  v_src,
  input  logic [COORD_W-1:0]  width,
  input  logic [COORD_W-1:0]  height,
  output logic [COORD_W-1:0]  u_dst,
  output logic [COORD_W-1:0]  v_dst,
  output logic                in_frame
);
  // numerators carry HA_FR fractional bits, the denominator HP_FR
  logic signed [63:0] su, sv, num_u, num_v, den, qu, qv, ru, rv;
  always_comb begin
    su    = 64'(u_src);
    sv    = 64'(v_src);
    num_u = h.h00 * su + h.h10 * sv + (64'(h.h20) <<< (HA_FR - HT_FR));
    num_v = h.h01 * su + h.h11 * sv + (64'(h.h21) <<< (HA_FR - HT_FR));
    den   = (64'sd1 <<< HP_FR) + h.h02 * su + h.h12 * sv;
    if (den <= 0) begin
      qu = '1;
      qv = '1;
    end else begin
      qu = (num_u <<< HP_FR) / den;
      qv = (num_v <<< HP_FR) / den;
    end
    ru = (qu + (64'sd1 <<< (HA_FR - 1))) >>> HA_FR;
    rv = (qv + (64'sd1 <<< (HA_FR - 1))) >>> HA_FR;
    in_frame = (den > 0) && (ru >= 0) && (rv >= 0) &&
             (ru < 64'(width)) && (rv < 64'(height));
    u_dst  = COORD_W'(ru);
    v_dst  = COORD_W'(rv);
  end
endmodule
