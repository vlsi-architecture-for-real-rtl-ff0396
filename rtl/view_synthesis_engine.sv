// view_synthesis_engine: synthesises a virtual camera view between a left
// and a right reference view (texture plus depth map each), after the
// two-step depth-image-based rendering flow: warp the depth maps into the
// virtual view, filter them, fetch texture through the warped depth (reverse
// warping), blend the two views and fill what is still missing.
//
// Hierarchical pipelining:
//  * Frame level, two stages working on consecutive frames at once. Stage 1
//    (forward_warping) warps DL/DR of frame i into DV_L/DV_R in external
//    memory; stage 2 processes frame i-1 from the DV maps stage 1 wrote in
//    the previous frame. The DV maps are double-buffered in external memory
//    (dv_buf selects which copy stage 1 writes; stage 2 reads the other).
//  * Column level: everything works image column by image column, one image
//    column per DRAM row. Stage 2: the DV reader fetches column c of DV_L
//    and DV_R; per view a depth_filtering (3x3 median) feeds reverse_warping,
//    and a hole_filtering feeds hole_dilation; blending merges the two views
//    using the texture and both hole maps; hole_filling fills the remaining
//    holes; the V writer stores the result columns. The units are joined by
//    valid/ready handshakes, so each runs as soon as its inputs are there.
//  * One 64-bit external bus, shared through bus_arbiter by six requesters:
//    0 forward-warping read, 1 forward-warping write, 2 DV read, 3/4
//    reverse-warping texture reads (L/R), 5 V write. 1, 3 and 4 have
//    priority.
//
// Where this design departs from the engine: the per-view units of stage 2
// are instantiated once per view instead of being time-shared (left view,
// then right view); preprocessing (computing the homographies) is not part
// of this module: the homography table is written through the h_* port.
// Of the preprocessing only its IEEE 754 divider (fp_divider) and the Z
// scaling (z_scaling) are here, with their operands brought out (pre_div_*,
// pre_z_*) for the missing sequencer.
//
// External memory port: mem_en with mem_we/mem_addr/mem_wdata/mem_wmask is
// one transfer in that cycle; read data must come back on mem_rvalid/
// mem_rdata in the next cycle. Address = {plane, column, word}, see vs_pkg.
// Frame control: pulse start with run_s1/run_s2 and dv_buf held; done
// pulses when every started stage has finished.
module view_synthesis_engine
  import vs_pkg::*;
#(
  parameter int MAX_H = 1080,
  parameter int FW_IDX_N = 256,   // forward warping index table entries
  parameter int FW_BUF_N = 256,   // forward warping output buffer words
  parameter int RW_IDX_N = 256,   // reverse warping index table entries
  parameter int RW_BUF_N = 256    // reverse warping input buffer / valid table words
) (
  input  logic                clk,
  input  logic                rst_n,
  // frame configuration
  input  logic [COORD_W-1:0]  width,
  input  logic [COORD_W-1:0]  height,
  input  logic [7:0]          alpha,
  input  logic                dir_l,
  input  logic                dir_r,
  // frame control
  input  logic                start,
  input  logic                run_s1,
  input  logic                run_s2,
  input  logic                dv_buf,
  output logic                busy,
  output logic                done,
  // homography table write port (from preprocessing)
  input  logic                h_swap,
  input  logic                h_wr_en,
  input  hsel_e               h_wr_sel,
  input  logic [2:0]          h_wr_entry,
  input  hmat_t               h_wr_base,
  input  hmat_t               h_wr_inc,
  // external memory
  output logic                mem_en,
  output logic                mem_we,
  output logic [ADDR_W-1:0]   mem_addr,
  output logic [63:0]         mem_wdata,
  output logic [7:0]          mem_wmask,
  input  logic                mem_rvalid,
  input  logic [63:0]         mem_rdata,
  // status
  output logic                rw_overflow,
  // floating-point divider of the preprocessing (sequencer not included)
  input  logic                pre_div_start,
  input  logic [31:0]         pre_div_a,
  input  logic [31:0]         pre_div_b,
  output logic                pre_div_busy,
  output logic                pre_div_done,
  output logic [31:0]         pre_div_q,
  // Z scaling of the preprocessing
  input  logic [31:0]         pre_z_min,
  input  logic [31:0]         pre_z_max,
  output logic [7:0]          pre_z_shift,
  output logic [31:0]         pre_z_min_s,
  output logic [31:0]         pre_z_max_s
);
  localparam int NM = 6;
  localparam logic [NM-1:0] HI_PRIO = 6'b011010;

  // ------------------------------------------------------------------ bus
  logic [NM-1:0]     req, gnt;
  logic [ADDR_W-1:0] addr   [NM];
  logic [NM-1:0]     is_wr;
  logic [63:0]       wdata  [NM];
  logic [7:0]        wmask  [NM];
  logic [NM-1:0]     rvalid;
  logic [NM-1:0]     rd_gnt_q;

  bus_arbiter #(.N(NM), .HI_PRIO(HI_PRIO)) u_arb (.clk, .rst_n, .req, .gnt);

  always_comb begin
    mem_en    = |gnt;
    mem_we    = 1'b0;
    mem_addr  = '0;
    mem_wdata = '0;
    mem_wmask = '0;
    for (int i = 0; i < NM; i++)
      if (gnt[i]) begin
        mem_we    = is_wr[i];
        mem_addr  = addr[i];
        mem_wdata = wdata[i];
        mem_wmask = wmask[i];
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_gnt_q <= '0;
    else        rd_gnt_q <= gnt & ~is_wr;
  end
  assign rvalid = mem_rvalid ? rd_gnt_q : '0;

  // ---------------------------------------------------- homography table
  logic       fw_hview;
  logic [2:0] fw_hentry, rwl_hentry, rwr_hentry;
  hmat_t      fw_hbase, fw_hinc, rwl_hbase, rwl_hinc, rwr_hbase, rwr_hinc;
  logic       h_pp;

  homography_table u_htab (
    .clk, .rst_n, .swap(h_swap), .wr_en(h_wr_en), .wr_sel(h_wr_sel),
    .wr_entry(h_wr_entry), .wr_base(h_wr_base), .wr_inc(h_wr_inc),
    .fw_view(fw_hview), .fw_entry(fw_hentry), .fw_base(fw_hbase), .fw_inc(fw_hinc),
    .rwl_entry(rwl_hentry), .rwl_base(rwl_hbase), .rwl_inc(rwl_hinc),
    .rwr_entry(rwr_hentry), .rwr_base(rwr_hbase), .rwr_inc(rwr_hinc), .pp(h_pp));

  // ----------------------------------------------------- stage 1
  logic fw_busy, fw_done, fw_stall, fw_init;

  forward_warping #(.MAX_H(MAX_H), .IDX_N(FW_IDX_N), .BUF_N(FW_BUF_N)) u_fw (
    .clk, .rst_n, .start(start && run_s1), .width, .height,
    .dv_plane(dv_buf ? PL_DV1 : PL_DV0), .dir_l, .dir_r,
    .h_view(fw_hview), .h_entry(fw_hentry), .h_base(fw_hbase), .h_inc(fw_hinc),
    .rd_req(req[0]), .rd_addr(addr[0]), .rd_gnt(gnt[0]), .rd_rvalid(rvalid[0]),
    .rd_rdata(mem_rdata),
    .wr_req(req[1]), .wr_addr(addr[1]), .wr_data(wdata[1]), .wr_mask(wmask[1]),
    .wr_gnt(gnt[1]), .busy(fw_busy), .done(fw_done), .stall(fw_stall),
    .init_active(fw_init));

  assign is_wr[0] = 1'b0;
  assign wdata[0] = '0;
  assign wmask[0] = '0;
  assign is_wr[1] = 1'b1;

  // ----------------------------------------------------- stage 2: DV reader
  typedef enum logic [1:0] { R_IDLE, R_REQ, R_WAIT, R_PUSH } rstate_e;
  rstate_e rs_q;
  logic [COORD_W-1:0] rcol_q;
  logic               rview_q;
  logic [WORD_W-1:0]  rword_q;
  logic [2:0]         rbyte_q;
  logic [63:0]        rbuf_q;
  logic [WORD_W-1:0]  nwc;
  logic [PLANE_W-1:0] s2_plane;
  logic               push_ok, push_last_byte;

  assign nwc      = WORD_W'((height + 11'd7) >> 3);
  assign s2_plane = dv_buf ? PL_DV0 : PL_DV1;

  logic [1:0] df_in_ready, hf_in_ready;
  logic [1:0] dv_push;
  logic [7:0] dv_byte;

  assign dv_byte        = rbuf_q[8*rbyte_q +: 8];
  assign push_ok        = rview_q ? (df_in_ready[1] && hf_in_ready[1])
                                  : (df_in_ready[0] && hf_in_ready[0]);
  assign push_last_byte = (rbyte_q == 3'd7) ||
                          ({rword_q, rbyte_q} == 11'(height - 11'd1));
  assign dv_push[0]     = (rs_q == R_PUSH) && !rview_q;
  assign dv_push[1]     = (rs_q == R_PUSH) &&  rview_q;

  assign req[2]   = (rs_q == R_REQ);
  assign addr[2]  = mk_addr(s2_plane + PLANE_W'(rview_q), rcol_q, rword_q);
  assign is_wr[2] = 1'b0;
  assign wdata[2] = '0;
  assign wmask[2] = '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rs_q    <= R_IDLE;
      rcol_q  <= '0;
      rview_q <= 1'b0;
      rword_q <= '0;
      rbyte_q <= '0;
      rbuf_q  <= '0;
    end else begin
      unique case (rs_q)
        R_IDLE: if (start && run_s2) begin
          rs_q    <= R_REQ;
          rcol_q  <= '0;
          rview_q <= 1'b0;
          rword_q <= '0;
        end
        R_REQ:  if (gnt[2]) rs_q <= R_WAIT;
        R_WAIT: if (rvalid[2]) begin
          rbuf_q  <= mem_rdata;
          rbyte_q <= '0;
          rs_q    <= R_PUSH;
        end
        R_PUSH: if (push_ok) begin
          rbyte_q <= rbyte_q + 3'd1;
          if (push_last_byte) begin
            rs_q <= R_REQ;
            if (rword_q == nwc - 1'b1) begin
              rword_q <= '0;
              rview_q <= ~rview_q;
              if (rview_q) begin
                if (rcol_q == width - 11'd1) rs_q <= R_IDLE;
                else rcol_q <= rcol_q + 11'd1;
              end
            end else rword_q <= rword_q + 1'b1;
          end
        end
        default: rs_q <= R_IDLE;
      endcase
    end
  end

  // ---------------------------------------------- stage 2: per-view units
  logic [1:0] df_ov, hf_ov, hd_ov, rw_ov, hd_in_ready, rw_in_ready;
  logic [1:0] df_ordy, hd_ordy, rw_ordy;
  logic [7:0] df_od [2];
  logic [1:0] hf_oh, hd_oh, hd_ohd, rw_tok, rw_ovf, rw_ext;
  logic [7:0] rw_tex [2][NCH];
  logic [10:0] unused_c [6], unused_r [6];
  logic        blend_in_ready, blend_join;

  for (genvar x = 0; x < 2; x++) begin : g_view
    depth_filtering #(.MAX_H(MAX_H)) u_df (
      .clk, .rst_n, .width, .height,
      .in_valid(dv_push[x] && push_ok), .in_ready(df_in_ready[x]), .in_depth(dv_byte),
      .out_valid(df_ov[x]), .out_ready(df_ordy[x]), .out_depth(df_od[x]),
      .out_col(unused_c[3*x]), .out_row(unused_r[3*x]));

    hole_filtering #(.MAX_H(MAX_H)) u_hf (
      .clk, .rst_n, .width, .height,
      .in_valid(dv_push[x] && push_ok), .in_ready(hf_in_ready[x]), .in_depth(dv_byte),
      .out_valid(hf_ov[x]), .out_ready(hd_in_ready[x]), .out_hole(hf_oh[x]),
      .out_col(unused_c[3*x+1]), .out_row(unused_r[3*x+1]));

    hole_dilation #(.MAX_H(MAX_H)) u_hd (
      .clk, .rst_n, .width, .height,
      .in_valid(hf_ov[x]), .in_ready(hd_in_ready[x]), .in_hole(hf_oh[x]),
      .out_valid(hd_ov[x]), .out_ready(hd_ordy[x]), .out_hole(hd_oh[x]),
      .out_hole_dil(hd_ohd[x]), .out_col(unused_c[3*x+2]), .out_row(unused_r[3*x+2]));

    assign df_ordy[x] = rw_in_ready[x];
    assign hd_ordy[x] = blend_join;
    assign rw_ordy[x] = blend_join;
  end

  reverse_warping #(.MAX_H(MAX_H), .IDX_N(RW_IDX_N), .BUF_N(RW_BUF_N)) u_rw_l (
    .clk, .rst_n, .width, .height, .tex_plane(PL_L),
    .h_entry(rwl_hentry), .h_base(rwl_hbase), .h_inc(rwl_hinc),
    .in_valid(df_ov[0]), .in_ready(rw_in_ready[0]), .in_depth(df_od[0]),
    .rd_req(req[3]), .rd_addr(addr[3]), .rd_gnt(gnt[3]), .rd_rvalid(rvalid[3]),
    .rd_rdata(mem_rdata), .out_valid(rw_ov[0]), .out_ready(rw_ordy[0]),
    .out_tex(rw_tex[0]), .out_tex_ok(rw_tok[0]), .overflow(rw_ovf[0]),
    .seg_extend(rw_ext[0]));

  reverse_warping #(.MAX_H(MAX_H), .IDX_N(RW_IDX_N), .BUF_N(RW_BUF_N)) u_rw_r (
    .clk, .rst_n, .width, .height, .tex_plane(PL_R),
    .h_entry(rwr_hentry), .h_base(rwr_hbase), .h_inc(rwr_hinc),
    .in_valid(df_ov[1]), .in_ready(rw_in_ready[1]), .in_depth(df_od[1]),
    .rd_req(req[4]), .rd_addr(addr[4]), .rd_gnt(gnt[4]), .rd_rvalid(rvalid[4]),
    .rd_rdata(mem_rdata), .out_valid(rw_ov[1]), .out_ready(rw_ordy[1]),
    .out_tex(rw_tex[1]), .out_tex_ok(rw_tok[1]), .overflow(rw_ovf[1]),
    .seg_extend(rw_ext[1]));

  assign is_wr[3] = 1'b0;
  assign wdata[3] = '0;
  assign wmask[3] = '0;
  assign is_wr[4] = 1'b0;
  assign wdata[4] = '0;
  assign wmask[4] = '0;
  assign rw_overflow = |rw_ovf;

  // ---------------------------------------------------- blending
  logic       bl_ov, bl_ordy, bl_hole;
  logic [7:0] bl_v [NCH];
  logic [2:0] bl_case;

  assign blend_join = blend_in_ready && (&rw_ov) && (&hd_ov);

  blending u_bl (
    .clk, .rst_n, .alpha, .in_valid((&rw_ov) && (&hd_ov)), .in_ready(blend_in_ready),
    .vl(rw_tex[0]), .vr(rw_tex[1]), .tex_l(rw_tok[0]), .tex_r(rw_tok[1]),
    .hole_l(hd_oh[0]), .hole_r(hd_oh[1]), .hole_dil_l(hd_ohd[0]), .hole_dil_r(hd_ohd[1]),
    .out_valid(bl_ov), .out_ready(bl_ordy), .v(bl_v), .out_hole(bl_hole), .bcase(bl_case));

  // ---------------------------------------------------- hole filling
  logic        hf2_ov, hf2_ordy, hf2_hole, hf2_filled;
  logic [7:0]  hf2_tex [NCH];
  logic [10:0] hf2_col, hf2_row;

  hole_filling #(.MAX_H(MAX_H)) u_fill (
    .clk, .rst_n, .width, .height,
    .in_valid(bl_ov), .in_ready(bl_ordy), .in_tex(bl_v), .in_hole(bl_hole),
    .out_valid(hf2_ov), .out_ready(hf2_ordy), .out_tex(hf2_tex), .out_hole(hf2_hole),
    .out_filled(hf2_filled), .out_col(hf2_col), .out_row(hf2_row));

  // ---------------------------------------------------- V writer
  logic [63:0]        vbuf_q [NCH];
  logic [7:0]         vmask_q;
  logic               vwr_q;
  logic [1:0]         vch_q;
  logic [COORD_W-1:0] vcol_q;
  logic [WORD_W-1:0]  vword_q;
  logic               s2_done;

  assign hf2_ordy = !vwr_q;
  assign req[5]   = vwr_q;
  assign is_wr[5] = 1'b1;
  assign addr[5]  = mk_addr(PL_V + PLANE_W'(vch_q), vcol_q, vword_q);
  assign wdata[5] = vbuf_q[vch_q];
  assign wmask[5] = vmask_q;
  assign s2_done  = vwr_q && gnt[5] && (vch_q == 2'(NCH - 1)) &&
                    (vcol_q == width - 11'd1) && (vword_q == nwc - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vmask_q <= '0;
      vwr_q   <= 1'b0;
      vch_q   <= '0;
      vcol_q  <= '0;
      vword_q <= '0;
      for (int ch = 0; ch < NCH; ch++) vbuf_q[ch] <= '0;
    end else if (vwr_q) begin
      if (gnt[5]) begin
        if (vch_q == 2'(NCH - 1)) begin
          vch_q   <= '0;
          vwr_q   <= 1'b0;
          vmask_q <= '0;
        end else vch_q <= vch_q + 2'd1;
      end
    end else if (hf2_ov) begin
      for (int ch = 0; ch < NCH; ch++) vbuf_q[ch][8*hf2_row[2:0] +: 8] <= hf2_tex[ch];
      vmask_q[hf2_row[2:0]] <= 1'b1;
      if (hf2_row[2:0] == 3'd7 || hf2_row == height - 11'd1) begin
        vwr_q   <= 1'b1;
        vch_q   <= '0;
        vcol_q  <= hf2_col;
        vword_q <= WORD_W'(hf2_row[COORD_W-1:3]);
      end
    end
  end

  // ---------------------------------------------------- frame control
  logic s1_run_q, s2_run_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_run_q <= 1'b0;
      s2_run_q <= 1'b0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        s1_run_q <= run_s1;
        s2_run_q <= run_s2;
      end else begin
        if (fw_done) s1_run_q <= 1'b0;
        if (s2_done) s2_run_q <= 1'b0;
        if ((s1_run_q || s2_run_q) &&
            (!s1_run_q || fw_done) && (!s2_run_q || s2_done))
          done <= 1'b1;
      end
    end
  end
  assign busy = s1_run_q || s2_run_q;

  // ---------------------------------------------------- preprocessing divider
  fp_divider u_div (.clk, .rst_n, .start(pre_div_start), .a(pre_div_a), .b(pre_div_b),
                    .busy(pre_div_busy), .done(pre_div_done), .q(pre_div_q));

  z_scaling u_zs (.z_min(pre_z_min), .z_max(pre_z_max), .shift(pre_z_shift),
                  .z_min_s(pre_z_min_s), .z_max_s(pre_z_max_s));

endmodule
