// reverse_warping: fetches, for one view, the reference texture of every
// pixel of a virtual-view column, using the filtered warped depth map.
//
// Per virtual column (columns arrive in order 0..width-1):
//  Create Index: the filtered depth column streams in. A pixel of depth 0, or
//    whose source position falls outside the frame, is a hole. Otherwise
//    WarpSet, linear interpolation of H_VL (or H_VR) and the matrix
//    multiplication give its source position (u,v) in the reference view,
//    and the data packing logic extends the current segment (same u, v one
//    higher) or opens a new one in the index table (u, v, len), building the
//    valid table (8-bit byte mask per 64-bit word) as it goes.
//  Read: the read control fetches each segment word by word, for each of the
//    NCH colour planes, into the input buffer.
//  Send: the column is emitted top to bottom; a non-hole pixel takes the next
//    valid byte of the input buffer (segments are in pixel order), a hole is
//    sent with tex_ok = 0.
// The index table, valid table and input buffer have IDX_N = BUF_N = 256
// entries. A pixel that would overflow them is sent as a hole and raises the
// sticky `overflow` flag (this design's choice). The three stages run one
// after another for a column here; the engine overlaps them over three
// columns.
//
// Interfaces: column input in_valid/in_ready/in_depth; pixel output
// out_valid/out_ready with out_tex, out_tex_ok; bus read requester as in
// forward_warping (data one cycle after grant); homography entry select
// h_entry with h_base/h_inc returned combinationally. tex_plane is the
// plane of the first colour channel; the others follow.
module reverse_warping
  import vs_pkg::*;
#(
  parameter int MAX_H = 1080,
  parameter int IDX_N = 256,
  parameter int BUF_N = 256
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [COORD_W-1:0]   width,
  input  logic [COORD_W-1:0]   height,
  input  logic [PLANE_W-1:0]   tex_plane,
  output logic [2:0]           h_entry,
  input  hmat_t                h_base,
  input  hmat_t                h_inc,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic [7:0]           in_depth,
  output logic                 rd_req,
  output logic [ADDR_W-1:0]    rd_addr,
  input  logic                 rd_gnt,
  input  logic                 rd_rvalid,
  input  logic [63:0]          rd_rdata,
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic [7:0]           out_tex [NCH],
  output logic                 out_tex_ok,
  output logic                 overflow,
  output logic                 seg_extend      // a pixel extended a segment
);
  localparam int IW = $clog2(IDX_N);
  localparam int BW = $clog2(BUF_N);

  typedef struct packed {
    logic [COORD_W-1:0] u;
    logic [COORD_W-1:0] v;
    logic [COORD_W-1:0] len;
  } seg_t;

  typedef enum logic [1:0] { S_IDX, S_RD, S_SEND } state_e;
  state_e state_q;

  seg_t        idx_q  [IDX_N];
  logic [7:0]  val_q  [BUF_N];
  logic [63:0] ibuf_q [NCH][BUF_N];
  logic        hole_q [MAX_H];
  logic [IW:0] nseg_q;
  logic [BW:0] nword_q;

  logic [COORD_W-1:0] col_q, row_q;
  logic        seg_open_q;
  logic [COORD_W-1:0] seg_u_q, seg_v_q, seg_len_q;

  // read control
  logic [IW:0]      rs_q;
  logic [WORD_W:0]  rj_q;
  logic [BW:0]      rp_q;
  logic [1:0]       rch_q;
  logic             rdone_q;
  logic [1:0]       pch_q;
  logic [BW-1:0]    pw_q;
  logic [BW+2:0]    rcv_q;   // up to NCH * BUF_N words

  // send pointer
  logic [BW:0]      sp_q;
  logic [2:0]       sl_q;

  // warp datapath
  logic [DW_W-1:0]    dw;
  hmat_t              hm;
  logic [COORD_W-1:0] u_d, v_d;
  logic               in_d;

  // WarpSet: table entry from the upper depth bits, weight from the lower
  assign h_entry = in_depth[7 -: $clog2(HT_ENTRIES)];
  assign dw      = in_depth[DW_W-1:0];
  linear_interp u_li (.h_base, .h_inc, .dweight(dw), .h(hm));
  matrix_mult u_mm (.h(hm), .u_src(col_q), .v_src(row_q), .width, .height,
                    .u_dst(u_d), .v_dst(v_d), .in_frame(in_d));

  logic cont, need_word, room, valid_px;
  always_comb begin
    valid_px  = (in_depth != 8'd0) && in_d;
    cont      = seg_open_q && (u_d == seg_u_q) && (v_d == seg_v_q + 11'd1) &&
                (seg_len_q != '1);
    need_word = !cont || (v_d[2:0] == 3'd0);
    room      = cont ? (!need_word || int'(nword_q) < BUF_N)
                     : (int'(nseg_q) < IDX_N && int'(nword_q) < BUF_N);
  end
  assign seg_extend = (state_q == S_IDX) && in_valid && valid_px && room && cont;

  // read control address
  seg_t rseg;
  logic [WORD_W:0] rseg_nw;
  always_comb begin
    rseg    = idx_q[rs_q[IW-1:0]];
    rseg_nw = (WORD_W+1)'((11'(rseg.v[2:0]) + rseg.len + 11'd7) >> 3);
    rd_req  = (state_q == S_RD) && !rdone_q;
    rd_addr = mk_addr(tex_plane + PLANE_W'(rch_q), rseg.u,
                      WORD_W'(rseg.v[COORD_W-1:3]) + rj_q[WORD_W-1:0]);
  end

  assign in_ready = (state_q == S_IDX);

  // send: current byte and next valid position
  logic [7:0]  cur_mask, nxt_mask;
  logic [2:0]  nxt_first;
  always_comb begin
    cur_mask  = val_q[sp_q[BW-1:0]];
    nxt_mask  = val_q[BW'(sp_q + 1'b1)];
    nxt_first = '0;
    for (int b = 7; b >= 0; b--) if (nxt_mask[b]) nxt_first = 3'(b);
  end

  logic send_adv;
  assign send_adv = (state_q == S_SEND) && (!out_valid || out_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_IDX;
      nseg_q     <= '0;
      nword_q    <= '0;
      col_q      <= '0;
      row_q      <= '0;
      seg_open_q <= 1'b0;
      seg_u_q    <= '0;
      seg_v_q    <= '0;
      seg_len_q  <= '0;
      rs_q       <= '0;
      rj_q       <= '0;
      rp_q       <= '0;
      rch_q      <= '0;
      rdone_q    <= 1'b0;
      pch_q      <= '0;
      pw_q       <= '0;
      rcv_q      <= '0;
      sp_q       <= '0;
      sl_q       <= '0;
      out_valid  <= 1'b0;
      out_tex_ok <= 1'b0;
      overflow   <= 1'b0;
      for (int ch = 0; ch < NCH; ch++) out_tex[ch] <= '0;
    end else begin
      unique case (state_q)
        // ---------------------------------------------------------- index
        S_IDX: if (in_valid) begin
          hole_q[row_q] <= !(valid_px && room);
          if (valid_px && !room) overflow <= 1'b1;
          if (valid_px && room) begin
            if (cont) begin
              seg_v_q   <= v_d;
              seg_len_q <= seg_len_q + 11'd1;
              idx_q[IW'(nseg_q - 1'b1)].len <= seg_len_q + 11'd1;
              if (need_word) begin
                val_q[nword_q[BW-1:0]] <= 8'd1 << v_d[2:0];
                nword_q <= nword_q + 1'b1;
              end else begin
                val_q[BW'(nword_q - 1'b1)][v_d[2:0]] <= 1'b1;
              end
            end else begin
              seg_open_q <= 1'b1;
              seg_u_q    <= u_d;
              seg_v_q    <= v_d;
              seg_len_q  <= 11'd1;
              idx_q[nseg_q[IW-1:0]] <= '{u: u_d, v: v_d, len: 11'd1};
              nseg_q  <= nseg_q + 1'b1;
              val_q[nword_q[BW-1:0]] <= 8'd1 << v_d[2:0];
              nword_q <= nword_q + 1'b1;
            end
          end
          if (row_q == height - 11'd1) begin
            row_q   <= '0;
            state_q <= S_RD;
            rs_q    <= '0;
            rj_q    <= '0;
            rp_q    <= '0;
            rch_q   <= '0;
            rcv_q   <= '0;
            // nothing to read when the column has no texture
            rdone_q <= (nseg_q == '0) && !(valid_px && room);
          end else row_q <= row_q + 11'd1;
        end
        // ----------------------------------------------------------- read
        S_RD: begin
          if (rd_gnt) begin
            pch_q <= rch_q;
            pw_q  <= rp_q[BW-1:0];
            if (rch_q == 2'(NCH - 1)) begin
              rch_q <= '0;
              rp_q  <= rp_q + 1'b1;
              if (rj_q == rseg_nw - 1'b1) begin
                rj_q <= '0;
                rs_q <= rs_q + 1'b1;
                if (rs_q == nseg_q - 1'b1) rdone_q <= 1'b1;
              end else rj_q <= rj_q + 1'b1;
            end else rch_q <= rch_q + 1'b1;
          end
          if (rd_rvalid) begin
            ibuf_q[pch_q][pw_q] <= rd_rdata;
            rcv_q <= rcv_q + 1'b1;
          end
          if (rdone_q && !rd_rvalid && !(rd_gnt)) begin
            // all words requested and returned
            if (int'(rcv_q) == int'(nword_q) * NCH) begin
              state_q <= S_SEND;
              sp_q    <= '0;
              sl_q    <= '0;
              for (int b = 7; b >= 0; b--) if (val_q[0][b]) sl_q <= 3'(b);
            end
          end
        end
        // ----------------------------------------------------------- send
        S_SEND: begin
          if (send_adv) begin
            if (row_q == height) begin
              // last pixel accepted: column finished
              out_valid  <= 1'b0;
              row_q      <= '0;
              nseg_q     <= '0;
              nword_q    <= '0;
              seg_open_q <= 1'b0;
              state_q    <= S_IDX;
              col_q      <= (col_q == width - 11'd1) ? '0 : col_q + 11'd1;
            end else begin
              out_valid <= 1'b1;
              row_q     <= row_q + 11'd1;
              if (hole_q[row_q]) begin
                out_tex_ok <= 1'b0;
                for (int ch = 0; ch < NCH; ch++) out_tex[ch] <= '0;
              end else begin
                out_tex_ok <= 1'b1;
                for (int ch = 0; ch < NCH; ch++)
                  out_tex[ch] <= ibuf_q[ch][sp_q[BW-1:0]][8*sl_q +: 8];
                if (sl_q != 3'd7 && cur_mask[sl_q + 3'd1]) sl_q <= sl_q + 3'd1;
                else begin
                  sp_q <= sp_q + 1'b1;
                  sl_q <= nxt_first;
                end
              end
            end
          end
        end
        default: state_q <= S_IDX;
      endcase
    end
  end
endmodule
