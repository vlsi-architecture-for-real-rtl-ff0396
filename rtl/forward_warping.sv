// forward_warping: first frame-level stage. Warps the reference depth maps DL
// and DR into the virtual view (DV_L, DV_R) in external memory.
//
// Operation for one frame:
//  1. Initialisation: both warped depth planes are cleared to zero (zero marks
//     a hole for the second stage).
//  2. For the left view, then the right view, column by column (column-order
//     warping; dir_l/dir_r choose right-to-left instead of left-to-right),
//     Read: the source column is fetched over the bus into the input buffer.
//     Perform: each pixel, top to bottom, goes through WarpSet, linear
//     interpolation of the homography (H_LV or H_RV) and the matrix
//     multiplication, giving its position (u,v) in the virtual view. The
//     data packing logic appends the depth to the packing buffer: a pixel
//     whose position continues the current run (same u, v one higher) extends
//     the current segment, otherwise a new segment is opened. The index
//     table keeps (u, v, len) of every segment (33 bits) and the output
//     buffer keeps the bytes, aligned as in memory, with an 8-bit valid mask
//     per 64-bit word.
//     Write: the writing control emits each segment as masked 64-bit writes.
//  The packing buffer has two banks (Updated / WrittenOut): one is filled
//  while the other is written. A bank is handed over at the end of a column
//  or when it is full; when the other bank is still being written the
//  perform pipeline stalls (`stall` is high in such a cycle).
//  Occlusion needs no Z-buffer: pixels are written in warping order, so a
//  later pixel overwrites an earlier one at the same position.
//
// The algorithm and buffer organisation follow the engine; reading a column
// completely before performing it, and one pixel per cycle through a
// combinational warp, are this design's simplifications.
//
// Bus: rd_* and wr_* are two requesters of the shared bus. A request is held
// until its grant; read data returns with rd_rvalid one cycle after the grant.
// Homography: h_view/h_entry select a table entry, h_base/h_inc return it
// combinationally. start begins a frame; done pulses when the last write of
// the frame has been granted.
module forward_warping
  import vs_pkg::*;
#(
  parameter int MAX_H = 1080,
  parameter int IDX_N = 256,
  parameter int BUF_N = 256
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  input  logic [COORD_W-1:0]          width,
  input  logic [COORD_W-1:0]          height,
  input  logic [PLANE_W-1:0]          dv_plane,   // DV_L plane, DV_R is the next
  input  logic                        dir_l,
  input  logic                        dir_r,
  // homography table read port
  output logic                        h_view,
  output logic [2:0]                  h_entry,
  input  hmat_t                       h_base,
  input  hmat_t                       h_inc,
  // bus read requester
  output logic                        rd_req,
  output logic [ADDR_W-1:0]           rd_addr,
  input  logic                        rd_gnt,
  input  logic                        rd_rvalid,
  input  logic [63:0]                 rd_rdata,
  // bus write requester
  output logic                        wr_req,
  output logic [ADDR_W-1:0]           wr_addr,
  output logic [63:0]                 wr_data,
  output logic [7:0]                  wr_mask,
  input  logic                        wr_gnt,
  output logic                        busy,
  output logic                        done,
  output logic                        stall,
  output logic                        init_active
);
  localparam int MAXW = (MAX_H + 7) / 8;

  typedef struct packed {
    logic [COORD_W-1:0] u;
    logic [COORD_W-1:0] v;
    logic [COORD_W-1:0] len;
  } seg_t;

  typedef enum logic [2:0] { S_IDLE, S_INIT, S_RD, S_PERF, S_HAND, S_FIN } state_e;
  state_e state_q;

  // input buffer
  logic [63:0] inbuf [MAXW];
  // packing buffer, two banks
  seg_t        idx_q  [2][IDX_N];
  logic [63:0] obuf_q [2][BUF_N];
  logic [7:0]  oval_q [2][BUF_N];
  logic [$clog2(IDX_N):0] nseg_q  [2];
  logic [$clog2(BUF_N):0] nword_q [2];
  logic        bview_q [2];

  logic        fb_q;            // bank being filled
  logic        view_q;
  logic [COORD_W-1:0] k_q, c_q, r_q;
  logic [WORD_W:0] rq_q, rr_q;
  logic [WORD_W-1:0] nwc;

  // init counters
  logic        ipl_q;
  logic [COORD_W-1:0] icol_q;
  logic [WORD_W-1:0]  iw_q;

  // writer
  logic        w_act_q, wb_q;
  logic [$clog2(IDX_N):0] ws_q;
  logic [WORD_W:0]        wj_q;
  logic [$clog2(BUF_N):0] wp_q;

  // current segment
  logic        seg_open_q;
  logic [COORD_W-1:0] seg_u_q, seg_v_q, seg_len_q;

  // warp datapath
  logic [7:0]  d;
  logic [DW_W-1:0] dw;
  hmat_t       hm;
  logic [COORD_W-1:0] u_d, v_d;
  logic        in_d;

  assign nwc = WORD_W'((height + 11'd7) >> 3);
  assign d   = inbuf[r_q[COORD_W-1:3]][8*r_q[2:0] +: 8];
  assign h_view = view_q;

  // WarpSet: the upper depth bits pick one of the 8 table entries, the lower
  // bits are the interpolation weight between that entry and the next
  assign h_entry = d[7 -: $clog2(HT_ENTRIES)];
  assign dw      = d[DW_W-1:0];
  linear_interp u_li (.h_base, .h_inc, .dweight(dw), .h(hm));
  matrix_mult u_mm (.h(hm), .u_src(c_q), .v_src(r_q), .width, .height,
                    .u_dst(u_d), .v_dst(v_d), .in_frame(in_d));

  // packing decisions for the current pixel
  logic cont, need_word, full, take;
  always_comb begin
    cont      = seg_open_q && (u_d == seg_u_q) && (v_d == seg_v_q + 11'd1) &&
                (seg_len_q != '1);
    need_word = !cont || (v_d[2:0] == 3'd0);
    full      = cont ? (need_word && int'(nword_q[fb_q]) == BUF_N)
                     : (int'(nseg_q[fb_q]) == IDX_N || int'(nword_q[fb_q]) == BUF_N);
    take      = (state_q == S_PERF) && in_d && !full;
    stall     = (state_q == S_PERF) && in_d && full && w_act_q;
  end

  // the bank to hand over is non-empty and the writer is free
  logic hand_ok;
  assign hand_ok = !w_act_q;

  // writer address and data
  seg_t ws_seg;
  logic [WORD_W:0] ws_nw;
  always_comb begin
    ws_seg = idx_q[wb_q][ws_q[$clog2(IDX_N)-1:0]];
    ws_nw  = (WORD_W+1)'((11'(ws_seg.v[2:0]) + ws_seg.len + 11'd7) >> 3);
  end

  always_comb begin
    rd_req  = (state_q == S_RD) && (rq_q < (WORD_W+1)'(nwc));
    rd_addr = mk_addr(view_q ? PL_DR : PL_DL, c_q, rq_q[WORD_W-1:0]);
    if (state_q == S_INIT) begin
      wr_req  = 1'b1;
      wr_addr = mk_addr(dv_plane + PLANE_W'(ipl_q), icol_q, iw_q);
      wr_data = '0;
      wr_mask = 8'hff;
    end else begin
      wr_req  = w_act_q;
      wr_addr = mk_addr(dv_plane + PLANE_W'(bview_q[wb_q]), ws_seg.u,
                        WORD_W'(ws_seg.v[COORD_W-1:3]) + wj_q[WORD_W-1:0]);
      wr_data = obuf_q[wb_q][wp_q[$clog2(BUF_N)-1:0]];
      wr_mask = oval_q[wb_q][wp_q[$clog2(BUF_N)-1:0]];
    end
  end

  assign busy        = (state_q != S_IDLE);
  assign init_active = (state_q == S_INIT);

  logic last_col;
  assign last_col = (k_q == width - 11'd1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      done    <= 1'b0;
      fb_q    <= 1'b0;
      view_q  <= 1'b0;
      k_q     <= '0;
      c_q     <= '0;
      r_q     <= '0;
      rq_q    <= '0;
      rr_q    <= '0;
      ipl_q   <= 1'b0;
      icol_q  <= '0;
      iw_q    <= '0;
      w_act_q <= 1'b0;
      wb_q    <= 1'b0;
      ws_q    <= '0;
      wj_q    <= '0;
      wp_q    <= '0;
      seg_open_q <= 1'b0;
      seg_u_q <= '0;
      seg_v_q <= '0;
      seg_len_q <= '0;
      nseg_q  <= '{default: '0};
      nword_q <= '{default: '0};
      bview_q <= '{default: 1'b0};
    end else begin
      done <= 1'b0;

      // writing control
      if (w_act_q && state_q != S_INIT && wr_gnt) begin
        wp_q <= wp_q + 1'b1;
        if (wj_q == ws_nw - 1'b1) begin
          wj_q <= '0;
          ws_q <= ws_q + 1'b1;
          if (ws_q == nseg_q[wb_q] - 1'b1) begin
            w_act_q      <= 1'b0;
            nseg_q[wb_q] <= '0;
            nword_q[wb_q] <= '0;
          end
        end else begin
          wj_q <= wj_q + 1'b1;
        end
      end

      unique case (state_q)
        S_IDLE: if (start) begin
          state_q <= S_INIT;
          ipl_q   <= 1'b0;
          icol_q  <= '0;
          iw_q    <= '0;
          view_q  <= 1'b0;
          k_q     <= '0;
          fb_q    <= 1'b0;
          seg_open_q <= 1'b0;
        end
        S_INIT: if (wr_gnt) begin
          if (iw_q == nwc - 1'b1) begin
            iw_q <= '0;
            if (icol_q == width - 11'd1) begin
              icol_q <= '0;
              if (ipl_q) begin
                state_q <= S_RD;
                c_q     <= dir_l ? width - 11'd1 : '0;
                rq_q    <= '0;
                rr_q    <= '0;
              end
              ipl_q <= ~ipl_q;
            end else icol_q <= icol_q + 11'd1;
          end else iw_q <= iw_q + 1'b1;
        end
        S_RD: begin
          if (rd_gnt) rq_q <= rq_q + 1'b1;
          if (rd_rvalid) begin
            inbuf[rr_q[WORD_W-1:0]] <= rd_rdata;
            rr_q <= rr_q + 1'b1;
            if (rr_q == (WORD_W+1)'(nwc) - 1'b1) begin
              state_q    <= S_PERF;
              r_q        <= '0;
              seg_open_q <= 1'b0;
            end
          end
        end
        S_PERF: begin
          if (in_d && full) begin
            // bank full: hand it over when the writer is free
            if (hand_ok) begin
              w_act_q     <= 1'b1;
              wb_q        <= fb_q;
              ws_q        <= '0;
              wj_q        <= '0;
              wp_q        <= '0;
              bview_q[fb_q] <= view_q;
              fb_q        <= ~fb_q;
              seg_open_q  <= 1'b0;
            end
          end else begin
            if (take) begin
              if (cont) begin
                seg_v_q   <= v_d;
                seg_len_q <= seg_len_q + 11'd1;
                idx_q[fb_q][nseg_q[fb_q][$clog2(IDX_N)-1:0] - 1'b1].len <= seg_len_q + 11'd1;
                if (need_word) begin
                  obuf_q[fb_q][nword_q[fb_q][$clog2(BUF_N)-1:0]] <= 64'(d) << (8*v_d[2:0]);
                  oval_q[fb_q][nword_q[fb_q][$clog2(BUF_N)-1:0]] <= 8'd1 << v_d[2:0];
                  nword_q[fb_q] <= nword_q[fb_q] + 1'b1;
                end else begin
                  obuf_q[fb_q][nword_q[fb_q][$clog2(BUF_N)-1:0] - 1'b1][8*v_d[2:0] +: 8] <= d;
                  oval_q[fb_q][nword_q[fb_q][$clog2(BUF_N)-1:0] - 1'b1][v_d[2:0]] <= 1'b1;
                end
              end else begin
                seg_open_q <= 1'b1;
                seg_u_q    <= u_d;
                seg_v_q    <= v_d;
                seg_len_q  <= 11'd1;
                idx_q[fb_q][nseg_q[fb_q][$clog2(IDX_N)-1:0]] <= '{u: u_d, v: v_d, len: 11'd1};
                nseg_q[fb_q] <= nseg_q[fb_q] + 1'b1;
                obuf_q[fb_q][nword_q[fb_q][$clog2(BUF_N)-1:0]] <= 64'(d) << (8*v_d[2:0]);
                oval_q[fb_q][nword_q[fb_q][$clog2(BUF_N)-1:0]] <= 8'd1 << v_d[2:0];
                nword_q[fb_q] <= nword_q[fb_q] + 1'b1;
              end
            end
            if (r_q == height - 11'd1) state_q <= S_HAND;
            else r_q <= r_q + 11'd1;
          end
        end
        S_HAND: begin
          // end of column: hand over the filled bank, then the next column
          if (nseg_q[fb_q] == '0 || hand_ok) begin
            if (nseg_q[fb_q] != '0) begin
              w_act_q     <= 1'b1;
              wb_q        <= fb_q;
              ws_q        <= '0;
              wj_q        <= '0;
              wp_q        <= '0;
              bview_q[fb_q] <= view_q;
              fb_q        <= ~fb_q;
            end
            rq_q <= '0;
            rr_q <= '0;
            if (last_col) begin
              k_q <= '0;
              if (view_q) state_q <= S_FIN;
              else begin
                view_q  <= 1'b1;
                c_q     <= dir_r ? width - 11'd1 : '0;
                state_q <= S_RD;
              end
            end else begin
              k_q     <= k_q + 11'd1;
              c_q     <= (view_q ? dir_r : dir_l) ? c_q - 11'd1 : c_q + 11'd1;
              state_q <= S_RD;
            end
          end
        end
        S_FIN: if (!w_act_q) begin
          state_q <= S_IDLE;
          done    <= 1'b1;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end
endmodule
