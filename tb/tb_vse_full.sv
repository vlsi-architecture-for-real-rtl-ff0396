// tb_vse_full: one complete frame of view_synthesis_engine at its default
// parameters (1080-row column buffers, 256-entry packing tables) on an
// HD1080p frame of 1920 x 1080 pixels.
//
// The frame goes through stage 1 (forward warping of DL and DR into the
// warped depth buffer) and then stage 2 (filtering, reverse warping,
// blending and hole filling into V), as two successive start commands with
// the warped depth buffer handed over between them. The synthesised view is
// compared pixel by pixel with a reference computed in the testbench from
// the same steps as the end-to-end test. The cycle count of each stage is
// printed; the engine's own figure is about 6.2 Mcycles per frame at
// 200 MHz and 32.4 frames/s, which this design (one pixel per cycle in each
// unit, no overlap of read and perform) does not reach.
module tb_vse_full;
  import vs_pkg::*;
  localparam int W = 1920, H = 1080, NF = 1;
  localparam logic [7:0] ALPHA = 8'd96;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, run_s1 = 0, run_s2 = 0, dv_buf = 0, busy, done;
  logic h_swap = 0, h_wr_en = 0;
  hsel_e h_wr_sel;
  logic [2:0] h_wr_entry;
  hmat_t h_wr_base, h_wr_inc;
  logic mem_en, mem_we, mem_rvalid, rw_overflow;
  logic [ADDR_W-1:0] mem_addr;
  logic [63:0] mem_wdata, mem_rdata;
  logic [7:0] mem_wmask;
  logic pre_div_start = 0, pre_div_busy, pre_div_done;
  logic [31:0] pre_div_a = '0, pre_div_b = '0, pre_div_q;
  logic [31:0] pre_z_min = '0, pre_z_max = '0, pre_z_min_s, pre_z_max_s;
  logic [7:0]  pre_z_shift;

  view_synthesis_engine dut (
    .clk, .rst_n, .width(11'(W)), .height(11'(H)), .alpha(ALPHA), .dir_l(1'b0), .dir_r(1'b1),
    .start, .run_s1, .run_s2, .dv_buf, .busy, .done,
    .h_swap, .h_wr_en, .h_wr_sel, .h_wr_entry, .h_wr_base, .h_wr_inc,
    .mem_en, .mem_we, .mem_addr, .mem_wdata, .mem_wmask, .mem_rvalid, .mem_rdata,
    .rw_overflow, .pre_div_start, .pre_div_a, .pre_div_b, .pre_div_busy, .pre_div_done,
    .pre_div_q, .pre_z_min, .pre_z_max, .pre_z_shift, .pre_z_min_s, .pre_z_max_s);

  tb_ext_mem mem (.clk, .en(mem_en), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata),
                  .wmask(mem_wmask), .rvalid(mem_rvalid), .rdata(mem_rdata));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 25) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #400000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------ mechanism counters
  int n_init, n_stall, n_ext, n_contend, n_both, n_fill, n_median;
  int n_case [8];
  always @(posedge clk) if (rst_n) begin
    if (dut.fw_init) n_init++;
    if (dut.fw_stall) n_stall++;
    if (|dut.rw_ext) n_ext++;
    if (!$onehot0(dut.req)) n_contend++;
    if (dut.fw_busy && dut.rs_q != 0) n_both++;
    if (dut.hf2_ov && dut.hf2_ordy && dut.hf2_filled) n_fill++;
    if (dut.df_ov[0] && dut.df_ordy[0] && dut.df_od[0] != dut.g_view[0].u_df.win[1][1]) n_median++;
    if (dut.bl_ov && dut.bl_ordy) n_case[dut.bl_case]++;
  end

  // ------------------------------------------------------ scene and reference
  int dl [NF][W][H], dr [NF][W][H];
  int tl [W][H][NCH], tr [W][H][NCH];
  int ref_v [NF][W][H][NCH];

  // frame-dependent vertical shift of the reverse homography H_VL
  function automatic int ty_l(input int f); return f % 2; endfunction

  function automatic int rnd_disp(input int d); // round(d/32)
    return $rtoi($floor(real'(d) / 32.0 + 0.5));
  endfunction

  task build_reference(input int f);  // static: the frame arrays are large
    int dv [2][W][H], md [2][W][H], hflt [2][W][H], hdil [2][W][H];
    int bt [W][H][NCH];
    bit bh [W][H];
    for (int x = 0; x < 2; x++)
      for (int c = 0; c < W; c++)
        for (int r = 0; r < H; r++) dv[x][c][r] = 0;
    // forward warping, left view left-to-right, right view right-to-left
    for (int c = 0; c < W; c++)
      for (int r = 0; r < H; r++) begin
        automatic int u = c + rnd_disp(dl[f][c][r]);
        if (u >= 0 && u < W) dv[0][u][r] = dl[f][c][r];
      end
    for (int c = W - 1; c >= 0; c--)
      for (int r = 0; r < H; r++) begin
        automatic int u = $rtoi($floor(real'(c) - real'(dr[f][c][r]) / 32.0 + 0.5));
        if (u >= 0 && u < W) dv[1][u][r] = dr[f][c][r];
      end
    // filters with edge repeat
    for (int x = 0; x < 2; x++)
      for (int c = 0; c < W; c++)
        for (int r = 0; r < H; r++) begin
          automatic int v9 [9];
          automatic int n = 0, s = 0;
          for (int dc = -1; dc <= 1; dc++)
            for (int dr_ = -1; dr_ <= 1; dr_++) begin
              automatic int cc = c + dc < 0 ? 0 : (c + dc >= W ? W - 1 : c + dc);
              automatic int rr = r + dr_ < 0 ? 0 : (r + dr_ >= H ? H - 1 : r + dr_);
              v9[n++] = dv[x][cc][rr];
              s += (dv[x][cc][rr] == 0);
            end
          v9.sort();
          md[x][c][r]   = v9[4];
          hflt[x][c][r] = (s > 5);
        end
    for (int x = 0; x < 2; x++)
      for (int c = 0; c < W; c++)
        for (int r = 0; r < H; r++) begin
          automatic int any = 0;
          for (int dc = -1; dc <= 1; dc++)
            for (int dr_ = -1; dr_ <= 1; dr_++) begin
              automatic int cc = c + dc < 0 ? 0 : (c + dc >= W ? W - 1 : c + dc);
              automatic int rr = r + dr_ < 0 ? 0 : (r + dr_ >= H ? H - 1 : r + dr_);
              any |= hflt[x][cc][rr];
            end
          hdil[x][c][r] = any;
        end
    // reverse warping and blending
    for (int c = 0; c < W; c++)
      for (int r = 0; r < H; r++) begin
        automatic bit ok [2];
        automatic int tx [2][NCH];
        automatic bit nb [2], na [2];
        for (int x = 0; x < 2; x++) begin
          automatic int d = md[x][c][r];
          automatic int us = (x == 0) ? $rtoi($floor(real'(c) - real'(d) / 32.0 + 0.5))
                                      : c + rnd_disp(d);
          automatic int vs = r + ((x == 0) ? ty_l(f) : 0);
          ok[x] = d != 0 && us >= 0 && us < W && vs < H;
          for (int ch = 0; ch < NCH; ch++)
            tx[x][ch] = !ok[x] ? 0 : (x == 0 ? tl[us][vs][ch] : tr[us][vs][ch]);
          nb[x] = ok[x] && !hflt[x][c][r];
          na[x] = !hdil[x][c][r];
        end
        bh[c][r] = 0;
        for (int ch = 0; ch < NCH; ch++) begin
          if (nb[0] && nb[1] && na[0] == na[1])
            bt[c][r][ch] = (tx[0][ch] * (256 - ALPHA) + tx[1][ch] * ALPHA + 128) / 256;
          else if (nb[0] && nb[1]) bt[c][r][ch] = na[0] ? tx[0][ch] : tx[1][ch];
          else if (nb[0]) bt[c][r][ch] = tx[0][ch];
          else if (nb[1]) bt[c][r][ch] = tx[1][ch];
          else begin bt[c][r][ch] = 0; bh[c][r] = 1; end
        end
      end
    // hole filling, column by column, top to bottom
    for (int c = 0; c < W; c++)
      for (int r = 0; r < H; r++)
        if (bh[c][r]) begin
          automatic int sw = 0;
          automatic int st [NCH] = '{default: 0};
          for (int dc = -2; dc <= 2; dc++)
            for (int dr_ = -4; dr_ <= 4; dr_++) begin
              automatic int cc = c + dc, rr = r + dr_;
              if (cc >= 0 && cc < W && rr >= 0 && rr < H && !bh[cc][rr]) begin
                automatic int w = 256 >> ((dc < 0 ? -dc : dc) + (dr_ < 0 ? -dr_ : dr_));
                sw += w;
                for (int ch = 0; ch < NCH; ch++) st[ch] += w * bt[cc][rr][ch];
              end
            end
          if (sw > 0) begin
            bh[c][r] = 0;
            for (int ch = 0; ch < NCH; ch++) bt[c][r][ch] = (st[ch] + sw / 2) / sw;
          end
        end
    for (int c = 0; c < W; c++)
      for (int r = 0; r < H; r++)
        for (int ch = 0; ch < NCH; ch++) ref_v[f][c][r][ch] = bt[c][r][ch];
  endtask

  // ------------------------------------------------------ homographies
  function automatic hmat_t ident();
    hmat_t h = '0;
    h.h00 = 18'sd1 <<< HA_FR;
    h.h11 = 18'sd1 <<< HA_FR;
    return h;
  endfunction

  // sgn: +1 adds d/32 to u, -1 subtracts it; ty: vertical shift
  task automatic write_h(input hsel_e sel, input int sgn, input int ty);
    for (int e = 0; e < 8; e++) begin
      hmat_t b = ident(), i = '0;
      b.h20 = 23'(sgn * (e <<< HT_FR));
      b.h21 = 23'(ty <<< HT_FR);
      i.h20 = 23'(sgn * 32);
      @(negedge clk);
      h_wr_en = 1; h_wr_sel = sel; h_wr_entry = 3'(e); h_wr_base = b; h_wr_inc = i;
      @(negedge clk);
      h_wr_en = 0;
    end
  endtask

  task automatic run_frame(input bit s1, input bit s2, input bit buf_sel, input int f);
    int t0;
    @(negedge clk); h_swap = 1; @(negedge clk); h_swap = 0;
    if (s1) begin
      write_h(H_LV, +1, 0);
      write_h(H_RV, -1, 0);
      write_h(H_VL, -1, ty_l(f));
      write_h(H_VR, +1, 0);
      for (int c = 0; c < W; c++)
        for (int r = 0; r < H; r++) begin
          mem.poke_px(PL_DL, c, r, 8'(dl[f][c][r]));
          mem.poke_px(PL_DR, c, r, 8'(dr[f][c][r]));
        end
    end
    @(negedge clk);
    start = 1; run_s1 = s1; run_s2 = s2; dv_buf = buf_sel;
    @(negedge clk);
    start = 0;
    t0 = $time;
    wait (done);
    @(negedge clk);
    $display("frame s1=%0d s2=%0d took %0d cycles", s1, s2, ($time - t0) / 10);
  endtask

  task automatic check_v(input int f);
    for (int c = 0; c < W; c++)
      for (int r = 0; r < H; r++)
        for (int ch = 0; ch < NCH; ch++) begin
          automatic int got = int'(mem.peek_px(PL_V + PLANE_W'(ch), c, r));
          if (got == ref_v[f][c][r][ch]) checks++;
          else check(1'b0, $sformatf("V (%0d,%0d) ch%0d got %0d exp %0d", c, r, ch,
                                     got, ref_v[f][c][r][ch]));
        end
  endtask

  initial begin
    // scene: blocky depth with a foreground object, stripes and random noise
    for (int f = 0; f < NF; f++)
      for (int c = 0; c < W; c++)
        for (int r = 0; r < H; r++) begin
          dl[f][c][r] = (c >= 600 + f && c < 1100 + f && r >= 200 && r < 800) ? 200 : 40 + 4 * (c / 200);
          dr[f][c][r] = (c >= 640 + f && c < 1140 + f && r >= 200 && r < 800) ? 200 : 40 + 4 * (c / 200);
          // horizontal stripes: every row opens a new forward-warping segment
          if (r >= 1000) dl[f][c][r] = (r % 2) ? 40 : 130;
          if ($urandom % 500 == 0) dl[f][c][r] = $urandom % 256;
          if ($urandom % 500 == 0) dr[f][c][r] = $urandom % 256;
        end
    for (int c = 0; c < W; c++)
      for (int r = 0; r < H; r++)
        for (int ch = 0; ch < NCH; ch++) begin
          tl[c][r][ch] = (c * 11 + r * 7 + ch * 50) % 256;
          tr[c][r][ch] = (c * 13 + r * 5 + ch * 70 + 9) % 256;
          mem.poke_px(PL_L + PLANE_W'(ch), c, r, 8'(tl[c][r][ch]));
          mem.poke_px(PL_R + PLANE_W'(ch), c, r, 8'(tr[c][r][ch]));
        end
    for (int f = 0; f < NF; f++) build_reference(f);

    repeat (3) @(posedge clk);
    rst_n = 1;
    run_frame(1, 0, 1'b0, 0);
    run_frame(0, 1, 1'b1, 0);
    check_v(0);
    check(!rw_overflow, "reverse warping overflow");
    $display("init=%0d stall=%0d extend=%0d contention=%0d filled=%0d median=%0d",
             n_init, n_stall, n_ext, n_contend, n_fill, n_median);
    $display("blend cases 1..7: %0d %0d %0d %0d %0d %0d %0d",
             n_case[1], n_case[2], n_case[3], n_case[4], n_case[5], n_case[6], n_case[7]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
