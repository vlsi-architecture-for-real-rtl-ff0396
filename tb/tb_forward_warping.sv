// tb_forward_warping: self-checking test of forward_warping.
// A 24x16 frame pair with blocky random depth is warped with depth-dependent
// translations (left view: u += d/32; right view: u -= d/32, v += 1), which
// makes overlaps (occlusion by warping order) and holes. The expected warped
// maps are computed here with real arithmetic, in column order, the later
// pixel winning. Small packing buffers (2 entries) force bank hand-overs and
// stalls. Also checks that initialisation clears stale data.
module tb_forward_warping;
  import vs_pkg::*;
  localparam int W = 24, H = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0;
  logic h_view;
  logic [2:0] h_entry;
  hmat_t h_base, h_inc;
  logic rd_req, rd_gnt, wr_req, wr_gnt, rvalid, busy, done, stall, init_active;
  logic [ADDR_W-1:0] rd_addr, wr_addr;
  logic [63:0] rdata, wr_data;
  logic [7:0] wr_mask;

  forward_warping #(.MAX_H(H), .IDX_N(2), .BUF_N(2)) dut (
    .clk, .rst_n, .start, .width(11'(W)), .height(11'(H)), .dv_plane(PL_DV1),
    .dir_l(1'b0), .dir_r(1'b1), .h_view, .h_entry, .h_base, .h_inc,
    .rd_req, .rd_addr, .rd_gnt, .rd_rvalid(rvalid), .rd_rdata(rdata),
    .wr_req, .wr_addr, .wr_data, .wr_mask, .wr_gnt, .busy, .done, .stall, .init_active);

  // simple bus: write first, random wait states (one cycle in five)
  logic bus_ok;
  always_comb begin
    wr_gnt = bus_ok && wr_req;
    rd_gnt = bus_ok && rd_req && !wr_req;
  end
  always @(posedge clk) bus_ok <= ($urandom % 5) == 0;

  tb_ext_mem mem (.clk, .en(rd_gnt | wr_gnt), .we(wr_gnt), .addr(wr_gnt ? wr_addr : rd_addr),
                  .wdata(wr_data), .wmask(wr_mask), .rvalid, .rdata);

  // homography table model: translation, tx = +-d/32, ty = 0 / 1
  always_comb begin
    h_base = '0; h_inc = '0;
    h_base.h00 = 18'sd1 <<< HA_FR;
    h_base.h11 = 18'sd1 <<< HA_FR;
    if (!h_view) begin
      h_base.h20 = 23'(int'(h_entry) <<< HT_FR);
      h_inc.h20  = 23'sd32;
    end else begin
      h_base.h20 = 23'(-(int'(h_entry) <<< HT_FR));
      h_inc.h20  = -23'sd32;
      h_base.h21 = 23'sd1 <<< HT_FR;
    end
  end

  int checks = 0, failures = 0, stalls = 0, cycles = 0;
  logic [7:0] dl [W][H], dr [W][H], exp_l [W][H], exp_r [W][H];

  always @(posedge clk) begin
    cycles++;
    if (stall) stalls++;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    // depth maps: 4x4 blocks of random depth, some single-pixel noise
    for (int c = 0; c < W; c++)
      for (int r = 0; r < H; r++) begin
        dl[c][r] = 8'(((c/4)*37 + (r/4)*91) % 256);
        dr[c][r] = 8'(((c/3)*53 + (r/5)*17 + 40) % 256);
      end
    dl[5][5] = 8'd255; dr[7][2] = 8'd3;
    for (int c = 0; c < W; c++)
      for (int r = 0; r < H; r++) begin
        mem.poke_px(PL_DL, c, r, dl[c][r]);
        mem.poke_px(PL_DR, c, r, dr[c][r]);
        mem.poke_px(PL_DV1, c, r, 8'hAA);       // stale data must be cleared
        mem.poke_px(PL_DV1 + 1, c, r, 8'h55);
        exp_l[c][r] = 0; exp_r[c][r] = 0;
      end
    // reference: left view left-to-right, right view right-to-left
    for (int k = 0; k < W; k++)
      for (int r = 0; r < H; r++) begin
        int u, v;
        u = $rtoi($floor(real'(k) + real'(dl[k][r]) / 32.0 + 0.5));
        v = r;
        if (u >= 0 && u < W && v < H) exp_l[u][v] = dl[k][r];
      end
    for (int k = W - 1; k >= 0; k--)
      for (int r = 0; r < H; r++) begin
        int u, v;
        u = $rtoi($floor(real'(k) - real'(dr[k][r]) / 32.0 + 0.5));
        v = r + 1;
        if (u >= 0 && u < W && v < H) exp_r[u][v] = dr[k][r];
      end

    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    start <= 1;
    @(posedge clk);
    start <= 0;
    wait (done);
    @(posedge clk);
    for (int c = 0; c < W; c++)
      for (int r = 0; r < H; r++) begin
        check(mem.peek_px(PL_DV1, c, r) == exp_l[c][r],
              $sformatf("DV_L(%0d,%0d)=%0d exp %0d", c, r, mem.peek_px(PL_DV1, c, r), exp_l[c][r]));
        check(mem.peek_px(PL_DV1 + 1, c, r) == exp_r[c][r],
              $sformatf("DV_R(%0d,%0d)=%0d exp %0d", c, r, mem.peek_px(PL_DV1 + 1, c, r), exp_r[c][r]));
      end
    check(stalls > 0, "packing buffer full stall never happened");
    check(!busy, "busy after done");
    $display("cycles=%0d stalls=%0d", cycles, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
