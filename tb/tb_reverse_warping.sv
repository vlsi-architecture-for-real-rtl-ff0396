// tb_reverse_warping: self-checking test of reverse_warping.
// A 20x16 virtual view with blocky depth (zeros are holes) is reverse warped
// with u_src = u - d/32, v_src = v + (d >= 128) from random three-channel
// texture planes. Every output pixel is compared with the texture fetched
// here directly, using real arithmetic for the position; holes and positions
// outside the frame must come out with tex_ok = 0. The output side applies
// random back-pressure and the bus random wait states.
module tb_reverse_warping;
  import vs_pkg::*;
  localparam int W = 20, H = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [2:0] h_entry;
  hmat_t h_base, h_inc;
  logic in_valid = 0, in_ready;
  logic [7:0] in_depth;
  logic rd_req, rd_gnt, rvalid, out_valid, out_ready, out_tex_ok, overflow, seg_extend;
  logic [ADDR_W-1:0] rd_addr;
  logic [63:0] rdata;
  logic [7:0] out_tex [NCH];

  reverse_warping #(.MAX_H(H)) dut (
    .clk, .rst_n, .width(11'(W)), .height(11'(H)), .tex_plane(PL_L),
    .h_entry, .h_base, .h_inc, .in_valid, .in_ready, .in_depth,
    .rd_req, .rd_addr, .rd_gnt, .rd_rvalid(rvalid), .rd_rdata(rdata),
    .out_valid, .out_ready, .out_tex, .out_tex_ok, .overflow, .seg_extend);

  logic bus_ok;
  always @(posedge clk) bus_ok <= ($urandom % 3) != 0;
  assign rd_gnt = rd_req && bus_ok;
  always @(posedge clk) out_ready <= ($urandom % 4) != 0;

  tb_ext_mem mem (.clk, .en(rd_gnt), .we(1'b0), .addr(rd_addr), .wdata('0), .wmask('0),
                  .rvalid, .rdata);

  always_comb begin
    h_base = '0; h_inc = '0;
    h_base.h00 = 18'sd1 <<< HA_FR;
    h_base.h11 = 18'sd1 <<< HA_FR;
    h_base.h20 = 23'(-(int'(h_entry) <<< HT_FR));
    h_inc.h20  = -23'sd32;
    h_base.h21 = (h_entry >= 3'd4) ? (23'sd1 <<< HT_FR) : 23'sd0;
  end

  int checks = 0, failures = 0, ext = 0;
  logic [7:0] dv [W][H];
  always @(posedge clk) if (seg_extend) ext++;

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

  // driver
  initial begin
    for (int c = 0; c < W; c++)
      for (int r = 0; r < H; r++) begin
        dv[c][r] = 8'(((c/4)*61 + (r/4)*29 + 10) % 256);
        if ((c + r) % 7 == 0) dv[c][r] = 8'd0;
        for (int ch = 0; ch < NCH; ch++)
          mem.poke_px(PL_L + PLANE_W'(ch), c, r, 8'($urandom));
      end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < W; c++)
      for (int r = 0; r < H; r++) begin
        @(negedge clk);
        in_valid = 1; in_depth = dv[c][r];
        while (!in_ready) @(negedge clk);
        @(posedge clk);
      end
    @(negedge clk);
    in_valid = 0;
  end

  // checker
  initial begin
    @(posedge rst_n);
    for (int c = 0; c < W; c++)
      for (int r = 0; r < H; r++) begin
        int us, vs;
        bit ok;
        @(negedge clk);
        while (!(out_valid && out_ready)) @(negedge clk);
        us = $rtoi($floor(real'(c) - real'(dv[c][r]) / 32.0 + 0.5));
        vs = r + (dv[c][r] >= 128 ? 1 : 0);
        ok = dv[c][r] != 0 && us >= 0 && us < W && vs < H;
        check(out_tex_ok == ok, $sformatf("tex_ok (%0d,%0d)=%0d exp %0d", c, r, out_tex_ok, ok));
        if (ok)
          for (int ch = 0; ch < NCH; ch++)
            check(out_tex[ch] == mem.peek_px(PL_L + PLANE_W'(ch), us, vs),
                  $sformatf("tex (%0d,%0d) ch%0d = %0d exp %0d", c, r, ch, out_tex[ch],
                            mem.peek_px(PL_L + PLANE_W'(ch), us, vs)));
      end
    check(ext > 0, "no segment was ever extended");
    check(!overflow, "unexpected overflow");
    $display("extended=%0d", ext);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
