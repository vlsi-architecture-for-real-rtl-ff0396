// tb_homography_table: self-checking test of homography_table.
// Frame 1: H_LV, H_RV and the first-stage H_VL/H_VR are written; the forward
// port must return LV/RV at once. After a swap the reverse ports must return
// frame 1's VL/VR while frame 2's VL/VR are written to the other copy, and
// after the next swap frame 2's values. All 8 entries of every matrix are
// checked against the values kept here.
module tb_homography_table;
  import vs_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic swap = 0, wr_en = 0, fw_view, pp;
  hsel_e wr_sel;
  logic [2:0] wr_entry, fw_entry, rwl_entry, rwr_entry;
  hmat_t wr_base, wr_inc, fw_base, fw_inc, rwl_base, rwl_inc, rwr_base, rwr_inc;

  homography_table dut (.clk, .rst_n, .swap, .wr_en, .wr_sel, .wr_entry, .wr_base, .wr_inc,
    .fw_view, .fw_entry, .fw_base, .fw_inc, .rwl_entry, .rwl_base, .rwl_inc,
    .rwr_entry, .rwr_base, .rwr_inc, .pp);

  hmat_t mb [3][4][8], mi [3][4][8];   // [frame][matrix][entry]
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic hmat_t rnd_mat();
    return hmat_t'({$urandom, $urandom, $urandom, $urandom, $urandom});
  endfunction

  task automatic write_frame(input int f, input bit with_fw);
    for (int m = 0; m < 4; m++)
      for (int e = 0; e < 8; e++) begin
        if (m < 2 && !with_fw) continue;
        @(negedge clk);
        wr_en = 1; wr_sel = hsel_e'(m); wr_entry = 3'(e);
        wr_base = mb[f][m][e]; wr_inc = mi[f][m][e];
        @(posedge clk);
        #1 wr_en = 0;
      end
  endtask

  task automatic check_fw(input int f);
    for (int v = 0; v < 2; v++)
      for (int e = 0; e < 8; e++) begin
        fw_view = 1'(v); fw_entry = 3'(e);
        #1;
        check(fw_base == mb[f][v][e] && fw_inc == mi[f][v][e], $sformatf("fw f%0d v%0d e%0d", f, v, e));
      end
  endtask

  task automatic check_rw(input int f);
    for (int e = 0; e < 8; e++) begin
      rwl_entry = 3'(e); rwr_entry = 3'(7 - e);
      #1;
      check(rwl_base == mb[f][2][e] && rwl_inc == mi[f][2][e], $sformatf("VL f%0d e%0d", f, e));
      check(rwr_base == mb[f][3][7-e] && rwr_inc == mi[f][3][7-e], $sformatf("VR f%0d e%0d", f, 7 - e));
    end
  endtask

  task automatic do_swap();
    @(negedge clk); swap = 1; @(posedge clk); #1 swap = 0;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < 3; f++)
      for (int m = 0; m < 4; m++)
        for (int e = 0; e < 8; e++) begin
          mb[f][m][e] = rnd_mat();
          mi[f][m][e] = rnd_mat();
        end
    repeat (2) @(posedge clk);
    rst_n = 1;
    write_frame(1, 1);
    check_fw(1);
    do_swap();
    check_rw(1);
    write_frame(2, 1);     // first-stage copy for frame 2
    check_rw(1);           // reverse warping still sees frame 1
    check_fw(2);
    do_swap();
    check_rw(2);
    check(pp == 1'b0, "ping-pong pointer after two swaps");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
