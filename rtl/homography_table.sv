// homography_table: holds the interpolation-table homographies used by the
// warping components.
//
// For each of the four warping directions (LV, RV for forward warping; VL,
// VR for reverse warping) the table keeps HT_ENTRIES entries, each an H_base
// and an H_inc matrix (vs_pkg::hmat_t, 154 bits each). The VL and VR
// matrices are held twice (ping-pong): the preprocessing side writes the
// first-stage copy for the frame it is working on while reverse warping, one
// frame behind, reads the second-stage copy. A `swap` pulse exchanges the two
// copies at a frame boundary. That gives 6 x 8 x 308 bits, as in the engine.
//
// Writes take one cycle (wr_en with wr_sel, wr_entry, wr_base, wr_inc).
// Reads are asynchronous: one forward port (LV or RV by fw_view) and one port
// for each reverse-warping view. Reset clears the ping-pong pointer only;
// the table contents must be written before use.
module homography_table
  import vs_pkg::*;
#(
  parameter int ENTRIES = HT_ENTRIES
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        swap,
  input  logic                        wr_en,
  input  hsel_e                       wr_sel,
  input  logic [$clog2(ENTRIES)-1:0]  wr_entry,
  input  hmat_t                       wr_base,
  input  hmat_t                       wr_inc,
  // forward warping: 0 = H_LV, 1 = H_RV
  input  logic                        fw_view,
  input  logic [$clog2(ENTRIES)-1:0]  fw_entry,
  output hmat_t                       fw_base,
  output hmat_t                       fw_inc,
  // reverse warping, second-stage copies of H_VL and H_VR
  input  logic [$clog2(ENTRIES)-1:0]  rwl_entry,
  output hmat_t                       rwl_base,
  output hmat_t                       rwl_inc,
  input  logic [$clog2(ENTRIES)-1:0]  rwr_entry,
  output hmat_t                       rwr_base,
  output hmat_t                       rwr_inc,
  output logic                        pp       // copy written by the first stage
);
  // index: 0 LV, 1 RV, 2 VL copy 0, 3 VR copy 0, 4 VL copy 1, 5 VR copy 1
  hmat_t base_q [6][ENTRIES];
  hmat_t inc_q  [6][ENTRIES];

  logic [2:0] wr_idx;
  always_comb begin
    unique case (wr_sel)
      H_LV:    wr_idx = 3'd0;
      H_RV:    wr_idx = 3'd1;
      H_VL:    wr_idx = pp ? 3'd4 : 3'd2;
      default: wr_idx = pp ? 3'd5 : 3'd3;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    pp <= 1'b0;
    else if (swap) pp <= ~pp;
  end

  always_ff @(posedge clk) begin
    if (wr_en) begin
      base_q[wr_idx][wr_entry] <= wr_base;
      inc_q[wr_idx][wr_entry]  <= wr_inc;
    end
  end

  logic [2:0] rl_idx, rr_idx;
  always_comb begin
    rl_idx   = pp ? 3'd2 : 3'd4;
    rr_idx   = pp ? 3'd3 : 3'd5;
    fw_base  = base_q[{2'b00, fw_view}][fw_entry];
    fw_inc   = inc_q[{2'b00, fw_view}][fw_entry];
    rwl_base = base_q[rl_idx][rwl_entry];
    rwl_inc  = inc_q[rl_idx][rwl_entry];
    rwr_base = base_q[rr_idx][rwr_entry];
    rwr_inc  = inc_q[rr_idx][rwr_entry];
  end
endmodule
