// tb_ext_mem: behavioural model of the external DRAM for the testbenches.
// Not part of the design. 64-bit words at vs_pkg addresses {plane, column,
// word}; a granted write stores the bytes enabled by its mask, a granted read
// returns its word one cycle later with rvalid. Unwritten words read as 0.
// The array is sparse, so the full address space costs nothing.
module tb_ext_mem
  import vs_pkg::*;
(
  input  logic               clk,
  input  logic               en,
  input  logic               we,
  input  logic [ADDR_W-1:0]  addr,
  input  logic [63:0]        wdata,
  input  logic [7:0]         wmask,
  output logic               rvalid,
  output logic [63:0]        rdata
);
  logic [63:0] mem [logic [ADDR_W-1:0]];

  function automatic logic [63:0] peek(input logic [ADDR_W-1:0] a);
    return mem.exists(a) ? mem[a] : 64'd0;
  endfunction

  function automatic void poke(input logic [ADDR_W-1:0] a, input logic [63:0] d);
    mem[a] = d;
  endfunction

  function automatic logic [7:0] peek_px(input logic [PLANE_W-1:0] pl, input int col, input int row);
    logic [63:0] w;
    w = peek(mk_addr(pl, COORD_W'(col), WORD_W'(row / 8)));
    return w[8*(row%8) +: 8];
  endfunction

  function automatic void poke_px(input logic [PLANE_W-1:0] pl, input int col, input int row,
                                  input logic [7:0] v);
    logic [63:0] w;
    logic [ADDR_W-1:0] a;
    a = mk_addr(pl, COORD_W'(col), WORD_W'(row / 8));
    w = peek(a);
    w[8*(row%8) +: 8] = v;
    mem[a] = w;
  endfunction

  initial rvalid = 1'b0;
  always @(posedge clk) begin
    rvalid <= 1'b0;
    if (en) begin
      if (we) begin
        logic [63:0] w;
        w = peek(addr);
        for (int b = 0; b < 8; b++) if (wmask[b]) w[8*b +: 8] = wdata[8*b +: 8];
        mem[addr] = w;
      end else begin
        rdata  <= peek(addr);
        rvalid <= 1'b1;
      end
    end
  end
endmodule
