// vs_pkg: types and constants shared by the view synthesis engine.
//
// A homography matrix (eq. (2), h22 = 1) is stored in 154 bits: the four
// rotation/scale terms h00,h10,h01,h11 as signed Q2.16 (18 bits), the two
// translation terms h20,h21 as signed Q13.10 (23 bits) and the two perspective
// terms h02,h12 as signed 18-bit values with 28 fractional bits. The total of
// 154 bits per matrix is the engine's figure; the split into fields is this
// design's choice. Pixels are 8-bit; a texture pixel carries NCH channels
// (Y, U, V) processed side by side. The external bus is 64 bits wide and
// holds eight pixels of one image column (one image column is one DRAM row).
package vs_pkg;

  localparam int HA_W   = 18;  // h00,h10,h01,h11
  localparam int HA_FR  = 16;
  localparam int HT_W   = 23;  // h20,h21
  localparam int HT_FR  = 10;
  localparam int HP_W   = 18;  // h02,h12
  localparam int HP_FR  = 28;
  localparam int HMAT_W = 4*HA_W + 2*HT_W + 2*HP_W;  // 154

  typedef struct packed {
    logic signed [HA_W-1:0] h00, h10, h01, h11;
    logic signed [HT_W-1:0] h20, h21;
    logic signed [HP_W-1:0] h02, h12;
  } hmat_t;

  // Homography table entries (LIA): 8 base matrices over 256 depth levels.
  localparam int HT_ENTRIES = 8;
  localparam int DW_W       = 5;   // dweight: 256/8 = 32 levels per entry

  // Matrices held in the table.
  typedef enum logic [1:0] { H_LV = 2'd0, H_RV = 2'd1, H_VL = 2'd2, H_VR = 2'd3 } hsel_e;

  localparam int COORD_W = 11;     // 1920 and 1080 fit in 11 bits
  localparam int NCH     = 3;      // Y, U, V

  // External memory word address: {plane, column (DRAM row), word in column}.
  localparam int PLANE_W = 4;
  localparam int WORD_W  = 8;      // up to 256 words of 8 pixels = 2048 rows
  localparam int ADDR_W  = PLANE_W + COORD_W + WORD_W;

  // Plane numbers of the external memory map (this design's choice).
  localparam logic [PLANE_W-1:0] PL_DL   = 4'd0;
  localparam logic [PLANE_W-1:0] PL_DR   = 4'd1;
  localparam logic [PLANE_W-1:0] PL_DV0  = 4'd2;   // DVL buffer 0, DVR is +1
  localparam logic [PLANE_W-1:0] PL_DV1  = 4'd4;   // DVL buffer 1, DVR is +1
  localparam logic [PLANE_W-1:0] PL_L    = 4'd6;   // L Y,U,V at 6,7,8
  localparam logic [PLANE_W-1:0] PL_R    = 4'd9;   // R Y,U,V at 9,10,11
  localparam logic [PLANE_W-1:0] PL_V    = 4'd12;  // V Y,U,V at 12,13,14

  function automatic logic [ADDR_W-1:0] mk_addr(input logic [PLANE_W-1:0] pl,
                                                input logic [COORD_W-1:0] col,
                                                input logic [WORD_W-1:0] w);
    return {pl, col, w};
  endfunction

endpackage
