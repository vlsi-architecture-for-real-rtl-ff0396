// column_window: the circular column FIFO shared by the filtering components.
//
// Pixels arrive column by column (top to bottom, column 0 first). NCOL column
// memories of MAX_H entries are used circularly: column j lives in memory
// j % NCOL. Once the columns a window needs are loaded, the module stops
// accepting input and sweeps the centre column from top to bottom, shifting
// one row of NCOL pixels per step into an NROW x NCOL register array; each
// step presents one full window (centre at out_col, out_row). Windows that
// reach past the frame edge get the nearest edge pixel (CLAMP = 1) or the
// constant PAD (CLAMP = 0). After the last column the remaining centres are
// swept without new input, and the module is ready for the next frame.
//
// A consumer may write a result back into the centre position (wb_en with
// wb_data, during the output handshake); the value replaces the centre in its
// column memory and in the register array, so later windows see it. Hole
// filling uses this.
//
// Handshakes: in_valid/in_ready and out_valid/out_ready, transfer when both
// are high. width and height must stay constant during a frame, width >= 2.
// Loading a column and sweeping it alternate (no overlap); that is this
// design's simplification of the overlapped column-level schedule.
module column_window #(
  parameter int              EW    = 8,
  parameter int              NCOL  = 3,
  parameter int              NROW  = 3,
  parameter int              MAX_H = 1080,
  parameter bit              CLAMP = 1'b1,
  parameter logic [EW-1:0]   PAD   = '0
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [10:0]            width,
  input  logic [10:0]            height,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  logic [EW-1:0]          in_data,
  output logic                   out_valid,
  input  logic                   out_ready,
  output logic [EW-1:0]          win [NROW][NCOL],
  output logic [10:0]            out_col,
  output logic [10:0]            out_row,
  input  logic                   wb_en,
  input  logic [EW-1:0]          wb_data
);
  localparam int C = NCOL / 2;
  localparam int R = NROW / 2;

  typedef enum logic { LOAD, PERF } state_e;
  state_e state_q;

  logic [EW-1:0] mem [NCOL][MAX_H];

  logic [10:0] lrow_q, loaded_q, center_q, k_q;

  // slot and presence of each window column
  logic [$clog2(NCOL)-1:0] slot   [NCOL];
  logic                    is_pad [NCOL];
  logic [EW-1:0]           rowval [NCOL];
  logic [10:0]             src_row;
  logic                    row_pad;
  logic                    advance;

  always_comb begin
    for (int dc = 0; dc < NCOL; dc++) begin
      int j;
      j = int'(center_q) + dc - C;
      is_pad[dc] = 1'b0;
      if (j < 0) begin
        if (CLAMP) j = 0; else is_pad[dc] = 1'b1;
      end
      if (j > int'(width) - 1) begin
        if (CLAMP) j = int'(width) - 1; else is_pad[dc] = 1'b1;
      end
      if (j < 0) j = 0;
      slot[dc] = $clog2(NCOL)'(j % NCOL);
    end
    row_pad = 1'b0;
    if (k_q < height) src_row = k_q;
    else begin
      src_row = height - 11'd1;
      row_pad = !CLAMP;
    end
    for (int dc = 0; dc < NCOL; dc++)
      rowval[dc] = (is_pad[dc] || row_pad) ? PAD : mem[slot[dc]][src_row];
  end

  assign in_ready = (state_q == LOAD);
  assign advance  = (state_q == PERF) && (!out_valid || out_ready);
  assign out_col  = center_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= LOAD;
      lrow_q    <= '0;
      loaded_q  <= '0;
      center_q  <= '0;
      k_q       <= '0;
      out_valid <= 1'b0;
      out_row   <= '0;
    end else begin
      unique case (state_q)
        LOAD: if (in_valid) begin
          if (lrow_q == height - 11'd1) begin
            lrow_q   <= '0;
            loaded_q <= loaded_q + 11'd1;
            if (int'(loaded_q) >= C) begin
              center_q <= loaded_q - 11'(C);
              k_q      <= '0;
              state_q  <= PERF;
            end
          end else begin
            lrow_q <= lrow_q + 11'd1;
          end
        end
        PERF: if (advance) begin
          if (int'(k_q) < int'(height) + R) begin
            k_q       <= k_q + 11'd1;
            out_valid <= (int'(k_q) >= R);
            out_row   <= 11'(int'(k_q) - R);
          end else begin
            out_valid <= 1'b0;
            k_q       <= '0;
            if (center_q == width - 11'd1) begin
              loaded_q <= '0;
              center_q <= '0;
              state_q  <= LOAD;
            end else if (loaded_q == width) begin
              center_q <= center_q + 11'd1;
            end else begin
              state_q <= LOAD;
            end
          end
        end
        default: state_q <= LOAD;
      endcase
    end
  end

  // memories and window registers (no reset needed: written before read)
  logic [$clog2(NCOL)-1:0] wslot;
  assign wslot = $clog2(NCOL)'(loaded_q % 11'(NCOL));

  always_ff @(posedge clk) begin
    if (state_q == LOAD && in_valid)
      mem[wslot][lrow_q] <= in_data;
    else if (state_q == PERF && wb_en && out_valid && out_ready)
      mem[slot[C]][out_row] <= wb_data;

    if (advance && int'(k_q) < int'(height) + R) begin
      if (k_q == '0) begin
        for (int r = 0; r < NROW - 1; r++)
          for (int dc = 0; dc < NCOL; dc++)
            win[r][dc] <= CLAMP ? rowval[dc] : PAD;
      end else begin
        for (int r = 0; r < NROW - 1; r++)
          for (int dc = 0; dc < NCOL; dc++)
            win[r][dc] <= win[r+1][dc];
        if (wb_en && out_valid && out_ready && R > 0)
          win[R-1][C] <= wb_data;
      end
      for (int dc = 0; dc < NCOL; dc++)
        win[NROW-1][dc] <= rowval[dc];
    end
  end
endmodule
