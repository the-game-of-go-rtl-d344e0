// display: draws the board on the monitor without sprites.
//
// Each pixel takes one of a few colours, decided from its coordinates alone:
// yellow background, black grid lines of a centred N x N grid, a square tile
// (black or white) over each occupied intersection, and a green tile at the
// cursor. The grid line positions are parameters. During the first frame after
// reset the renderer records the coordinates of every intersection it passes
// (where a vertical and a horizontal line cross), stepping a column index j
// and, after j = N-1, a row index i. Because the intersections form a regular
// grid the N x N coordinate table is kept as one x per column and one y per
// row. Tiles are drawn only once the table is complete: a pixel is inside the
// tile of (i,j) when it lies within TILE/2 of that intersection. The
// sprite-free method, the first-frame capture and the colours follow the
// original design; sizes, exact colour values and the coordinate lookup are
// this design's choices.
//
// Interface: hcount/vcount/blank from vga_timing; pixel_out is 12-bit RGB
// (4 bits each) and lags the counters by one clock.
module display
  import go_pkg::*;
#(
  parameter int unsigned H_ACTIVE = 1024,
  parameter int unsigned V_ACTIVE = 768,
  parameter int unsigned SPACING  = 80,  // pixels between grid lines
  parameter int unsigned TILE     = 70   // tile width, a little under SPACING
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [10:0] hcount,
  input  logic [9:0]  vcount,
  input  logic        blank,
  input  board_t      board,
  input  logic [3:0]  cursor_row,
  input  logic [3:0]  cursor_col,
  output logic [11:0] pixel_out
);
  localparam int unsigned SPAN = (N - 1) * SPACING;
  localparam int unsigned X0   = (H_ACTIVE - SPAN) / 2;
  localparam int unsigned Y0   = (V_ACTIVE - SPAN) / 2;
  localparam int unsigned HALF = TILE / 2;

  localparam logic [11:0] C_BACK  = 12'hEE2;
  localparam logic [11:0] C_GRID  = 12'h000;
  localparam logic [11:0] C_BLACK = 12'h111;
  localparam logic [11:0] C_WHITE = 12'hEEF;
  localparam logic [11:0] C_CURS  = 12'h0D2;

  // Is the pixel on a vertical / horizontal grid line (within the grid)?
  logic on_vline, on_hline, in_x, in_y;
  always_comb begin
    on_vline = 1'b0;
    on_hline = 1'b0;
    for (int k = 0; k < int'(N); k++) begin
      if (hcount == 11'(X0 + k * SPACING)) on_vline = 1'b1;
      if (vcount == 10'(Y0 + k * SPACING)) on_hline = 1'b1;
    end
    in_x = (hcount >= 11'(X0)) && (hcount <= 11'(X0 + SPAN));
    in_y = (vcount >= 10'(Y0)) && (vcount <= 10'(Y0 + SPAN));
  end
  wire on_grid = (on_vline && in_y) || (on_hline && in_x);
  wire at_xing = on_vline && on_hline;

  // First-frame capture of intersection coordinates.
  logic [10:0] col_x [N];
  logic [9:0]  row_y [N];
  logic [3:0]  cap_i, cap_j;
  logic        captured;

  always_ff @(posedge clk) begin
    if (rst) begin
      cap_i    <= '0;
      cap_j    <= '0;
      captured <= 1'b0;
      for (int k = 0; k < int'(N); k++) begin
        col_x[k] <= '0;
        row_y[k] <= '0;
      end
    end else if (!captured && at_xing) begin
      col_x[cap_j] <= hcount;
      row_y[cap_i] <= vcount;
      if (cap_j == 4'(N - 1)) begin
        cap_j <= '0;
        if (cap_i == 4'(N - 1)) begin
          cap_i    <= '0;
          captured <= 1'b1;
        end else cap_i <= cap_i + 1'b1;
      end else cap_j <= cap_j + 1'b1;
    end
  end

  // Which tile, if any, is the pixel inside ("tilebound")?
  logic       tile_x, tile_y;
  logic [3:0] ti, tj;
  always_comb begin
    tile_x = 1'b0;
    tile_y = 1'b0;
    ti = '0;
    tj = '0;
    for (int k = 0; k < int'(N); k++) begin
      if (hcount + 11'(HALF) >= col_x[k] && hcount <= col_x[k] + 11'(HALF)) begin
        tile_x = 1'b1;
        tj = 4'(k);
      end
      if (vcount + 10'(HALF) >= row_y[k] && vcount <= row_y[k] + 10'(HALF)) begin
        tile_y = 1'b1;
        ti = 4'(k);
      end
    end
  end
  wire   tilebound = captured && tile_x && tile_y;
  wire   is_cursor = tilebound && (ti == cursor_row) && (tj == cursor_col);
  cell_t tile_cell;
  assign tile_cell = board[ti][tj];
  wire   on_tile   = tilebound && (tile_cell != EMPTY);

  always_ff @(posedge clk) begin
    if (rst || blank)   pixel_out <= 12'h000;
    else if (is_cursor) pixel_out <= C_CURS;
    else if (on_tile)   pixel_out <= (tile_cell == BLACK) ? C_BLACK : C_WHITE;
    else if (on_grid)   pixel_out <= C_GRID;
    else                pixel_out <= C_BACK;
  end
endmodule
