// tb_display: runs the renderer on real VGA timing for two frames. In the
// second frame every visible pixel is compared with a colour computed here
// from the geometry (grid at X0 + 80*k, Y0 + 80*k; 70-pixel tiles centred on
// the intersections; cursor drawn over stones). In the first frame, before
// the intersection table is complete, no tile may appear in the top row.
module tb_display;
  import go_pkg::*;

  localparam int X0 = 192, Y0 = 64, SP = 80, HALF = 35;

  logic clk = 0, rst = 1;
  logic [10:0] hcount;
  logic [9:0]  vcount;
  logic hsync, vsync, blank;
  board_t board = EMPTY_BOARD;
  logic [3:0] cursor_row = 4, cursor_col = 4;
  logic [11:0] pixel_out;
  int checks = 0, failures = 0, shown = 0;

  vga_timing u_tim (.*);
  display dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [11:0] expected(int x, int y, bit tiles);
    int j = (x - X0 + SP / 2) / SP;
    int i = (y - Y0 + SP / 2) / SP;
    bit tx = (x - X0 + SP / 2 >= 0) && j < int'(N) && (x - (X0 + SP * j) <= HALF) && ((X0 + SP * j) - x <= HALF);
    bit ty = (y - Y0 + SP / 2 >= 0) && i < int'(N) && (y - (Y0 + SP * i) <= HALF) && ((Y0 + SP * i) - y <= HALF);
    bit grid_v = (x >= X0) && ((x - X0) % SP == 0) && (x <= X0 + 8 * SP) && (y >= Y0) && (y <= Y0 + 8 * SP);
    bit grid_h = (y >= Y0) && ((y - Y0) % SP == 0) && (y <= Y0 + 8 * SP) && (x >= X0) && (x <= X0 + 8 * SP);
    if (x >= 1024 || y >= 768) return 12'h000;
    if (tiles && tx && ty) begin
      if (i == int'(cursor_row) && j == int'(cursor_col)) return 12'h0D2;
      if (board[i][j] == BLACK) return 12'h111;
      if (board[i][j] == WHITE) return 12'hEEF;
    end
    if (grid_v || grid_h) return 12'h000;
    return 12'hEE2;
  endfunction

  initial begin
    int frame = 0;
    int ph = 0, pv = 0;
    board[0][0] = BLACK;
    board[8][8] = WHITE;
    board[4][4] = BLACK;  // under the cursor
    board[2][6] = WHITE;
    repeat (3) @(negedge clk);
    rst = 0;
    @(posedge clk);
    forever begin
      ph = int'(hcount);
      pv = int'(vcount);
      @(posedge clk);
      #1;
      if (ph == 0 && pv == 0) frame++;
      if (frame == 1 && pv < 40 && ph < 1024) begin
        checks++;
        if (pixel_out != expected(ph, pv, 0)) begin
          failures++;
          if (failures < 10) $display("FAIL frame 1 (%0d,%0d) %h", ph, pv, pixel_out);
        end
      end
      if (frame == 2) begin
        logic [11:0] e;
        e = expected(ph, pv, 1);
        checks++;
        if (e == 12'h0D2 || e == 12'h111 || e == 12'hEEF) shown++;
        if (pixel_out != e) begin
          failures++;
          if (failures < 10) $display("FAIL (%0d,%0d) got %h exp %h", ph, pv, pixel_out, e);
        end
      end
      if (frame == 3) break;
    end
    checks++;
    if (shown != 4 * 71 * 71) begin
      failures++;
      $display("FAIL tile pixels %0d", shown);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
