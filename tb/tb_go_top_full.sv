// tb_go_top_full: the two-board game at full size and full timing (65 MHz
// clock, 9600 baud serial link, 10 ms debounce, N*N pruning delay). Black
// moves the cursor one point right and plays, white plays at its cursor,
// then both pass. Checks that both boards agree after each move, that the
// bytes crossed the link, that the game ends on both boards and that the
// territory counts match a reference.
module tb_go_top_full;
  import go_pkg::*;
  import go_ref_pkg::*;

  localparam int unsigned DB   = 650_000;   // debounce clocks, as in go_top
  localparam int unsigned BYTE = 10 * (65_000_000 / 9600);

  logic clk = 0, rst = 1;
  logic [4:0] btn_a = '0, btn_b = '0;  // {r, l, c, u, d}
  logic pass_a = 0, pass_b = 0;
  logic a2b, b2a;
  logic [11:0] pix_a, pix_b;
  logic hs_a, vs_a, hs_b, vs_b;
  logic [6:0] seg_a, seg_b;
  logic [7:0] an_a, an_b;
  int checks = 0, failures = 0;

  go_top u_a (
    .clk, .rst, .btn_r(btn_a[4]), .btn_l(btn_a[3]), .btn_c(btn_a[2]), .btn_u(btn_a[1]),
    .btn_d(btn_a[0]), .sw_pass(pass_a), .player_white(1'b0), .rx(b2a), .tx(a2b),
    .pixel_out(pix_a), .hsync(hs_a), .vsync(vs_a), .seg(seg_a), .an(an_a)
  );
  go_top u_b (
    .clk, .rst, .btn_r(btn_b[4]), .btn_l(btn_b[3]), .btn_c(btn_b[2]), .btn_u(btn_b[1]),
    .btn_d(btn_b[0]), .sw_pass(pass_b), .player_white(1'b1), .rx(a2b), .tx(b2a),
    .pixel_out(pix_b), .hsync(hs_b), .vsync(vs_b), .seg(seg_b), .an(an_b)
  );

  always #5 clk = ~clk;

  initial begin
    #2_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endfunction

  task automatic press(bit white, int b);
    @(negedge clk);
    if (white) btn_b[b] = 1'b1; else btn_a[b] = 1'b1;
    repeat (DB + 10) @(negedge clk);
    btn_a = '0;
    btn_b = '0;
    repeat (DB + 10) @(negedge clk);
  endtask

  task automatic settle();
    repeat (BYTE + 2000) @(negedge clk);
  endtask

  initial begin
    ref_board_t exp;
    foreach (exp[i, j]) exp[i][j] = 0;
    repeat (5) @(negedge clk);
    rst = 0;
    press(0, 4);  // black: cursor right
    check(u_a.cursor_row == 4 && u_a.cursor_col == 5, "cursor moved");
    press(0, 2);  // black plays (4,5)
    settle();
    exp[4][5] = 1;
    check(same(to_ref(u_a.board), exp) && same(to_ref(u_b.board), exp), "black move on both boards");
    check(u_a.turn == WHITE && u_b.turn == WHITE, "white to move");
    press(1, 2);  // white plays (4,4)
    settle();
    exp[4][4] = 2;
    check(same(to_ref(u_a.board), exp) && same(to_ref(u_b.board), exp), "white move on both boards");
    pass_a = 1;
    press(0, 2);
    pass_a = 0;
    settle();
    check(u_a.u_fsm.last_pass && u_b.u_fsm.last_pass, "black pass seen by both");
    pass_b = 1;
    press(1, 2);
    pass_b = 0;
    settle();
    check(u_a.game_over && u_b.game_over, "game over on both boards");
    check(int'(u_a.black_count) == ref_area(exp, 1) && int'(u_a.white_count) == ref_area(exp, 2)
          && u_b.black_count == u_a.black_count && u_b.white_count == u_a.white_count,
          $sformatf("territory %0d/%0d", u_a.black_count, u_a.white_count));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
