// tb_go_top: two complete boards, black and white, with their serial lines
// crossed, play a scripted game through the buttons. Shortened timing (64
// clocks per serial bit, 4-clock debounce, fast digit scan); the pruning
// delay is the full N*N. After every move both boards must agree with a
// reference model. The script makes each mechanism happen and counts it:
// cursor skipping over stones, a capture, a ko refused, a suicide refused,
// button presses while locked, a pass, a game-ending double pass, the serial
// transfer in both directions, the territory count and the win/lose message,
// and a stone drawn on the monitor.
module tb_go_top;
  import go_pkg::*;
  import go_ref_pkg::*;

  localparam int unsigned CLK_HZ = 614_400;
  localparam int unsigned BAUD   = 9600;
  localparam int unsigned DB     = 4;
  localparam int unsigned WAIT   = 3000;  // > check + serial byte + check

  logic clk = 0, rst = 1;
  logic [4:0] btn_a = '0, btn_b = '0;  // {r, l, c, u, d}
  logic pass_a = 0, pass_b = 0;
  logic a2b, b2a;
  logic [11:0] pix_a, pix_b;
  logic hs_a, vs_a, hs_b, vs_b;
  logic [6:0] seg_a, seg_b;
  logic [7:0] an_a, an_b;
  int checks = 0, failures = 0;
  int n_skip = 0, n_capture = 0, n_ko = 0, n_suicide = 0, n_locked = 0, n_pass = 0;
  int n_gameover = 0, n_tx_a = 0, n_tx_b = 0, n_terr = 0, n_pixel = 0;

  go_top #(.CLK_HZ(CLK_HZ), .BAUD(BAUD), .DEBOUNCE_CYCLES(DB), .REFRESH_BITS(6)) u_a (
    .clk, .rst, .btn_r(btn_a[4]), .btn_l(btn_a[3]), .btn_c(btn_a[2]), .btn_u(btn_a[1]),
    .btn_d(btn_a[0]), .sw_pass(pass_a), .player_white(1'b0), .rx(b2a), .tx(a2b),
    .pixel_out(pix_a), .hsync(hs_a), .vsync(vs_a), .seg(seg_a), .an(an_a)
  );
  go_top #(.CLK_HZ(CLK_HZ), .BAUD(BAUD), .DEBOUNCE_CYCLES(DB), .REFRESH_BITS(6)) u_b (
    .clk, .rst, .btn_r(btn_b[4]), .btn_l(btn_b[3]), .btn_c(btn_b[2]), .btn_u(btn_b[1]),
    .btn_d(btn_b[0]), .sw_pass(pass_b), .player_white(1'b1), .rx(a2b), .tx(b2a),
    .pixel_out(pix_b), .hsync(hs_b), .vsync(vs_b), .seg(seg_b), .an(an_b)
  );

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (!rst && u_a.tx_start) n_tx_a++;
    if (!rst && u_b.tx_start) n_tx_b++;
  end

  initial begin
    #200_000_000;
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

  // bit index in btn_*: 4 r, 3 l, 2 c, 1 u, 0 d
  task automatic press(bit white, int b);
    @(negedge clk);
    if (white) btn_b[b] = 1'b1; else btn_a[b] = 1'b1;
    repeat (DB + 4) @(negedge clk);
    btn_a = '0;
    btn_b = '0;
    repeat (DB + 4 + 2 * N) @(negedge clk);
  endtask

  function automatic int cur_r(bit white);
    return white ? int'(u_b.cursor_row) : int'(u_a.cursor_row);
  endfunction
  function automatic int cur_c(bit white);
    return white ? int'(u_b.cursor_col) : int'(u_a.cursor_col);
  endfunction

  // Steer the cursor to (r,c), then press centre. Counts multi-point jumps.
  task automatic play_at(bit white, int r, int c);
    int tries = 0;
    int horiz_fail = 0;
    while ((cur_r(white) != r || cur_c(white) != c) && tries < 60) begin
      int r0 = cur_r(white), c0 = cur_c(white);
      if (c0 != c && horiz_fail < 2) press(white, (c0 < c) ? 4 : 3);
      else if (r0 != r) press(white, (r0 < r) ? 0 : 1);
      else press(white, (c0 < c) ? 4 : 3);
      if (cur_c(white) - c0 > 1 || c0 - cur_c(white) > 1 ||
          cur_r(white) - r0 > 1 || r0 - cur_r(white) > 1) n_skip++;
      if (cur_c(white) == c0 && c0 != c) horiz_fail++;
      tries++;
    end
    check(cur_r(white) == r && cur_c(white) == c, $sformatf("cursor reached %0d,%0d", r, c));
    press(white, 2);
    repeat (WAIT) @(negedge clk);
  endtask

  task automatic pass_move(bit white);
    if (white) pass_b = 1; else pass_a = 1;
    press(white, 2);
    pass_a = 0;
    pass_b = 0;
    repeat (WAIT) @(negedge clk);
  endtask

  // Both boards must show exp with the given colour to move.
  task automatic agree(ref_board_t exp, cell_t to_move, string what);
    check(same(to_ref(u_a.board), exp) && same(to_ref(u_b.board), exp), {what, ": boards"});
    check(u_a.turn == to_move && u_b.turn == to_move, {what, ": turn"});
  endtask

  // Reference: apply a legal move for colour col.
  function automatic ref_board_t apply(ref_board_t b, int col, int r, int c);
    b[r][c] = col;
    return ref_prune(b, 3 - col);
  endfunction

  // Segment pattern of the leftmost digit.
  task automatic left_digit(output logic [6:0] s);
    while (an_a != 8'b0111_1111) @(negedge clk);
    @(negedge clk);
    s = seg_a;
  endtask

  initial begin
    ref_board_t exp;
    int nb_tx_a, nb_tx_b;
    logic [6:0] s;
    foreach (exp[i, j]) exp[i][j] = 0;
    repeat (5) @(negedge clk);
    rst = 0;
    repeat (100) @(negedge clk);

    // presses by white while it is black's turn do nothing
    press(1, 3);
    press(1, 2);
    if (cur_c(1) == 4 && u_b.board == EMPTY_BOARD) n_locked++;
    check(n_locked == 1 && n_tx_b == 0, "white locked on black's turn");

    play_at(0, 3, 4); exp = apply(exp, 1, 3, 4); agree(exp, WHITE, "B1");
    play_at(1, 3, 5); exp = apply(exp, 2, 3, 5); agree(exp, BLACK, "W1");
    play_at(0, 4, 3); exp = apply(exp, 1, 4, 3); agree(exp, WHITE, "B2");
    play_at(1, 5, 5); exp = apply(exp, 2, 5, 5); agree(exp, BLACK, "W2");
    play_at(0, 5, 4); exp = apply(exp, 1, 5, 4); agree(exp, WHITE, "B3");
    play_at(1, 4, 6); exp = apply(exp, 2, 4, 6); agree(exp, BLACK, "W3");
    play_at(0, 0, 1); exp = apply(exp, 1, 0, 1); agree(exp, WHITE, "B4");
    play_at(1, 4, 4); exp = apply(exp, 2, 4, 4); agree(exp, BLACK, "W4");
    // black captures the white stone at (4,4)
    play_at(0, 4, 5); exp = apply(exp, 1, 4, 5); agree(exp, WHITE, "B5 capture");
    if (exp[4][4] == 0 && u_a.board[4][4] == EMPTY) n_capture++;
    // white retakes at once: ko, refused; white still to move
    nb_tx_b = n_tx_b;
    play_at(1, 4, 4); agree(exp, WHITE, "W ko refused");
    if (n_tx_b == nb_tx_b) n_ko++;
    play_at(1, 8, 8); exp = apply(exp, 2, 8, 8); agree(exp, BLACK, "W5");
    play_at(0, 1, 0); exp = apply(exp, 1, 1, 0); agree(exp, WHITE, "B6");
    // white into the corner eye: suicide, refused
    nb_tx_b = n_tx_b;
    play_at(1, 0, 0); agree(exp, WHITE, "W suicide refused");
    if (n_tx_b == nb_tx_b) n_suicide++;
    play_at(1, 8, 7); exp = apply(exp, 2, 8, 7); agree(exp, BLACK, "W6");
    // black passes, white passes: game over on both boards
    pass_move(0); agree(exp, WHITE, "B pass");
    if (u_b.u_fsm.last_pass && u_a.u_fsm.last_pass) n_pass++;
    pass_move(1);
    if (u_a.game_over && u_b.game_over) n_gameover++;
    check(u_a.game_over && u_b.game_over, "game over on both boards");
    nb_tx_a = n_tx_a;
    check(nb_tx_a == 7 && n_tx_b == 7, $sformatf("bytes sent a=%0d b=%0d", n_tx_a, n_tx_b));
    // territory: counted after the last move
    repeat (200) @(negedge clk);
    check(int'(u_a.black_count) == ref_area(exp, 1) && int'(u_a.white_count) == ref_area(exp, 2),
          $sformatf("territory %0d/%0d exp %0d/%0d", u_a.black_count, u_a.white_count,
                    ref_area(exp, 1), ref_area(exp, 2)));
    check(u_b.black_count == u_a.black_count && u_b.white_count == u_a.white_count, "counts agree");
    if (u_a.black_count != 0) n_terr++;
    // win/lose message on black's board
    left_digit(s);
    check(s == ~((ref_area(exp, 1) > ref_area(exp, 2)) ? 7'b0011100 :
                 (ref_area(exp, 1) < ref_area(exp, 2)) ? 7'b0111000 : 7'b1111000),
          "result message");
    // monitor: the black stone at (3,4) is drawn at x = 192 + 4*80, y = 64 + 3*80
    while (!u_a.u_disp.captured) @(negedge clk);
    while (!(u_a.hcount == 11'(192 + 4 * 80) && u_a.vcount == 10'(64 + 3 * 80))) @(negedge clk);
    @(negedge clk);
    if (pix_a == 12'h111) n_pixel++;
    check(pix_a == 12'h111, $sformatf("stone drawn: %h", pix_a));

    $display("skip=%0d capture=%0d ko=%0d suicide=%0d locked=%0d pass=%0d gameover=%0d tx_a=%0d tx_b=%0d terr=%0d pixel=%0d",
             n_skip, n_capture, n_ko, n_suicide, n_locked, n_pass, n_gameover, n_tx_a, n_tx_b, n_terr, n_pixel);
    check(n_skip > 0, "cursor skip happened");
    check(n_capture > 0, "capture happened");
    check(n_ko > 0, "ko refusal happened");
    check(n_suicide > 0, "suicide refusal happened");
    check(n_pass > 0, "pass happened");
    check(n_gameover > 0, "game over happened");
    check(n_tx_a > 0 && n_tx_b > 0, "serial both ways");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
