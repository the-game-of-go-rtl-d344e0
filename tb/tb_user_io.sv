// tb_user_io: presses buttons on random boards and checks the cursor against
// a reference search (nearest empty point in the pressed direction, or no
// move at the edge), plus hand-made cases: skipping two stones, stopping at
// the edge, playing a move, a pass, the centre button on a stone, and
// presses while it is not this player's turn.
module tb_user_io;
  import go_pkg::*;
  import go_ref_pkg::*;

  localparam int unsigned DB = 4;

  logic clk = 0, rst = 1;
  logic btn_r = 0, btn_l = 0, btn_c = 0, btn_u = 0, btn_d = 0, pass_sel = 0;
  board_t board = EMPTY_BOARD;
  logic my_turn = 1;
  logic [3:0] cursor_row, cursor_col;
  move_t move;
  logic make_move;
  int checks = 0, failures = 0, n_moves = 0;
  move_t last_move;

  user_io #(.DEBOUNCE_CYCLES(DB)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (!rst && make_move) begin n_moves++; last_move = move; end

  initial begin
    #2_000_000;
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

  // d: 0 right, 1 left, 2 up, 3 down, 4 centre
  task automatic press(int d);
    @(negedge clk);
    case (d)
      0: btn_r = 1; 1: btn_l = 1; 2: btn_u = 1; 3: btn_d = 1; default: btn_c = 1;
    endcase
    repeat (DB + 4) @(negedge clk);
    {btn_r, btn_l, btn_u, btn_d, btn_c} = '0;
    repeat (DB + 4 + 2 * N) @(negedge clk);
  endtask

  function automatic void expect_cursor(ref_board_t b, int d, inout int r, inout int c);
    int dr = (d == 2) ? -1 : (d == 3) ? 1 : 0;
    int dc = (d == 0) ? 1 : (d == 1) ? -1 : 0;
    int pr = r + dr, pc = c + dc;
    while (pr >= 0 && pr < int'(N) && pc >= 0 && pc < int'(N)) begin
      if (b[pr][pc] == 0) begin
        r = pr;
        c = pc;
        return;
      end
      pr += dr;
      pc += dc;
    end
  endfunction

  initial begin
    ref_board_t b;
    int er, ec;
    repeat (3) @(negedge clk);
    rst = 0;
    check(cursor_row == 4 && cursor_col == 4, "reset position");
    foreach (b[i, j]) b[i][j] = 0;
    b[4][6] = 1; b[4][7] = 2;
    board = from_ref(b);
    press(0);
    check(cursor_row == 4 && cursor_col == 5, "step right");
    press(0);
    check(cursor_row == 4 && cursor_col == 8, "skip two stones");
    press(0);
    check(cursor_row == 4 && cursor_col == 8, "edge holds");
    press(4);
    check(n_moves == 1 && last_move == 8'h48, "play move");
    b[4][8] = 1;
    board = from_ref(b);
    press(4);
    check(n_moves == 1, "centre on a stone ignored");
    pass_sel = 1;
    press(4);
    check(n_moves == 2 && last_move == MOVE_PASS, "pass");
    pass_sel = 0;
    my_turn = 0;
    repeat (3) @(negedge clk);
    press(1);
    press(4);
    check(n_moves == 2 && cursor_col == 8, "locked when not my turn");
    my_turn = 1;
    repeat (3) @(negedge clk);
    // random boards and presses against the reference search
    er = int'(cursor_row);
    ec = int'(cursor_col);
    for (int t = 0; t < 300; t++) begin
      int d = int'($urandom_range(3));
      if (t % 25 == 0) begin
        b = random_board(40);
        b[er][ec] = 0;
        board = from_ref(b);
      end
      expect_cursor(b, d, er, ec);
      press(d);
      check(int'(cursor_row) == er && int'(cursor_col) == ec,
            $sformatf("random press %0d dir %0d: got %0d,%0d exp %0d,%0d", t, d, cursor_row, cursor_col, er, ec));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
