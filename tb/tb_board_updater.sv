// tb_board_updater: plays random games through the board updater and checks
// every result (next board, valid/invalid, latency) against a reference that
// applies the move, removes dead opponent stones, and rejects ko and suicide.
// Also checks a hand-built ko, a hand-built suicide, a capture and a pass.
module tb_board_updater;
  import go_pkg::*;
  import go_ref_pkg::*;

  localparam int unsigned PC = N * N;

  logic   clk = 0, rst = 1, start = 0;
  cell_t  turn;
  board_t board, ko_board, next_board;
  move_t  move;
  logic   valid, invalid, busy;
  int checks = 0, failures = 0;
  int n_valid = 0, n_ko = 0, n_suicide = 0, n_capture = 0, n_pass = 0;

  board_updater dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20_000_000;
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

  // Sends one move; returns 1 if accepted. Updates brd/ko as the game FSM would.
  task automatic play(inout ref_board_t brd, inout ref_board_t ko, input int col,
                      input int r, input int c, input bit is_pass, output bit ok);
    ref_board_t placed, p1, p2;
    bit exp_ok;
    int lat;
    if (is_pass) begin
      exp_ok = 1;
      p1 = brd;
    end else begin
      placed = brd;
      placed[r][c] = col;
      p1 = ref_prune(placed, (col == 1) ? 2 : 1);
      p2 = ref_prune(p1, col);
      exp_ok = !same(p1, ko) && same(p1, p2);
      if (same(p1, ko)) n_ko++;
      else if (!same(p1, p2)) n_suicide++;
      if (exp_ok) begin
        int n_before = 0, n_after = 0;
        foreach (p1[i, j]) begin
          n_before += (placed[i][j] != 0);
          n_after  += (p1[i][j] != 0);
        end
        if (n_after < n_before) n_capture++;
      end
    end
    board    = from_ref(brd);
    ko_board = from_ref(ko);
    turn     = cell_t'(col[1:0]);
    move     = is_pass ? MOVE_PASS : make_move_byte(4'(r), 4'(c));
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    lat = 1;
    while (!valid && !invalid) begin
      @(negedge clk);
      lat++;
    end
    ok = valid;
    check(valid == exp_ok && invalid == !exp_ok, $sformatf("verdict r%0d c%0d", r, c));
    check(lat == (is_pass ? 2 : (exp_ok || !same(p1, ko)) ? 2 * (PC + 3) + 6 : PC + 3 + 5),
          $sformatf("latency %0d", lat));
    if (valid) begin
      check(same(to_ref(next_board), p1), "next board");
      ko  = brd;
      brd = p1;
      n_valid++;
      if (is_pass) n_pass++;
    end
    @(negedge clk);
    check(!valid && !invalid && !busy, "flags are single pulses");
  endtask

  initial begin
    ref_board_t brd, ko;
    bit ok;
    repeat (3) @(negedge clk);
    rst = 0;
    // ko: black captures at (4,5); white retaking at (4,4) is refused
    foreach (brd[i, j]) brd[i][j] = 0;
    ko = brd;
    brd[3][4] = 1; brd[4][3] = 1; brd[5][4] = 1;
    brd[3][5] = 2; brd[5][5] = 2; brd[4][6] = 2; brd[4][4] = 2;
    play(brd, ko, 1, 4, 5, 0, ok);
    check(ok && brd[4][4] == 0, "ko setup capture");
    play(brd, ko, 2, 4, 4, 0, ok);
    check(!ok, "ko retake refused");
    // suicide in the corner
    foreach (brd[i, j]) brd[i][j] = 0;
    ko = brd;
    brd[0][1] = 2; brd[1][0] = 2;
    play(brd, ko, 1, 0, 0, 0, ok);
    check(!ok, "suicide refused");
    play(brd, ko, 1, 0, 0, 1, ok);
    check(ok, "pass accepted");
    // random games
    for (int g = 0; g < 6; g++) begin
      int col = 1;
      foreach (brd[i, j]) brd[i][j] = 0;
      ko = brd;
      for (int m = 0; m < 70; m++) begin
        int r, c, tries = 0;
        do begin
          r = int'($urandom_range(N - 1));
          c = int'($urandom_range(N - 1));
          tries++;
        end while (brd[r][c] != 0 && tries < 200);
        if (brd[r][c] != 0) break;
        play(brd, ko, col, r, c, 0, ok);
        if (ok) col = 3 - col;
      end
    end
    check(n_ko > 0 && n_suicide > 0 && n_capture > 0 && n_pass > 0, "all cases seen");
    $display("valid=%0d ko=%0d suicide=%0d capture=%0d pass=%0d", n_valid, n_ko, n_suicide, n_capture, n_pass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
