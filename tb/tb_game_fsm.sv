// tb_game_fsm: drives the game FSM together with the real board updater
// through a short game on the black board: own and received moves, a
// refused suicide, a pass followed by a move, a double pass ending the game,
// and a make_move pulse arriving while a move is still being checked. It
// checks the board, ko board, turn, the bytes sent and the game-over flag.
// A second phase resets the pair and plays a random game of 120 moves on
// empty points (with some single passes) against a reference model of
// capture, ko and suicide, checking after every move the board, the ko
// board, the turn and that exactly the valid moves made on this board's turn
// were sent.
module tb_game_fsm;
  import go_pkg::*;
  import go_ref_pkg::*;

  logic   clk = 0, rst = 1;
  logic   make_move = 0;
  move_t  move_in = '0;
  cell_t  my_color = BLACK;
  logic   upd_start, upd_valid, upd_invalid, upd_busy;
  move_t  upd_move;
  board_t upd_next_board, board, ko_board;
  cell_t  turn;
  logic   tx_start, last_pass, game_over, moved;
  move_t  tx_data;
  logic [2:0] state_out;
  int checks = 0, failures = 0;
  move_t sent[$];

  game_fsm dut (.*);
  board_updater u_upd (
    .clk, .rst, .start(upd_start), .turn(turn), .board(board), .ko_board(ko_board),
    .move(upd_move), .next_board(upd_next_board), .valid(upd_valid),
    .invalid(upd_invalid), .busy(upd_busy)
  );

  always #5 clk = ~clk;
  always @(posedge clk) if (!rst && tx_start) sent.push_back(tx_data);

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

  task automatic send(move_t m, bit double_pulse = 0);
    @(negedge clk) begin make_move = 1; move_in = m; end
    @(negedge clk) make_move = 0;
    if (double_pulse) begin
      @(negedge clk) begin make_move = 1; move_in = 8'h00; end
      @(negedge clk) make_move = 0;
    end
    repeat (250) @(negedge clk);
  endtask

  initial begin
    ref_board_t exp, prev;
    int nsent;
    repeat (3) @(negedge clk);
    rst = 0;
    foreach (exp[i, j]) exp[i][j] = 0;
    check(turn == BLACK && board == EMPTY_BOARD, "reset state");
    // own move, with a second pulse while it is checked (ignored)
    send(make_move_byte(4, 4), 1);
    prev = exp; exp[4][4] = 1;
    check(same(to_ref(board), exp) && same(to_ref(ko_board), prev), "own move applied");
    check(turn == WHITE, "turn flips");
    check(sent.size() == 1 && sent[0] == 8'h44, "own move sent once");
    send(make_move_byte(0, 1));  prev = exp; exp[0][1] = 2;
    check(same(to_ref(board), exp) && same(to_ref(ko_board), prev), "received move applied");
    check(sent.size() == 1, "received move not sent back");
    send(make_move_byte(4, 5));  exp[4][5] = 1;
    send(make_move_byte(1, 0));  exp[1][0] = 2;
    check(same(to_ref(board), exp) && turn == BLACK, "four moves");
    nsent = sent.size();
    // suicide in the corner: refused, nothing changes
    send(make_move_byte(0, 0));
    check(same(to_ref(board), exp) && turn == BLACK && sent.size() == nsent, "suicide refused");
    // black passes, white plays, black plays, white passes, black passes
    send(MOVE_PASS);
    check(turn == WHITE && last_pass && sent.size() == nsent + 1 && sent[$] == MOVE_PASS, "own pass");
    send(make_move_byte(5, 5));  exp[5][5] = 2;
    check(!last_pass && same(to_ref(board), exp) && turn == BLACK, "move after pass");
    send(make_move_byte(6, 6));  exp[6][6] = 1;
    send(MOVE_PASS);
    check(last_pass && !game_over && turn == BLACK, "received pass");
    nsent = sent.size();
    send(MOVE_PASS);
    check(game_over && sent.size() == nsent + 1 && sent[$] == MOVE_PASS, "double pass ends game");
    send(make_move_byte(7, 7));
    check(game_over && same(to_ref(board), exp), "no moves after game over");
    // random game against the reference model
    rst = 1;
    repeat (3) @(negedge clk);
    rst = 0;
    sent.delete();
    begin
      ref_board_t ko, cand, after;
      int t, r, c, nexp, ncap, nrefused, npass;
      bit lastp, ok;
      move_t m, last_sent;
      foreach (exp[i, j]) exp[i][j] = 0;
      ko = exp;
      t = 1;
      nexp = 0; ncap = 0; nrefused = 0; npass = 0;
      lastp = 0;
      last_sent = '0;
      for (int k = 0; k < 120; k++) begin
        if (!lastp && $urandom_range(99) < 8) begin
          m = MOVE_PASS;
          ok = 1;
          cand = exp;
        end else begin
          do begin
            r = $urandom_range(N - 1);
            c = $urandom_range(N - 1);
          end while (exp[r][c] != 0);
          m = make_move_byte(r, c);
          cand = exp;
          cand[r][c] = t;
          after = ref_prune(cand, 3 - t);
          ok = !same(after, ko) && same(ref_prune(after, t), after);
          if (ok && !same(after, cand)) ncap++;
          cand = after;
        end
        send(m);
        if (ok) begin
          if (m != MOVE_PASS) begin
            ko = exp;
            exp = cand;
          end else begin
            npass++;
          end
          lastp = (m == MOVE_PASS);
          if (t == 1) begin
            nexp++;
            last_sent = m;
          end
          t = 3 - t;
        end else begin
          nrefused++;
        end
        check(same(to_ref(board), exp) && same(to_ref(ko_board), ko),
              $sformatf("random move %0d (%0d,%0d) board", k, r, c));
        check(int'(turn) == t && !game_over, $sformatf("random move %0d turn", k));
        check(sent.size() == nexp && (nexp == 0 || sent[$] == last_sent),
              $sformatf("random move %0d sent %0d of %0d", k, sent.size(), nexp));
      end
      $display("random game: %0d captures, %0d refused, %0d passes", ncap, nrefused, npass);
      check(ncap > 0 && nrefused > 0, "random game exercised capture and refusal");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
