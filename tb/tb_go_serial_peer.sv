// tb_go_serial_peer: one board (black) plays against a peer that speaks only
// the serial protocol, as a program on a PC would. The testbench is that peer:
// it decodes the bytes the board sends and answers with its own moves, one
// byte per move, 8N1 at the board's bit rate. Checks that the board sends its
// moves and passes, applies the peer's moves (including a capture), ignores a
// byte sent out of turn, refuses an illegal (suicide) peer move and ends the game on a
// double pass. Shortened timing: 64 clocks per bit, 4-clock debounce.
module tb_go_serial_peer;
  import go_pkg::*;
  import go_ref_pkg::*;

  localparam int unsigned CLK_HZ = 614_400;
  localparam int unsigned BAUD   = 9600;
  localparam int unsigned BIT    = CLK_HZ / BAUD;
  localparam int unsigned DB     = 4;

  logic clk = 0, rst = 1;
  logic [4:0] btn = '0;  // {r, l, c, u, d}
  logic sw_pass = 0;
  logic rx = 1, tx;
  logic [11:0] pixel_out;
  logic hsync, vsync;
  logic [6:0] seg;
  logic [7:0] an;
  int checks = 0, failures = 0;
  move_t got[$];

  go_top #(.CLK_HZ(CLK_HZ), .BAUD(BAUD), .DEBOUNCE_CYCLES(DB), .REFRESH_BITS(6)) dut (
    .clk, .rst, .btn_r(btn[4]), .btn_l(btn[3]), .btn_c(btn[2]), .btn_u(btn[1]), .btn_d(btn[0]),
    .sw_pass, .player_white(1'b0), .rx, .tx, .pixel_out, .hsync, .vsync, .seg, .an
  );

  always #5 clk = ~clk;

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Peer receiver: decode every frame on tx.
  initial begin
    forever begin
      logic [7:0] b;
      @(negedge tx);
      if (rst) continue;
      repeat (BIT / 2) @(negedge clk);
      for (int k = 0; k < 8; k++) begin
        repeat (BIT) @(negedge clk);
        b[k] = tx;
      end
      repeat (BIT) @(negedge clk);
      if (tx) got.push_back(b);
    end
  end

  function automatic void check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endfunction

  task automatic peer_send(move_t b);
    logic [9:0] frame;
    frame = {1'b1, b, 1'b0};
    for (int k = 0; k < 10; k++) begin
      rx = frame[k];
      repeat (BIT) @(negedge clk);
    end
    rx = 1'b1;
    repeat (400) @(negedge clk);
  endtask

  task automatic press(int b);
    @(negedge clk) btn[b] = 1'b1;
    repeat (DB + 4) @(negedge clk);
    btn = '0;
    repeat (DB + 4 + 2 * N) @(negedge clk);
  endtask

  initial begin
    ref_board_t exp;
    foreach (exp[i, j]) exp[i][j] = 0;
    repeat (5) @(negedge clk);
    rst = 0;
    repeat (50) @(negedge clk);
    // a byte from the peer while it is black's turn is ignored
    peer_send(8'h00);
    check(dut.board == EMPTY_BOARD && dut.turn == BLACK, "out-of-turn byte ignored");
    // black plays (4,4) from the centre cursor position
    press(2);
    repeat (12 * BIT) @(negedge clk);
    exp[4][4] = 1;
    check(got.size() == 1 && got[0] == 8'h44, "board sent its move");
    // buttons: press(4) right, press(3) left, press(2) centre, press(1) up, press(0) down
    peer_send(8'h00); exp[0][0] = 2;
    check(same(to_ref(dut.board), exp) && dut.turn == BLACK, "peer move applied");
    repeat (4) press(3);  // (4,0)
    repeat (3) press(1);  // (1,0)
    press(2);
    repeat (12 * BIT) @(negedge clk);
    exp[1][0] = 1;
    check(got.size() == 2 && got[1] == 8'h10, $sformatf("board sent (1,0): %0d bytes", got.size()));
    peer_send(8'h88); exp[8][8] = 2;
    check(same(to_ref(dut.board), exp) && dut.turn == BLACK, "second peer move");
    press(1);  // up: (0,0) holds a stone and the edge follows, cursor stays
    check(dut.cursor_row == 1 && dut.cursor_col == 0, "cursor held at the edge");
    press(4);  // (1,1)
    press(1);  // (0,1)
    press(2);  // black (0,1) captures the white stone at (0,0)
    repeat (12 * BIT) @(negedge clk);
    exp[0][1] = 1;
    exp = ref_prune(exp, 2);
    check(exp[0][0] == 0 && same(to_ref(dut.board), exp), "capture of the peer's stone");
    check(got.size() == 3 && got[2] == 8'h01, "board sent (0,1)");
    // the peer plays back into (0,0): suicide, refused; still white's turn
    peer_send(8'h00);
    check(same(to_ref(dut.board), exp) && dut.turn == WHITE, "illegal peer move refused");
    peer_send(8'h87); exp[8][7] = 2;
    check(same(to_ref(dut.board), exp) && dut.turn == BLACK, "peer move after refusal");
    // black passes, the peer passes: game over
    sw_pass = 1;
    press(2);
    sw_pass = 0;
    repeat (12 * BIT) @(negedge clk);
    check(got.size() == 4 && got[3] == MOVE_PASS && dut.u_fsm.last_pass, "board passed");
    peer_send(MOVE_PASS);
    check(dut.game_over && got.size() == 4, "peer pass ends the game");
    repeat (300) @(negedge clk);
    check(int'(dut.black_count) == ref_area(exp, 1) && int'(dut.white_count) == ref_area(exp, 2),
          $sformatf("score %0d/%0d", dut.black_count, dut.white_count));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
