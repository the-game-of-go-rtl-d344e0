// go_top: one player's board in a two-board game of Go.
//
// Each player has an identical board; the two exchange moves over a serial
// link (9600 baud, one byte per move). On this board the player steers a
// cursor with the direction buttons and plays with the centre button; switch
// 13 turns the centre button into a pass. player_white selects the colour
// played here. The move, or a byte received from the other board, goes to
// the game FSM, which has the board updater (with its pruner) place the
// stone, remove captured stones and reject ko and suicide. Accepted moves
// made here are sent to the other board; the board is shown on a VGA monitor
// and the scores and messages on the seven-segment digits. After every
// accepted move the territory counter recounts the area of both players.
//
// Block structure and connections follow the original design. Two details are
// this design's choices: the move source (buttons or serial) is selected by
// whose turn it is, for both the move byte and its strobe, so a byte received
// out of turn is ignored; and moves are sent by the game FSM after they have
// been checked, not straight from the buttons.
//
// Submodule outputs the top does not need (the transmitter's and updater's
// busy, the FSM's last_pass, the counter's ready) are left open on purpose.
//
// Timing: a move is checked in 2*(PRUNE_CYCLES+3)+6 clocks; the serial byte
// takes 10*CLK_HZ/BAUD clocks. pixel_out, hsync and vsync are aligned.
module go_top
  import go_pkg::*;
#(
  parameter int unsigned CLK_HZ          = 65_000_000,
  parameter int unsigned BAUD            = 9600,
  parameter int unsigned DEBOUNCE_CYCLES = 650_000,
  parameter int unsigned PRUNE_CYCLES    = N * N,
  parameter int unsigned REFRESH_BITS    = 16
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        btn_r,
  input  logic        btn_l,
  input  logic        btn_c,
  input  logic        btn_u,
  input  logic        btn_d,
  input  logic        sw_pass,
  input  logic        player_white,
  input  logic        rx,
  output logic        tx,
  output logic [11:0] pixel_out,
  output logic        hsync,
  output logic        vsync,
  output logic [6:0]  seg,
  output logic [7:0]  an
);
  cell_t  my_color, turn;
  board_t board, ko_board, next_board;
  logic   my_turn, game_over, moved;
  logic   io_make_move, rx_ready, make_move;
  move_t  io_move, rx_data, move_in, upd_move, tx_data;
  logic   upd_start, upd_valid, upd_invalid, tx_start;
  logic [3:0] cursor_row, cursor_col;
  game_state_t fsm_state;
  logic [7:0] black_count, white_count;

  assign my_color = player_white ? WHITE : BLACK;
  assign my_turn  = (turn == my_color) && !game_over;

  // Move source: this player's buttons on its turn, the serial link otherwise.
  assign move_in   = my_turn ? io_move : rx_data;
  assign make_move = my_turn ? io_make_move : rx_ready;

  user_io #(.DEBOUNCE_CYCLES(DEBOUNCE_CYCLES)) u_io (
    .clk, .rst, .btn_r, .btn_l, .btn_c, .btn_u, .btn_d,
    .pass_sel(sw_pass), .board, .my_turn,
    .cursor_row, .cursor_col, .move(io_move), .make_move(io_make_move)
  );

  uart_rx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_rx (
    .clk, .rst, .rx, .data(rx_data), .ready(rx_ready)
  );

  uart_tx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_tx (
    .clk, .rst, .start(tx_start), .data(tx_data), .tx, .busy()
  );

  game_fsm u_fsm (
    .clk, .rst, .make_move, .move_in, .my_color,
    .upd_start, .upd_move, .upd_next_board(next_board), .upd_valid, .upd_invalid,
    .board, .ko_board, .turn, .tx_start, .tx_data, .last_pass(), .game_over, .moved,
    .state_out(fsm_state)
  );

  board_updater #(.PRUNE_CYCLES(PRUNE_CYCLES)) u_upd (
    .clk, .rst, .start(upd_start), .turn, .board, .ko_board, .move(upd_move),
    .next_board, .valid(upd_valid), .invalid(upd_invalid), .busy()
  );

  territory_counter #(.PRUNE_CYCLES(PRUNE_CYCLES)) u_terr (
    .clk, .rst, .start(moved), .board, .black_count, .white_count, .ready()
  );

  seven_seg #(.REFRESH_BITS(REFRESH_BITS)) u_seg (
    .clk, .rst, .black_count, .white_count, .pass_sel(sw_pass), .state(fsm_state),
    .my_color, .seg, .an
  );

  logic [10:0] hcount;
  logic [9:0]  vcount;
  logic        hsync_raw, vsync_raw, blank;

  vga_timing u_vga (
    .clk, .rst, .hcount, .vcount, .hsync(hsync_raw), .vsync(vsync_raw), .blank
  );

  display u_disp (
    .clk, .rst, .hcount, .vcount, .blank, .board, .cursor_row, .cursor_col, .pixel_out
  );

  // Delay the syncs by the renderer's one clock.
  always_ff @(posedge clk) begin
    if (rst) begin
      hsync <= 1'b1;
      vsync <= 1'b1;
    end else begin
      hsync <= hsync_raw;
      vsync <= vsync_raw;
    end
  end
endmodule
