// game_fsm: keeps the game state and steps it one move at a time.
//
// It holds the board bus, the ko board (the board before the last move),
// whose turn it is, whether the last move was a pass, and game over. A
// make_move pulse in WAITING or PASSED WAITING starts the board updater with
// the move byte; the FSM then waits for the updater's verdict. An invalid
// move (ko or suicide) leaves everything unchanged and waits for a new move.
// A valid move goes to UPDATE BUS (board <= next board, ko <= old board) and
// SENDING MOVE (send the move if it was this board's own, flip the turn). A
// valid pass goes to PASS (send if own, flip the turn) and PASSED WAITING; a
// second pass from there goes to GAME OVER SEND and GAME OVER. The states and
// their conditions follow the original design; sending the passes too, so the
// other board can follow, is this design's choice.
//
// Interface: make_move is a one-clock pulse with move_in valid; pulses that
// arrive while a move is being checked are ignored. tx_start is a one-clock
// pulse with tx_data holding the move byte. moved pulses once per accepted
// move or pass (used to restart territory counting). The updater ports
// (upd_*) connect straight to board_updater.
module game_fsm
  import go_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   make_move,
  input  move_t  move_in,
  input  cell_t  my_color,
  // board updater
  output logic   upd_start,
  output move_t  upd_move,
  input  board_t upd_next_board,
  input  logic   upd_valid,
  input  logic   upd_invalid,
  // game state
  output board_t board,
  output board_t ko_board,
  output cell_t  turn,
  output logic   tx_start,
  output move_t  tx_data,
  output logic   last_pass,
  output logic   game_over,
  output logic   moved,
  output game_state_t state_out
);
  game_state_t state;

  logic pending;  // the updater is checking upd_move

  assign upd_move  = tx_data;
  assign last_pass = (state == GS_PASSED_WAITING);
  assign game_over = (state == GS_GAME_OVER);
  assign state_out = state;

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= GS_WAITING;
      board     <= EMPTY_BOARD;
      ko_board  <= EMPTY_BOARD;
      turn      <= BLACK;
      tx_start  <= 1'b0;
      tx_data   <= MOVE_PASS;
      upd_start <= 1'b0;
      pending   <= 1'b0;
      moved     <= 1'b0;
    end else begin
      tx_start  <= 1'b0;
      upd_start <= 1'b0;
      moved     <= 1'b0;
      unique case (state)
        GS_WAITING, GS_PASSED_WAITING: begin
          if (!pending && make_move) begin
            upd_start <= 1'b1;
            tx_data   <= move_in;
            pending   <= 1'b1;
          end else if (pending && upd_invalid) begin
            pending <= 1'b0;
          end else if (pending && upd_valid) begin
            pending <= 1'b0;
            if (tx_data != MOVE_PASS)  state <= GS_UPDATE_BUS;
            else if (state == GS_WAITING) state <= GS_PASS;
            else                       state <= GS_GAME_OVER_SEND;
          end
        end
        GS_UPDATE_BUS: begin
          ko_board <= board;
          board    <= upd_next_board;
          state    <= GS_SENDING_MOVE;
        end
        GS_SENDING_MOVE, GS_PASS: begin
          tx_start <= (turn == my_color);
          turn     <= other_color(turn);
          moved    <= 1'b1;
          state    <= (state == GS_PASS) ? GS_PASSED_WAITING : GS_WAITING;
        end
        GS_GAME_OVER_SEND: begin
          tx_start <= (turn == my_color);
          moved    <= 1'b1;
          state    <= GS_GAME_OVER;
        end
        GS_GAME_OVER: state <= GS_GAME_OVER;
        default:   state <= GS_WAITING;
      endcase
    end
  end
endmodule
