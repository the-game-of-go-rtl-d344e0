// board_updater: computes the board that follows a move and decides whether
// the move is legal.
//
// On start the current board, the ko board (the board before the previous
// move), the move byte and the mover's colour are captured. A pass is valid
// at once and leaves the board unchanged. Otherwise the stone is placed
// (LOAD MOVE) and the single pruner instance is run twice:
//   1. PRUNE 1 removes the opponent's stones left without a liberty.
//   2. PRUNE COLORSWAP compares that result with the ko board; equal means
//      the move repeats the earlier position (ko) and is invalid.
//   3. PRUNE 2 prunes the mover's own colour; if any stone disappears the
//      move was a suicide and is invalid.
// The state sequence and the two checks follow the original design.
//
// Interface: pulse start while in WAITING (busy low). Exactly one of valid or
// invalid pulses for one clock when the result is known; with valid,
// next_board holds the new board until the next valid. A legal non-pass move
// takes 2*(PRUNE_CYCLES+3)+6 clocks from start to the flag; a pass takes 2.
// The target point is assumed empty: the cursor logic never offers an
// occupied point.
module board_updater
  import go_pkg::*;
#(
  parameter int unsigned PRUNE_CYCLES = N * N
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   start,
  input  cell_t  turn,
  input  board_t board,
  input  board_t ko_board,
  input  move_t  move,
  output board_t next_board,
  output logic   valid,
  output logic   invalid,
  output logic   busy
);
  typedef enum logic [3:0] {
    WAITING, LOAD_BOARD, LOAD_MOVE, PULSE_PRUNE1, PRUNE1, PRUNE_COLORSWAP,
    PULSE_PRUNE2, PRUNE2, VALID_BOARD, INVALID_BOARD
  } state_t;
  state_t state;

  board_t board_q, ko_q, work;
  move_t  move_q;
  cell_t  turn_q, prune_color;

  logic   pr_start, pr_done;
  board_t pr_out;

  pruner #(.PRUNE_CYCLES(PRUNE_CYCLES)) u_pruner (
    .clk       (clk),
    .rst       (rst),
    .start     (pr_start),
    .board_in  (work),
    .color     (prune_color),
    .board_out (pr_out),
    .done      (pr_done)
  );

  assign pr_start = (state == PULSE_PRUNE1) || (state == PULSE_PRUNE2);
  assign valid    = (state == VALID_BOARD);
  assign invalid  = (state == INVALID_BOARD);
  assign busy     = (state != WAITING);

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= WAITING;
      board_q     <= EMPTY_BOARD;
      ko_q        <= EMPTY_BOARD;
      work        <= EMPTY_BOARD;
      next_board  <= EMPTY_BOARD;
      move_q      <= MOVE_PASS;
      turn_q      <= BLACK;
      prune_color <= WHITE;
    end else begin
      unique case (state)
        WAITING: if (start) begin
          board_q <= board;
          ko_q    <= ko_board;
          move_q  <= move;
          turn_q  <= turn;
          state   <= LOAD_BOARD;
        end
        LOAD_BOARD: begin
          if (move_q == MOVE_PASS) begin
            next_board <= board_q;
            state      <= VALID_BOARD;
          end else begin
            state <= LOAD_MOVE;
          end
        end
        LOAD_MOVE: begin
          work <= board_q;
          work[move_row(move_q)][move_col(move_q)] <= turn_q;
          prune_color <= other_color(turn_q);
          state <= PULSE_PRUNE1;
        end
        PULSE_PRUNE1: state <= PRUNE1;
        PRUNE1: if (pr_done) state <= PRUNE_COLORSWAP;
        PRUNE_COLORSWAP: begin
          if (pr_out == ko_q) begin
            state <= INVALID_BOARD;
          end else begin
            work        <= pr_out;
            prune_color <= turn_q;
            state       <= PULSE_PRUNE2;
          end
        end
        PULSE_PRUNE2: state <= PRUNE2;
        PRUNE2: if (pr_done) begin
          if (pr_out != work) begin
            state <= INVALID_BOARD;
          end else begin
            next_board <= work;
            state      <= VALID_BOARD;
          end
        end
        VALID_BOARD, INVALID_BOARD: state <= WAITING;
        default: state <= WAITING;
      endcase
    end
  end
endmodule
