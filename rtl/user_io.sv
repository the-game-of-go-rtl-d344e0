// user_io: cursor and move entry for the local player.
//
// Four direction buttons move a cursor over the board and the centre button
// plays the move under it (or a pass when pass_sel, switch 13, is on). The
// cursor never stops on a stone and never leaves the board: a direction press
// is registered and MOVE CURSOR probes one point further per clock in that
// direction until it finds an empty point (the cursor jumps there) or runs
// off the edge (the cursor stays where it was). After a move is pulsed the
// inputs are LOCKED until it is this player's turn again; they are also
// locked whenever it is not this player's turn. The four states and the
// skipping search follow the original design. The original only enters
// LOCKED after a move; also entering it from WAITING when it is not this
// player's turn is this design's choice. The debouncing, the reset
// position at the centre point, and ignoring the centre button while the
// cursor sits on a stone (so only legal points are ever sent) are this
// design's choices.
//
// Interface: buttons are raw levels; make_move is a one-clock pulse with move
// (row in the upper nibble, column in the lower, 8'hFF = pass) held after it.
module user_io
  import go_pkg::*;
#(
  parameter int unsigned DEBOUNCE_CYCLES = 650_000
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       btn_r,
  input  logic       btn_l,
  input  logic       btn_c,
  input  logic       btn_u,
  input  logic       btn_d,
  input  logic       pass_sel,
  input  board_t     board,
  input  logic       my_turn,
  output logic [3:0] cursor_row,
  output logic [3:0] cursor_col,
  output move_t      move,
  output logic       make_move
);
  typedef enum logic [1:0] {WAITING, MOVE_CURSOR, PULSE_MOVE, LOCKED} state_t;
  typedef enum logic [1:0] {DIR_R, DIR_L, DIR_U, DIR_D} dir_t;
  state_t state;
  dir_t   dir_q;

  logic p_r, p_l, p_c, p_u, p_d;
  btn_pulse #(.DEBOUNCE_CYCLES(DEBOUNCE_CYCLES)) u_r (.clk, .rst, .btn(btn_r), .pulse(p_r));
  btn_pulse #(.DEBOUNCE_CYCLES(DEBOUNCE_CYCLES)) u_l (.clk, .rst, .btn(btn_l), .pulse(p_l));
  btn_pulse #(.DEBOUNCE_CYCLES(DEBOUNCE_CYCLES)) u_c (.clk, .rst, .btn(btn_c), .pulse(p_c));
  btn_pulse #(.DEBOUNCE_CYCLES(DEBOUNCE_CYCLES)) u_u (.clk, .rst, .btn(btn_u), .pulse(p_u));
  btn_pulse #(.DEBOUNCE_CYCLES(DEBOUNCE_CYCLES)) u_d (.clk, .rst, .btn(btn_d), .pulse(p_d));

  // Probe position: the point being examined during MOVE CURSOR.
  logic [3:0] probe_row, probe_col;
  logic [4:0] next_row, next_col;  // one extra bit to see the edge
  logic       off_board;

  always_comb begin
    next_row = {1'b0, probe_row};
    next_col = {1'b0, probe_col};
    unique case (dir_q)
      DIR_R: next_col = next_col + 5'd1;
      DIR_L: next_col = next_col - 5'd1;
      DIR_U: next_row = next_row - 5'd1;
      default: next_row = next_row + 5'd1;
    endcase
    off_board = (next_row >= 5'(N)) || (next_col >= 5'(N));
  end

  wire cursor_empty = (board[cursor_row][cursor_col] == EMPTY);

  assign make_move = (state == PULSE_MOVE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= WAITING;
      dir_q      <= DIR_R;
      cursor_row <= 4'(N / 2);
      cursor_col <= 4'(N / 2);
      probe_row  <= 4'(N / 2);
      probe_col  <= 4'(N / 2);
      move       <= MOVE_PASS;
    end else begin
      unique case (state)
        WAITING: begin
          probe_row <= cursor_row;
          probe_col <= cursor_col;
          if (!my_turn) begin
            state <= LOCKED;
          end else if (p_c && (pass_sel || cursor_empty)) begin
            move  <= pass_sel ? MOVE_PASS : make_move_byte(cursor_row, cursor_col);
            state <= PULSE_MOVE;
          end else if (p_r || p_l || p_u || p_d) begin
            dir_q <= p_r ? DIR_R : p_l ? DIR_L : p_u ? DIR_U : DIR_D;
            state <= MOVE_CURSOR;
          end
        end
        MOVE_CURSOR: begin
          if (off_board) begin
            state <= WAITING;  // nothing free that way: cursor stays
          end else if (board[next_row[3:0]][next_col[3:0]] == EMPTY) begin
            cursor_row <= next_row[3:0];
            cursor_col <= next_col[3:0];
            state      <= WAITING;
          end else begin
            probe_row <= next_row[3:0];
            probe_col <= next_col[3:0];
          end
        end
        PULSE_MOVE: state <= LOCKED;
        LOCKED:     if (my_turn) state <= WAITING;
        default:    state <= WAITING;
      endcase
    end
  end
endmodule
