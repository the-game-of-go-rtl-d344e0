// go_pkg: types and constants shared by the Go board logic.
//
// The board is a 9x9 grid of intersections, each held in two bits. A move
// travels between blocks (and over the serial link) as one byte: the upper
// nibble is the row, the lower nibble the column, and the byte 8'hFF means
// "pass". The 9x9 size and the pass byte follow the original design; the
// cell values and the row/column packing are this design's own choice.
package go_pkg;

  localparam int unsigned N = 9;  // board is N x N intersections

  // Contents of one intersection.
  typedef enum logic [1:0] {
    EMPTY = 2'd0,
    BLACK = 2'd1,
    WHITE = 2'd2
  } cell_t;

  // board[row][col]; row 0 is the top row, col 0 the left column.
  typedef cell_t [N-1:0][N-1:0] board_t;

  typedef logic [7:0] move_t;
  localparam move_t MOVE_PASS = 8'hFF;

  function automatic move_t make_move_byte(logic [3:0] row, logic [3:0] col);
    return {row, col};
  endfunction

  function automatic logic [3:0] move_row(move_t m);
    return m[7:4];
  endfunction

  function automatic logic [3:0] move_col(move_t m);
    return m[3:0];
  endfunction

  function automatic cell_t other_color(cell_t c);
    return (c == BLACK) ? WHITE : BLACK;
  endfunction

  // States of the game FSM; the seven-segment driver reads them too.
  typedef enum logic [2:0] {
    GS_WAITING, GS_UPDATE_BUS, GS_SENDING_MOVE, GS_PASS, GS_PASSED_WAITING,
    GS_GAME_OVER_SEND, GS_GAME_OVER
  } game_state_t;

  localparam board_t EMPTY_BOARD = '0;  // every cell EMPTY (encoded 0)

endpackage
