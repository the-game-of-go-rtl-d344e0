// seven_seg: eight-digit seven-segment driver for game messages and scores.
//
// The four left digits show a status word and the four right digits the two
// territory counts in decimal (black, then white):
//   game over : "uin " if this player's count is higher, "LOSE" if lower,
//               "tIE " if equal
//   pass switch on     : "PASS"   (the next centre press passes)
//   last move a pass   : "PASd"
//   otherwise          : blank
// The digits are multiplexed: one digit is lit at a time, advancing every
// 2^(REFRESH_BITS-3) clocks. The game state comes straight from the game
// FSM: PASSED WAITING means the last move was a pass, GAME OVER ends the game. Showing these messages and the counts follows
// the original design; the words, layout and refresh rate are this design's
// choice. seg[0] is segment a ... seg[6] segment g; seg and an are active low.
module seven_seg
  import go_pkg::*;
#(
  parameter int unsigned REFRESH_BITS = 16
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] black_count,
  input  logic [7:0] white_count,
  input  logic       pass_sel,
  input  game_state_t state,
  input  cell_t      my_color,
  output logic [6:0] seg,
  output logic [7:0] an
);
  typedef enum logic [4:0] {
    CH_0, CH_1, CH_2, CH_3, CH_4, CH_5, CH_6, CH_7, CH_8, CH_9,
    CH_A, CH_P, CH_S, CH_D, CH_U, CH_I, CH_N, CH_L, CH_O, CH_E, CH_T, CH_BLANK
  } char_t;

  function automatic logic [6:0] glyph(char_t ch);
    unique case (ch)
      CH_0, CH_O: return 7'h3F;
      CH_1:       return 7'h06;
      CH_2:       return 7'h5B;
      CH_3:       return 7'h4F;
      CH_4:       return 7'h66;
      CH_5, CH_S: return 7'h6D;
      CH_6:       return 7'h7D;
      CH_7:       return 7'h07;
      CH_8:       return 7'h7F;
      CH_9:       return 7'h6F;
      CH_A:       return 7'h77;
      CH_P:       return 7'h73;
      CH_D:       return 7'h5E;
      CH_U:       return 7'h1C;
      CH_I:       return 7'h04;
      CH_N:       return 7'h54;
      CH_L:       return 7'h38;
      CH_E:       return 7'h79;
      CH_T:       return 7'h78;
      default:    return 7'h00;
    endcase
  endfunction

  function automatic char_t digit(logic [7:0] v);
    return char_t'(5'(v));
  endfunction

  logic [REFRESH_BITS-1:0] refresh;
  logic [2:0] idx;
  char_t chars [8];  // chars[7] is the leftmost digit

  wire game_over = (state == GS_GAME_OVER);
  wire last_pass = (state == GS_PASSED_WAITING);

  assign idx = refresh[REFRESH_BITS-1 -: 3];

  always_comb begin
    logic [7:0] mine, theirs;
    mine   = (my_color == WHITE) ? white_count : black_count;
    theirs = (my_color == WHITE) ? black_count : white_count;
    chars[3] = digit(8'(black_count / 10));
    chars[2] = digit(8'(black_count % 10));
    chars[1] = digit(8'(white_count / 10));
    chars[0] = digit(8'(white_count % 10));
    if (game_over) begin
      if (mine > theirs)      {chars[7], chars[6], chars[5], chars[4]} = {CH_U, CH_I, CH_N, CH_BLANK};
      else if (mine < theirs) {chars[7], chars[6], chars[5], chars[4]} = {CH_L, CH_O, CH_S, CH_E};
      else                    {chars[7], chars[6], chars[5], chars[4]} = {CH_T, CH_I, CH_E, CH_BLANK};
    end else if (pass_sel) begin
      {chars[7], chars[6], chars[5], chars[4]} = {CH_P, CH_A, CH_S, CH_S};
    end else if (last_pass) begin
      {chars[7], chars[6], chars[5], chars[4]} = {CH_P, CH_A, CH_S, CH_D};
    end else begin
      {chars[7], chars[6], chars[5], chars[4]} = {CH_BLANK, CH_BLANK, CH_BLANK, CH_BLANK};
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      refresh <= '0;
      seg     <= '1;
      an      <= '1;
    end else begin
      refresh <= refresh + 1'b1;
      seg     <= ~glyph(chars[idx]);
      an      <= ~(8'b1 << idx);
    end
  end
endmodule
