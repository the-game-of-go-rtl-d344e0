// territory_counter: area score of each player, built on the pruner.
//
// For black: take the board, swap white stones and empty points, and prune
// white from it. An empty region that touches no white stone becomes a white
// group with no liberty and is removed; a region touching white survives,
// because the white stones became empty points next to it. The points where
// the pruned and unpruned swapped boards differ (their XOR) are black's
// enclosed territory; adding black's stones gives black's count. White is
// counted the same way with the colours exchanged, by a second pruner running
// in parallel. The swap-prune-XOR method and the WAITING, PULSE PRUNERS,
// PRUNING, LOAD COUNT, PULSE READY sequence follow the original design.
// A board with no stones counts every point for both players, since the
// single empty region touches neither colour.
//
// Interface: pulse start with board valid; ready pulses PRUNE_CYCLES+6 clocks
// later, with black_count and white_count (stones plus territory, 0..81) held
// until the next ready.
module territory_counter
  import go_pkg::*;
#(
  parameter int unsigned PRUNE_CYCLES = N * N
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  board_t     board,
  output logic [7:0] black_count,
  output logic [7:0] white_count,
  output logic       ready
);
  typedef enum logic [2:0] {WAITING, PULSE_PRUNERS, PRUNING, LOAD_COUNT, PULSE_READY} state_t;
  state_t state;

  board_t board_q, swap_b, swap_w, pruned_b, pruned_w;
  logic   done_b, done_w, got_b, got_w;

  // swap_b: white <-> empty (for black's count); swap_w: black <-> empty.
  always_comb begin
    for (int r = 0; r < int'(N); r++) begin
      for (int c = 0; c < int'(N); c++) begin
        unique case (board_q[r][c])
          EMPTY:   begin swap_b[r][c] = WHITE; swap_w[r][c] = BLACK; end
          BLACK:   begin swap_b[r][c] = BLACK; swap_w[r][c] = EMPTY; end
          default: begin swap_b[r][c] = EMPTY; swap_w[r][c] = WHITE; end
        endcase
      end
    end
  end

  wire start_pr = (state == PULSE_PRUNERS);

  pruner #(.PRUNE_CYCLES(PRUNE_CYCLES)) u_prune_b (
    .clk, .rst, .start(start_pr), .board_in(swap_b), .color(WHITE),
    .board_out(pruned_b), .done(done_b)
  );
  pruner #(.PRUNE_CYCLES(PRUNE_CYCLES)) u_prune_w (
    .clk, .rst, .start(start_pr), .board_in(swap_w), .color(BLACK),
    .board_out(pruned_w), .done(done_w)
  );

  // Tally of the XOR boards plus the stones of each colour.
  logic [7:0] tally_b, tally_w;
  always_comb begin
    tally_b = '0;
    tally_w = '0;
    for (int r = 0; r < int'(N); r++) begin
      for (int c = 0; c < int'(N); c++) begin
        tally_b += 8'((pruned_b[r][c] ^ swap_b[r][c]) != 2'b00) + 8'(board_q[r][c] == BLACK);
        tally_w += 8'((pruned_w[r][c] ^ swap_w[r][c]) != 2'b00) + 8'(board_q[r][c] == WHITE);
      end
    end
  end

  assign ready = (state == PULSE_READY);

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= WAITING;
      board_q     <= EMPTY_BOARD;
      black_count <= '0;
      white_count <= '0;
      got_b       <= 1'b0;
      got_w       <= 1'b0;
    end else begin
      unique case (state)
        WAITING: if (start) begin
          board_q <= board;
          got_b   <= 1'b0;
          got_w   <= 1'b0;
          state   <= PULSE_PRUNERS;
        end
        PULSE_PRUNERS: state <= PRUNING;
        PRUNING: begin
          if (done_b) got_b <= 1'b1;
          if (done_w) got_w <= 1'b1;
          if ((done_b || got_b) && (done_w || got_w)) state <= LOAD_COUNT;
        end
        LOAD_COUNT: begin
          black_count <= tally_b;
          white_count <= tally_w;
          state       <= PULSE_READY;
        end
        PULSE_READY: state <= WAITING;
        default:     state <= WAITING;
      endcase
    end
  end
endmodule
