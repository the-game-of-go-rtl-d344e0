// pruner: removes the stones of one colour that have no liberty.
//
// Every pair of neighbouring intersections is joined by a wire (see
// wire_calc). Each wire has a register. On start the board is captured and all
// wire registers are pulsed cold (PULSE); then, once per clock (PROPAGATING),
// every register samples its wire_calc result. Wires touching an empty
// intersection turn hot on the first clock, and from there "hot" advances one
// wire per clock into same-colour groups, so the search runs from every empty
// point at once, like a breadth-first search in parallel. Because all
// registers start cold, a group with no liberty can never hold itself hot.
// After PRUNE_CYCLES clocks a stone of the selected colour whose wires are all
// cold has no liberty and is removed (PRUNED).
//
// The wire scheme and the four states follow the original design. The delay
// of N*N clocks is this design's choice: a path through a group holds at most
// N*N-1 stones, so N*N clocks reach every stone.
//
// Interface: pulse start for one clock with board_in and color valid. done
// pulses PRUNE_CYCLES+3 clocks after start, with board_out valid from then
// until the next done. A start while busy is ignored.
module pruner
  import go_pkg::*;
#(
  parameter int unsigned PRUNE_CYCLES = N * N
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   start,
  input  board_t board_in,
  input  cell_t  color,
  output board_t board_out,
  output logic   done
);
  typedef enum logic [1:0] {WAITING, PULSE, PROPAGATING, PRUNED} state_t;
  state_t state;

  localparam int unsigned CW = $clog2(PRUNE_CYCLES + 1);
  logic [CW-1:0] prune_count;

  board_t board_q;
  cell_t  color_q;

  // h_q[r][c]: wire between (r,c) and (r,c+1); v_q[r][c]: between (r,c) and (r+1,c).
  logic [N-1:0][N-2:0] h_q, h_d;
  logic [N-2:0][N-1:0] v_q, v_d;

  // Registered wire state with cold outside the board.
  function automatic logic hget(int r, int c);
    if (r < 0 || r >= int'(N) || c < 0 || c >= int'(N) - 1) return 1'b0;
    return h_q[r][c];
  endfunction
  function automatic logic vget(int r, int c);
    if (r < 0 || r >= int'(N) - 1 || c < 0 || c >= int'(N)) return 1'b0;
    return v_q[r][c];
  endfunction

  for (genvar r = 0; r < N; r++) begin : g_hrow
    for (genvar c = 0; c < N - 1; c++) begin : g_hcol
      wire_calc u_wire (
        .cell_a (board_q[r][c]),
        .cell_b (board_q[r][c+1]),
        .nbr    ({hget(r, c-1), vget(r-1, c),   vget(r, c),
                  hget(r, c+1), vget(r-1, c+1), vget(r, c+1)}),
        .hot    (h_d[r][c])
      );
    end
  end

  for (genvar r = 0; r < N - 1; r++) begin : g_vrow
    for (genvar c = 0; c < N; c++) begin : g_vcol
      wire_calc u_wire (
        .cell_a (board_q[r][c]),
        .cell_b (board_q[r+1][c]),
        .nbr    ({vget(r-1, c), hget(r, c-1),   hget(r, c),
                  vget(r+1, c), hget(r+1, c-1), hget(r+1, c)}),
        .hot    (v_d[r][c])
      );
    end
  end

  // A stone has a liberty when any wire touching it is hot.
  board_t pruned;
  always_comb begin
    for (int r = 0; r < int'(N); r++) begin
      for (int c = 0; c < int'(N); c++) begin
        logic lib;
        lib = hget(r, c-1) | hget(r, c) | vget(r-1, c) | vget(r, c);
        pruned[r][c] = (board_q[r][c] == color_q && !lib) ? EMPTY : board_q[r][c];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= WAITING;
      prune_count <= '0;
      board_q     <= EMPTY_BOARD;
      color_q     <= BLACK;
      h_q         <= '0;
      v_q         <= '0;
      board_out   <= EMPTY_BOARD;
      done        <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        WAITING: if (start) begin
          board_q <= board_in;
          color_q <= color;
          state   <= PULSE;
        end
        PULSE: begin
          h_q         <= '0;
          v_q         <= '0;
          prune_count <= CW'(PRUNE_CYCLES - 1);
          state       <= PROPAGATING;
        end
        PROPAGATING: begin
          h_q <= h_d;
          v_q <= v_d;
          if (prune_count == '0) state <= PRUNED;
          else                   prune_count <= prune_count - 1'b1;
        end
        PRUNED: begin
          board_out <= pruned;
          done      <= 1'b1;
          state     <= WAITING;
        end
      endcase
    end
  end
endmodule
