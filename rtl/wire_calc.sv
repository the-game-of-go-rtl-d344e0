// wire_calc: state of one "wire" between two adjacent intersections.
//
// The pruner treats every pair of neighbouring intersections as joined by a
// wire that is either hot (a liberty can flow through it) or cold.
//   * either end empty           -> hot
//   * ends hold opposite colours -> cold
//   * ends hold the same colour  -> OR of the six wires that touch either end
//                                   (three at each end), as last sampled
// The neighbour inputs are the registered wire states, not the live outputs of
// other wire_calc instances, so no combinational loop forms; a missing
// neighbour at the board edge is tied cold by the instantiating module.
// These rules follow the original design. Pure combinational logic.
module wire_calc
  import go_pkg::*;
(
  input  cell_t      cell_a,
  input  cell_t      cell_b,
  input  logic [5:0] nbr,   // sampled states of the neighbouring wires
  output logic       hot
);
  always_comb begin
    if (cell_a == EMPTY || cell_b == EMPTY) hot = 1'b1;
    else if (cell_a != cell_b)              hot = 1'b0;
    else                                    hot = |nbr;
  end
endmodule
