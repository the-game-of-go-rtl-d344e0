// tb_pruner: checks the pruner against a flood-fill reference on hand-made
// and random boards, for both colours, and checks that done arrives exactly
// PRUNE_CYCLES+3 clocks after start. Includes a long snake-shaped group whose
// only liberty is at its far end, the worst case for propagation.
module tb_pruner;
  import go_pkg::*;
  import go_ref_pkg::*;

  logic   clk = 0, rst = 1, start = 0;
  board_t board_in, board_out;
  cell_t  color;
  logic   done;
  int checks = 0, failures = 0;

  pruner dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(ref_board_t b, int col, string what);
    ref_board_t exp = ref_prune(b, col);
    int lat = 0;
    board_in = from_ref(b);
    color    = cell_t'(col[1:0]);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    lat = 1;
    while (!done) begin
      @(negedge clk);
      lat++;
    end
    checks++;
    if (!same(to_ref(board_out), exp)) begin
      failures++;
      $display("FAIL %s: pruned board differs", what);
    end
    checks++;
    if (lat != int'(N * N) + 3) begin
      failures++;
      $display("FAIL %s: latency %0d", what, lat);
    end
  endtask

  initial begin
    ref_board_t b;
    repeat (3) @(negedge clk);
    rst = 0;
    // single white stone surrounded by black in the middle
    foreach (b[i, j]) b[i][j] = 0;
    b[4][4] = 2; b[3][4] = 1; b[5][4] = 1; b[4][3] = 1; b[4][5] = 1;
    run(b, 2, "lone capture");
    run(b, 1, "black survives");
    // corner capture
    foreach (b[i, j]) b[i][j] = 0;
    b[0][0] = 1; b[0][1] = 2; b[1][0] = 2;
    run(b, 1, "corner");
    // worst case: black snake filling the board, single empty at the end
    foreach (b[i, j]) b[i][j] = 2;
    for (int i = 0; i < int'(N); i += 2) for (int j = 0; j < int'(N); j++) b[i][j] = 1;
    for (int i = 1; i < int'(N); i += 2) b[i][(i % 4 == 1) ? N - 1 : 0] = 1;
    b[N-1][N-1] = 0;
    run(b, 1, "snake alive");
    b[N-1][N-1] = 2;
    run(b, 1, "snake dead");
    // random boards
    for (int t = 0; t < 150; t++) begin
      b = random_board(5 + (t % 40));
      run(b, 1 + (t % 2), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
