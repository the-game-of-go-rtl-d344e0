// tb_territory_counter: compares both counts with a flood-fill area count on
// hand-made and random boards, and checks the start-to-ready latency.
module tb_territory_counter;
  import go_pkg::*;
  import go_ref_pkg::*;

  logic       clk = 0, rst = 1, start = 0;
  board_t     board;
  logic [7:0] black_count, white_count;
  logic       ready;
  int checks = 0, failures = 0;

  territory_counter dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(ref_board_t b, string what);
    int lat = 0;
    int eb = ref_area(b, 1);
    int ew = ref_area(b, 2);
    board = from_ref(b);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    lat = 1;
    while (!ready) begin
      @(negedge clk);
      lat++;
    end
    checks += 3;
    if (int'(black_count) != eb || int'(white_count) != ew) begin
      failures += 2;
      $display("FAIL %s: got b=%0d w=%0d exp b=%0d w=%0d", what, black_count, white_count, eb, ew);
    end
    if (lat != int'(N * N) + 6) begin
      failures++;
      $display("FAIL %s: latency %0d", what, lat);
    end
  endtask

  initial begin
    ref_board_t b;
    repeat (3) @(negedge clk);
    rst = 0;
    // black wall on column 3, white wall on column 5
    foreach (b[i, j]) b[i][j] = 0;
    for (int i = 0; i < int'(N); i++) begin b[i][3] = 1; b[i][5] = 2; end
    run(b, "two walls");
    checks++;
    if (black_count != 8'd36 || white_count != 8'd36) begin
      failures++;
      $display("FAIL two walls: hand count");
    end
    foreach (b[i, j]) b[i][j] = 0;
    b[0][1] = 1; b[1][0] = 1; b[8][8] = 2;
    run(b, "corner");
    for (int t = 0; t < 100; t++) begin
      b = random_board(20 + (t % 60));
      run(b, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
