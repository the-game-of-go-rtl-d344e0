// tb_uart_tx: sends random bytes and samples the line in the middle of each
// bit period, checking start bit, data bits (LSB first), stop bit, the busy
// time of 10 bit periods, and that a start while busy is ignored.
module tb_uart_tx;
  localparam int unsigned CLK_HZ = 614_400;  // 64 clocks per bit at 9600 baud
  localparam int unsigned BAUD   = 9600;
  localparam int unsigned DIV    = CLK_HZ / BAUD;

  logic clk = 0, rst = 1, start = 0;
  logic [7:0] data;
  logic tx, busy;
  int checks = 0, failures = 0;

  uart_tx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    check(tx == 1'b1 && !busy, "idle high");
    for (int t = 0; t < 20; t++) begin
      logic [7:0] b;
      logic [9:0] frame;
      b = 8'($urandom);
      frame = {1'b1, b, 1'b0};
      data = b;
      @(negedge clk) start = 1;
      @(negedge clk) begin start = 0; data = ~b; end
      // start pulse during the frame must be ignored
      repeat (DIV / 2 - 1) @(negedge clk);
      for (int k = 0; k < 10; k++) begin
        check(tx == frame[k], $sformatf("byte %02x bit %0d", b, k));
        if (k == 3) begin
          start = 1;
          @(negedge clk) start = 0;
          repeat (DIV - 1) @(negedge clk);
        end else repeat (DIV) @(negedge clk);
      end
      while (busy) @(negedge clk);
      check(tx == 1'b1, "idle after stop");
    end
    // busy time
    begin
      int n = 0;
      data = 8'hA5;
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      while (busy) begin n++; @(negedge clk); end
      check(n == 10 * int'(DIV), $sformatf("busy for %0d clocks", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
