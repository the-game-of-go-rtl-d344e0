// tb_uart_rx: drives serial frames into the receiver: random bytes sent back
// to back, a short glitch that must not start a byte, and a frame with a bad
// stop bit that must be dropped, then random bytes with random idle gaps
// from a sender running 3% fast and 3% slow. Checks each received byte, that
// ready pulses exactly once per good frame, and that ready is one clock wide.
module tb_uart_rx;
  localparam int unsigned CLK_HZ = 614_400;  // 64 clocks per bit, 4 per sample tick
  localparam int unsigned BAUD   = 9600;
  localparam int unsigned DIV    = CLK_HZ / BAUD;

  logic clk = 0, rst = 1, rx = 1;
  logic [7:0] data;
  logic ready;
  int checks = 0, failures = 0;
  logic [7:0] got[$];

  uart_rx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) dut (.*);

  always #5 clk = ~clk;
  int wide = 0;
  logic ready_d = 0;
  always @(posedge clk) if (!rst && ready) got.push_back(data);
  always @(posedge clk) begin
    ready_d <= ready;
    if (!rst && ready && ready_d) wide++;
  end

  initial begin
    #10_000_000;
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

  task automatic send(logic [7:0] b, logic stop = 1'b1, int bit_clocks = DIV);
    logic [9:0] frame;
    frame = {stop, b, 1'b0};
    for (int k = 0; k < 10; k++) begin
      rx = frame[k];
      repeat (bit_clocks) @(negedge clk);
    end
    rx = 1'b1;
  endtask

  initial begin
    logic [7:0] sent[$];
    int rate[2];
    rate[0] = DIV - 2;  // 3% fast
    rate[1] = DIV + 2;  // 3% slow
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (3 * DIV) @(negedge clk);
    for (int t = 0; t < 30; t++) begin
      logic [7:0] b;
      b = 8'($urandom);
      sent.push_back(b);
      send(b);
    end
    repeat (2 * DIV) @(negedge clk);
    check(got.size() == sent.size(), $sformatf("got %0d of %0d bytes", got.size(), sent.size()));
    foreach (sent[i]) if (i < got.size()) check(got[i] == sent[i], $sformatf("byte %0d", i));
    got.delete();
    // glitch shorter than half a bit
    rx = 0;
    repeat (DIV / 4) @(negedge clk);
    rx = 1;
    repeat (3 * DIV) @(negedge clk);
    check(got.size() == 0, "glitch ignored");
    // bad stop bit, then a good byte
    send(8'h3C, 1'b0);
    repeat (2 * DIV) @(negedge clk);
    check(got.size() == 0, "bad stop bit dropped");
    send(8'hFF);
    repeat (2 * DIV) @(negedge clk);
    check(got.size() == 1 && got[0] == 8'hFF, "byte after bad frame");
    // sender clock off by 3% either way, random gaps between frames
    foreach (rate[q]) begin
      logic [7:0] b;
      got.delete();
      sent.delete();
      for (int t = 0; t < 20; t++) begin
        b = 8'($urandom);
        sent.push_back(b);
        send(b, 1'b1, rate[q]);
        repeat ($urandom_range(3 * DIV)) @(negedge clk);
      end
      repeat (2 * DIV) @(negedge clk);
      check(got.size() == sent.size(),
            $sformatf("%0d clocks/bit: got %0d of %0d bytes", rate[q], got.size(), sent.size()));
      foreach (sent[i])
        if (i < got.size())
          check(got[i] == sent[i], $sformatf("%0d clocks/bit: byte %0d", rate[q], i));
    end
    check(wide == 0, "ready is a one-clock pulse");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
