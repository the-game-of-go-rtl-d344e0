// tb_seven_seg: checks every digit of the display for each message (blank,
// PASS, PASd, win, lose, tie, driven by the game FSM state) and several score pairs, against a segment
// table written out here letter by letter, and checks the digit scan order.
module tb_seven_seg;
  import go_pkg::*;

  logic clk = 0, rst = 1;
  logic [7:0] black_count = 0, white_count = 0;
  logic pass_sel = 0;
  game_state_t state = GS_WAITING;
  cell_t my_color = BLACK;
  logic [6:0] seg;
  logic [7:0] an;
  int checks = 0, failures = 0;

  seven_seg #(.REFRESH_BITS(5)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // segments gfedcba for a character
  function automatic logic [6:0] pat(byte ch);
    case (ch)
      "0", "O": return 7'b0111111;
      "1", "I": return 7'b0000110;
      "2": return 7'b1011011;
      "3": return 7'b1001111;
      "4": return 7'b1100110;
      "5", "S": return 7'b1101101;
      "6": return 7'b1111101;
      "7": return 7'b0000111;
      "8": return 7'b1111111;
      "9": return 7'b1101111;
      "A": return 7'b1110111;
      "P": return 7'b1110011;
      "d": return 7'b1011110;
      "u": return 7'b0011100;
      "i": return 7'b0000100;
      "n": return 7'b1010100;
      "L": return 7'b0111000;
      "E": return 7'b1111001;
      "t": return 7'b1111000;
      default: return 7'b0000000;
    endcase
  endfunction

  // text: 8 characters, leftmost first
  task automatic expect_text(string text);
    for (int d = 0; d < 8; d++) begin
      int guard = 0;
      while (an != ~(8'b1 << d) && guard < 200) begin
        @(negedge clk);
        guard++;
      end
      checks++;
      if (seg != ~pat(text[7 - d])) begin
        failures++;
        $display("FAIL '%s' digit %0d: seg=%b", text, d, seg);
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (40) @(negedge clk);
    black_count = 8'd7; white_count = 8'd42;
    repeat (2) @(negedge clk);
    expect_text("    0742");
    pass_sel = 1;
    repeat (2) @(negedge clk);
    expect_text("PASS0742");
    pass_sel = 0; state = GS_PASSED_WAITING;
    repeat (2) @(negedge clk);
    expect_text("PASd0742");
    state = GS_GAME_OVER;
    repeat (2) @(negedge clk);
    expect_text("LOSE0742");
    my_color = WHITE;
    repeat (2) @(negedge clk);
    expect_text("uin 0742");
    black_count = 8'd81; white_count = 8'd81;
    repeat (2) @(negedge clk);
    expect_text("tiE 8181");
    state = GS_WAITING;
    for (int t = 0; t < 10; t++) begin
      int b, w;
      b = int'($urandom_range(81));
      w = int'($urandom_range(81));
      black_count = 8'(b); white_count = 8'(w);
      repeat (2) @(negedge clk);
      expect_text($sformatf("    %02d%02d", b, w));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
