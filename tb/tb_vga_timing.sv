// tb_vga_timing: measures line length, frame length, sync pulse widths and
// the number of visible pixels per frame for the default 1024x768 timing.
// It also follows the counters clock by clock for a second frame, checking
// each step against an expected count and each blank/hsync/vsync value
// against the sync and porch positions, and checks that reset in mid-frame
// returns the counters to (0,0).
module tb_vga_timing;
  logic clk = 0, rst = 1;
  logic [10:0] hcount;
  logic [9:0]  vcount;
  logic hsync, vsync, blank;
  int checks = 0, failures = 0;

  vga_timing dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100_000_000;
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
    int n = 0, hs = 0, vs_lines = 0, vis = 0, lines = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    // one full frame from (0,0)
    do begin
      if (!blank) vis++;
      if (!hsync && vcount == 0) hs++;
      if (hcount == 0 && !vsync) vs_lines++;
      if (hcount == 0) lines++;
      n++;
      @(negedge clk);
    end while (!(hcount == 0 && vcount == 0));
    check(n == 1344 * 806, $sformatf("frame %0d clocks", n));
    check(lines == 806, $sformatf("%0d lines", lines));
    check(vis == 1024 * 768, $sformatf("%0d visible", vis));
    check(hs == 136, $sformatf("hsync %0d", hs));
    check(vs_lines == 6, $sformatf("vsync %0d lines", vs_lines));
    // second frame, clock by clock (one check per line to keep the count
    // readable; a line fails if any of its pixels is wrong)
    begin
      int eh = 0, ev = 0, bad = 0;
      bit e_blank, e_hs, e_vs;
      for (int k = 0; k < 1344 * 806; k++) begin
        e_blank = (eh >= 1024) || (ev >= 768);
        e_hs = !(eh >= 1048 && eh < 1184);
        e_vs = !(ev >= 771 && ev < 777);
        if (hcount != 11'(eh) || vcount != 10'(ev) || blank != e_blank ||
            hsync != e_hs || vsync != e_vs) begin
          bad++;
          if (bad <= 3)
            $display("FAIL at (%0d,%0d): got (%0d,%0d) b%0d h%0d v%0d", eh, ev,
                     hcount, vcount, blank, hsync, vsync);
        end
        if (eh == 1343) begin
          check(bad == 0, $sformatf("line %0d", ev));
          bad = 0;
          eh = 0;
          ev = (ev == 805) ? 0 : ev + 1;
        end else begin
          eh++;
        end
        @(negedge clk);
      end
    end
    // reset in mid-frame
    repeat (123457) @(negedge clk);
    rst = 1;
    @(negedge clk);
    rst = 0;
    check(hcount == 0 && vcount == 0, "reset returns to (0,0)");
    @(negedge clk);
    check(hcount == 1 && vcount == 0, "counting after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
