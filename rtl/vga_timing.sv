// vga_timing: pixel counters and syncs for the monitor.
//
// hcount runs 0..H_TOTAL-1 once per line and vcount 0..V_TOTAL-1 once per
// frame; blank is high outside the H_ACTIVE x V_ACTIVE picture. Defaults are
// the standard 1024x768 at 60 Hz timing for a 65 MHz pixel clock, with
// active-low syncs. The renderer only needs hcount and vcount; these timing
// values are this design's choice.
module vga_timing #(
  parameter int unsigned H_ACTIVE = 1024,
  parameter int unsigned H_FP     = 24,
  parameter int unsigned H_SYNC   = 136,
  parameter int unsigned H_BP     = 160,
  parameter int unsigned V_ACTIVE = 768,
  parameter int unsigned V_FP     = 3,
  parameter int unsigned V_SYNC   = 6,
  parameter int unsigned V_BP     = 29
) (
  input  logic        clk,
  input  logic        rst,
  output logic [10:0] hcount,
  output logic [9:0]  vcount,
  output logic        hsync,
  output logic        vsync,
  output logic        blank
);
  localparam int unsigned H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP;

  always_ff @(posedge clk) begin
    if (rst) begin
      hcount <= '0;
      vcount <= '0;
    end else if (hcount == 11'(H_TOTAL - 1)) begin
      hcount <= '0;
      vcount <= (vcount == 10'(V_TOTAL - 1)) ? '0 : vcount + 1'b1;
    end else begin
      hcount <= hcount + 1'b1;
    end
  end

  always_comb begin
    hsync = !((hcount >= 11'(H_ACTIVE + H_FP)) && (hcount < 11'(H_ACTIVE + H_FP + H_SYNC)));
    vsync = !((vcount >= 10'(V_ACTIVE + V_FP)) && (vcount < 10'(V_ACTIVE + V_FP + V_SYNC)));
    blank = (hcount >= 11'(H_ACTIVE)) || (vcount >= 10'(V_ACTIVE));
  end
endmodule
