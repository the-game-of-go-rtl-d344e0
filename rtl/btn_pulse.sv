// btn_pulse: turns a raw push-button level into a one-clock pulse.
//
// The input passes through a two-flop synchroniser; the debounced level only
// changes after the synchronised input has held its new value for
// DEBOUNCE_CYCLES clocks, and pulse is high for the one clock in which the
// debounced level rises. Used by the user interface for every button; the
// debounce time is this design's choice.
module btn_pulse #(
  parameter int unsigned DEBOUNCE_CYCLES = 650_000  // 10 ms at 65 MHz
) (
  input  logic clk,
  input  logic rst,
  input  logic btn,
  output logic pulse
);
  localparam int unsigned CW = $clog2(DEBOUNCE_CYCLES + 1);
  logic [1:0]    sync;
  logic          level;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      sync  <= '0;
      level <= 1'b0;
      cnt   <= '0;
      pulse <= 1'b0;
    end else begin
      sync  <= {sync[0], btn};
      pulse <= 1'b0;
      if (sync[1] == level) begin
        cnt <= '0;
      end else if (cnt == CW'(DEBOUNCE_CYCLES - 1)) begin
        cnt   <= '0;
        level <= sync[1];
        pulse <= sync[1];
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
