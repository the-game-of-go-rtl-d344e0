// uart_tx: serial transmitter for the move byte.
//
// A 10-bit shift buffer is loaded with {stop bit, data, start bit} on start
// and shifted out one bit every CLK_HZ/BAUD clocks, least significant data bit
// first (8N1). The line idles high. 9600 baud follows the original design;
// the 8N1 framing and the 65 MHz clock are this design's assumptions.
//
// Interface: pulse start with data valid while busy is low; a start while
// busy is ignored. busy stays high for 10 bit times.
module uart_tx #(
  parameter int unsigned CLK_HZ = 65_000_000,
  parameter int unsigned BAUD   = 9600
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  logic [7:0] data,
  output logic       tx,
  output logic       busy
);
  localparam int unsigned DIV = CLK_HZ / BAUD;
  localparam int unsigned DW  = $clog2(DIV);

  logic [9:0]    shreg;
  logic [3:0]    bits_left;
  logic [DW-1:0] div_cnt;

  assign tx   = shreg[0];
  assign busy = (bits_left != 0);

  always_ff @(posedge clk) begin
    if (rst) begin
      shreg     <= '1;
      bits_left <= '0;
      div_cnt   <= '0;
    end else if (!busy) begin
      if (start) begin
        shreg     <= {1'b1, data, 1'b0};
        bits_left <= 4'd10;
        div_cnt   <= DW'(DIV - 1);
      end
    end else if (div_cnt == 0) begin
      shreg     <= {1'b1, shreg[9:1]};
      bits_left <= bits_left - 1'b1;
      div_cnt   <= DW'(DIV - 1);
    end else begin
      div_cnt <= div_cnt - 1'b1;
    end
  end
endmodule
