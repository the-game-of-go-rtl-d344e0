// uart_rx: serial receiver for the move byte.
//
// The line is synchronised with two flip-flops and sampled on a tick at
// OVERSAMPLE times the baud rate. After reset, a false start bit or a bad
// stop bit the FSM first waits (ARM) until it has seen OVERSAMPLE/4 high
// samples in a row, so a stray low level is not taken for a start bit. In
// IDLE a low sample starts a byte; the start bit must still be low half a bit
// later, then each data bit is sampled at its middle (every OVERSAMPLE
// ticks), least significant first, and the stop bit must be high. A good
// byte is presented on data with a one-clock ready pulse and the FSM returns
// straight to IDLE: the high stop-bit sample stands in for the wait, so a
// byte that follows with no gap from a sender a few percent fast is not
// missed. Sampling at 16 times 9600 baud and the wait state follow the
// original design; the wait length (a quarter bit), skipping it after a good
// stop bit, middle-of-bit sampling and the stop-bit check are this design's
// choices.
module uart_rx #(
  parameter int unsigned CLK_HZ     = 65_000_000,
  parameter int unsigned BAUD       = 9600,
  parameter int unsigned OVERSAMPLE = 16
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       rx,
  output logic [7:0] data,
  output logic       ready
);
  localparam int unsigned TICK_DIV = CLK_HZ / (BAUD * OVERSAMPLE);
  localparam int unsigned TW = (TICK_DIV > 1) ? $clog2(TICK_DIV) : 1;
  localparam int unsigned SW = $clog2(OVERSAMPLE) + 1;

  typedef enum logic [2:0] {ARM, IDLE, START, DATA, STOP} state_t;
  state_t state;

  logic [1:0]    sync;
  logic [TW-1:0] tick_cnt;
  logic          tick;
  logic [SW-1:0] samp;
  logic [2:0]    bit_idx;
  logic [7:0]    shreg;

  wire rxs = sync[1];

  always_ff @(posedge clk) begin
    if (rst) begin
      sync     <= 2'b11;
      tick_cnt <= '0;
      tick     <= 1'b0;
    end else begin
      sync <= {sync[0], rx};
      tick <= (tick_cnt == 0);
      tick_cnt <= (tick_cnt == 0) ? TW'(TICK_DIV - 1) : tick_cnt - 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= ARM;
      samp    <= '0;
      bit_idx <= '0;
      shreg   <= '0;
      data    <= '0;
      ready   <= 1'b0;
    end else begin
      ready <= 1'b0;
      if (tick) begin
        unique case (state)
          ARM: begin
            if (!rxs) samp <= '0;
            else if (samp == SW'(OVERSAMPLE / 4 - 1)) begin
              samp  <= '0;
              state <= IDLE;
            end else samp <= samp + 1'b1;
          end
          IDLE: if (!rxs) begin
            samp  <= '0;
            state <= START;
          end
          START: begin
            if (samp == SW'(OVERSAMPLE / 2 - 1)) begin
              samp    <= '0;
              bit_idx <= '0;
              state   <= rxs ? ARM : DATA;
            end else samp <= samp + 1'b1;
          end
          DATA: begin
            if (samp == SW'(OVERSAMPLE - 1)) begin
              samp    <= '0;
              shreg   <= {rxs, shreg[7:1]};
              bit_idx <= bit_idx + 1'b1;
              if (bit_idx == 3'd7) state <= STOP;
            end else samp <= samp + 1'b1;
          end
          STOP: begin
            if (samp == SW'(OVERSAMPLE - 1)) begin
              samp <= '0;
              if (rxs) begin
                data  <= shreg;
                ready <= 1'b1;
                state <= IDLE;
              end else begin
                state <= ARM;
              end
            end else samp <= samp + 1'b1;
          end
          default: state <= ARM;
        endcase
      end
    end
  end
endmodule
