// uart_rx: 8N1 serial receiver, 115200 baud from a 100 MHz clock.
//
// The rx line is synchronised with two flip-flops. A falling edge starts a
// bit-period counter (CLKS_PER_BIT = 868 clocks); after half a period the
// start bit is checked again, then the eight data bits (LSB first) are
// sampled in the middle of each bit period and the stop bit is checked.
// After a good stop bit `valid` is high for one cycle with the byte in
// `data`; a bad start or stop bit is dropped silently (this framing-error
// handling is this design's choice).
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 868
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       rx,
  output logic       valid,
  output logic [7:0] data
);
  typedef enum logic [1:0] {IDLE, START, DATA, STOP} state_t;
  state_t state;
  logic   rx_s1, rx_s2;
  logic [$clog2(CLKS_PER_BIT)-1:0] cnt;
  logic [2:0] bit_idx;

  always_ff @(posedge clk) begin
    rx_s1 <= rx;
    rx_s2 <= rx_s1;
    if (rst) begin
      state <= IDLE;
      valid <= 1'b0;
      rx_s1 <= 1'b1;
      rx_s2 <= 1'b1;
    end else begin
      valid <= 1'b0;
      case (state)
        IDLE: if (!rx_s2) begin
          state <= START;
          cnt   <= '0;
        end
        START: begin
          if (cnt == ($bits(cnt))'(CLKS_PER_BIT / 2 - 1)) begin
            cnt     <= '0;
            bit_idx <= '0;
            state   <= rx_s2 ? IDLE : DATA;
          end else cnt <= cnt + 1'b1;
        end
        DATA: begin
          if (cnt == ($bits(cnt))'(CLKS_PER_BIT - 1)) begin
            cnt  <= '0;
            data <= {rx_s2, data[7:1]};
            if (bit_idx == 3'd7) state <= STOP;
            bit_idx <= bit_idx + 1'b1;
          end else cnt <= cnt + 1'b1;
        end
        STOP: begin
          if (cnt == ($bits(cnt))'(CLKS_PER_BIT - 1)) begin
            valid <= rx_s2;
            state <= IDLE;
          end else cnt <= cnt + 1'b1;
        end
      endcase
    end
  end
endmodule
