// uart_tx: 8N1 serial transmitter at CLKS_PER_BIT clocks per bit.
//
// Loads a byte on `start` and drives its start bit at once, then eight data
// bits LSB first and a stop bit, each CLKS_PER_BIT clocks long. A new byte is
// accepted in the last clock of the stop bit, so back-to-back bytes keep the
// line busy without gaps and the transmitter keeps up with a receiver on the
// same baud rate. The model memory uses it to echo every received byte back
// to the host, a debugging aid rather than part of the upload protocol.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 868
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  logic [7:0] data,
  output logic       busy,
  output logic       tx
);
  logic [8:0] shreg;
  logic [3:0] nbits;   // bits still to send after the current one
  logic [$clog2(CLKS_PER_BIT)-1:0] cnt;
  logic       bit_end, done;

  assign bit_end = (cnt == ($bits(cnt))'(CLKS_PER_BIT - 1));
  assign done    = busy && bit_end && (nbits == 0);

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0;
      tx   <= 1'b1;
      cnt  <= '0;
    end else if ((!busy || done) && start) begin
      tx    <= 1'b0;
      shreg <= {1'b1, data};
      nbits <= 4'd9;
      cnt   <= '0;
      busy  <= 1'b1;
    end else if (done) begin
      busy <= 1'b0;
      tx   <= 1'b1;
    end else if (busy) begin
      if (bit_end) begin
        cnt   <= '0;
        tx    <= shreg[0];
        shreg <= {1'b1, shreg[8:1]};
        nbits <= nbits - 1'b1;
      end else cnt <= cnt + 1'b1;
    end
  end
endmodule
