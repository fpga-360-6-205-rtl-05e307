// xadc_reader: reads the two joystick channels from the XADC through its
// dynamic reconfiguration port (DRP) and steps the joystick multiplexers.
//
// DEN is held high and DWE low, so the XADC keeps returning the status
// register at DADDR. Rather than switching on the DRDY edge, the address
// alternates every SAMPLE_CYCLES clocks (60,000 = 0.6 ms at 100 MHz) between
// VAUX3 (0x13, the x multiplexer) and VAUX11 (0x1B, the y multiplexer); the
// last DO seen with DRDY high during each slot is kept (its 12 most
// significant bits). After both channels have been read, `sample_valid`
// pulses with x, y and the joystick they came from, and `joystick_select`
// toggles so that the next pair comes from the other joystick.
module xadc_reader #(
  parameter int unsigned SAMPLE_CYCLES = 60_000,
  parameter logic [6:0]  ADDR_X = 7'h13,
  parameter logic [6:0]  ADDR_Y = 7'h1B
) (
  input  logic        clk,
  input  logic        rst,
  // DRP
  output logic [6:0]  daddr,
  output logic        den,
  output logic        dwe,
  output logic [15:0] di,
  input  logic [15:0] do_data,
  input  logic        drdy,
  // joystick multiplexer select
  output logic        joystick_select,
  // samples
  output logic        sample_valid,
  output logic        sample_joystick,
  output logic [11:0] x,
  output logic [11:0] y
);
  logic [$clog2(SAMPLE_CYCLES)-1:0] timer;
  logic        chan;          // 0: x channel, 1: y channel
  logic [11:0] x_q, y_q;

  assign den   = 1'b1;
  assign dwe   = 1'b0;
  assign di    = '0;
  assign daddr = chan ? ADDR_Y : ADDR_X;

  always_ff @(posedge clk) begin
    if (rst) begin
      timer           <= '0;
      chan            <= 1'b0;
      joystick_select <= 1'b0;
      sample_valid    <= 1'b0;
      x_q             <= 12'h400;
      y_q             <= 12'h400;
    end else begin
      sample_valid <= 1'b0;
      if (drdy) begin
        if (chan) y_q <= do_data[15:4];
        else      x_q <= do_data[15:4];
      end
      if (timer == ($bits(timer))'(SAMPLE_CYCLES - 1)) begin
        timer <= '0;
        chan  <= ~chan;
        if (chan) begin
          sample_valid    <= 1'b1;
          sample_joystick <= joystick_select;
          x               <= x_q;
          y               <= (drdy) ? do_data[15:4] : y_q;
          joystick_select <= ~joystick_select;
        end
      end else timer <= timer + 1'b1;
    end
  end
endmodule
