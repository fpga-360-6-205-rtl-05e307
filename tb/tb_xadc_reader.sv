// tb_xadc_reader: a behavioural XADC answers DRP reads with DRDY every 7
// cycles, returning the value of the joystick selected by joystick_select on
// the channel addressed by DADDR (VAUX3 = x, VAUX11 = y). The joystick
// values change at random. Each sample pair must carry the x/y of the
// joystick it is labelled with, alternate between the joysticks, and arrive
// every 2*SAMPLE_CYCLES cycles; DEN/DWE/address use is checked too.
module tb_xadc_reader;
  localparam int SC = 40;
  logic clk = 0, rst = 1;
  logic [6:0] daddr; logic den, dwe, drdy = 0, jsel, sv, sj;
  logic [15:0] di, do_data = 0;
  logic [11:0] x, y;
  logic [11:0] joy [2][2];       // [joystick][0 x, 1 y]
  int checks = 0, failures = 0, cyc = 0, last = -1, n = 0, div = 0;
  logic last_j = 0;

  xadc_reader #(.SAMPLE_CYCLES(SC)) dut (.clk, .rst, .daddr, .den, .dwe, .di, .do_data, .drdy,
    .joystick_select(jsel), .sample_valid(sv), .sample_joystick(sj), .x, .y);
  always #5 clk = ~clk;

  // XADC: one conversion every 7 cycles on the addressed channel
  always @(posedge clk) begin
    cyc <= cyc + 1;
    div <= (div == 6) ? 0 : div + 1;
    drdy <= (div == 6);
    if (div == 6) begin
      if (daddr == 7'h13)      do_data <= {joy[jsel][0], 4'h0};
      else if (daddr == 7'h1B) do_data <= {joy[jsel][1], 4'h0};
      else                     do_data <= 16'hDEAD;
    end
  end

  initial begin
    joy = '{'{12'h400, 12'h400}, '{12'h400, 12'h400}};
    repeat (3) @(negedge clk);
    rst = 0;
  end

  always @(posedge clk) if (!rst) begin
    if (!den || dwe || !(daddr == 7'h13 || daddr == 7'h1B)) begin
      failures++; $display("bad DRP control"); end
    if (sv) begin
      checks += 3;
      if (x != joy[sj][0] || y != joy[sj][1]) begin
        failures++; $display("pair %0d js %0d: %h %h vs %h %h", n, sj, x, y, joy[sj][0], joy[sj][1]); end
      if (n > 0 && sj == last_j) begin failures++; $display("joystick did not alternate"); end
      if (n > 0 && cyc - last != 2 * SC) begin failures++; $display("interval %0d", cyc - last); end
      last = cyc; last_j = sj; n++;
      // new values only while the other joystick is being read
      for (int a = 0; a < 2; a++) joy[sj][a] = 12'($urandom);
      if (n == 60) begin
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  initial begin
    repeat (200 * SC) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
