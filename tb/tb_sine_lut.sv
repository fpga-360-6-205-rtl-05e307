// tb_sine_lut: sweeps all 4096 angles, one per cycle, and compares each
// result, two cycles later, with $sin of the angle (absolute error below
// 1e-6), including the exact values at 0, 90, 180 and 270 degrees.
module tb_sine_lut;
  import tb_fp_pkg::*;
  logic clk = 0;
  logic [11:0] angle = 0;
  logic [31:0] sine;
  int checks = 0, failures = 0;
  localparam real PI = 3.14159265358979;

  sine_lut dut (.clk, .angle, .sine);
  always #5 clk = ~clk;

  initial begin
    logic [11:0] hist [3];
    for (int i = 0; i < 4096 + 2; i++) begin
      @(negedge clk);
      if (i >= 2) begin
        real e;
        e = $sin(real'(hist[0]) * PI / 2048.0);
        checks++;
        if (fabs(f2r(sine) - e) > 1e-6) begin
          failures++;
          if (failures < 5) $display("angle %h: %f vs %f", hist[0], f2r(sine), e);
        end
        if (hist[0] == 12'h400 || hist[0] == 12'hC00) begin
          checks++;
          if (sine[30:0] != 31'h3F80_0000) begin failures++; $display("not exactly 1 at %h", hist[0]); end
        end
      end
      hist[1] = hist[0];
      hist[0] = angle;
      angle = 12'(i + 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
