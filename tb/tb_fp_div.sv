// tb_fp_div: checks fp_add against binary64 reference arithmetic rounded to
// binary32 (exact for a single rounding of a sum of two floats), including
// cancellation, sign and zero cases, and checks the 9-cycle latency with one
// operation issued per cycle.
module tb_fp_div;
  import tb_fp_pkg::*;
  logic clk = 0;
  logic rst = 1;
  logic vin = 0;
  logic [31:0] a = 0, b = 0, y;
  logic vout;
  int checks = 0, failures = 0;
  localparam int N = 400;
  logic [31:0] ea [N];
  int sent = 0, got = 0, cyc = 0, first_out = -1;

  fp_div dut (.clk, .rst, .valid_in(vin), .a, .b, .valid_out(vout), .y);

  always #5 clk = ~clk;

  function automatic logic [31:0] rnd_f();
    real r;
    r = (real'($urandom % 2000000) - 1000000.0) / 1000.0;
    if ($urandom % 4 == 0) r = r * 1.0e-6;
    return r2f(r);
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < N; i++) begin
      logic [31:0] x, z;
      x = rnd_f();
      z = rnd_f();
      if (i == 0) begin x = r2f(1.5); z = r2f(-1.5); end
      if (i == 1) begin x = r2f(1.0); z = r2f(1.0e-9); end
      if (i == 2) begin x = r2f(3.0); z = r2f(-2.999999); end
      if (i == 3) begin x = 32'h0; z = r2f(-7.25); end
      if (z[30:0] == 0) z = r2f(3.0);
      if (i == 4) z = f_negate(x);
      @(negedge clk);
      a = x; b = z; vin = 1;
      ea[i] = r2f(f2r(x) / f2r(z));
      if (ea[i][30:0] == 0) ea[i] = 32'h0;
    end
    @(negedge clk) vin = 0;
  end

  function automatic logic [31:0] f_negate(input logic [31:0] f);
    return {~f[31], f[30:0]};
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (vout && !rst) begin
      if (first_out < 0) first_out = cyc;
      checks++;
      // binary64 then binary32 rounding may differ by one unit in the last place
      if ((y[31] != ea[got][31] || (y[30:0] > ea[got][30:0] + 1) || (y[30:0] + 1 < ea[got][30:0])) && !(y[30:0] == 0 && ea[got][30:0] == 0)) begin
        failures++;
        if (failures < 5) $display("mismatch %0d: got %h exp %h", got, y, ea[got]);
      end
      got++;
      if (got == N) begin
        checks++;
        // first input is sampled at the 4th edge, after three reset cycles
        if (first_out - 4 != 30) begin
          failures++;
          $display("latency %0d", first_out - 4);
        end
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
