// tb_fixed_div: random unsigned divisions (quotient known to fit in QW bits)
// checked against the integer / and % operators, one per cycle, and the
// QW+1 cycle latency.
module tb_fixed_div;
  localparam int NW = 50, DW = 24, QW = 27, N = 300;
  logic clk = 0, rst = 1, vin = 0, vout;
  logic [NW-1:0] n = 0;
  logic [DW-1:0] d = 1;
  logic [QW-1:0] q;
  logic [DW-1:0] rem;
  logic [QW-1:0] eq [N];
  logic [DW-1:0] er [N];
  int checks = 0, failures = 0, got = 0, cyc = 0, first_out = -1, first_in = -1;

  fixed_div #(.NW(NW), .DW(DW), .QW(QW)) dut (.clk, .rst, .valid_in(vin), .n, .d,
                                            .valid_out(vout), .q, .rem);
  always #5 clk = ~clk;

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < N; i++) begin
      logic [DW-1:0] dd;
      logic [NW-1:0] nn;
      dd = DW'({$urandom, $urandom}) | 24'h80_0000;
      nn = {$urandom, $urandom};
      nn = nn % ({26'd0, dd} << QW);
      @(negedge clk);
      n = nn; d = dd; vin = 1;
      if (first_in < 0) first_in = cyc;
      eq[i] = QW'(nn / dd);
      er[i] = DW'(nn % dd);
    end
    @(negedge clk) vin = 0;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (vout && !rst) begin
      if (first_out < 0) first_out = cyc;
      checks++;
      if (q !== eq[got] || rem !== er[got]) begin
        failures++;
        if (failures < 5) $display("mismatch %0d: %h r %h exp %h r %h", got, q, rem, eq[got], er[got]);
      end
      got++;
      if (got == N) begin
        checks++;
        if (first_out - first_in != QW + 1) begin
          failures++;
          $display("latency %0d", first_out - first_in);
        end
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
