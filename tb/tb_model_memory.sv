// tb_model_memory: uploads a small model through the serial line (bit-level
// stimulus written in the testbench, 8 clocks per bit) and reads every entry
// back through the four read ports, checking the one-cycle read latency, the
// power-up stop words of the index buffer and the byte echo on tx.
module tb_model_memory;
  import gfx_pkg::*;
  localparam int CPB = 8;
  logic clk = 0, rst = 1, rx = 1, tx;
  logic [13:0] ia = 0;
  logic [10:0] pa = 0, na = 0;
  logic [4:0]  ma = 0;
  index_t idx;
  fvec3_t pos, nrm, mat;
  int checks = 0, failures = 0;

  model_memory #(.CLKS_PER_BIT(CPB)) dut (
    .clk, .rst, .uart_rx_in(rx), .uart_tx_out(tx),
    .index_read_addr(ia), .index(idx), .position_read_addr(pa), .position(pos),
    .normal_read_addr(na), .normal(nrm), .material_read_addr(ma), .material(mat));
  always #5 clk = ~clk;

  task automatic check(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  byte unsigned echo [$];
  byte unsigned sent [$];
  task automatic send_byte(input logic [7:0] b);
    sent.push_back(b);
    rx = 0; repeat (CPB) @(negedge clk);
    for (int i = 0; i < 8; i++) begin rx = b[i]; repeat (CPB) @(negedge clk); end
    rx = 1; repeat (CPB) @(negedge clk);
  endtask
  task automatic send_entry(input int nb, input logic [95:0] d);
    for (int i = 0; i < nb; i++) send_byte(d[8*i +: 8]);
  endtask

  // echo decoder
  initial forever begin
    logic [7:0] b;
    @(negedge tx);
    repeat (CPB / 2) @(posedge clk);
    for (int i = 0; i < 8; i++) begin repeat (CPB) @(posedge clk); b[i] = tx; end
    repeat (CPB) @(posedge clk);
    echo.push_back(b);
  end

  logic [35:0] I [3];
  logic [95:0] P [3], N [2], M [2];
  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    ia = 14'd5;
    @(negedge clk); @(negedge clk);
    check(idx == index_t'('1), "empty index buffer holds stop words");
    for (int i = 0; i < 3; i++) I[i] = {$urandom, $urandom} & ~36'h1;
    for (int i = 0; i < 3; i++) P[i] = {$urandom, $urandom, $urandom} & ~96'h1;
    for (int i = 0; i < 2; i++) N[i] = {$urandom, $urandom, $urandom} & ~96'h1;
    for (int i = 0; i < 2; i++) M[i] = {$urandom, $urandom, $urandom} & ~96'h1;
    for (int i = 0; i < 3; i++) send_entry(5, 96'(I[i]));
    send_entry(5, 96'(36'hF_FFFF_FFFF));
    for (int i = 0; i < 3; i++) send_entry(12, P[i]);
    send_entry(12, '1);
    for (int i = 0; i < 2; i++) send_entry(12, N[i]);
    send_entry(12, '1);
    for (int i = 0; i < 2; i++) send_entry(12, M[i]);
    send_entry(12, '1);
    repeat (4 * CPB) @(negedge clk);
    for (int i = 0; i < 4; i++) begin
      ia = 14'(i); pa = 11'(i); na = 11'(i % 2); ma = 5'(i % 2);
      @(negedge clk);
      check(idx == index_t'((i < 3) ? I[i] : 36'hF_FFFF_FFFF), $sformatf("index %0d", i));
      if (i < 3) check(pos == fvec3_t'(P[i]), $sformatf("position %0d", i));
      check(nrm == fvec3_t'(N[i % 2]), $sformatf("normal %0d", i));
      check(mat == fvec3_t'(M[i % 2]), $sformatf("material %0d", i));
    end
    // latency: data appears one clock after the address
    ia = 14'd1;
    @(posedge clk); #1;
    check(idx == index_t'(I[1]), "one-cycle read latency");
    repeat (12 * CPB) @(negedge clk);
    check(echo.size() == sent.size(), $sformatf("echoed %0d of %0d bytes", echo.size(), sent.size()));
    for (int i = 0; i < echo.size() && i < sent.size(); i++)
      if (echo[i] != sent[i]) begin check(0, $sformatf("echo byte %0d", i)); break; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
