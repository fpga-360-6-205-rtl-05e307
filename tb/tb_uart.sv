// tb_uart: uart_tx drives uart_rx directly; random bytes must arrive intact,
// each within 10 bit periods of the start. A glitch shorter than half a bit
// must not produce a byte. CLKS_PER_BIT is reduced to 16 to keep it short.
module tb_uart;
  localparam int CPB = 16;
  logic clk = 0, rst = 1, start = 0, busy, line, valid;
  logic [7:0] data = 0, rx_data;
  logic glitch = 1;
  int checks = 0, failures = 0, nrx = 0;
  logic [7:0] sent [64];

  uart_tx #(.CLKS_PER_BIT(CPB)) u_tx (.clk, .rst, .start, .data, .busy, .tx(line));
  uart_rx #(.CLKS_PER_BIT(CPB)) u_rx (.clk, .rst, .rx(line & glitch), .valid, .data(rx_data));
  always #5 clk = ~clk;

  always @(posedge clk) if (valid && !rst) begin
    checks++;
    if (nrx >= 64 || rx_data !== sent[nrx]) begin
      failures++;
      $display("byte %0d got %h", nrx, rx_data);
    end
    nrx++;
  end

  initial begin
    int t0;
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (5) @(negedge clk);
    // short glitch on an idle line
    glitch = 0;
    repeat (CPB / 4) @(negedge clk);
    glitch = 1;
    repeat (3 * CPB) @(negedge clk);
    checks++;
    if (nrx != 0) begin failures++; $display("glitch received"); end
    for (int i = 0; i < 64; i++) begin
      sent[i] = (i == 0) ? 8'hFF : (i == 1) ? 8'h00 : 8'($urandom);
      data = sent[i];
      start = 1;
      t0 = $time;
      @(negedge clk) start = 0;
      while (nrx <= i) @(negedge clk);
      checks++;
      if (($time - t0) / 10 > 10 * CPB + 4) begin
        failures++;
        $display("byte %0d took %0d cycles", i, ($time - t0) / 10);
      end
      while (busy) @(negedge clk);
    end
    checks++;
    if (nrx != 64) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (64 * 12 * CPB + 2000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
