// tb_model_loader: feeds a byte stream of index, position, normal and
// material entries, each list ended by an all-ones stop word, and checks
// every write (target, address, data), the switch of target after each stop
// word and the wrap back to the index buffer.
module tb_model_loader;
  logic clk = 0, rst = 1, byte_valid = 0, we;
  logic [7:0] byte_in = 0;
  logic [1:0] target;
  logic [13:0] addr;
  logic [95:0] wdata;
  int checks = 0, failures = 0;

  model_loader dut (.clk, .rst, .byte_valid, .byte_in, .we, .target, .addr, .wdata);
  always #5 clk = ~clk;

  typedef struct { logic [1:0] t; logic [13:0] a; logic [95:0] d; } wr_t;
  wr_t exp_q [$];

  task automatic send_entry(input logic [1:0] t, input logic [13:0] a, input logic [95:0] d);
    int nb;
    nb = (t == 0) ? 5 : 12;
    exp_q.push_back('{t, a, (t == 0) ? {56'd0, d[39:0]} : d});
    for (int i = 0; i < nb; i++) begin
      byte_in = d[8*i +: 8];
      byte_valid = 1;
      @(negedge clk);
      byte_valid = 0;
      repeat ($urandom % 3) @(negedge clk);
    end
  endtask

  always @(posedge clk) if (we && !rst) begin
    wr_t e;
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("unexpected write"); end
    else begin
      e = exp_q.pop_front();
      if (target !== e.t || addr !== e.a || wdata !== e.d) begin
        failures++;
        $display("write t%0d a%0d %h, expected t%0d a%0d %h", target, addr, wdata, e.t, e.a, e.d);
      end
    end
  end

  initial begin
    int n [4] = '{7, 4, 3, 2};
    repeat (3) @(negedge clk);
    rst = 0;
    for (int round = 0; round < 2; round++)
      for (int t = 0; t < 4; t++) begin
        for (int i = 0; i < n[t]; i++)
          send_entry(2'(t), 14'(i), {$urandom, $urandom, $urandom} & ~96'h1);
        send_entry(2'(t), 14'(n[t]), (t == 0) ? {60'd0, 36'hF_FFFF_FFFF} : '1);
      end
    repeat (3) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d writes missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
