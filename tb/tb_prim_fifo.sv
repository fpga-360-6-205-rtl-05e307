// tb_prim_fifo: bursts of vertices written every cycle while a consumer with
// random ready pulls them; data and attributes must come out in order. A
// small instance (DEPTH 16) is then filled past capacity (16 entries plus
// the output register) to check that the
// overflow flag is set and that the stored entries are intact.
module tb_prim_fifo;
  import gfx_pkg::*;
  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;

  logic valid_in = 0, valid_out, ready = 0, empty, overflow;
  fvec3_t vin = '0, vout;
  attr_t ain = '0, aout;
  prim_fifo #(.DEPTH(16)) dut (.clk, .rst, .valid_in, .vertex_in(vin), .attr_in(ain),
                               .valid_out, .ready, .vertex_out(vout), .attr_out(aout),
                               .empty, .overflow);
  always #5 clk = ~clk;

  int nin = 0, nout = 0;
  always @(posedge clk) if (!rst && valid_out && ready) begin
    checks++;
    if (vout != fvec3_t'({32'(nout), 32'(nout * 3), 32'(nout * 5)}) || aout.material != 12'(nout)) begin
      failures++;
      if (failures < 5) $display("read %0d got %h", nout, vout);
    end
    nout++;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    checks++;
    if (!empty || valid_out) failures++;
    // phase 1: 200 vertices in bursts of 6, consumer 1-in-3
    fork
      begin
        for (int b = 0; b < 200 / 6 + 1; b++) begin
          for (int i = 0; i < 6 && nin < 200; i++) begin
            vin = fvec3_t'({32'(nin), 32'(nin * 3), 32'(nin * 5)});
            ain = '{material: 12'(nin), normal: 12'(nin + 1)};
            valid_in = 1; nin++;
            @(negedge clk);
          end
          valid_in = 0;
          repeat (18) @(negedge clk);
        end
      end
      begin
        while (nout < 200) begin
          ready = ($urandom % 3 == 0);
          @(negedge clk);
        end
        ready = 0;
      end
    join
    checks++;
    if (overflow || !empty) begin failures++; $display("overflow %b empty %b", overflow, empty); end
    // phase 2: 20 writes into 16 entries with no reader
    for (int i = 0; i < 20; i++) begin
      vin = fvec3_t'({32'(nin), 32'(nin * 3), 32'(nin * 5)});
      ain = '{material: 12'(nin), normal: 12'(0)};
      valid_in = 1; nin++;
      @(negedge clk);
    end
    valid_in = 0;
    checks++;
    if (!overflow) begin failures++; $display("no overflow"); end
    ready = 1;
    repeat (40) @(negedge clk);
    checks++;
    if (nout != 217) begin failures++; $display("read %0d", nout); end
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
