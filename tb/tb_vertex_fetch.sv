// tb_vertex_fetch: behavioural one-cycle-latency memories hold an index list
// ended by a stop word. After restart every listed vertex must come out in
// order, one per cycle, with the right position and indices, and `done` must
// rise afterwards. A second restart must replay the list.
module tb_vertex_fetch;
  import gfx_pkg::*;
  localparam int NV = 30;
  logic clk = 0, rst = 1, restart = 0, valid_out, done;
  logic [13:0] ia;
  logic [10:0] pa;
  index_t idx;
  fvec3_t pos, pos_out;
  attr_t attr_out;
  index_t imem [64];
  fvec3_t pmem [2048];
  int checks = 0, failures = 0, nout = 0, first = -1, last = -1, cyc = 0;

  vertex_fetch dut (.clk, .rst, .restart, .index_read_addr(ia), .index(idx),
                    .position_read_addr(pa), .position(pos), .valid_out,
                    .position_out(pos_out), .attr_out, .done);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    idx <= imem[ia[5:0]];
    pos <= pmem[pa];
    cyc <= cyc + 1;
  end

  always @(posedge clk) if (!rst && valid_out) begin
    int k;
    k = nout % NV;
    checks++;
    if (pos_out != pmem[imem[k].position[10:0]] || attr_out.material != imem[k].material ||
        attr_out.normal != imem[k].normal) begin
      failures++;
      if (failures < 5) $display("vertex %0d wrong", nout);
    end
    if (first < 0) first = cyc;
    last = cyc;
    nout++;
  end

  initial begin
    for (int i = 0; i < 2048; i++) pmem[i] = fvec3_t'({$urandom, $urandom, $urandom});
    for (int i = 0; i < 64; i++)
      imem[i] = (i < NV) ? index_t'({12'($urandom % 32), 12'($urandom % 2048), 12'($urandom % 2048)})
                         : index_t'('1);
    repeat (3) @(negedge clk);
    rst = 0;
    for (int pass = 0; pass < 2; pass++) begin
      first = -1;
      restart = 1;
      @(negedge clk) restart = 0;
      @(negedge clk);
      while (!done) @(negedge clk);
      checks++;
      if (nout != NV * (pass + 1)) begin failures++; $display("pass %0d: %0d vertices", pass, nout); end
      checks++;
      if (last - first != NV - 1) begin failures++; $display("not one per cycle"); end
      repeat (5) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
