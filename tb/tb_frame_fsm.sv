// tb_frame_fsm: with a short frame period (1000 cycles), checks that frames
// start once per period, that each start is preceded by switch+clear and a
// wait for framebuffer ready (modelled as a 300-cycle clear), and that a
// request arriving while the pipeline is busy is held until it is idle.
module tb_frame_fsm;
  localparam int P = 1000;
  logic clk = 0, rst = 1, idle = 1, fb_ready;
  logic fb_switch, fb_clear, restart, latch;
  logic [15:0] frames;
  bit was_busy = 0;
  int checks = 0, failures = 0, cyc = 0, clr_left = 0, last_restart = -1, nclear = 0;

  frame_fsm #(.FRAME_CYCLES(P)) dut (.clk, .rst, .pipeline_idle(idle), .fb_ready,
                                      .fb_switch, .fb_clear, .restart, .latch, .frames);
  always #5 clk = ~clk;

  // framebuffer model: clearing takes 300 cycles
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (fb_clear) begin clr_left <= 300; nclear++; end
    else if (clr_left > 0) clr_left <= clr_left - 1;
  end
  assign fb_ready = (clr_left == 0) && !fb_clear;

  always @(posedge clk) if (!rst) begin
    if (!idle) was_busy = 1;
    if (fb_clear || fb_switch) begin
      checks++;
      if (!(fb_clear && fb_switch) || !idle) begin failures++; $display("switch/clear at %0d", cyc); end
    end
    if (restart) begin
      checks++;
      if (clr_left != 0 || !latch) begin failures++; $display("restart before clear done"); end
      if (last_restart >= 0 && !was_busy && cyc - last_restart != P) begin
        failures++;
        $display("restart interval %0d", cyc - last_restart);
      end
      last_restart = cyc;
      was_busy = 0;
    end
  end

  initial begin
    int f0, held;
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (3500) @(negedge clk);
    checks++;
    if (frames != 3) begin failures++; $display("frames %0d after 3.5 periods", frames); end
    // busy pipeline across a request: start must wait for idle
    idle = 0;
    f0 = frames;
    repeat (1500) @(negedge clk);
    checks++;
    if (frames != f0) begin failures++; $display("frame started while busy"); end
    held = cyc;
    idle = 1;
    @(posedge restart);
    checks++;
    if (cyc - held > 310) begin failures++; $display("held request took %0d", cyc - held); end
    repeat (2500) @(negedge clk);
    checks++;
    if (frames != f0 + 3) begin failures++; $display("frames %0d", frames); end
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
