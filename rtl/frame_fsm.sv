// frame_fsm: paces rendering and sequences the framebuffer.
//
// A free-running timer requests a new frame every FRAME_CYCLES clocks
// (2,000,000 at 100 MHz: 50 frames per second, independent of the 60 Hz
// display). When a request is pending and the pipeline is idle (the previous
// frame is completely written), the FSM pulses `fb_switch` and `fb_clear`
// together, so the finished frame goes on screen and the other frame is
// cleared, waits until the framebuffer reports ready, then pulses `restart`
// for the vertex fetch and `latch` to freeze the camera transform for the
// new frame. A request that arrives while the previous frame is still being
// rendered waits; `frames` counts started frames. Waiting for an idle
// pipeline rather than switching blindly on the timer is this design's
// choice.
module frame_fsm #(
  parameter int unsigned FRAME_CYCLES = 2_000_000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        pipeline_idle,
  input  logic        fb_ready,
  output logic        fb_switch,
  output logic        fb_clear,
  output logic        restart,
  output logic        latch,
  output logic [15:0] frames
);
  typedef enum logic [1:0] {RENDER, CLEAR, WAIT_READY} state_t;
  state_t state;
  logic [$clog2(FRAME_CYCLES)-1:0] timer;
  logic pending;

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= RENDER;
      timer     <= '0;
      pending   <= 1'b0;
      fb_switch <= 1'b0;
      fb_clear  <= 1'b0;
      restart   <= 1'b0;
      latch     <= 1'b0;
      frames    <= '0;
    end else begin
      fb_switch <= 1'b0;
      fb_clear  <= 1'b0;
      restart   <= 1'b0;
      latch     <= 1'b0;
      if (timer == ($bits(timer))'(FRAME_CYCLES - 1)) begin
        timer   <= '0;
        pending <= 1'b1;
      end else timer <= timer + 1'b1;
      case (state)
        RENDER: if (pending && pipeline_idle) begin
          pending   <= 1'b0;
          fb_switch <= 1'b1;
          fb_clear  <= 1'b1;
          state     <= CLEAR;
        end
        CLEAR: state <= WAIT_READY;       // framebuffer leaves NORMAL here
        WAIT_READY: if (fb_ready) begin
          restart <= 1'b1;
          latch   <= 1'b1;
          frames  <= frames + 1'b1;
          state   <= RENDER;
        end
        default: state <= RENDER;
      endcase
    end
  end
endmodule
