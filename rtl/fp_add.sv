// fp_add: pipelined single-precision adder, y = a + b.
//
// One operation can enter every cycle; the result and its valid flag appear
// LATENCY cycles later (9 by default, the adder latency of the original
// design). The arithmetic is done by fp_pkg::f_add in the first stage and the
// result then travels down a register chain (valid bits cleared by rst); the stage split inside the
// adder is this implementation's own choice. Subnormals flush to zero.
module fp_add #(
  parameter int unsigned LATENCY = 9
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        valid_in,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic        valid_out,
  output logic [31:0] y
);
  import fp_pkg::*;

  logic [31:0] res_q [LATENCY];
  logic        vld_q [LATENCY];

  always_ff @(posedge clk) begin
    res_q[0] <= f_add(a, b);
    vld_q[0] <= valid_in & ~rst;
    for (int i = 1; i < LATENCY; i++) begin
      res_q[i] <= res_q[i-1];
      vld_q[i] <= vld_q[i-1] & ~rst;
    end
  end

  assign y         = res_q[LATENCY-1];
  assign valid_out = vld_q[LATENCY-1];
endmodule
