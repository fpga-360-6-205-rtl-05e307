// fixed_div: fully pipelined unsigned restoring divider, q = n / d.
//
// One division enters per cycle and leaves QW+1 cycles later. Stage k
// produces one quotient bit, most significant first: the partial remainder
// takes in the next dividend bit and the divisor is subtracted when it fits.
// The caller must guarantee that the quotient fits in QW bits, i.e.
// n >> QW < d; the final remainder is given so callers can round. Each stage
// is one register rank, which is this implementation's choice.
// Used by fp_div (significand quotient) and by the rasterizer's barycentric
// conversion (area ratios).
module fixed_div #(
  parameter int unsigned NW = 50,   // dividend width
  parameter int unsigned DW = 24,   // divisor width
  parameter int unsigned QW = 27    // quotient width (= pipeline depth)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          valid_in,
  input  logic [NW-1:0] n,
  input  logic [DW-1:0] d,
  output logic          valid_out,
  output logic [QW-1:0] q,
  output logic [DW-1:0] rem
);
  // stage registers: partial remainder, remaining low dividend bits, divisor,
  // quotient bits so far
  logic [DW:0]   r_q   [QW+1];
  logic [QW-1:0] lo_q  [QW+1];
  logic [DW-1:0] d_q   [QW+1];
  logic [QW-1:0] q_q   [QW+1];
  logic          v_q   [QW+1];

  always_ff @(posedge clk) begin
    r_q[0]  <= (DW+1)'(n >> QW);
    lo_q[0] <= n[QW-1:0];
    d_q[0]  <= d;
    q_q[0]  <= '0;
    v_q[0]  <= valid_in & ~rst;
    for (int k = 1; k <= QW; k++) begin
      logic [DW+1:0] trial;
      trial = {r_q[k-1], lo_q[k-1][QW-1]};
      if (trial >= {2'b00, d_q[k-1]}) begin
        r_q[k] <= (DW+1)'(trial - {2'b00, d_q[k-1]});
        q_q[k] <= {q_q[k-1][QW-2:0], 1'b1};
      end else begin
        r_q[k] <= trial[DW:0];
        q_q[k] <= {q_q[k-1][QW-2:0], 1'b0};
      end
      lo_q[k] <= lo_q[k-1] << 1;
      d_q[k]  <= d_q[k-1];
      v_q[k]  <= v_q[k-1] & ~rst;
    end
  end

  assign q         = q_q[QW];
  assign rem       = r_q[QW][DW-1:0];
  assign valid_out = v_q[QW];
endmodule
