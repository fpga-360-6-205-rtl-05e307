// delay_line: W-bit register chain of N stages (N >= 1), used to keep side
// data aligned with the fixed-latency arithmetic units.
module delay_line #(
  parameter int unsigned W = 1,
  parameter int unsigned N = 1
) (
  input  logic         clk,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] sr [N];
  always_ff @(posedge clk) begin
    sr[0] <= d;
    for (int i = 1; i < N; i++) sr[i] <= sr[i-1];
  end
  assign q = sr[N-1];
endmodule
