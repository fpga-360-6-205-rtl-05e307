// fp_div: pipelined single-precision divider, y = a / b, 30-cycle latency.
//
// One division can enter per cycle. Stage 0 unpacks the operands and forms
// the significand dividend {1.ma, 26 zeros}; fixed_div produces the 27-bit
// significand quotient (28 stages, one quotient bit each); a final stage
// normalises, rounds to nearest even using the remainder as sticky bit and
// packs. A short delay chain pads the total to LATENCY (30, the divider
// latency of the design). Division by zero gives infinity, 0/0 NaN; subnormal
// operands and results flush to zero.
module fp_div #(
  parameter int unsigned LATENCY = 30
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

  localparam int unsigned QW  = 27;
  localparam int unsigned DIV_LAT = QW + 1;
  localparam int unsigned PAD = LATENCY - DIV_LAT - 1;

  // special-case result, decided in stage 0 and carried alongside
  typedef struct packed {
    logic        special;
    logic [31:0] special_val;
    logic        s;
    logic [9:0]  e;     // biased exponent of quotient before normalisation
  } side_t;

  logic [49:0] num;
  logic [23:0] den;
  side_t       side_in;
  side_t       side_q [DIV_LAT];
  logic [QW-1:0] q;
  logic [23:0]   rem;
  logic          div_valid;

  always_comb begin
    logic az, bz, ai, bi, an, bn;
    az = a[30:23] == 8'd0;
    bz = b[30:23] == 8'd0;
    ai = a[30:23] == 8'hFF && a[22:0] == 0;
    bi = b[30:23] == 8'hFF && b[22:0] == 0;
    an = a[30:23] == 8'hFF && a[22:0] != 0;
    bn = b[30:23] == 8'hFF && b[22:0] != 0;
    side_in.s           = a[31] ^ b[31];
    side_in.e           = 10'(int'(a[30:23]) - int'(b[30:23]) + 127);
    side_in.special     = 1'b1;
    side_in.special_val = F_QNAN;
    if (an || bn || (az && bz) || (ai && bi)) side_in.special_val = F_QNAN;
    else if (ai || bz)                        side_in.special_val = {side_in.s, F_INF[30:0]};
    else if (az || bi)                        side_in.special_val = {side_in.s, 31'd0};
    else                                      side_in.special     = 1'b0;
    num = {1'b1, a[22:0], 26'd0};
    den = {1'b1, b[22:0]};
  end

  fixed_div #(.NW(50), .DW(24), .QW(QW)) u_div (
    .clk, .rst, .valid_in, .n(num), .d(den),
    .valid_out(div_valid), .q, .rem
  );

  always_ff @(posedge clk) begin
    side_q[0] <= side_in;
    for (int i = 1; i < DIV_LAT; i++) side_q[i] <= side_q[i-1];
  end

  // normalise and round: q is in (2^25, 2^27)
  logic [31:0] res_q [PAD+1];
  logic        vld_q [PAD+1];
  always_ff @(posedge clk) begin
    side_t sd;
    int    e;
    sd = side_q[DIV_LAT-1];
    e  = int'(signed'({1'b0, sd.e})) - ((sd.e[9]) ? 1024 : 0);
    if (sd.special)
      res_q[0] <= sd.special_val;
    else if (q[26])
      res_q[0] <= f_pack(sd.s, e, q[26:3], q[2], |q[1:0] | (rem != 0));
    else
      res_q[0] <= f_pack(sd.s, e - 1, q[25:2], q[1], q[0] | (rem != 0));
    vld_q[0] <= div_valid & ~rst;
    for (int i = 1; i <= PAD; i++) begin
      res_q[i] <= res_q[i-1];
      vld_q[i] <= vld_q[i-1] & ~rst;
    end
  end

  assign y         = res_q[PAD];
  assign valid_out = vld_q[PAD];
endmodule
