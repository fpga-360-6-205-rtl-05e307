// fp_pkg: shared types and single-precision arithmetic for the renderer.
//
// The pipelined units fp_add, fp_mul and fp_div wrap the combinational
// functions below in delay lines of the latencies the design uses (9, 7 and
// 30 cycles). The arithmetic follows IEEE-754 binary32 with round to nearest
// even, except that subnormal inputs and results are flushed to zero, as the
// original units do. Infinities and NaN are propagated in the simplest way
// (any NaN gives the canonical quiet NaN). Also holds the conversions between
// floats and the fixed-point and integer formats used elsewhere.
package fp_pkg;

  typedef logic [31:0] f32_t;
  typedef f32_t        vec3_t [3];

  localparam f32_t F_ZERO = 32'h0000_0000;
  localparam f32_t F_ONE  = 32'h3F80_0000;
  localparam f32_t F_QNAN = 32'h7FC0_0000;
  localparam f32_t F_INF  = 32'h7F80_0000;

  function automatic f32_t f_neg(input f32_t a);
    return {~a[31], a[30:0]};
  endfunction

  // Round a 24-bit significand with guard and sticky bits, pack it.
  // e is the biased exponent of the significand's leading one.
  function automatic f32_t f_pack(input logic s, input int e,
                                  input logic [23:0] m, input logic g,
                                  input logic st);
    logic [24:0] r;
    int          ee;
    ee = e;
    r  = {1'b0, m} + {24'd0, g & (st | m[0])};
    if (r[24]) begin
      r  = r >> 1;
      ee = ee + 1;
    end
    if (ee >= 255) return {s, F_INF[30:0]};
    if (ee <= 0)   return {s, 31'd0};
    return {s, 8'(ee), r[22:0]};
  endfunction

  function automatic f32_t f_add(input f32_t a_in, input f32_t b_in);
    f32_t        a, b, t;
    logic [26:0] ma, mb;         // 1.23 significand + guard, round, sticky
    logic [27:0] sum;
    int          d, e, lz;
    logic        st;
    a = a_in;
    b = b_in;
    if (a[30:23] == 8'd0) a = {a[31], 31'd0};
    if (b[30:23] == 8'd0) b = {b[31], 31'd0};
    if (a[30:23] == 8'hFF && a[22:0] != 0) return F_QNAN;
    if (b[30:23] == 8'hFF && b[22:0] != 0) return F_QNAN;
    if (a[30:23] == 8'hFF || b[30:23] == 8'hFF) begin
      if (a[30:23] == 8'hFF && b[30:23] == 8'hFF && a[31] != b[31]) return F_QNAN;
      return (a[30:23] == 8'hFF) ? a : b;
    end
    if (a[30:0] < b[30:0]) begin
      t = a; a = b; b = t;
    end
    if (b[30:0] == 0) begin
      if (a[30:0] == 0) return {a[31] & b[31], 31'd0};
      return a;
    end
    ma = {1'b1, a[22:0], 3'b000};
    mb = {1'b1, b[22:0], 3'b000};
    d  = int'(a[30:23]) - int'(b[30:23]);
    if (d >= 27) begin
      mb = 27'd1;                // only the sticky bit survives
    end else if (d > 0) begin
      st = |(mb & ((27'd1 << d) - 27'd1));
      mb = (mb >> d) | 27'(st);
    end
    e = int'(a[30:23]);
    if (a[31] == b[31]) begin
      sum = {1'b0, ma} + {1'b0, mb};
      if (sum[27]) begin
        sum = {1'b0, sum[27:2], sum[1] | sum[0]};
        e = e + 1;
      end
    end else begin
      sum = {1'b0, ma} - {1'b0, mb};
      if (sum == 0) return F_ZERO;
      lz = 0;
      for (int i = 26; i >= 0; i--) begin
        if (sum[i]) break;
        lz++;
      end
      sum = sum << lz;
      e = e - lz;
    end
    return f_pack(a[31], e, sum[26:3], sum[2], sum[1] | sum[0]);
  endfunction

  function automatic f32_t f_mul(input f32_t a, input f32_t b);
    logic        s;
    logic [47:0] p;
    int          e;
    s = a[31] ^ b[31];
    if ((a[30:23] == 8'hFF && a[22:0] != 0) || (b[30:23] == 8'hFF && b[22:0] != 0))
      return F_QNAN;
    if (a[30:23] == 8'hFF || b[30:23] == 8'hFF) begin
      if (a[30:23] == 8'd0 || b[30:23] == 8'd0) return F_QNAN;
      return {s, F_INF[30:0]};
    end
    if (a[30:23] == 8'd0 || b[30:23] == 8'd0) return {s, 31'd0};
    p = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    e = int'(a[30:23]) + int'(b[30:23]) - 127;
    if (p[47]) return f_pack(s, e + 1, p[47:24], p[23], |p[22:0]);
    return f_pack(s, e, p[46:23], p[22], |p[21:0]);
  endfunction

  // Signed integer to float (exact for |v| < 2^24), scaled by 2^-frac.
  function automatic f32_t f_from_int(input logic signed [31:0] v, input int frac);
    logic [31:0] m;
    int          lz;
    if (v == 0) return F_ZERO;
    m  = v[31] ? 32'(-v) : 32'(v);
    lz = 0;
    for (int i = 31; i >= 0; i--) begin
      if (m[i]) break;
      lz++;
    end
    m = m << lz;                 // leading one now at bit 31
    return f_pack(v[31], 127 + 31 - lz - frac, m[31:8], m[7], |m[6:0]);
  endfunction

  // Float to signed fixed point with `frac` fractional bits, truncating
  // toward minus infinity and saturating to `width` bits.
  function automatic logic signed [31:0] f_to_fixed(input f32_t a, input int frac,
                                                    input int width);
    logic signed [63:0] mag, res, lim;
    int                 sh;
    lim = (64'sd1 <<< (width - 1)) - 1;
    if (a[30:23] == 8'd0) return 32'sd0;
    if (a[30:23] == 8'hFF) return a[31] ? 32'(-lim - 1) : 32'(lim);
    sh  = int'(a[30:23]) - 127 - 23 + frac;
    mag = 64'({1'b1, a[22:0]});
    if (sh >= 40) mag = lim + 1;
    else if (sh >= 0) mag = mag <<< sh;
    else if (sh > -64) begin
      if (a[31] && ((mag & ((64'sd1 <<< -sh) - 1)) != 0)) mag = (mag >>> -sh) + 1;
      else mag = mag >>> -sh;
    end else mag = a[31] ? 64'sd1 : 64'sd0;
    res = a[31] ? -mag : mag;
    if (res > lim) res = lim;
    if (res < -lim - 1) res = -lim - 1;
    return 32'(res);
  endfunction

  // Magnitude comparison |a| <= |b| for finite floats.
  function automatic logic f_abs_le(input logic [30:0] a_mag, input logic [30:0] b_mag);
    return a_mag <= b_mag;
  endfunction

endpackage
