// tb_fp_pkg: testbench-only helpers converting between real numbers and
// binary32 bit patterns, built on $realtobits / $bitstoreal (binary64).
// These are independent of the RTL arithmetic and serve as reference models.
package tb_fp_pkg;

  function automatic logic [31:0] r2f(input real r);
    logic [63:0] d;
    logic [52:0] m;
    logic [24:0] mr;
    int          e;
    d = $realtobits(r);
    if (d[62:0] == 0) return {d[63], 31'd0};
    e = int'(d[62:52]) - 1023 + 127;
    if (e <= 0) return {d[63], 31'd0};
    m  = {1'b1, d[51:0]};
    // round to nearest even at bit 29
    mr = {1'b0, m[52:29]} + 25'(m[28] & ((|m[27:0]) | m[29]));
    if (mr[24]) begin
      mr = mr >> 1;
      e++;
    end
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    return {d[63], 8'(e), mr[22:0]};
  endfunction

  function automatic real f2r(input logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 0) return 0.0;
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic real fabs(input real r);
    return (r < 0.0) ? -r : r;
  endfunction

  // relative/absolute closeness test
  function automatic bit close(input real a, input real b, input real tol);
    return fabs(a - b) <= tol * (1.0 + fabs(b));
  endfunction

endpackage
