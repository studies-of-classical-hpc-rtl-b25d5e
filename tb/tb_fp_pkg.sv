// tb_fp_pkg: reference conversions for the testbenches.
// r2s rounds a real to IEEE single (nearest-even, subnormals flushed to zero),
// s2r widens a single to real. Because every single-precision sum or product is
// exact in double precision or satisfies the double-rounding bound, r2s(s2r(a)
// op s2r(b)) is the correctly rounded single-precision result.
package tb_fp_pkg;
  function automatic logic [31:0] r2s(real r);
    logic [63:0] d;
    logic        s;
    int          e;
    logic [51:0] f;
    logic [23:0] m;
    logic        g, st;
    d = $realtobits(r);
    s = d[63];
    e = int'(d[62:52]);
    f = d[51:0];
    if (e == 0) return {s, 31'b0};
    if (e == 2047) return (f != 0) ? 32'h7fc00000 : {s, 8'hff, 23'b0};
    e = e - 1023 + 127;
    m = {1'b0, f[51:29]};
    g = f[28];
    st = |f[27:0];
    if (g && (st || m[0])) m = m + 1;
    if (m[23]) begin
      m = m >> 1;
      e = e + 1;
    end
    if (e >= 255) return {s, 8'hff, 23'b0};
    if (e <= 0) return {s, 31'b0};
    return {s, 8'(e), m[22:0]};
  endfunction

  function automatic real s2r(logic [31:0] x);
    int e;
    e = int'(x[30:23]);
    if (e == 0) return x[31] ? -0.0 : 0.0;
    return $bitstoreal({x[31], 11'(e - 127 + 1023), x[22:0], 29'b0});
  endfunction

  // random normal single with exponent in [127-span, 127+span]
  function automatic logic [31:0] rand_s(int span);
    int e;
    e = 127 - span + int'($urandom_range(0, 2 * span));
    return {1'($urandom), 8'(e), 23'($urandom)};
  endfunction

  function automatic logic [63:0] rand_d(int span);
    int e;
    e = 1023 - span + int'($urandom_range(0, 2 * span));
    return {1'($urandom), 11'(e), 20'($urandom), 32'($urandom)};
  endfunction
endpackage
