// tb_f32_pkg: reference conversions between IEEE 754 single-precision bit
// patterns and simulator reals, for testbenches. Conversions go through the
// double-precision bit pattern ($realtobits/$bitstoreal), independently of the
// design's own floating-point functions. Rounding to single is to nearest even;
// subnormals are flushed to zero, like the design.
package tb_f32_pkg;

  function automatic real f2r(input logic [31:0] f);
    logic [10:0] e;
    if (f[30:23] == 8'd0) return 0.0;
    e = 11'(int'(f[30:23]) - 127 + 1023);
    return $bitstoreal({f[31], e, f[22:0], 29'd0});
  endfunction

  function automatic logic [31:0] r2f(input real r);
    logic [63:0] d;
    int          ef;
    logic [23:0] m;
    logic        g, st;
    d = $realtobits(r);
    if (d[62:52] == 11'd0) return {d[63], 31'd0};
    ef = int'(d[62:52]) - 1023 + 127;
    m  = {1'b0, d[51:29]};
    g  = d[28];
    st = |d[27:0];
    if (g && (st || m[0])) m = m + 24'd1;
    if (m[23]) begin m = '0; ef = ef + 1; end
    if (ef <= 0)   return {d[63], 31'd0};
    if (ef >= 255) return {d[63], 8'hFF, 23'd0};
    return {d[63], 8'(ef), m[22:0]};
  endfunction

  // Distance in units in the last place between two floats of equal sign.
  function automatic int ulp_diff(input logic [31:0] a, input logic [31:0] b);
    longint da;
    if (a == b) return 0;
    if (a[31] != b[31]) return (a[30:0] == 0 && b[30:0] == 0) ? 0 : 1 << 30;
    da = longint'(a[30:0]) - longint'(b[30:0]);
    return int'(da < 0 ? -da : da);
  endfunction

  // Random float with the given exponent range (unbiased) and random sign.
  function automatic logic [31:0] rand_f32(input int emin, input int emax);
    int e;
    e = emin + int'($urandom_range(emax - emin));
    return {1'($urandom), 8'(e + 127), 23'($urandom)};
  endfunction

  function automatic longint round_away(input real r);
    return (r >= 0.0) ? longint'($floor(r + 0.5)) : -longint'($floor(-r + 0.5));
  endfunction

endpackage
