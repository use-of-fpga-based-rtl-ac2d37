// cel_pkg: types and arithmetic shared by the calibration-electronic (CEL) datapath.
//
// Floating-point values are IEEE 754 single precision (32 bit), as the CEL uses
// throughout its signal processing. The functions here are combinational and
// synthesizable; modules register their results. Handling is deliberately
// reduced to what a calibration datapath needs, which is this design's choice:
// subnormal inputs and results are flushed to zero, NaN and infinity inputs are
// treated as ordinary numbers, and overflow produces infinity. Rounding is to
// nearest, ties to even.
package cel_pkg;

  typedef logic [31:0] f32_t;

  localparam f32_t F32_ZERO = 32'h0000_0000;
  localparam f32_t F32_ONE  = 32'h3F80_0000;
  localparam f32_t F32_INF  = 32'h7F80_0000;

  // Switch positions of the calibration input selector.
  typedef enum logic [1:0] {
    SEL_SIGNAL = 2'd0,
    SEL_GROUND = 2'd1,
    SEL_REF    = 2'd2,
    SEL_DAC    = 2'd3
  } cal_sel_e;

  // Normalize and round: the value is (mag / 2^62) * 2^(e - 127).
  function automatic f32_t f32_norm(input logic s, input int e, input logic [63:0] mag);
    int          p;
    int          ee;
    logic [63:0] m;
    logic        lost;
    logic [24:0] mr;
    logic        g, st;
    if (mag == 64'd0) return {s, 31'd0};
    p = 0;
    for (int i = 0; i < 64; i++) if (mag[i]) p = i;
    lost = 1'b0;
    if (p == 63) begin
      m    = mag >> 1;
      lost = mag[0];
    end else begin
      m = mag << (62 - p);
    end
    ee = e + p - 62;
    g  = m[38];
    st = (|m[37:0]) | lost;
    mr = {1'b0, m[62:39]};
    if (g && (st || mr[0])) mr = mr + 25'd1;
    if (mr[24]) begin
      mr = mr >> 1;
      ee = ee + 1;
    end
    if (ee <= 0)   return {s, 31'd0};
    if (ee >= 255) return {s, F32_INF[30:0]};
    return {s, ee[7:0], mr[22:0]};
  endfunction

  // 24-bit significand with hidden bit; zero for a zero/subnormal operand.
  function automatic logic [23:0] f32_sig(input f32_t a);
    return (a[30:23] == 8'd0) ? 24'd0 : {1'b1, a[22:0]};
  endfunction

  function automatic f32_t f32_mul(input f32_t a, input f32_t b);
    logic        s;
    logic [47:0] pr;
    s = a[31] ^ b[31];
    if (a[30:23] == 8'd0 || b[30:23] == 8'd0) return {s, 31'd0};
    pr = f32_sig(a) * f32_sig(b);
    return f32_norm(s, int'(a[30:23]) + int'(b[30:23]) - 127, {pr, 16'd0});
  endfunction

  function automatic f32_t f32_add(input f32_t a, input f32_t b);
    f32_t        big, sml;
    int          d;
    logic [63:0] mb, ms, r;
    logic        sticky;
    if ({a[30:0]} >= {b[30:0]}) begin big = a; sml = b; end
    else                        begin big = b; sml = a; end
    if (big[30:23] == 8'd0) return F32_ZERO;
    mb = {1'b0, f32_sig(big), 39'd0};
    ms = {1'b0, f32_sig(sml), 39'd0};
    d  = int'(big[30:23]) - int'(sml[30:23]);
    if (sml[30:23] == 8'd0) ms = 64'd0;
    else if (d > 62) ms = 64'd1;
    else if (d > 0) begin
      sticky = |(ms & ((64'd1 << d) - 64'd1));
      ms     = (ms >> d) | {63'd0, sticky};
    end
    if (big[31] == sml[31]) r = mb + ms;
    else                    r = mb - ms;
    if (r == 64'd0) return F32_ZERO;
    return f32_norm(big[31], int'(big[30:23]), r);
  endfunction

  function automatic f32_t f32_sub(input f32_t a, input f32_t b);
    return f32_add(a, {~b[31], b[30:0]});
  endfunction

  function automatic f32_t f32_div(input f32_t a, input f32_t b);
    logic        s;
    logic [63:0] q, rem;
    s = a[31] ^ b[31];
    if (a[30:23] == 8'd0) return {s, 31'd0};
    if (b[30:23] == 8'd0) return {s, F32_INF[30:0]};
    q   = {f32_sig(a), 40'd0} / {40'd0, f32_sig(b)};
    rem = {f32_sig(a), 40'd0} % {40'd0, f32_sig(b)};
    return f32_norm(s, int'(a[30:23]) - int'(b[30:23]) + 127,
                    (q << 22) | {63'd0, rem != 64'd0});
  endfunction

  // Ordering key: unsigned comparison of keys equals float comparison.
  function automatic logic [31:0] f32_key(input f32_t a);
    return a[31] ? ~a : {1'b1, a[30:0]};
  endfunction

  function automatic logic f32_le(input f32_t a, input f32_t b);
    return f32_key(a) <= f32_key(b);
  endfunction

  function automatic logic f32_lt(input f32_t a, input f32_t b);
    return f32_key(a) < f32_key(b);
  endfunction

  // Integer (sign/magnitude) to float.
  function automatic f32_t f32_from_int(input logic s, input logic [31:0] mag);
    return f32_norm(s, 189, {32'd0, mag});
  endfunction

  // Float to integer, round half away from zero, saturating to W bits
  // (signed range if sgn, else unsigned range; negative values give 0 unsigned).
  function automatic logic [63:0] f32_to_int(input f32_t a, input int w, input logic sgn);
    int          sh;
    logic [63:0] mag, lim;
    logic [63:0] half;
    if (a[30:23] == 8'd0) return 64'd0;
    sh = int'(a[30:23]) - 150;
    if (sh > 40) mag = 64'hFFFF_FFFF_FFFF_FFFF;
    else if (sh >= 0) mag = {40'd0, f32_sig(a)} << sh;
    else if (sh < -25) mag = 64'd0;
    else begin
      half = 64'd1 << (-sh - 1);
      mag  = ({40'd0, f32_sig(a)} + half) >> (-sh);
    end
    if (sgn) begin
      lim = a[31] ? (64'd1 << (w - 1)) : ((64'd1 << (w - 1)) - 64'd1);
      if (mag > lim) mag = lim;
      return a[31] ? (~mag + 64'd1) : mag;
    end
    if (a[31]) return 64'd0;
    lim = (w >= 64) ? 64'hFFFF_FFFF_FFFF_FFFF : ((64'd1 << w) - 64'd1);
    return (mag > lim) ? lim : mag;
  endfunction

endpackage
