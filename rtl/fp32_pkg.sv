// IEEE 754 single-precision helpers for the floating-point entropy type.
//
// Combinational functions, synthesizable as written. Each result is
// rounded once, to nearest with ties to even, from an exact intermediate:
//   fp_round     packs (-1)^s * m * 2^e0 for a 64-bit integer m
//   fp_from_fix  unsigned fixed point with frac fraction bits -> float
//   fp_mul       exact 48-bit mantissa product, then fp_round
//   fp_add       operands aligned exactly in 64 bits (an operand more than
//                38 binades smaller cannot change the rounded sum), then
//                fp_round
// Subnormal results flush to zero and overflow gives infinity; NaN and
// infinity inputs are not needed by the entropy datapath and are not
// treated specially. The function set is this design's choice.
package fp32_pkg;

  typedef logic [31:0] fp32_t;

  function automatic int msb64(input logic [63:0] m);
    int p = 0;
    for (int i = 0; i < 64; i++) if (m[i]) p = i;
    return p;
  endfunction

  function automatic fp32_t fp_round(input logic s, input int e0, input logic [63:0] m);
    logic [63:0] mm;
    logic [23:0] mant;
    logic        guard, sticky;
    int          p, be;
    if (m == '0) return '0;
    p      = msb64(m);
    mm     = m << (63 - p);
    mant   = {1'b0, mm[62:40]};
    guard  = mm[39];
    sticky = |mm[38:0];
    if (guard && (sticky || mant[0])) mant = mant + 24'd1;
    if (mant[23]) begin
      mant = '0;
      p    = p + 1;
    end
    be = e0 + p + 127;
    if (be <= 0)   return '0;
    if (be >= 255) return {s, 8'hFF, 23'd0};
    return {s, 8'(be), mant[22:0]};
  endfunction

  function automatic fp32_t fp_from_fix(input logic [63:0] x, input int frac);
    return fp_round(1'b0, -frac, x);
  endfunction

  function automatic fp32_t fp_mul(input fp32_t a, input fp32_t b);
    logic [47:0] prod;
    if (a[30:23] == 8'd0 || b[30:23] == 8'd0) return '0;
    prod = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    return fp_round(a[31] ^ b[31], int'(a[30:23]) + int'(b[30:23]) - 2 * 150, {16'd0, prod});
  endfunction

  function automatic fp32_t fp_neg(input fp32_t a);
    return (a[30:23] == 8'd0) ? '0 : {~a[31], a[30:0]};
  endfunction

  function automatic fp32_t fp_add(input fp32_t a, input fp32_t b);
    fp32_t       larger, lesser;
    int          d;
    logic [63:0] mb, ms, r;
    if (a[30:23] == 8'd0) return b;
    if (b[30:23] == 8'd0) return a;
    if (a[30:0] >= b[30:0]) begin larger = a; lesser = b; end
    else                    begin larger = b; lesser = a; end
    d = int'(larger[30:23]) - int'(lesser[30:23]);
    if (d > 38) return larger;
    mb = 64'({1'b1, larger[22:0]}) << d;
    ms = 64'({1'b1, lesser[22:0]});
    r  = (larger[31] == lesser[31]) ? mb + ms : mb - ms;
    return fp_round(larger[31], int'(lesser[30:23]) - 150, r);
  endfunction

endpackage
