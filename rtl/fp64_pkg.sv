// fp64_pkg: IEEE-754 double-precision add/subtract and multiply used by the
// mutable functional unit (add) and FPU2 (multiply).
//
// Both round to nearest, ties to even. Simplifications chosen for this design:
// subnormal inputs are read as zero and results that would be subnormal are
// flushed to a signed zero; any NaN input gives the quiet NaN 0x7FF8...0;
// overflow gives infinity. Results for normal operands with normal results
// are bit-exact IEEE.
package fp64_pkg;

  localparam logic [63:0] QNAN = 64'h7FF8_0000_0000_0000;

  function automatic logic [63:0] fp_add(logic [63:0] a, logic [63:0] b, logic sub);
    logic        sa, sb, sr;
    logic [10:0] ea, eb;
    logic [52:0] ma, mb;
    logic [55:0] xa, xb, xbs;
    logic [56:0] sum;
    logic [55:0] n;
    logic [53:0] mr;
    logic        sticky, rnd;
    int          d, er, lz;
    sa = a[63];
    sb = b[63] ^ sub;
    ea = a[62:52];
    eb = b[62:52];
    // NaN / infinity
    if ((ea == 11'h7FF && a[51:0] != 0) || (eb == 11'h7FF && b[51:0] != 0)) return QNAN;
    if (ea == 11'h7FF && eb == 11'h7FF) return (sa == sb) ? {sa, 11'h7FF, 52'd0} : QNAN;
    if (ea == 11'h7FF) return {sa, 11'h7FF, 52'd0};
    if (eb == 11'h7FF) return {sb, 11'h7FF, 52'd0};
    // zeros (subnormals read as zero)
    if (ea == 0 && eb == 0) return {sa & sb, 63'd0};
    if (ea == 0) return {sb, b[62:0]};
    if (eb == 0) return {sa, a[62:0]};
    ma = {1'b1, a[51:0]};
    mb = {1'b1, b[51:0]};
    // order so that |a| >= |b|
    if ({eb, mb} > {ea, ma}) begin
      {sa, ea, ma, sb, eb, mb} = {sb, eb, mb, sa, ea, ma};
    end
    d  = int'(ea) - int'(eb);
    xa = {ma, 3'b000};
    xb = {mb, 3'b000};
    if (d >= 56) begin
      xbs = 56'd1;             // only the sticky bit survives
    end else begin
      xbs    = xb >> d;
      sticky = 1'b0;
      for (int i = 0; i < 56; i++) if (i < d && xb[i]) sticky = 1'b1;
      xbs[0] = xbs[0] | sticky;
    end
    sum = (sa == sb) ? ({1'b0, xa} + {1'b0, xbs}) : ({1'b0, xa} - {1'b0, xbs});
    sr  = sa;
    if (sum == 0) return 64'd0;  // exact cancellation gives +0
    er = int'(ea);
    if (sum[56]) begin
      n  = sum[56:1];
      n[0] = n[0] | sum[0];
      er = er + 1;
    end else begin
      lz = 0;
      for (int i = 0; i < 56; i++) if (sum[i]) lz = 55 - i;   // highest set bit wins
      n  = sum[55:0] << lz;
      er = er - lz;
    end
    if (er <= 0) return {sr, 63'd0};
    rnd = n[2] & (n[1] | n[0] | n[3]);
    mr  = {1'b0, n[55:3]} + 54'(rnd);
    if (mr[53]) begin
      mr = mr >> 1;
      er = er + 1;
    end
    if (er >= 2047) return {sr, 11'h7FF, 52'd0};
    return {sr, er[10:0], mr[51:0]};
  endfunction

  function automatic logic [63:0] fp_mul(logic [63:0] a, logic [63:0] b);
    logic         sr;
    logic [10:0]  ea, eb;
    logic [105:0] p;
    logic [52:0]  m;
    logic [53:0]  mr;
    logic         g, s, rnd;
    int           er;
    sr = a[63] ^ b[63];
    ea = a[62:52];
    eb = b[62:52];
    if ((ea == 11'h7FF && a[51:0] != 0) || (eb == 11'h7FF && b[51:0] != 0)) return QNAN;
    if (ea == 11'h7FF || eb == 11'h7FF) begin
      if (ea == 0 || eb == 0) return QNAN;   // inf * 0
      return {sr, 11'h7FF, 52'd0};
    end
    if (ea == 0 || eb == 0) return {sr, 63'd0};
    p  = {1'b1, a[51:0]} * {1'b1, b[51:0]};
    er = int'(ea) + int'(eb) - 1023;
    if (p[105]) begin
      m  = p[105:53];
      g  = p[52];
      s  = |p[51:0];
      er = er + 1;
    end else begin
      m  = p[104:52];
      g  = p[51];
      s  = |p[50:0];
    end
    rnd = g & (s | m[0]);
    mr  = {1'b0, m} + 54'(rnd);
    if (mr[53]) begin
      mr = mr >> 1;
      er = er + 1;
    end
    if (er <= 0) return {sr, 63'd0};
    if (er >= 2047) return {sr, 11'h7FF, 52'd0};
    return {sr, er[10:0], mr[51:0]};
  endfunction

endpackage
