// IEEE-754 single-precision arithmetic used by the lane FP unit.
//
// fp_add() adds or subtracts with round-to-nearest-even using guard, round
// and sticky bits; fp_mul() multiplies with the same rounding. Denormal
// inputs and results are flushed to zero; infinities and NaNs propagate
// in the usual way (NaN results are the canonical quiet NaN). The document
// names a floating-point adder/subtractor and multiplier taken from open
// source code but does not give their insides; these functions are the
// simplest correctly rounded version and are this design's own.
package fp_pkg;

  localparam logic [31:0] QNAN = 32'h7fc00000;

  function automatic logic [31:0] fp_add(logic [31:0] a, logic [31:0] b, logic sub);
    logic        sa, sb, sx, sy, sr;
    logic [7:0]  ea, eb, ex, ey;
    logic [23:0] ma, mb, mx, my;
    logic [27:0] wx, wy, w;
    logic [8:0]  d;
    logic [9:0]  e;
    logic [4:0]  lz;
    logic [24:0] rm;
    logic        g, r, s, sticky;
    sa = a[31]; sb = b[31] ^ sub;
    ea = a[30:23]; eb = b[30:23];
    ma = (ea == 0) ? 24'd0 : {1'b1, a[22:0]};
    mb = (eb == 0) ? 24'd0 : {1'b1, b[22:0]};
    // special operands
    if (ea == 8'hff || eb == 8'hff) begin
      if ((ea == 8'hff && a[22:0] != 0) || (eb == 8'hff && b[22:0] != 0)) return QNAN;
      if (ea == 8'hff && eb == 8'hff) return (sa == sb) ? {sa, 8'hff, 23'd0} : QNAN;
      return (ea == 8'hff) ? {sa, 8'hff, 23'd0} : {sb, 8'hff, 23'd0};
    end
    if (ma == 0 && mb == 0) return {sa & sb, 31'd0};
    if (ma == 0) return {sb, eb, mb[22:0]};
    if (mb == 0) return {sa, ea, ma[22:0]};
    // order by magnitude
    if ({ea, ma} >= {eb, mb}) begin
      sx = sa; ex = ea; mx = ma; sy = sb; ey = eb; my = mb;
    end else begin
      sx = sb; ex = eb; mx = mb; sy = sa; ey = ea; my = ma;
    end
    d  = {1'b0, ex} - {1'b0, ey};
    wx = {1'b0, mx, 3'b000};
    wy = {1'b0, my, 3'b000};
    if (d >= 9'd27) begin
      wy = {27'd0, (my != 0)};
    end else begin
      sticky = 1'b0;
      for (int i = 0; i < 27; i++)
        if (i < int'(d) && wy[i]) sticky = 1'b1;
      wy = (wy >> d) | {27'd0, sticky};
    end
    sr = sx;
    e  = {2'b00, ex};
    if (sx == sy) begin
      w = wx + wy;
      if (w[27]) begin
        w = {1'b0, w[27:2], w[1] | w[0]};
        e = e + 1;
      end
    end else begin
      w = wx - wy;
      if (w == 0) return 32'd0;
      lz = 0;
      for (int i = 26; i >= 0; i--) begin
        if (w[i]) break;
        lz = lz + 1;
      end
      w = w << lz;
      e = e - {5'd0, lz};
    end
    // round to nearest even on bits [2:0]
    g = w[2]; r = w[1]; s = w[0];
    rm = {1'b0, w[26:3]};
    if (g && (r || s || rm[0])) rm = rm + 1;
    if (rm[24]) begin
      rm = rm >> 1;
      e  = e + 1;
    end
    if ($signed(e) <= 0) return {sr, 31'd0};
    if (e >= 10'd255) return {sr, 8'hff, 23'd0};
    return {sr, e[7:0], rm[22:0]};
  endfunction

  function automatic logic [31:0] fp_mul(logic [31:0] a, logic [31:0] b);
    logic        sr;
    logic [7:0]  ea, eb;
    logic [23:0] ma, mb;
    logic [47:0] p;
    logic [9:0]  e;
    logic [24:0] rm;
    logic        g, s;
    sr = a[31] ^ b[31];
    ea = a[30:23]; eb = b[30:23];
    ma = (ea == 0) ? 24'd0 : {1'b1, a[22:0]};
    mb = (eb == 0) ? 24'd0 : {1'b1, b[22:0]};
    if ((ea == 8'hff && a[22:0] != 0) || (eb == 8'hff && b[22:0] != 0)) return QNAN;
    if (ea == 8'hff || eb == 8'hff) begin
      if (ma == 0 || mb == 0) return QNAN;
      return {sr, 8'hff, 23'd0};
    end
    if (ma == 0 || mb == 0) return {sr, 31'd0};
    p = ma * mb;
    e = {2'b00, ea} + {2'b00, eb} - 10'd127;
    if (p[47]) begin
      e  = e + 1;
      rm = {1'b0, p[47:24]};
      g  = p[23];
      s  = |p[22:0];
    end else begin
      rm = {1'b0, p[46:23]};
      g  = p[22];
      s  = |p[21:0];
    end
    if (g && (s || rm[0])) rm = rm + 1;
    if (rm[24]) begin
      rm = rm >> 1;
      e  = e + 1;
    end
    if ($signed(e) <= 0) return {sr, 31'd0};
    if ($signed(e) >= 255) return {sr, 8'hff, 23'd0};
    return {sr, e[7:0], rm[22:0]};
  endfunction

endpackage
