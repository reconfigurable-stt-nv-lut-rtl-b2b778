// IEEE 754 double-precision adder/subtractor, combinational.
// The operand of larger magnitude is aligned with three extra bits (guard,
// round, sticky); the smaller one is shifted right with the shifted-out bits
// ORed into the sticky bit. After the add or subtract the sum is normalised
// (right by one on carry-out, left by the leading-zero count after
// cancellation) and rounded to nearest even. Subnormals flush to zero as in
// fp_mul64; an exact zero difference is +0. These are this design's choices.
module fp_add64 (
  input  logic [63:0] a,
  input  logic [63:0] b,
  input  logic        sub,     // 1: a - b
  output logic [63:0] y
);
  logic        sa, sb, sx, sy;
  logic [10:0] ea, eb, ex, ey;
  logic [51:0] fa, fb, fx, fy;
  logic        za, zb, ia, ib, na, nb;
  logic [11:0] d;
  logic [55:0] mx, my, my_sh;
  logic        sh_sticky;
  logic [56:0] sum;
  logic [6:0]  lz;
  logic        found;
  logic [52:0] mant;
  logic        guard, sticky, inc;
  logic [53:0] mant_r;
  logic signed [13:0] exp;

  always_comb begin
    {sa, ea, fa} = a;
    {sb, eb, fb} = b;
    sb = sb ^ sub;
    za = (ea == 11'd0);
    zb = (eb == 11'd0);
    ia = (ea == 11'h7FF) && (fa == '0);
    ib = (eb == 11'h7FF) && (fb == '0);
    na = (ea == 11'h7FF) && (fa != '0);
    nb = (eb == 11'h7FF) && (fb != '0);
    // order by magnitude: x is the larger
    if ({ea, fa} >= {eb, fb}) begin
      sx = sa; ex = ea; fx = fa; sy = sb; ey = eb; fy = fb;
    end else begin
      sx = sb; ex = eb; fx = fb; sy = sa; ey = ea; fy = fa;
    end
    d  = {1'b0, ex} - {1'b0, ey};
    mx = {1'b1, fx, 3'b000};
    my = {1'b1, fy, 3'b000};
    if (d >= 12'd56) begin
      my_sh     = '0;
      sh_sticky = 1'b1;
    end else begin
      my_sh     = my >> d;
      sh_sticky = (my & ((56'd1 << d) - 56'd1)) != '0;
    end
    my_sh[0] = my_sh[0] | sh_sticky;
    exp   = $signed({3'b000, ex});
    lz    = 7'd0;
    found = 1'b0;
    if (sx == sy) sum = {1'b0, mx} + {1'b0, my_sh};
    else          sum = {1'b0, mx} - {1'b0, my_sh};
    if (sum[56]) begin
      sum = {1'b0, sum[56:2], sum[1] | sum[0]};
      exp = exp + 14'sd1;
    end else begin
      for (int i = 55; i >= 0; i--) begin
        if (sum[i]) found = 1'b1;
        if (!found) lz = lz + 7'd1;
      end
      if (lz <= 7'd55) begin
        sum = sum << lz;
        exp = exp - $signed({7'd0, lz});
      end
    end
    mant   = sum[55:3];
    guard  = sum[2];
    sticky = sum[1] | sum[0];
    inc    = guard & (sticky | mant[0]);
    mant_r = {1'b0, mant} + {53'd0, inc};
    if (mant_r[53]) begin
      mant_r = mant_r >> 1;
      exp    = exp + 14'sd1;
    end
    if (na || nb || (ia && ib && (sa != sb)))
      y = 64'h7FF8_0000_0000_0000;
    else if (ia)
      y = {sa, 11'h7FF, 52'd0};
    else if (ib)
      y = {sb, 11'h7FF, 52'd0};
    else if (za && zb)
      y = {sa & sb, 63'd0};
    else if (za)
      y = {sb, eb, fb};
    else if (zb)
      y = {sa, ea, fa};
    else if (sum[55:0] == '0 || exp <= 14'sd0)
      y = {(sum[55:0] == '0) ? 1'b0 : sx, 63'd0};
    else if (exp >= 14'sd2047)
      y = {sx, 11'h7FF, 52'd0};
    else
      y = {sx, exp[10:0], mant_r[51:0]};
  end
endmodule
