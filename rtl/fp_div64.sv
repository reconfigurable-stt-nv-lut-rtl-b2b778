// IEEE 754 double-precision divider, combinational.
// The 53-bit significands are divided as integers with the dividend scaled by
// 2^55, giving at least 55 quotient bits; the remainder forms the sticky bit,
// so normal results are exact with round-to-nearest-even. Subnormals flush to
// zero as in fp_mul64. x/0 gives a signed infinity, 0/0 and inf/inf the
// default quiet NaN. These are this design's choices.
module fp_div64 (
  input  logic [63:0] a,
  input  logic [63:0] b,
  output logic [63:0] y
);
  logic        sa, sb, sy;
  logic [10:0] ea, eb;
  logic [51:0] fa, fb;
  logic        za, zb, ia, ib, na, nb;
  logic [107:0] num, quo, rem;
  logic [52:0]  mant;
  logic         guard, sticky, inc;
  logic [53:0]  mant_r;
  logic signed [13:0] exp;

  always_comb begin
    {sa, ea, fa} = a;
    {sb, eb, fb} = b;
    sy = sa ^ sb;
    za = (ea == 11'd0);
    zb = (eb == 11'd0);
    ia = (ea == 11'h7FF) && (fa == '0);
    ib = (eb == 11'h7FF) && (fb == '0);
    na = (ea == 11'h7FF) && (fa != '0);
    nb = (eb == 11'h7FF) && (fb != '0);
    num = {54'd0, 1'b1, fa, 1'b0} << 54;        // {1,fa} * 2^55
    quo = num / {55'd0, 1'b1, fb};
    rem = num % {55'd0, 1'b1, fb};
    exp = $signed({3'b000, ea}) - $signed({3'b000, eb}) + 14'sd1023;
    if (quo[55]) begin
      mant   = quo[55:3];
      guard  = quo[2];
      sticky = (|quo[1:0]) | (rem != '0);
    end else begin
      mant   = quo[54:2];
      guard  = quo[1];
      sticky = quo[0] | (rem != '0);
      exp    = exp - 14'sd1;
    end
    inc    = guard & (sticky | mant[0]);
    mant_r = {1'b0, mant} + {53'd0, inc};
    if (mant_r[53]) begin
      mant_r = mant_r >> 1;
      exp    = exp + 14'sd1;
    end
    if (na || nb || (za && zb) || (ia && ib))
      y = 64'h7FF8_0000_0000_0000;
    else if (ia || zb || exp >= 14'sd2047)
      y = {sy, 11'h7FF, 52'd0};
    else if (za || ib || exp <= 14'sd0)
      y = {sy, 63'd0};
    else
      y = {sy, exp[10:0], mant_r[51:0]};
  end
endmodule
