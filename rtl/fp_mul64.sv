// IEEE 754 double-precision multiplier, combinational.
// Normal operands and results are exact with round-to-nearest-even. Subnormal
// inputs are read as zero and results below the normal range flush to signed
// zero (this design's simplification; the document does not specify the FP
// units beyond naming them). Overflow gives infinity, invalid operations give
// the default quiet NaN 0x7FF8_0000_0000_0000.
module fp_mul64 (
  input  logic [63:0] a,
  input  logic [63:0] b,
  output logic [63:0] y
);
  logic        sa, sb, sy;
  logic [10:0] ea, eb;
  logic [51:0] fa, fb;
  logic        za, zb, ia, ib, na, nb;
  logic [105:0] prod;
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
    prod   = {1'b1, fa} * {1'b1, fb};
    exp    = $signed({3'b000, ea}) + $signed({3'b000, eb}) - 14'sd1023;
    if (prod[105]) begin
      mant   = prod[105:53];
      guard  = prod[52];
      sticky = |prod[51:0];
      exp    = exp + 14'sd1;
    end else begin
      mant   = prod[104:52];
      guard  = prod[51];
      sticky = |prod[50:0];
    end
    inc    = guard & (sticky | mant[0]);
    mant_r = {1'b0, mant} + {53'd0, inc};
    if (mant_r[53]) begin
      mant_r = mant_r >> 1;
      exp    = exp + 14'sd1;
    end
    if (na || nb || (ia && zb) || (ib && za))
      y = 64'h7FF8_0000_0000_0000;
    else if (ia || ib || exp >= 14'sd2047)
      y = {sy, 11'h7FF, 52'd0};
    else if (za || zb || exp <= 14'sd0)
      y = {sy, 63'd0};
    else
      y = {sy, exp[10:0], mant_r[51:0]};
  end
endmodule
