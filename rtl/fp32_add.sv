// Single-precision floating-point adder (combinational).
//
// Computes a+b for IEEE-754 binary32 operands with round-to-nearest-even.
// The operand of larger magnitude is kept in place; the other significand is
// shifted right to align, its shifted-out bits folded into a sticky bit. Sum
// or difference is taken on 27 bits (24 significand bits plus guard, round
// and sticky), normalised by a leading-zero count, rounded and re-normalised
// if rounding carries out. Exact cancellation gives +0; -0 + -0 gives -0.
// Subnormal operands are read as zero and results below the normal range are
// flushed to a signed zero; overflow gives a signed infinity. A NaN operand,
// or infinities of opposite sign, give the quiet NaN 0x7FC00000.
// The element type float is the accelerator's; the rounding and flush
// choices are this design's own. Purely combinational.
module fp32_add
  import mm_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);

  logic        sa, sb, s_big, s_small, sub;
  logic [7:0]  ea, eb, e_big, e_small;
  logic [22:0] fa, fb;
  logic        a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;
  logic [23:0] m_big, m_small;
  logic [7:0]  d;
  logic [26:0] big_x, small_x, shifted;
  logic        sh_sticky;
  logic [27:0] sum;
  logic [26:0] norm;
  logic [4:0]  lz;
  logic signed [10:0] exp_s;
  logic [23:0] mant;
  logic        guard, rs, inc;
  logic [24:0] mant_r;

  always_comb begin
    sa = a[31]; ea = a[30:23]; fa = a[22:0];
    sb = b[31]; eb = b[30:23]; fb = b[22:0];
    a_zero = (ea == 8'd0);
    b_zero = (eb == 8'd0);
    a_inf  = (ea == 8'hFF) && (fa == 23'd0);
    b_inf  = (eb == 8'hFF) && (fb == 23'd0);
    a_nan  = (ea == 8'hFF) && (fa != 23'd0);
    b_nan  = (eb == 8'hFF) && (fb != 23'd0);

    // order by magnitude
    if ({ea, fa} >= {eb, fb}) begin
      s_big = sa; e_big = ea; m_big = {1'b1, fa};
      s_small = sb; e_small = eb; m_small = {1'b1, fb};
    end else begin
      s_big = sb; e_big = eb; m_big = {1'b1, fb};
      s_small = sa; e_small = ea; m_small = {1'b1, fa};
    end
    sub = s_big ^ s_small;
    d   = e_big - e_small;

    // align the smaller operand, keeping a sticky bit
    big_x   = {m_big, 3'b000};
    small_x = {m_small, 3'b000};
    if (d >= 8'd27) begin
      shifted   = 27'd0;
      sh_sticky = 1'b1;
    end else begin
      shifted   = small_x >> d;
      sh_sticky = ((shifted << d) != small_x);
    end
    shifted[0] = shifted[0] | sh_sticky;

    sum   = sub ? ({1'b0, big_x} - {1'b0, shifted}) : ({1'b0, big_x} + {1'b0, shifted});
    exp_s = 11'(signed'({3'b000, e_big}));

    // normalise
    lz = 5'd0;
    if (sum[27]) begin
      norm  = {sum[27:2], sum[1] | sum[0]};
      exp_s = exp_s + 11'sd1;
    end else begin
      for (int i = 0; i <= 26; i++)
        if (sum[i]) lz = 5'(26 - i);
      norm  = sum[26:0] << lz;
      exp_s = exp_s - 11'(lz);
    end

    mant   = norm[26:3];
    guard  = norm[2];
    rs     = norm[1] | norm[0];
    inc    = guard & (rs | mant[0]);
    mant_r = {1'b0, mant} + 25'(inc);
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      exp_s  = exp_s + 11'sd1;
    end

    if (a_nan || b_nan || (a_inf && b_inf && (sa != sb)))
      y = FP_QNAN;
    else if (a_inf)
      y = {sa, 8'hFF, 23'd0};
    else if (b_inf)
      y = {sb, 8'hFF, 23'd0};
    else if (a_zero && b_zero)
      y = {sa & sb, 31'd0};
    else if (a_zero)
      y = b;
    else if (b_zero)
      y = a;
    else if (sum == 28'd0)
      y = FP_POS_ZERO;
    else if (exp_s >= 11'sd255)
      y = {s_big, 8'hFF, 23'd0};
    else if (exp_s <= 11'sd0)
      y = {s_big, 31'd0};
    else
      y = {s_big, exp_s[7:0], mant_r[22:0]};
  end

endmodule
