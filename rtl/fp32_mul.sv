// Single-precision floating-point multiplier (combinational).
//
// Computes a*b for IEEE-754 binary32 operands with round-to-nearest-even.
// The 24x24-bit significand product is normalised by at most one place,
// rounded on its guard and sticky bits, and re-normalised if rounding
// carries out. Subnormal operands are read as zero and results below the
// normal range are flushed to a signed zero (the usual behaviour of FPGA
// floating-point cores); overflow gives a signed infinity. Any NaN operand,
// or infinity times zero, gives the quiet NaN 0x7FC00000.
// The accelerator's element type is float; the rounding and flush choices
// are this design's own. Purely combinational: the caller registers it.
module fp32_mul
  import mm_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);

  logic        sa, sb, sy;
  logic [7:0]  ea, eb;
  logic [22:0] fa, fb;
  logic        a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;
  logic [47:0] prod;
  logic [23:0] mant;
  logic        guard, sticky, inc;
  logic [24:0] mant_r;
  logic signed [10:0] exp_s;

  always_comb begin
    sa = a[31]; ea = a[30:23]; fa = a[22:0];
    sb = b[31]; eb = b[30:23]; fb = b[22:0];
    sy = sa ^ sb;
    a_zero = (ea == 8'd0);
    b_zero = (eb == 8'd0);
    a_inf  = (ea == 8'hFF) && (fa == 23'd0);
    b_inf  = (eb == 8'hFF) && (fb == 23'd0);
    a_nan  = (ea == 8'hFF) && (fa != 23'd0);
    b_nan  = (eb == 8'hFF) && (fb != 23'd0);

    prod   = {1'b1, fa} * {1'b1, fb};
    exp_s  = 11'(signed'({3'b000, ea})) + 11'(signed'({3'b000, eb})) - 11'sd127;
    if (prod[47]) begin
      mant   = prod[47:24];
      guard  = prod[23];
      sticky = |prod[22:0];
      exp_s  = exp_s + 11'sd1;
    end else begin
      mant   = prod[46:23];
      guard  = prod[22];
      sticky = |prod[21:0];
    end
    inc    = guard & (sticky | mant[0]);
    mant_r = {1'b0, mant} + 25'(inc);
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      exp_s  = exp_s + 11'sd1;
    end

    if (a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero))
      y = FP_QNAN;
    else if (a_inf || b_inf)
      y = {sy, 8'hFF, 23'd0};
    else if (a_zero || b_zero)
      y = {sy, 31'd0};
    else if (exp_s >= 11'sd255)
      y = {sy, 8'hFF, 23'd0};
    else if (exp_s <= 11'sd0)
      y = {sy, 31'd0};
    else
      y = {sy, exp_s[7:0], mant_r[22:0]};
  end

endmodule
