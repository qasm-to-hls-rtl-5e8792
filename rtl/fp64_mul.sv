// fp64_mul: IEEE-754 binary64 multiplier, purely combinational.
//
// y = a * b, rounded to nearest, ties to even. The 53x53-bit significand
// product is normalised by at most one place, then rounded with a guard bit
// and a sticky bit. Subnormal inputs are read as zero and results below the
// normal range are flushed to a signed zero, as FPGA floating-point cores
// commonly do; results above it become infinity. NaN inputs and inf*0 give
// the quiet NaN 0x7FF8_0000_0000_0000. The emulator only states that it
// computes in 64-bit floating point; the rounding mode, the flush-to-zero
// handling and the single-cycle (unpipelined) structure are this design's
// choices.
module fp64_mul
  import qemu_pkg::*;
(
  input  fp64_t a,
  input  fp64_t b,
  output fp64_t y
);

  logic        sa, sb, sy;
  logic [10:0] ea, eb;
  logic [51:0] fa, fb;
  logic        a_nan, b_nan, a_inf, b_inf, a_zero, b_zero;

  logic [105:0] prod;
  logic signed [13:0] exp_pre, exp_rnd;
  logic [51:0] frac_pre;
  logic        guard, sticky, inc;
  logic [52:0] frac_rnd;

  always_comb begin
    sa = a[63]; ea = a[62:52]; fa = a[51:0];
    sb = b[63]; eb = b[62:52]; fb = b[51:0];
    sy = sa ^ sb;

    a_nan  = (ea == 11'h7FF) && (fa != '0);
    b_nan  = (eb == 11'h7FF) && (fb != '0);
    a_inf  = (ea == 11'h7FF) && (fa == '0);
    b_inf  = (eb == 11'h7FF) && (fb == '0);
    a_zero = (ea == 11'h000);
    b_zero = (eb == 11'h000);

    prod    = {1'b1, fa} * {1'b1, fb};
    exp_pre = 14'(ea) + 14'(eb) - 14'sd1023;

    if (prod[105]) begin
      frac_pre = prod[104:53];
      guard    = prod[52];
      sticky   = |prod[51:0];
      exp_pre  = exp_pre + 14'sd1;
    end else begin
      frac_pre = prod[103:52];
      guard    = prod[51];
      sticky   = |prod[50:0];
    end

    inc      = guard & (sticky | frac_pre[0]);
    frac_rnd = {1'b0, frac_pre} + 53'(inc);
    exp_rnd  = frac_rnd[52] ? exp_pre + 14'sd1 : exp_pre;

    if (a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero))
      y = FP64_QNAN;
    else if (a_inf || b_inf)
      y = {sy, 11'h7FF, 52'd0};
    else if (a_zero || b_zero)
      y = {sy, 63'd0};
    else if (exp_rnd >= 14'sd2047)
      y = {sy, 11'h7FF, 52'd0};
    else if (exp_rnd <= 14'sd0)
      y = {sy, 63'd0};
    else
      y = {sy, exp_rnd[10:0], frac_rnd[51:0]};
  end

endmodule
