// fp64_add: IEEE-754 binary64 adder, purely combinational.
//
// y = a + b, rounded to nearest, ties to even. The operand of larger
// magnitude is taken as the base; the other significand is shifted right to
// align it, keeping guard, round and sticky bits. After the add or subtract
// the sum is normalised (one place right on a carry, or left by the count of
// leading zeros after cancellation) and rounded. Subnormal inputs read as
// zero and results below the normal range flush to zero; an exact
// cancellation (no leading one left after normalising) gives +0. Overflow
// gives infinity, NaN inputs and inf-inf give the quiet NaN. Subtraction is
// done by flipping the sign bit of b at the caller. The emulator only states
// 64-bit floating-point arithmetic; the rounding mode, the flush-to-zero
// handling and the single-cycle structure are this design's choices.
module fp64_add
  import qemu_pkg::*;
(
  input  fp64_t a,
  input  fp64_t b,
  output fp64_t y
);

  // Count of leading zeros of a 56-bit vector.
  function automatic logic [5:0] lzc56(input logic [55:0] v);
    logic [5:0] n;
    logic       found;
    n = 6'd56;
    found = 1'b0;
    for (int i = 55; i >= 0; i--) begin
      if (!found && v[i]) begin
        n = 6'(55 - i);
        found = 1'b1;
      end
    end
    return n;
  endfunction

  logic        sa, sb;
  logic [10:0] ea, eb;
  logic [51:0] fa, fb;
  logic        a_nan, b_nan, a_inf, b_inf, a_zero, b_zero;

  logic        swap;
  logic        sx, sz;          // signs of the larger (x) and smaller (z) operand
  logic [10:0] ex, ez;
  logic [51:0] fx, fz;
  logic [10:0] diff;
  logic [5:0]  shamt;
  logic [55:0] mx, mz;          // {hidden, fraction, guard, round, sticky}
  logic [111:0] zsh;
  logic [55:0] mz_al;
  logic [56:0] sum;
  logic [55:0] norm;
  logic [5:0]  lz;
  logic signed [13:0] exp_n, exp_r;
  logic        inc;
  logic [52:0] frac_r;

  always_comb begin
    sa = a[63]; ea = a[62:52]; fa = a[51:0];
    sb = b[63]; eb = b[62:52]; fb = b[51:0];
    a_nan  = (ea == 11'h7FF) && (fa != '0);
    b_nan  = (eb == 11'h7FF) && (fb != '0);
    a_inf  = (ea == 11'h7FF) && (fa == '0);
    b_inf  = (eb == 11'h7FF) && (fb == '0);
    a_zero = (ea == 11'h000);
    b_zero = (eb == 11'h000);

    swap = {eb, fb} > {ea, fa};
    sx = swap ? sb : sa;  ex = swap ? eb : ea;  fx = swap ? fb : fa;
    sz = swap ? sa : sb;  ez = swap ? ea : eb;  fz = swap ? fa : fb;

    diff  = ex - ez;
    shamt = (diff > 11'd63) ? 6'd63 : diff[5:0];
    mx    = {1'b1, fx, 3'b000};
    mz    = {1'b1, fz, 3'b000};
    zsh   = {mz, 56'd0} >> shamt;
    mz_al = {zsh[111:57], zsh[56] | (|zsh[55:0])};

    if (sx == sz) sum = {1'b0, mx} + {1'b0, mz_al};
    else          sum = {1'b0, mx} - {1'b0, mz_al};

    lz    = 6'd0;
    exp_n = 14'(ex);
    if (sum[56]) begin
      norm  = {sum[56:2], sum[1] | sum[0]};
      exp_n = exp_n + 14'sd1;
    end else begin
      lz    = lzc56(sum[55:0]);
      norm  = sum[55:0] << lz;
      exp_n = exp_n - 14'(lz);
    end

    inc    = norm[2] & (norm[1] | norm[0] | norm[3]);
    frac_r = {1'b0, norm[54:3]} + 53'(inc);
    exp_r  = frac_r[52] ? exp_n + 14'sd1 : exp_n;

    if (a_nan || b_nan || (a_inf && b_inf && (sa != sb)))
      y = FP64_QNAN;
    else if (a_inf)
      y = {sa, 11'h7FF, 52'd0};
    else if (b_inf)
      y = {sb, 11'h7FF, 52'd0};
    else if (a_zero && b_zero)
      y = {sa & sb, 63'd0};
    else if (b_zero)
      y = a;
    else if (a_zero)
      y = b;
    else if (!norm[55])
      y = 64'd0;
    else if (exp_r >= 14'sd2047)
      y = {sx, 11'h7FF, 52'd0};
    else if (exp_r <= 14'sd0)
      y = {sx, 63'd0};
    else
      y = {sx, exp_r[10:0], frac_r[51:0]};
  end

endmodule
