// cmac: complex multiply-accumulate in IEEE-754 binary64, combinational.
//
// y = acc + a * b for complex a, b, acc. Four double-precision multipliers
// form ar*br, ai*bi, ar*bi and ai*br; two adders form the product
// (ar*br - ai*bi) + j(ar*bi + ai*br); two more add it to acc. Every operation
// rounds to nearest even, in exactly that order, so a software model that
// evaluates the same expressions in double precision matches bit for bit.
// This is the arithmetic unit of both emulation kernels. That the kernels
// compute complex products in 64-bit floating point follows the emulator's
// description; the operation order and the single-cycle structure are this
// design's choices.
module cmac
  import qemu_pkg::*;
(
  input  cplx_t a,
  input  cplx_t b,
  input  cplx_t acc,
  output cplx_t y
);

  fp64_t p_rr, p_ii, p_ri, p_ir;
  fp64_t t_re, t_im;
  fp64_t y_re, y_im;

  fp64_mul u_mul_rr (.a(a.re), .b(b.re), .y(p_rr));
  fp64_mul u_mul_ii (.a(a.im), .b(b.im), .y(p_ii));
  fp64_mul u_mul_ri (.a(a.re), .b(b.im), .y(p_ri));
  fp64_mul u_mul_ir (.a(a.im), .b(b.re), .y(p_ir));

  fp64_add u_add_tre (.a(p_rr), .b({~p_ii[63], p_ii[62:0]}), .y(t_re));
  fp64_add u_add_tim (.a(p_ri), .b(p_ir), .y(t_im));

  fp64_add u_add_yre (.a(acc.re), .b(t_re), .y(y_re));
  fp64_add u_add_yim (.a(acc.im), .b(t_im), .y(y_im));

  assign y = '{re: y_re, im: y_im};

endmodule
