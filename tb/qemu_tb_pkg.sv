// qemu_tb_pkg: reference models and stimulus helpers for the emulator testbenches.
//
// The reference arithmetic uses the simulator's own double-precision `real`
// type, which rounds to nearest even like the hardware, so the models below
// reproduce the hardware bit for bit as long as no value falls into the
// subnormal range (the stimulus keeps magnitudes well away from it). The
// complex multiply-accumulate model evaluates the same operations in the
// same order as the cmac unit.
package qemu_tb_pkg;
  import qemu_pkg::*;

  function automatic real r_of(fp64_t x);
    return $bitstoreal(x);
  endfunction

  function automatic fp64_t fp_of(real x);
    return $realtobits(x);
  endfunction

  function automatic fp64_t fadd_ref(fp64_t a, fp64_t b);
    return $realtobits($bitstoreal(a) + $bitstoreal(b));
  endfunction

  function automatic fp64_t fmul_ref(fp64_t a, fp64_t b);
    return $realtobits($bitstoreal(a) * $bitstoreal(b));
  endfunction

  // random normal number with unbiased exponent in [emin, emax]
  function automatic fp64_t rand_fp(int emin, int emax);
    logic [51:0] f;
    int e;
    f = {20'($urandom), $urandom};
    e = 1023 + emin + int'($urandom_range(0, emax - emin));
    return {1'($urandom), 11'(e), f};
  endfunction

  // random complex amplitude, magnitude below 1, some parts exactly zero
  function automatic cplx_t rand_amp();
    cplx_t c;
    c.re = ($urandom_range(0, 7) == 0) ? FP64_ZERO : rand_fp(-6, -1);
    c.im = ($urandom_range(0, 7) == 0) ? FP64_ZERO : rand_fp(-6, -1);
    return c;
  endfunction

  // acc + a*b in the cmac unit's operation order
  function automatic cplx_t cmac_ref(cplx_t a, cplx_t b, cplx_t acc);
    fp64_t p_rr, p_ii, p_ri, p_ir, t_re, t_im;
    cplx_t y;
    p_rr = fmul_ref(a.re, b.re);
    p_ii = fmul_ref(a.im, b.im);
    p_ri = fmul_ref(a.re, b.im);
    p_ir = fmul_ref(a.im, b.re);
    t_re = fadd_ref(p_rr, {~p_ii[63], p_ii[62:0]});
    t_im = fadd_ref(p_ri, p_ir);
    y.re = fadd_ref(acc.re, t_re);
    y.im = fadd_ref(acc.im, t_im);
    return y;
  endfunction

  function automatic real cdist(cplx_t a, cplx_t b);
    real dr, di;
    dr = r_of(a.re) - r_of(b.re);
    di = r_of(a.im) - r_of(b.im);
    return (dr < 0 ? -dr : dr) + (di < 0 ? -di : di);
  endfunction

  function automatic cplx_t cplx_of(real re, real im);
    cplx_t c;
    c.re = fp_of(re);
    c.im = fp_of(im);
    return c;
  endfunction

endpackage
