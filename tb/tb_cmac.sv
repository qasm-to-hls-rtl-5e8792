// tb_cmac: self-checking test of the complex binary64 multiply-accumulate.
// Random complex operands and accumulators are compared bit for bit with a
// model that performs the same double-precision operations in the same order;
// a few exact cases check the sign conventions of the complex product.
module tb_cmac;
  import qemu_pkg::*;
  import qemu_tb_pkg::*;

  cplx_t a, b, acc, y;
  int checks = 0, failures = 0;

  cmac dut (.a, .b, .acc, .y);

  task automatic check(cplx_t exp_y, string what);
    #1;
    checks++;
    if (y !== exp_y) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, y, exp_y);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20000; n++) begin
      a = rand_amp();
      b = rand_amp();
      acc = ($urandom_range(0, 3) == 0) ? CPLX_ZERO : rand_amp();
      check(cmac_ref(a, b, acc), "random");
    end
    // (1+2j)(3-1j) = 5+5j ; plus acc (0.5-0.25j)
    a = cplx_of(1.0, 2.0); b = cplx_of(3.0, -1.0); acc = cplx_of(0.5, -0.25);
    check(cplx_of(5.5, 4.75), "exact product");
    // j*j = -1
    a = cplx_of(0.0, 1.0); b = cplx_of(0.0, 1.0); acc = CPLX_ZERO;
    check(cplx_of(-1.0, 0.0), "j*j");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
