// tb_fp64_mul: self-checking test of the binary64 multiplier.
// Random normal operands over a wide exponent range are compared bit for bit
// with the simulator's double multiply; directed cases cover zeros, signs,
// infinities, NaN, overflow to infinity, underflow to zero and rounding carry.
module tb_fp64_mul;
  import qemu_pkg::*;
  import qemu_tb_pkg::*;

  fp64_t a, b, y;
  int checks = 0, failures = 0;

  fp64_mul dut (.a, .b, .y);

  task automatic check(fp64_t exp_y, string what);
    #1;
    checks++;
    if (y !== exp_y) begin
      failures++;
      $display("FAIL %s: %h * %h = %h, expected %h", what, a, b, y, exp_y);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20000; n++) begin
      a = rand_fp(-300, 300);
      b = rand_fp(-300, 300);
      check(fmul_ref(a, b), "random");
    end
    // operands whose significands are close to 2: product needs a carry
    for (int n = 0; n < 2000; n++) begin
      a = {1'($urandom), 11'(1023 + $urandom_range(0, 20)), 12'hFFF, 40'($urandom)};
      b = {1'($urandom), 11'(1023 - $urandom_range(0, 20)), 12'hFFF, 40'($urandom)};
      check(fmul_ref(a, b), "near-two");
    end
    a = fp_of(1.5);  b = fp_of(-2.0);  check(fp_of(-3.0), "1.5*-2");
    a = fp_of(0.0);  b = fp_of(-7.0);  check(64'h8000_0000_0000_0000, "0*-7");
    a = 64'h7FF0_0000_0000_0000; b = fp_of(-2.0); check(64'hFFF0_0000_0000_0000, "inf*-2");
    a = 64'h7FF0_0000_0000_0000; b = FP64_ZERO;    check(FP64_QNAN, "inf*0");
    a = 64'h7FF8_0000_0000_0001; b = fp_of(1.0);   check(FP64_QNAN, "nan*1");
    a = fp_of(1.0e200); b = fp_of(1.0e200);        check(64'h7FF0_0000_0000_0000, "overflow");
    a = fp_of(1.0e-200); b = fp_of(-1.0e-200);     check(64'h8000_0000_0000_0000, "underflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
