// tb_fp64_add: self-checking test of the binary64 adder.
// Random operands with exponents close together and far apart, random signs,
// and near-cancelling pairs are compared bit for bit with the simulator's
// double add; directed cases cover exact cancellation, signed zeros,
// infinities, NaN, overflow and a tie that must round to even.
module tb_fp64_add;
  import qemu_pkg::*;
  import qemu_tb_pkg::*;

  fp64_t a, b, y;
  int checks = 0, failures = 0;

  fp64_add dut (.a, .b, .y);

  task automatic check(fp64_t exp_y, string what);
    #1;
    checks++;
    if (y !== exp_y) begin
      failures++;
      $display("FAIL %s: %h + %h = %h, expected %h", what, a, b, y, exp_y);
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
    for (int n = 0; n < 10000; n++) begin
      a = rand_fp(-10, 10);
      b = rand_fp(-10, 10);
      check(fadd_ref(a, b), "close exponents");
    end
    for (int n = 0; n < 5000; n++) begin
      a = rand_fp(-100, 100);
      b = rand_fp(-100, 100);
      check(fadd_ref(a, b), "far exponents");
    end
    for (int n = 0; n < 5000; n++) begin
      a = rand_fp(-5, 5);
      b = {~a[63], a[62:52], a[51:0] ^ 52'($urandom_range(0, 1 << $urandom_range(0, 30)))};
      if ($urandom_range(0, 1) == 1) b[62:52] = b[62:52] - 11'd1;
      check(fadd_ref(a, b), "near cancel");
    end
    a = fp_of(1.25);  b = fp_of(-1.25); check(FP64_ZERO, "x-x");
    a = 64'h8000_0000_0000_0000; b = 64'h8000_0000_0000_0000; check(64'h8000_0000_0000_0000, "-0+-0");
    a = 64'h8000_0000_0000_0000; b = FP64_ZERO; check(FP64_ZERO, "-0+0");
    a = fp_of(3.0);   b = FP64_ZERO;   check(fp_of(3.0), "3+0");
    a = FP64_ZERO;    b = fp_of(-3.0); check(fp_of(-3.0), "0+-3");
    a = 64'h7FF0_0000_0000_0000; b = 64'hFFF0_0000_0000_0000; check(FP64_QNAN, "inf-inf");
    a = 64'hFFF0_0000_0000_0000; b = fp_of(5.0); check(64'hFFF0_0000_0000_0000, "-inf+5");
    a = 64'h7FEF_FFFF_FFFF_FFFF; b = 64'h7FEF_FFFF_FFFF_FFFF; check(64'h7FF0_0000_0000_0000, "overflow");
    // 1 + 2^-53 is a tie and rounds to 1 (even); 1+2^-52 + 2^-53 rounds up
    a = FP64_ONE; b = 64'h3CA0_0000_0000_0000; check(FP64_ONE, "tie even");
    a = 64'h3FF0_0000_0000_0001; b = 64'h3CA0_0000_0000_0000; check(64'h3FF0_0000_0000_0002, "tie up");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
