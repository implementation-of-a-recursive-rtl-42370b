// fp_add_tb: self-checking testbench for fp_add.
//
// Drives random operands over a wide exponent range plus the special cases
// (zero operands, exact cancellation) and
// compares each result with the double-precision value of the operation on the
// same operands, to within one unit in the last place of the 16-bit
// mantissa.
module fp_add_tb;
  import qrd_pkg::*;
  import fp_tb_pkg::*;

  fp_t a, b, y;
  int  checks = 0, failures = 0;

  fp_add dut (.a(a), .b(b), .y(y));

  task automatic check(fp_t ta, fp_t tb_, real want, real scale);
    real got;
    a = ta;
    b = tb_;
    #1;
    got = fp2real(y);
    checks++;
    if (!close(got, want, pow2(-16), scale)) begin
      failures++;
      if (failures < 10)
        $display("FAIL %g + %g: got %g want %g", fp2real(ta), fp2real(tb_), got, want);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fp_t ra, rb;
    real x, w;
    for (int n = 0; n < 5000; n++) begin
      ra = real2fp(rnd_real(1.0, 20));
      rb = real2fp(rnd_real(1.0, 20));
      if (n % 7 == 0) rb = real2fp(fp2real(ra) * (1.0 + rnd_real(0.001, 0)));
      if (n % 11 == 0) rb = ra;
      if (n % 13 == 0) rb = fp_neg(ra);
      x = fp2real(ra) + fp2real(rb);
      // Alignment and rounding are relative to the larger operand.
      w = (absr(fp2real(ra)) > absr(fp2real(rb))) ? absr(fp2real(ra)) : absr(fp2real(rb));
      check(ra, rb, x, w);
    end
    check(FP_ZERO, real2fp(3.25), 3.25, 3.25);
    check(real2fp(-7.5), FP_ZERO, -7.5, 7.5);
    check(real2fp(1.0), real2fp(-1.0), 0.0, 1.0);
    check(real2fp(1.0), real2fp(pow2(-20)), 1.0, 1.0);
    check(real2fp(1.5), real2fp(1.5), 3.0, 3.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
