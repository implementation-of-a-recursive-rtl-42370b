// backsub_cell_tb: self-checking testbench for backsub_cell.
//
// Runs random back-substitution sequences on complex data: 0 to 7 LI steps
// (BS_MAC) with random U[i][k] and X[k][j], then one LD step (BS_DIV) with
// random Z[i][j] and a real U[i][i]. The accumulator after every LI step and
// x at the LD step are compared with the double-precision result; the
// accumulator must be zero after the LD step and hold while the cell is idle.
module backsub_cell_tb;
  import qrd_pkg::*;
  import fp_tb_pkg::*;

  logic   clk = 1'b0, rst_n = 1'b0;
  bs_op_e op;
  cfp_t   a, b, z, x, acc;
  fp_t    d;
  int     checks = 0, failures = 0;

  backsub_cell dut (.*);

  always #5 clk = ~clk;

  task automatic check_part(string what, fp_t got, real want, real scale);
    checks++;
    if (!close(fp2real(got), want, pow2(-12), (scale > 0.0) ? scale : 1.0)) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %g want %g", what, fp2real(got), want);
    end
  endtask

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real accr, acci, ar, ai, br, bi, sc, rd;
    int  nmac;
    op = BS_IDLE; a = CFP_ZERO; b = CFP_ZERO; z = CFP_ZERO; d = FP_ONE;
    @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 1000; n++) begin
      accr = 0.0; acci = 0.0; sc = 0.0;
      nmac = $urandom % 8;
      for (int q = 0; q < nmac; q++) begin
        op = BS_MAC;
        a  = real2cfp(rnd_real(2.0, 2), rnd_real(2.0, 2));
        b  = real2cfp(rnd_real(2.0, 2), rnd_real(2.0, 2));
        ar = fp2real(a.re); ai = fp2real(a.im); br = fp2real(b.re); bi = fp2real(b.im);
        accr = accr - (ar * br - ai * bi);
        acci = acci - (ar * bi + ai * br);
        if (cabs(ar, ai) * cabs(br, bi) > sc) sc = cabs(ar, ai) * cabs(br, bi);
        @(negedge clk);
        check_part("acc.re", acc.re, accr, 2.0 * sc);
        check_part("acc.im", acc.im, acci, 2.0 * sc);
      end
      op = BS_DIV;
      z  = real2cfp(rnd_real(2.0, 2), rnd_real(2.0, 2));
      d  = (n % 29 == 0) ? FP_ZERO : real2fp(absr(rnd_real(2.0, 2)) + pow2(-6));
      #1;
      rd = fp2real(d);
      if (cabs(fp2real(z.re), fp2real(z.im)) > sc) sc = cabs(fp2real(z.re), fp2real(z.im));
      check_part("x.re", x.re, (rd == 0.0) ? 0.0 : (fp2real(z.re) + accr) / rd, (rd == 0.0) ? 1.0 : 2.0 * sc / rd);
      check_part("x.im", x.im, (rd == 0.0) ? 0.0 : (fp2real(z.im) + acci) / rd, (rd == 0.0) ? 1.0 : 2.0 * sc / rd);
      @(negedge clk);
      op = BS_IDLE;
      a  = real2cfp(1.0, 1.0);
      b  = real2cfp(1.0, 0.0);
      @(negedge clk);
      checks++;
      if (!fp_is_zero(acc.re) || !fp_is_zero(acc.im)) begin
        failures++;
        $display("FAIL acc not cleared by the LD step / not held when idle");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
