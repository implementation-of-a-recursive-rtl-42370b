// boundary_cell_tb: self-checking testbench for boundary_cell.
//
// Applies random (u, v, w), with complex v, including u = 0 (empty array row)
// and v = 0, checks the combinational u_new = u + w*|v|^2, then clocks with
// en high and checks the registered c = v/u, s = w*conj(v) and
// w_out = w*u/u_new against double-precision values, and finally checks that
// the registers hold while en is low.
module boundary_cell_tb;
  import qrd_pkg::*;
  import fp_tb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  fp_t  u, w, u_new, w_out;
  cfp_t v, c, s;
  int   checks = 0, failures = 0;

  boundary_cell dut (.*);

  always #5 clk = ~clk;

  task automatic expect_close(string what, real got, real want, real scale);
    checks++;
    if (!close(got, want, pow2(-13), (scale > 0.0) ? scale : 1.0)) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %g want %g", what, got, want);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ru, vr, vi, rw, run, cs;
    fp_t hw;
    cfp_t hc, hs;
    u = FP_ZERO; v = CFP_ZERO; w = FP_ONE;
    @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      u = (n % 5 == 0) ? FP_ZERO : real2fp(absr(rnd_real(4.0, 4)) + pow2(-10));
      v = (n % 17 == 0) ? CFP_ZERO : real2cfp(rnd_real(2.0, 3), (n % 4 == 1) ? 0.0 : rnd_real(2.0, 3));
      w = (n % 3 == 0) ? FP_ONE : real2fp(absr(rnd_real(1.0, 0)) + pow2(-8));
      ru = fp2real(u); vr = fp2real(v.re); vi = fp2real(v.im); rw = fp2real(w);
      run = ru + rw * (vr * vr + vi * vi);
      en = 1'b1;
      #1;
      expect_close("u_new", fp2real(u_new), run, run);
      @(negedge clk);
      en = 1'b0;
      cs = (ru == 0.0) ? 1.0 : cabs(vr, vi) / ru;
      expect_close("c.re", fp2real(c.re), (ru == 0.0) ? 0.0 : vr / ru, cs);
      expect_close("c.im", fp2real(c.im), (ru == 0.0) ? 0.0 : vi / ru, cs);
      expect_close("s.re", fp2real(s.re), rw * vr, rw * cabs(vr, vi));
      expect_close("s.im", fp2real(s.im), -rw * vi, rw * cabs(vr, vi));
      expect_close("w_out", fp2real(w_out), (run == 0.0) ? 0.0 : rw * ru / run,
                   (run == 0.0) ? 1.0 : rw * ru / run);
      // registers hold while en is low
      hc = c; hs = s; hw = w_out;
      u = real2fp(3.0); v = real2cfp(1.0, -1.0);
      @(negedge clk);
      checks++;
      if (c != hc || s != hs || w_out != hw) begin
        failures++;
        $display("FAIL registers changed with en low");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
