// internal_cell_tb: self-checking testbench for internal_cell.
//
// Loads random complex rotation parameters (c, s) with p_load, then changes
// the c_in/s_in inputs without p_load (the cell must keep the loaded set),
// applies random complex (u, v), including zero operands and purely real
// ones, and checks u_new = u + s*v and v_new = v - c*u against
// double-precision complex arithmetic, with a tolerance of a few units in
// the last place of the largest term.
module internal_cell_tb;
  import qrd_pkg::*;
  import fp_tb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, p_load = 1'b0;
  cfp_t c_in, s_in, u, v, c, s, u_new, v_new;
  int   checks = 0, failures = 0;

  internal_cell dut (.*);

  always #5 clk = ~clk;

  function automatic cfp_t rnd_c(int n, int zmod);
    if (n % zmod == 0) return CFP_ZERO;
    return real2cfp(rnd_real(4.0, 3), (n % (zmod + 2) == 1) ? 0.0 : rnd_real(4.0, 3));
  endfunction

  task automatic check_part(string what, fp_t got, real want, real scale);
    checks++;
    if (!close(fp2real(got), want, pow2(-13), (scale > 0.0) ? scale : 1.0)) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %g want %g", what, fp2real(got), want);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ur, ui, vr, vi, cr, ci, sr, si, sc;
    c_in = CFP_ZERO; s_in = CFP_ZERO; u = CFP_ZERO; v = CFP_ZERO;
    @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 5000; n++) begin
      // load a parameter set every few elements
      if (n % 4 == 0) begin
        c = rnd_c(n, 13); s = rnd_c(n, 19);
        c_in = c; s_in = s; p_load = 1'b1;
        @(negedge clk);
        p_load = 1'b0;
        c_in = rnd_c(n + 1, 5); s_in = rnd_c(n + 2, 5);
      end
      u = rnd_c(n, 7); v = rnd_c(n, 11);
      @(negedge clk);
      ur = fp2real(u.re); ui = fp2real(u.im); vr = fp2real(v.re); vi = fp2real(v.im);
      cr = fp2real(c.re); ci = fp2real(c.im); sr = fp2real(s.re); si = fp2real(s.im);
      sc = cabs(ur, ui) + cabs(sr, si) * cabs(vr, vi);
      check_part("u_new.re", u_new.re, ur + sr * vr - si * vi, sc);
      check_part("u_new.im", u_new.im, ui + sr * vi + si * vr, sc);
      sc = cabs(vr, vi) + cabs(cr, ci) * cabs(ur, ui);
      check_part("v_new.re", v_new.re, vr - (cr * ur - ci * ui), sc);
      check_part("v_new.im", v_new.im, vi - (cr * ui + ci * ur), sc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
