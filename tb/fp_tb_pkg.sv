// fp_tb_pkg: helpers for the testbenches of the QRD-RLS inversion core.
//
// Converts between the 25-bit floating-point word of qrd_pkg (and its complex
// pair) and SystemVerilog real, so that every testbench can compute its expected values in double
// precision, independently of the arithmetic under test, and compare with a
// relative tolerance.
package fp_tb_pkg;
  import qrd_pkg::*;

  function automatic real pow2(int e);
    real r;
    r = 1.0;
    if (e >= 0) for (int i = 0; i < e; i++) r = r * 2.0;
    else        for (int i = 0; i < -e; i++) r = r / 2.0;
    return r;
  endfunction

  function automatic real fp2real(fp_t a);
    real m;
    if (a.exp == 0) return 0.0;
    m = 1.0 + real'(a.man) / 65536.0;
    m = m * pow2(int'(a.exp) - 127);
    return a.sign ? -m : m;
  endfunction

  function automatic fp_t real2fp(real x);
    fp_t r;
    real m;
    int  e;
    int  frac;
    if (x == 0.0) return FP_ZERO;
    r.sign = (x < 0.0);
    m = (x < 0.0) ? -x : x;
    e = 0;
    while (m >= 2.0) begin m = m / 2.0; e++; end
    while (m < 1.0)  begin m = m * 2.0; e--; end
    frac = int'((m - 1.0) * 65536.0);  // rounds to nearest
    if (frac >= 65536) begin frac = 0; e++; end
    r.exp = 8'(e + 127);
    r.man = 16'(frac);
    return r;
  endfunction

  function automatic real absr(real x);
    return (x < 0.0) ? -x : x;
  endfunction

  // Random real in [-mag, mag] with a random scale of 2^[-scl, scl].
  function automatic real rnd_real(real mag, int scl);
    real x;
    int  s;
    x = (real'($urandom % 200001) - 100000.0) / 100000.0 * mag;
    s = (scl == 0) ? 0 : (int'($urandom % (2 * scl + 1)) - scl);
    return x * pow2(s);
  endfunction

  function automatic cfp_t real2cfp(real re, real im);
    return '{re: real2fp(re), im: real2fp(im)};
  endfunction

  // Magnitude of a complex value given as two reals.
  function automatic real cabs(real re, real im);
    return $sqrt(re * re + im * im);
  endfunction

  // True when got is within rel of want, measured against scale.
  function automatic bit close(real got, real want, real rel, real scale);
    return absr(got - want) <= rel * scale;
  endfunction

endpackage
