// qrd_pkg: types and constants shared by the QRD-RLS matrix inversion core.
//
// Matrix elements are complex: cfp_t holds a real and an imaginary part, each
// a floating-point word fp_t.
// Numbers are held in a 25-bit floating-point word: one sign bit, an 8-bit
// exponent (bias 127) and a 16-bit mantissa with a hidden leading one. This
// follows the word the design is built around (two bytes of mantissa, one
// byte of exponent, one sign bit). The rest of the format is this design's
// own choice: an exponent field of 0 means zero (no subnormals), there are
// no infinities or NaNs, results that overflow saturate to the largest
// magnitude and results that underflow flush to zero.
package qrd_pkg;

  localparam int unsigned EXP_W = 8;
  localparam int unsigned MAN_W = 16;
  localparam int unsigned BIAS  = 127;

  typedef struct packed {
    logic             sign;
    logic [EXP_W-1:0] exp;
    logic [MAN_W-1:0] man;
  } fp_t;

  localparam fp_t FP_ZERO = '{sign: 1'b0, exp: '0, man: '0};
  localparam fp_t FP_ONE  = '{sign: 1'b0, exp: EXP_W'(BIAS), man: '0};
  localparam fp_t FP_MAX  = '{sign: 1'b0, exp: '1, man: '1};

  function automatic logic fp_is_zero(fp_t a);
    return a.exp == '0;
  endfunction

  function automatic fp_t fp_neg(fp_t a);
    fp_t r;
    r      = a;
    r.sign = ~a.sign;
    return r;
  endfunction

  // Pack sign, unbiased-plus-bias exponent (may be out of range) and a
  // 17-bit normalised mantissa (bit 16 set) into fp_t with saturation and
  // flush to zero.
  function automatic fp_t fp_pack(logic sign, logic signed [11:0] e, logic [MAN_W:0] m);
    fp_t r;
    if (e <= 0) begin
      r = FP_ZERO;
    end else if (e > 12'sd255) begin
      r      = FP_MAX;
      r.sign = sign;
    end else begin
      r.sign = sign;
      r.exp  = e[EXP_W-1:0];
      r.man  = m[MAN_W-1:0];
    end
    return r;
  endfunction

  // Round a 17-bit mantissa with one guard bit to nearest (ties away from
  // zero); a carry out renormalises and bumps the exponent.
  function automatic fp_t fp_round_pack(logic sign, logic signed [11:0] e,
                                        logic [MAN_W:0] m, logic guard);
    logic [MAN_W+1:0] mr;
    mr = {1'b0, m} + (MAN_W+2)'(guard);
    if (mr[MAN_W+1]) return fp_pack(sign, e + 12'sd1, mr[MAN_W+1:1]);
    return fp_pack(sign, e, mr[MAN_W:0]);
  endfunction

  // Complex number: real and imaginary part.
  typedef struct packed {
    fp_t re;
    fp_t im;
  } cfp_t;

  localparam cfp_t CFP_ZERO = '{re: FP_ZERO, im: FP_ZERO};
  localparam cfp_t CFP_ONE  = '{re: FP_ONE,  im: FP_ZERO};

  function automatic cfp_t cfp_neg(cfp_t a);
    return '{re: fp_neg(a.re), im: fp_neg(a.im)};
  endfunction

  function automatic cfp_t cfp_conj(cfp_t a);
    return '{re: a.re, im: fp_neg(a.im)};
  endfunction

  function automatic cfp_t cfp_real(fp_t a);
    return '{re: a, im: FP_ZERO};
  endfunction

  // Operations of the folded back-substitution cell.
  typedef enum logic [1:0] {
    BS_IDLE = 2'd0,
    BS_MAC  = 2'd1,  // LI step: acc <- acc_in - a*b
    BS_DIV  = 2'd2   // LD step: x   <- (z + acc_in) / d
  } bs_op_e;

endpackage
