// fp_add: combinational floating-point adder for the 25-bit word of qrd_pkg.
//
// The operand of larger magnitude is taken as the reference; the other
// mantissa is aligned to it by a right shift, keeping three extra low bits.
// Equal signs add (with at most one place of renormalisation), different
// signs subtract (followed by a leading-zero normalisation). The result is
// rounded to nearest on the first dropped bit. A zero operand passes the
// other through; an exact cancellation gives zero. Subtraction is done by
// flipping the sign of b outside this block. The design's source only names
// the adder and takes it from a vendor library; this one is the design's
// own. No clock.
module fp_add
  import qrd_pkg::*;
(
  input  fp_t a,
  input  fp_t b,
  output fp_t y
);

  localparam int unsigned XW = MAN_W + 4;  // hidden one, mantissa, 3 low bits

  fp_t                bgr, sml;
  logic [EXP_W-1:0]   d;
  logic [XW-1:0]      mb, ms;
  logic [XW:0]        sum;
  logic [XW-1:0]      norm;
  logic signed [11:0] e;
  int unsigned        lz;

  always_comb begin
    if ({a.exp, a.man} >= {b.exp, b.man}) begin
      bgr   = a;
      sml = b;
    end else begin
      bgr   = b;
      sml = a;
    end
    d    = bgr.exp - sml.exp;
    mb   = {1'b1, bgr.man, 3'b0};
    ms   = (d >= EXP_W'(XW)) ? '0 : ({1'b1, sml.man, 3'b0} >> d);
    e    = $signed({4'b0, bgr.exp});
    norm = '0;
    lz   = 0;
    sum  = '0;
    if (fp_is_zero(sml)) begin
      y = bgr;
    end else if (bgr.sign == sml.sign) begin
      sum = {1'b0, mb} + {1'b0, ms};
      if (sum[XW]) begin
        y = fp_round_pack(bgr.sign, e + 12'sd1, sum[XW:4], sum[3]);
      end else begin
        y = fp_round_pack(bgr.sign, e, sum[XW-1:3], sum[2]);
      end
    end else begin
      sum = {1'b0, mb - ms};
      if (sum == '0) begin
        y = FP_ZERO;
      end else begin
        for (int i = XW - 1; i >= 0; i--) begin
          if (sum[i] && lz == 0) lz = XW - i;  // first set bit from the top
        end
        norm = sum[XW-1:0] << (lz - 1);
        y    = fp_round_pack(bgr.sign, e - 12'(lz - 1), norm[XW-1:3], norm[2]);
      end
    end
  end

endmodule
