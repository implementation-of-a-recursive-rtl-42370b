// fp_mul: combinational floating-point multiplier for the 25-bit word of
// qrd_pkg (sign, 8-bit exponent, 16-bit mantissa).
//
// The two 17-bit mantissas (hidden one restored) are multiplied into a
// 34-bit product, which is normalised by at most one place and rounded to
// nearest on the first dropped bit. A zero operand gives zero; overflow
// saturates and underflow flushes to zero (see qrd_pkg). The operators are
// only named by the design's source, which takes them from a vendor library;
// this one is the design's own. No clock: the result follows the inputs in
// the same cycle.
module fp_mul
  import qrd_pkg::*;
(
  input  fp_t a,
  input  fp_t b,
  output fp_t y
);

  logic [2*MAN_W+1:0] prod;
  logic signed [11:0] e;
  logic               s;

  always_comb begin
    s    = a.sign ^ b.sign;
    prod = {1'b1, a.man} * {1'b1, b.man};
    e    = $signed({4'b0, a.exp}) + $signed({4'b0, b.exp}) - 12'sd127;
    if (fp_is_zero(a) || fp_is_zero(b)) begin
      y = FP_ZERO;
    end else if (prod[2*MAN_W+1]) begin
      y = fp_round_pack(s, e + 12'sd1, prod[2*MAN_W+1:MAN_W+1], prod[MAN_W]);
    end else begin
      y = fp_round_pack(s, e, prod[2*MAN_W:MAN_W], prod[MAN_W-1]);
    end
  end

endmodule
