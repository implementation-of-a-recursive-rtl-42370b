// fp_div: combinational floating-point divider for the 25-bit word of
// qrd_pkg.
//
// The dividend mantissa, shifted left by 18 places, is divided by the
// divisor mantissa; the quotient lies in [2^17, 2^19) and is normalised by
// at most one place and rounded to nearest on the first dropped bit. The
// design's equations (19) and (20) divide, but no divider is specified;
// this one is the design's own. A zero dividend or a zero divisor gives
// zero (callers test for a zero divisor themselves). No clock.
module fp_div
  import qrd_pkg::*;
(
  input  fp_t a,
  input  fp_t b,
  output fp_t y
);

  localparam int unsigned QW = 2 * MAN_W + 3;  // dividend width

  logic [QW-1:0]      num;
  logic [QW-1:0]      q;
  logic signed [11:0] e;
  logic               s;

  always_comb begin
    s   = a.sign ^ b.sign;
    num = {1'b1, a.man, 18'b0};
    q   = num / QW'({1'b1, b.man});
    e   = $signed({4'b0, a.exp}) - $signed({4'b0, b.exp}) + 12'sd127;
    if (fp_is_zero(a) || fp_is_zero(b)) begin
      y = FP_ZERO;
    end else if (q[18]) begin
      y = fp_round_pack(s, e, q[18:2], q[1]);
    end else begin
      y = fp_round_pack(s, e - 12'sd1, q[17:1], q[0]);
    end
  end

endmodule
