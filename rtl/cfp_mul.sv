// cfp_mul: combinational complex floating-point multiplier,
//   y = a * b = (a.re*b.re - a.im*b.im) + j(a.re*b.im + a.im*b.re),
// built from four fp_mul and two fp_add. Conjugation, where needed, is applied
// to an operand by the caller (qrd_pkg::cfp_conj). No clock.
module cfp_mul
  import qrd_pkg::*;
(
  input  cfp_t a,
  input  cfp_t b,
  output cfp_t y
);

  fp_t rr, ii, ri, ir;

  fp_mul u_rr (.a(a.re), .b(b.re), .y(rr));
  fp_mul u_ii (.a(a.im), .b(b.im), .y(ii));
  fp_mul u_ri (.a(a.re), .b(b.im), .y(ri));
  fp_mul u_ir (.a(a.im), .b(b.re), .y(ir));
  fp_add u_re (.a(rr), .b(fp_neg(ii)), .y(y.re));
  fp_add u_im (.a(ri), .b(ir),         .y(y.im));

endmodule
