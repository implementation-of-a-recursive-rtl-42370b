// cfp_add: combinational complex floating-point adder, y = a + b, one fp_add
// per part. Subtraction is done by the caller negating b (qrd_pkg::cfp_neg).
// No clock.
module cfp_add
  import qrd_pkg::*;
(
  input  cfp_t a,
  input  cfp_t b,
  output cfp_t y
);

  fp_add u_re (.a(a.re), .b(b.re), .y(y.re));
  fp_add u_im (.a(a.im), .b(b.im), .y(y.im));

endmodule
