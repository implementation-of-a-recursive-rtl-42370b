// boundary_cell: the diagonal (boundary) node of the squared Givens rotation
// (SGR) triangular array, used once per array row and per input row in the
// folded core.
//
// The stored diagonal value u and the row weight w are real; the incoming
// element v is complex. The cell computes
//   u_new = u + w*conj(v)*v = u + w*|v|^2     (eq. 18)
//   w_out = w*u / u_new                        (eq. 19)
//   c     = v / u                              (eq. 20)
//   s     = w*conj(v)
// u_new is combinational and is written back to the D memory by the caller in
// the same cycle. c and s are the rotation parameters for the internal cell,
// and w_out is the weight the rotated row carries into the next array row;
// these three are registered on a clock edge where en is high and hold their
// value until the next such edge, so the internal cell uses them for the rest
// of the array row. When u is zero (the first row to reach this node) the
// divider returns zero, which makes c = 0 and w_out = 0: the incoming row is
// absorbed entirely and nothing is passed on. The equations follow the
// design's SGR description; s, the registers and the zero handling are this
// design's choices.
module boundary_cell
  import qrd_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic en,      // perform a vectoring step this cycle
  input  fp_t  u,       // stored diagonal element (real)
  input  cfp_t v,       // incoming element
  input  fp_t  w,       // weight of the incoming row (real)
  output fp_t  u_new,   // updated diagonal element (combinational)
  output cfp_t c,       // v/u, registered
  output cfp_t s,       // w*conj(v), registered
  output fp_t  w_out    // weight for the next array row, registered
);

  fp_t  rr, ii, mag2, wmag2, wu, w_d;
  cfp_t c_d, s_d;

  // |v|^2 and the diagonal update
  fp_mul u_mul_rr  (.a(v.re), .b(v.re),  .y(rr));
  fp_mul u_mul_ii  (.a(v.im), .b(v.im),  .y(ii));
  fp_add u_add_mag (.a(rr),   .b(ii),    .y(mag2));
  fp_mul u_mul_w   (.a(w),    .b(mag2),  .y(wmag2));
  fp_add u_add_u   (.a(u),    .b(wmag2), .y(u_new));
  // new weight
  fp_mul u_mul_wu  (.a(w),    .b(u),     .y(wu));
  fp_div u_div_w   (.a(wu),   .b(u_new), .y(w_d));
  // rotation parameters
  fp_div u_div_cre (.a(v.re), .b(u),     .y(c_d.re));
  fp_div u_div_cim (.a(v.im), .b(u),     .y(c_d.im));
  fp_mul u_mul_sre (.a(w),    .b(v.re),  .y(s_d.re));
  fp_mul u_mul_sim (.a(w),    .b(fp_neg(v.im)), .y(s_d.im));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c     <= CFP_ZERO;
      s     <= CFP_ZERO;
      w_out <= FP_ZERO;
    end else if (en) begin
      c     <= c_d;
      s     <= s_d;
      w_out <= w_d;
    end
  end

endmodule
