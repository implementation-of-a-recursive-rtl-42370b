// internal_cell: the off-diagonal (internal) node of the squared Givens
// rotation triangular array, used for every element to the right of the
// diagonal in the folded core (columns of A and of the identity matrix).
//
// The rotation parameters c = v_i/u_i and s = w*conj(v_i) come from the
// boundary cell and are copied into this cell's own registers on a clock
// edge with p_load high; they are then used for a whole array row while the
// boundary cell already works on the parameters of the next one. With the
// stored element u and the incoming element v it computes (all complex)
//   u_new = u + s*v
//   v_new = v - c*u
// u_new goes back to the D memory, v_new is the incoming row's element for
// the next array row. Both are combinational: the caller writes them on the
// clock edge that ends the cycle. These are the standard SGR rotation
// equations; the design's text gives the boundary equations and names the
// internal cell's role, the rotation form is this design's reading of it.
module internal_cell
  import qrd_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic p_load,  // take c_in and s_in
  input  cfp_t c_in,    // v_i / u_i from the boundary cell
  input  cfp_t s_in,    // w * conj(v_i) from the boundary cell
  input  cfp_t u,       // stored element of U (scaled form)
  input  cfp_t v,       // incoming element
  output cfp_t u_new,   // updated stored element
  output cfp_t v_new    // rotated incoming element
);

  cfp_t c, s, sv, cu;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c <= CFP_ZERO;
      s <= CFP_ZERO;
    end else if (p_load) begin
      c <= c_in;
      s <= s_in;
    end
  end

  cfp_mul u_mul_sv (.a(s), .b(v), .y(sv));
  cfp_add u_add_u  (.a(u), .b(sv), .y(u_new));
  cfp_mul u_mul_cu (.a(c), .b(u), .y(cu));
  cfp_add u_sub_v  (.a(v), .b(cfp_neg(cu)), .y(v_new));

endmodule
