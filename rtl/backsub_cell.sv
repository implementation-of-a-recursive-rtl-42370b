// backsub_cell: the folded back-substitution node. It plays, one step per
// cycle, the LI (multiply-accumulate) and LD (divide) cells of the unfolded
// back-substitution column.
//
// After triangularisation the D memory holds U (upper triangular, in the
// square-root-free SGR scaling) and Z, the identity matrix rotated the same
// way; the inverse X solves U*X = Z. For element X[i][j]:
//   LI steps, k = N-1 down to i+1:  acc <- acc - U[i][k]*X[k][j]
//   LD step:                         X[i][j] = (Z[i][j] + acc) / U[i][i]
// The accumulator is a register that starts at zero and is cleared by every
// LD step. op = BS_MAC takes a and b as U[i][k] and X[k][j]; op = BS_DIV takes
// z and d as Z[i][j] and U[i][i] and drives x combinationally in the same
// cycle. A, b, z, x and the accumulator are complex; the divisor d, a
// diagonal element of U, is real. The split into LI and LD follows the design's description; the
// folding into one node and the order of the steps are this design's.
module backsub_cell
  import qrd_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  bs_op_e op,
  input  cfp_t   a,    // U[i][k]
  input  cfp_t   b,    // X[k][j]
  input  cfp_t   z,    // Z[i][j]
  input  fp_t    d,    // U[i][i] (real)
  output cfp_t   x,    // X[i][j] (valid when op == BS_DIV)
  output cfp_t   acc   // running sum
);

  cfp_t ab, acc_mac, num;

  cfp_mul u_mul    (.a(a),      .b(b),           .y(ab));
  cfp_add u_sub    (.a(acc),    .b(cfp_neg(ab)), .y(acc_mac));
  cfp_add u_add    (.a(z),      .b(acc),         .y(num));
  fp_div  u_div_re (.a(num.re), .b(d),           .y(x.re));
  fp_div  u_div_im (.a(num.im), .b(d),           .y(x.im));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= CFP_ZERO;
    end else begin
      unique case (op)
        BS_MAC:  acc <= acc_mac;
        BS_DIV:  acc <= CFP_ZERO;
        default: acc <= acc;
      endcase
    end
  end

endmodule
