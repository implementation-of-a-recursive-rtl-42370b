// qrd_rls_inv: folded QRD-RLS matrix inversion core.
//
// The core inverts an N x N complex matrix A (N = 8 by default) by solving
// A*X = I with a QR decomposition built from squared Givens rotations (SGR),
// which need neither square roots nor the usual number of multiplications,
// followed by back substitution. The triangular systolic array that would
// do this node by node is folded onto one boundary cell, one internal cell
// and one back-substitution cell, with an A memory (input matrix and the row
// being rotated), a D memory (triangular factor, then the inverse) and a
// controller that schedules the cells, as in the design's block diagram.
// The boundary cell computes the rotation parameters of the next array row
// while the internal cell applies the current ones.
//
// Interface: elements of A enter row-major as complex numbers, each part a
// 25-bit floating-point word (qrd_pkg::cfp_t), on a valid/ready stream
// (in_valid, in_ready, in_data). Elements of the inverse leave as they are
// produced, one per out_valid pulse, tagged with their position (out_row,
// out_col); the order is column by column, each column from the bottom row
// up. out_last marks the final element of a matrix. The next matrix can be
// streamed in while the current one is in back substitution.
//
// The matrix size can be chosen per matrix at run time: in_dim (1..N, 0 or
// anything larger meaning N) is taken together with the first element, and
// the matrix then has in_dim x in_dim elements on the stream and in the
// result. A smaller matrix A is inverted as the N x N matrix diag(A, I),
// whose inverse is diag(A^-1, I); the A memory supplies the identity
// padding and the output leaves it out. The cycle counts are those of size
// N.
//
// Timing at N = 8, once the rows arrive as fast as they are used: 738 cycles
// of triangularisation and 288 cycles of back substitution per matrix, plus
// one cycle of output register. The output is registered; all cell and
// memory reads are combinational within a cycle.
//
// Departures from the design's source: the floating-point operators are this
// design's own, and the schedule is this design's, so the cycle counts differ
// from the source's figures (see qrd_controller).
module qrd_rls_inv
  import qrd_pkg::*;
#(
  parameter int unsigned N  = 8,
  localparam int unsigned RW = $clog2(N),
  localparam int unsigned CW = $clog2(2 * N),
  localparam int unsigned DW = $clog2(N + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  cfp_t          in_data,
  input  logic [DW-1:0] in_dim,     // matrix size 1..N, taken with its first element (0: N)
  output logic          out_valid,
  output logic [RW-1:0] out_row,
  output logic [RW-1:0] out_col,
  output cfp_t          out_data,
  output logic          out_last,
  output logic          busy        // a matrix is being rotated or solved
);

  // ---- controller -------------------------------------------------------
  logic          load_we, b_en, b_first, b_w_one, i_en, p_load, i_first;
  logic          last, bs_keep, tri_phase, stall;
  logic [DW-1:0] dim;
  logic [RW-1:0] load_row, load_col, rb, ib, r, i, bi, bk, bj;
  logic [CW-1:0] k;
  bs_op_e        bs_op;

  qrd_controller #(.N(N)) u_ctrl (
    .clk, .rst_n, .in_valid, .in_ready, .in_dim, .dim, .load_we, .load_row, .load_col,
    .b_en, .rb, .ib, .b_first, .b_w_one,
    .i_en, .p_load, .r, .i, .k, .i_first,
    .bs_op, .bi, .bk, .bj, .bs_keep, .last, .tri_phase, .stall
  );

  // ---- A memory ---------------------------------------------------------
  cfp_t vb, vi, v_new;

  a_mem #(.N(N)) u_amem (
    .clk, .dim,
    .load_we, .load_row, .load_col, .load_data(in_data),
    .b_orig(ib == '0), .b_row(rb), .b_col(CW'(ib)), .b_data(vb),
    .i_orig(i == '0),  .i_row(r),  .i_col(k),       .i_data(vi),
    .wr_en(i_en), .wr_col(k), .wr_data(v_new)
  );

  // ---- D memory ---------------------------------------------------------
  // port 0: internal cell (TRI); U[bi][bk] or U[bi][bi], and X write (BSUB)
  // port 1: boundary cell (TRI); X[bk][bj] or Z[bi][bj] (BSUB)
  logic          we0;
  logic [RW-1:0] rrow0, rrow1, wrow0;
  logic [CW-1:0] rcol0, rcol1, wcol0;
  cfp_t          wdata0, rd0, rd1, ic_unew, bs_x;
  fp_t           bc_unew;

  always_comb begin
    if (tri_phase) begin
      rrow0  = i;
      rcol0  = k;
      rrow1  = ib;
      rcol1  = CW'(ib);
      we0    = i_en;
      wrow0  = i;
      wcol0  = k;
      wdata0 = ic_unew;
    end else begin
      rrow0  = bi;
      rcol0  = (bs_op == BS_DIV) ? CW'(bi) : CW'(bk);
      rrow1  = (bs_op == BS_DIV) ? bi : bk;
      rcol1  = CW'(N) + CW'(bj);
      we0    = (bs_op == BS_DIV);
      wrow0  = bi;
      wcol0  = CW'(N) + CW'(bj);
      wdata0 = bs_x;
    end
  end

  d_mem #(.N(N)) u_dmem (
    .clk,
    .we0, .wrow0, .wcol0, .wdata0,
    .we1(b_en), .wrow1(ib), .wcol1(CW'(ib)), .wdata1(cfp_real(bc_unew)),
    .rrow0, .rcol0, .rdata0(rd0),
    .rrow1, .rcol1, .rdata1(rd1)
  );

  // ---- triangular array cells -------------------------------------------
  // The diagonal of U is real: the boundary cell takes the real part.
  fp_t  ub, w_in, bc_w;
  cfp_t ui, bc_c, bc_s;

  assign ub   = b_first ? FP_ZERO : rd1.re;
  assign ui   = i_first ? CFP_ZERO : rd0;
  assign w_in = b_w_one ? FP_ONE : bc_w;

  boundary_cell u_bc (
    .clk, .rst_n, .en(b_en),
    .u(ub), .v(vb), .w(w_in),
    .u_new(bc_unew), .c(bc_c), .s(bc_s), .w_out(bc_w)
  );

  internal_cell u_ic (
    .clk, .rst_n, .p_load, .c_in(bc_c), .s_in(bc_s),
    .u(ui), .v(vi),
    .u_new(ic_unew), .v_new(v_new)
  );

  // ---- back substitution ------------------------------------------------
  cfp_t bs_acc;

  backsub_cell u_bs (
    .clk, .rst_n, .op(bs_op),
    .a(rd0), .b(rd1), .z(rd1), .d(rd0.re),
    .x(bs_x), .acc(bs_acc)
  );

  // ---- output -----------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_row   <= '0;
      out_col   <= '0;
      out_data  <= CFP_ZERO;
    end else begin
      out_valid <= (bs_op == BS_DIV) && bs_keep;
      out_last  <= last;
      if (bs_op == BS_DIV) begin
        out_row  <= bi;
        out_col  <= bj;
        out_data <= bs_x;
      end
    end
  end

  // idle = triangularisation phase, nothing started, waiting for input
  assign busy = !tri_phase || b_en || i_en || stall;

endmodule
