// qrd_controller: the scheduler of the folded QRD-RLS core. It decides, cycle
// by cycle, which steps the single boundary cell, the single internal cell
// and the single back-substitution cell perform, and on which elements.
//
// Loading: input elements arrive row-major on a valid/ready stream; the load
// counter addresses the A memory. in_ready is high while the A memory has
// room, which includes the whole back-substitution phase of the previous
// matrix, so loading the next matrix overlaps it.
//
// Matrix size: in_dim is taken with the first element of each matrix (0 or
// more than N meaning N) and sets how many elements the stream delivers
// (in_dim^2) and where the load address wraps. Rows and columns beyond it
// are identity padding supplied by the A memory, so the schedule below is
// always the one for size N; elements of the padding are never waited for,
// and bs_keep marks the back-substitution results that belong to the
// matrix. The size of the matrix in back substitution is kept separately,
// since the next matrix may already be loading.
//
// Triangularisation (phase TRI): every input row r = 0..N-1 of [A | I] is
// passed through array rows i = 0..N-1. The boundary cell and the internal
// cell work at the same time on different data. The internal thread (r, i,
// k) rotates columns k = i+1..2N-1 of array row i, one per cycle, with the
// rotation parameters it holds for (r, i). The boundary thread (rb, ib)
// computes the parameters for the next array row ahead of it: step (rb, ib)
// may issue once its input element exists (for ib > 0 the internal cell has
// already rotated column ib of array row ib-1; for ib = 0 element A[rb][0]
// has been loaded) and the boundary cell's parameter registers are free,
// that is, the internal cell has taken the previous set (p_load). The
// internal cell takes a new set at the edge that ends an array row, or
// waits for one when the boundary cell is late. An internal step in array
// row 0 waits until its element A[r][k] has been loaded, so triangularisation
// follows the input stream element by element rather than waiting for whole
// rows or the whole matrix. With the input loaded ahead,
// the internal cell never idles after the first step, and one matrix takes
//   N * (N(2N-1) - N(N-1)/2) + 2   cycles   (738 for N = 8)
// from the first boundary step to the first back-substitution step.
// b_first / i_first mark input row 0, for which the stored U values are taken
// as zero; b_w_one marks array row 0, where the incoming row weight is 1.
//
// Back substitution (phase BSUB): columns j = 0..N-1 of the inverse, rows
// i = N-1 down to 0; for each X[i][j] the LI steps k = N-1 down to i+1
// (BS_MAC) and then the LD step (BS_DIV): N(N+1)/2 cycles per column,
//   N^2 (N+1)/2   cycles   (288 for N = 8).
// After the last LD step the controller returns to TRI for the next matrix.
//
// The design's description names a controller that schedules data between
// the combined nodes and the memories, with boundary and internal cell active
// at the same time on different data, and processing that starts before the
// input matrix is completely stored; the exact rules, the handshake and the
// cycle counts are this design's own.
module qrd_controller
  import qrd_pkg::*;
#(
  parameter int unsigned N  = 8,
  localparam int unsigned RW = $clog2(N),
  localparam int unsigned CW = $clog2(2 * N),
  localparam int unsigned LW = $clog2(N * N + 1),
  localparam int unsigned DW = $clog2(N + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // input stream
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [DW-1:0] in_dim,     // size of the matrix, taken with its first element
  output logic [DW-1:0] dim,        // size of the matrix being loaded / triangularised
  output logic          load_we,
  output logic [RW-1:0] load_row,
  output logic [RW-1:0] load_col,
  // boundary cell
  output logic          b_en,       // boundary step (rb, ib) this cycle
  output logic [RW-1:0] rb,
  output logic [RW-1:0] ib,
  output logic          b_first,    // rb == 0: stored diagonal taken as zero
  output logic          b_w_one,    // ib == 0: incoming weight is 1
  // internal cell
  output logic          i_en,       // internal step (r, i, k) this cycle
  output logic          p_load,     // internal cell takes the boundary's parameters
  output logic [RW-1:0] r,
  output logic [RW-1:0] i,
  output logic [CW-1:0] k,
  output logic          i_first,    // r == 0: stored U taken as zero
  // back substitution
  output bs_op_e        bs_op,
  output logic [RW-1:0] bi,         // result row
  output logic [RW-1:0] bk,         // LI index
  output logic [RW-1:0] bj,         // result column
  output logic          bs_keep,    // X[bi][bj] lies inside the matrix (bi, bj < its size)
  output logic          last,       // last kept LD step of a matrix
  // status
  output logic          tri_phase,  // triangularisation phase
  output logic          stall       // internal cell idle in TRI after the matrix started
);

  typedef enum logic {TRI, BSUB} phase_e;

  phase_e        phase;
  logic [LW-1:0] lcnt;
  logic [RW-1:0] lrow, lcol;
  logic [DW-1:0] ld_dim;     // size of the matrix in the A memory
  logic [DW-1:0] bs_dim;     // size of the matrix in back substitution
  logic [DW-1:0] in_dim_ok, dl;
  logic          b_done;     // all boundary steps of this matrix issued
  logic          p_full;     // boundary parameter registers hold an unused set
  logic          p_cur;      // internal cell holds the set for (r, i)
  logic          started;    // first boundary step of this matrix issued
  logic          b_ready, i_ready, i_row_end, tri_end;

  // ---- loading ----------------------------------------------------------
  // sizes 0 and above N are taken as N
  assign in_dim_ok = (in_dim == '0 || in_dim > DW'(N)) ? DW'(N) : in_dim;
  // the size applying to the element now on the stream
  assign dl        = (lcnt == '0) ? in_dim_ok : ld_dim;
  assign dim       = ld_dim;
  // from registers only: the first element of a matrix is always welcome
  assign in_ready  = (lcnt == '0) || (32'(lcnt) < 32'(ld_dim) * 32'(ld_dim));
  assign load_we   = in_valid && in_ready;
  assign load_row = lrow;
  assign load_col = lcol;

  // ---- triangularisation decode -----------------------------------------
  assign tri_phase = (phase == TRI);
  assign b_first   = (rb == '0);
  assign b_w_one   = (ib == '0);
  assign i_first   = (r == '0);

  // Input of boundary step (rb, ib) is available:
  //  ib = 0: element A[rb][0] loaded in an earlier cycle;
  //  ib > 0: internal step (rb, ib-1, ib) done in an earlier cycle.
  always_comb begin
    if (ib == '0)
      b_ready = (32'(rb) >= 32'(ld_dim)) || (32'(lcnt) > 32'(rb) * 32'(ld_dim));
    else
      b_ready = (r > rb) || (r == rb && (i > ib - 1'b1 || (i == ib - 1'b1 && k > CW'(ib))));
  end

  // Input of internal step (r, 0, k < N), element A[r][k], is loaded; the
  // identity half and the later array rows need nothing from the stream.
  // Rows and columns beyond the matrix size are padding (see a_mem).
  assign i_ready   = (i != '0) || (32'(k) >= 32'(ld_dim)) || (32'(r) >= 32'(ld_dim)) ||
                     (32'(lcnt) > 32'(r) * 32'(ld_dim) + 32'(k));
  assign i_en      = tri_phase && p_cur && i_ready;
  assign i_row_end = i_en && (k == CW'(2 * N - 1));
  assign tri_end   = i_row_end && (i == RW'(N - 1)) && (r == RW'(N - 1));
  // the internal cell takes a new parameter set when it ends a row or idles
  assign p_load    = tri_phase && p_full && (!p_cur || (i_row_end && !tri_end));
  // the boundary may overwrite its registers once they are free or taken now
  assign b_en      = tri_phase && !b_done && b_ready && (!p_full || p_load);
  assign stall     = tri_phase && started && !i_en;

  // ---- back substitution decode -----------------------------------------
  always_comb begin
    if (phase != BSUB) bs_op = BS_IDLE;
    else               bs_op = (bk == bi) ? BS_DIV : BS_MAC;
  end

  assign bs_keep = (32'(bi) < 32'(bs_dim)) && (32'(bj) < 32'(bs_dim));
  assign last    = (bs_op == BS_DIV) && (bi == '0) && (32'(bj) == 32'(bs_dim) - 1);

  // ---- state ------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase   <= TRI;
      lcnt    <= '0;
      lrow    <= '0;
      lcol    <= '0;
      ld_dim  <= DW'(N);
      bs_dim  <= DW'(N);
      rb      <= '0;
      ib      <= '0;
      b_done  <= 1'b0;
      p_full  <= 1'b0;
      p_cur   <= 1'b0;
      started <= 1'b0;
      r       <= '0;
      i       <= '0;
      k       <= CW'(1);
      bi      <= '0;
      bk      <= '0;
      bj      <= '0;
    end else begin
      if (load_we) begin
        lcnt <= lcnt + 1'b1;
        if (lcnt == '0) ld_dim <= in_dim_ok;
        if (32'(lcol) == 32'(dl) - 1) begin
          lcol <= '0;
          lrow <= (32'(lrow) == 32'(dl) - 1) ? '0 : lrow + 1'b1;
        end else begin
          lcol <= lcol + 1'b1;
        end
      end

      // parameter hand-over
      if (b_en)        p_full <= 1'b1;
      else if (p_load) p_full <= 1'b0;
      if (p_load)         p_cur <= 1'b1;
      else if (i_row_end) p_cur <= 1'b0;

      // boundary thread
      if (b_en) begin
        started <= 1'b1;
        if (ib != RW'(N - 1)) begin
          ib <= ib + 1'b1;
        end else begin
          ib <= '0;
          if (rb != RW'(N - 1)) rb <= rb + 1'b1;
          else begin
            rb     <= '0;
            b_done <= 1'b1;
          end
        end
      end

      // internal thread
      if (i_en) begin
        if (!i_row_end) begin
          k <= k + 1'b1;
        end else if (i != RW'(N - 1)) begin
          i <= i + 1'b1;
          k <= CW'(i) + CW'(2);
        end else begin
          i <= '0;
          k <= CW'(1);
          r <= (r == RW'(N - 1)) ? '0 : r + 1'b1;
        end
      end

      if (tri_end) begin
        // matrix triangularised: the A memory is free for the next one
        lcnt    <= '0;
        bs_dim  <= ld_dim;
        phase   <= BSUB;
        started <= 1'b0;
        bi      <= RW'(N - 1);
        bk      <= RW'(N - 1);
        bj      <= '0;
      end

      if (phase == BSUB) begin
        if (bk != bi) begin
          bk <= bk - 1'b1;
        end else if (bi != '0) begin
          bi <= bi - 1'b1;
          bk <= RW'(N - 1);
        end else if (bj != RW'(N - 1)) begin
          bj <= bj + 1'b1;
          bi <= RW'(N - 1);
          bk <= RW'(N - 1);
        end else begin
          phase  <= TRI;
          b_done <= 1'b0;
        end
      end
    end
  end

  // The load counter cannot advance at the cycle it is cleared: by then the
  // whole matrix is loaded and in_ready is low.
  a_no_load_at_clear : assert property (@(posedge clk) disable iff (!rst_n)
    tri_end |-> !load_we);
  // The internal cell only works with a parameter set for its own row.
  a_param_before_use : assert property (@(posedge clk) disable iff (!rst_n)
    i_en |-> p_cur);

endmodule
