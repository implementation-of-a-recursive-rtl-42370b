// qrd_rls_inv_tb: end-to-end testbench of the QRD-RLS inversion core at its
// default size (N = 8).
//
// It streams NMAT matrices into the core back to back and checks every
// element of every inverse against a Gauss-Jordan inverse computed in double
// precision from the same (already 25-bit-rounded) complex inputs. The tolerance is
// relative to the largest element of the reference inverse. Matrix kinds:
// diagonally dominant, general random, lower triangular with widely scaled
// rows (all complex), and real-valued. It also checks the output order and tags, the
// out_last flag, the cycle counts of the two phases (TRI_CYC and BSUB_CYC cycles,
// 738 and 288 at N = 8, once a matrix is fully loaded in advance) and that each mechanism of the
// core happened: waiting for an input element (stall), a row started
// before it was fully loaded, boundary and internal
// cell working in the same cycle, loading the next matrix
// during back substitution, an input row absorbed by an empty array row
// (u = 0 at the boundary cell), and back pressure on the input. The last
// four matrices are smaller than N (3x3 to 6x6), chosen at run time through
// in_dim; the reference inverts them padded as diag(A, I), and only their
// own elements may come out. Some full-size matrices give their size as 0.
module qrd_rls_inv_tb;
  import qrd_pkg::*;
  import fp_tb_pkg::*;

  localparam int N    = 8;
  localparam int NMAT = 12;
  localparam int RW   = $clog2(N);
  // cycles per matrix: triangularisation (boundary and internal cell overlapped) and back substitution
  localparam int TRI_CYC  = N * (N * (2 * N - 1) - N * (N - 1) / 2) + 2;
  localparam int BSUB_CYC = N * N * (N + 1) / 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, in_ready, out_valid, out_last, busy;
  cfp_t in_data, out_data;
  logic [RW-1:0] out_row, out_col;

  logic [$clog2(N + 1)-1:0] in_dim;

  qrd_rls_inv dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // complex matrices as separate real and imaginary parts
  real  ar [NMAT][N][N], ai [NMAT][N][N];
  real  xr [NMAT][N][N], xi [NMAT][N][N];
  cfp_t ain [NMAT][N][N];
  int   dm  [NMAT];            // size of each matrix: N, then 3..6 for the last four

  // ---- reference inverse (complex Gauss-Jordan, partial pivoting) --------
  task automatic ref_inverse(int m);
    real gr [N][2*N], gi [N][2*N];
    real tr, ti, pr, pi, pm, fr, fi;
    int  piv;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < 2 * N; c++) begin
        // a smaller matrix is inverted as diag(A, I); ar/ai hold the padding
        gr[r][c] = (c < N) ? ar[m][r][c] : ((c - N == r) ? 1.0 : 0.0);
        gi[r][c] = (c < N) ? ai[m][r][c] : 0.0;
      end
    for (int c = 0; c < N; c++) begin
      piv = c;
      for (int r = c + 1; r < N; r++)
        if (cabs(gr[r][c], gi[r][c]) > cabs(gr[piv][c], gi[piv][c])) piv = r;
      for (int q = 0; q < 2 * N; q++) begin
        tr = gr[c][q]; gr[c][q] = gr[piv][q]; gr[piv][q] = tr;
        ti = gi[c][q]; gi[c][q] = gi[piv][q]; gi[piv][q] = ti;
      end
      // divide the pivot row by the pivot
      pr = gr[c][c]; pi = gi[c][c]; pm = pr * pr + pi * pi;
      for (int q = 0; q < 2 * N; q++) begin
        tr = (gr[c][q] * pr + gi[c][q] * pi) / pm;
        ti = (gi[c][q] * pr - gr[c][q] * pi) / pm;
        gr[c][q] = tr; gi[c][q] = ti;
      end
      for (int r = 0; r < N; r++) if (r != c) begin
        fr = gr[r][c]; fi = gi[r][c];
        for (int q = 0; q < 2 * N; q++) begin
          gr[r][q] = gr[r][q] - (fr * gr[c][q] - fi * gi[c][q]);
          gi[r][q] = gi[r][q] - (fr * gi[c][q] + fi * gr[c][q]);
        end
      end
    end
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        xr[m][r][c] = gr[r][N + c];
        xi[m][r][c] = gi[r][N + c];
      end
  endtask

  // Kinds: 0 diagonally dominant complex, 1 general complex, 2 lower
  // triangular complex with row scales from 2^-3 to 2^4, 3 real-valued.
  task automatic make_matrix(int m);
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        real x, y;
        case (m % 4)
          0: begin x = rnd_real(1.0, 0) + ((r == c) ? 6.0 : 0.0); y = rnd_real(1.0, 0); end
          1: begin x = rnd_real(1.0, 0) + ((r == c) ? 1.5 : 0.0); y = rnd_real(1.0, 0); end
          2: begin
            x = (c <= r) ? rnd_real(1.0, 0) * pow2(r - 3) + ((r == c) ? pow2(r - 3) * 2.0 : 0.0) : 0.0;
            y = (c <= r) ? rnd_real(1.0, 0) * pow2(r - 3) : 0.0;
          end
          default: begin x = rnd_real(1.0, 0) + ((r == c) ? 2.0 : 0.0); y = 0.0; end
        endcase
        if (r >= dm[m] || c >= dm[m]) begin
          x = (r == c) ? 1.0 : 0.0;
          y = 0.0;
        end
        ain[m][r][c] = real2cfp(x, y);
        ar[m][r][c]  = fp2real(ain[m][r][c].re);
        ai[m][r][c]  = fp2real(ain[m][r][c].im);
      end
    ref_inverse(m);
  endtask

  // ---- mechanism counters ------------------------------------------------
  int n_small = 0, n_early = 0, n_stall = 0, n_concurrent = 0, n_overlap_load = 0, n_absorb = 0, n_backpressure = 0;

  always @(posedge clk) if (rst_n) begin
    // internal cell idle because the next input row is not loaded yet
    if (dut.stall && !dut.u_ctrl.i_ready) n_stall++;
    if (dut.b_en && dut.ib == 0 && int'(dut.u_ctrl.lcnt) < (int'(dut.rb) + 1) * N) n_early++;
    // boundary and internal cell busy in the same cycle
    if (dut.b_en && dut.i_en) n_concurrent++;
    if (!dut.tri_phase && dut.load_we) n_overlap_load++;
    if (dut.b_en && fp_is_zero(dut.ub)) n_absorb++;
    if (in_valid && !in_ready) n_backpressure++;
  end

  // ---- phase timing ------------------------------------------------------
  int cyc = 0;
  int t_tri_start = -1, t_bsub_start = -1;
  int tri_len [$], bsub_len [$];

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (dut.b_en && dut.rb == 0 && dut.ib == 0) t_tri_start = cyc;
      if (dut.bs_op != BS_IDLE) begin
        if (t_bsub_start < 0) begin
          t_bsub_start = cyc;
          tri_len.push_back(cyc - t_tri_start);
        end
        if (dut.bs_op == BS_DIV && dut.bi == 0 && dut.bj == RW'(N - 1)) begin
          bsub_len.push_back(cyc - t_bsub_start + 1);
          t_bsub_start = -1;
        end
      end
    end
  end

  // ---- stimulus ----------------------------------------------------------
  bit slow_feed;

  initial begin
    in_valid = 1'b0;
    in_data  = CFP_ZERO;
    in_dim   = '0;
    for (int m = 0; m < NMAT; m++) begin
      dm[m] = (m < NMAT - 4) ? N : 3 + (m % 4);
      make_matrix(m);
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int m = 0; m < NMAT; m++) begin
      // matrix 0 is fed slowly (gaps) so the core waits for its rows;
      // the others are fed as fast as the core accepts them
      slow_feed = (m == 0);
      for (int e = 0; e < dm[m] * dm[m]; e++) begin
        // drive on the falling edge; in_ready comes from a register and is
        // stable there, so the element is taken at the next rising edge
        if (slow_feed) begin
          in_valid = 1'b0;
          repeat (1 + $urandom % (6 * N)) @(negedge clk);
        end
        in_valid = 1'b1;
        in_data  = ain[m][e / dm[m]][e % dm[m]];
        in_dim   = (dm[m] == N && m % 2 == 1) ? '0 : ($clog2(N + 1))'(dm[m]);
        while (!in_ready) @(negedge clk);
        @(negedge clk);
      end
      in_valid = 1'b0;
    end
  end

  // ---- output checking ---------------------------------------------------
  int  mo = 0, eo = 0;
  real maxerr [NMAT];

  initial for (int m = 0; m < NMAT; m++) maxerr[m] = 0.0;

  always @(posedge clk) if (rst_n && out_valid) begin
    automatic int  d  = dm[mo];
    automatic int  er = d - 1 - (eo % d);
    automatic int  ec = eo / d;
    automatic real scale = 0.0;
    automatic real gre = fp2real(out_data.re);
    automatic real gim = fp2real(out_data.im);
    automatic real err;
    for (int r = 0; r < d; r++) for (int c = 0; c < d; c++)
      if (cabs(xr[mo][r][c], xi[mo][r][c]) > scale) scale = cabs(xr[mo][r][c], xi[mo][r][c]);
    checks++;
    if (out_row != RW'(er) || out_col != RW'(ec)) begin
      failures++;
      $display("FAIL matrix %0d: element %0d tagged (%0d,%0d), expected (%0d,%0d)",
               mo, eo, out_row, out_col, er, ec);
    end
    checks++;
    err = cabs(gre - xr[mo][er][ec], gim - xi[mo][er][ec]);
    if (err > maxerr[mo]) maxerr[mo] = err;
    if (err > 2.0e-3 * scale) begin
      failures++;
      $display("FAIL matrix %0d X[%0d][%0d]: got (%g, %g) want (%g, %g)", mo, er, ec,
               gre, gim, xr[mo][er][ec], xi[mo][er][ec]);
    end
    checks++;
    if (out_last != (eo == d * d - 1)) begin
      failures++;
      $display("FAIL matrix %0d: out_last wrong at element %0d", mo, eo);
    end
    eo++;
    if (eo == d * d) begin
      if (d < N) n_small++;
      $display("matrix %0d (%0dx%0d) done, max |error| %g (largest |X| %g)", mo, d, d, maxerr[mo], scale);
      eo = 0;
      mo++;
    end
  end

  // ---- end of test -------------------------------------------------------
  initial begin
    wait (mo == NMAT);
    // a smaller last matrix leaves its output before back substitution ends
    wait (bsub_len.size() == NMAT);
    repeat (5) @(posedge clk);
    // phase lengths: matrices after the first arrive fully loaded
    for (int m = 1; m < NMAT; m++) begin
      checks++;
      if (tri_len[m] != TRI_CYC) begin
        failures++;
        $display("FAIL matrix %0d: triangularisation took %0d cycles, expected %0d", m, tri_len[m], TRI_CYC);
      end
      checks++;
      if (bsub_len[m] != BSUB_CYC) begin
        failures++;
        $display("FAIL matrix %0d: back substitution took %0d cycles, expected %0d", m, bsub_len[m], BSUB_CYC);
      end
    end
    $display("stall=%0d early=%0d concurrent=%0d overlap_load=%0d absorb=%0d backpressure=%0d",
             n_stall, n_early, n_concurrent, n_overlap_load, n_absorb, n_backpressure);
    checks += 7;
    if (n_small == 0)        begin failures++; $display("FAIL no matrix smaller than N"); end
    if (n_concurrent == 0)   begin failures++; $display("FAIL boundary and internal cell never worked together"); end
    if (n_stall == 0)        begin failures++; $display("FAIL no input-row stall"); end
    if (n_early == 0)        begin failures++; $display("FAIL no row started before fully loaded"); end
    if (n_overlap_load == 0) begin failures++; $display("FAIL no load during back substitution"); end
    if (n_absorb == 0)       begin failures++; $display("FAIL no row absorbed by an empty array row"); end
    if (n_backpressure == 0) begin failures++; $display("FAIL no input back pressure"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NMAT * (TRI_CYC + BSUB_CYC) + 6 * N * N * N + 2000) @(posedge clk);
    failures++;
    $display("watchdog: %0d of %0d matrices done", mo, NMAT);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
