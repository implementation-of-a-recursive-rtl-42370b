// qrd_controller_tb: self-checking testbench for qrd_controller (N = 8).
//
// Feeds three matrices' worth of input handshakes, the first with random
// gaps, and checks the schedule the controller issues against rules worked
// out here, not against its own decode:
//  - boundary steps come in the order (rb, ib), internal steps in the order
//    (r, i, k) with k = i+1..2N-1, back-substitution steps in the order
//    (j, i = N-1..0, k = N-1..i+1 then LD), each matching nested loops;
//  - a boundary step (rb, 0) only after element A[rb][0] is loaded, an
//    internal step (r, 0, k < N) only after A[r][k] is loaded, a boundary
//    step (rb, ib > 0) only after the internal step (rb, ib-1, ib) was issued
//    in an earlier cycle;
//  - the internal cell only works on (r, i) holding the parameter set of
//    boundary step (r, i), and a parameter set is never overwritten before
//    the internal cell has taken it;
//  - load addresses run row-major and in_ready is high exactly while the A
//    memory has room;
//  - phase lengths (738 triangularisation cycles from the first boundary step,
//    288 back substitution cycles, for matrices loaded in advance), and that
//    stalls, rows started before they were fully loaded, concurrent boundary/internal steps and loading during back
//    substitution all happened.
module qrd_controller_tb;
  import qrd_pkg::*;

  localparam int N = 8;
  localparam int NMAT = 3;

  logic       clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic       in_ready, load_we, b_en, b_first, b_w_one, i_en, p_load, i_first;
  logic       last, bs_keep, tri_phase, stall;
  logic [3:0] in_dim = 4'(N), dim;   // full size throughout
  logic [2:0] load_row, load_col, rb, ib, r, i, bi, bk, bj;
  logic [3:0] k;
  bs_op_e     bs_op;
  int         checks = 0, failures = 0;

  qrd_controller #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic fail(string msg);
    failures++;
    if (failures < 15) $display("FAIL %s", msg);
  endtask

  // expected step sequences
  int exp_b [$], exp_i [$], exp_bs [$];

  initial begin
    for (int m = 0; m < NMAT; m++) begin
      for (int rr = 0; rr < N; rr++)
        for (int ii = 0; ii < N; ii++) begin
          exp_b.push_back(rr * 16 + ii);
          for (int kk = ii + 1; kk < 2 * N; kk++) exp_i.push_back(rr * 256 + ii * 16 + kk);
        end
      for (int jj = 0; jj < N; jj++)
        for (int ii = N - 1; ii >= 0; ii--) begin
          for (int kk = N - 1; kk > ii; kk--) exp_bs.push_back(jj * 256 + ii * 16 + kk);
          exp_bs.push_back(4096 + jj * 256 + ii * 16 + ii);
        end
    end
  end

  int loaded = 0, mat_loaded = 0, cyc = 0;
  int i_issue_cyc [N][N][2*N];
  int held = -1, pending = -1;          // parameter set held by the internal cell / boundary
  int n_early = 0, n_stall = 0, n_conc = 0, n_overlap = 0, nb = 0, ni = 0, nbs = 0;
  int t_b0 = 0, t_bs0 = -1;
  int tri_len [$], bsub_len [$];

  always @(posedge clk) if (rst_n) begin
    cyc++;
    // ---- loading
    checks++;
    if (in_ready != (mat_loaded < N * N)) fail($sformatf("in_ready %0d with %0d loaded", in_ready, mat_loaded));
    if (load_we) begin
      checks++;
      if (load_row != 3'((loaded % (N * N)) / N) || load_col != 3'(loaded % N))
        fail($sformatf("load address (%0d,%0d) for element %0d", load_row, load_col, loaded));
    end
    // ---- internal steps (checked before this cycle's parameter hand-over)
    if (i_en) begin
      automatic int e = exp_i.pop_front();
      checks += 3;
      if (e != int'(r) * 256 + int'(i) * 16 + int'(k))
        fail($sformatf("internal step r%0d i%0d k%0d, want %0d", r, i, k, e));
      if (i == 0 && k < N && mat_loaded < int'(r) * N + int'(k) + 1)
        fail($sformatf("internal step r%0d k%0d with %0d loaded", r, k, mat_loaded));
      if (held != int'(r) * 16 + int'(i)) fail($sformatf("internal (r%0d,i%0d) holds set %0d", r, i, held));
      if (i_first != (r == 0)) fail("i_first");
      i_issue_cyc[r][i][k] = cyc;
      ni++;
    end
    // ---- boundary steps
    if (b_en) begin
      automatic int e = exp_b.pop_front();
      checks += 4;
      if (e != int'(rb) * 16 + int'(ib)) fail($sformatf("boundary step rb%0d ib%0d, want %0d", rb, ib, e));
      if (b_first != (rb == 0) || b_w_one != (ib == 0)) fail("b_first / b_w_one");
      if (ib == 0) begin
        if (mat_loaded < int'(rb) * N + 1) fail($sformatf("row %0d used with %0d loaded", rb, mat_loaded));
        if (mat_loaded < (int'(rb) + 1) * N) n_early++;
      end else begin
        if (!(i_issue_cyc[rb][ib - 1][ib] > 0 && i_issue_cyc[rb][ib - 1][ib] < cyc))
          fail($sformatf("boundary (%0d,%0d) before its input was rotated", rb, ib));
      end
      if (pending >= 0 && !p_load) fail("parameter set overwritten before it was taken");
      if (rb == 0 && ib == 0) t_b0 = cyc;
      nb++;
    end
    if (p_load) begin
      if (pending < 0) fail("p_load with no parameter set");
      held = pending;
      pending = -1;
    end
    if (b_en) pending = int'(rb) * 16 + int'(ib);
    if (b_en && i_en) n_conc++;
    if (stall) n_stall++;
    // ---- back substitution
    if (bs_op != BS_IDLE) begin
      automatic int e = exp_bs.pop_front();
      checks += 2;
      if (e != ((bs_op == BS_DIV) ? 4096 : 0) + int'(bj) * 256 + int'(bi) * 16 + int'(bk))
        fail($sformatf("bsub step %s j%0d i%0d k%0d, want %0d", bs_op.name(), bj, bi, bk, e));
      if (last != (bs_op == BS_DIV && bi == 0 && bj == 3'(N - 1))) fail("last");
      checks++;
      if (!bs_keep || dim != 4'(N)) fail("full-size matrix reported as smaller");
      if (tri_phase) fail("back substitution during TRI");
      if (load_we) n_overlap++;
      if (t_bs0 < 0) begin
        t_bs0 = cyc;
        tri_len.push_back(cyc - t_b0);
        for (int a = 0; a < N; a++) for (int b2 = 0; b2 < N; b2++) for (int c = 0; c < 2 * N; c++)
          i_issue_cyc[a][b2][c] = 0;
      end
      if (last) begin
        bsub_len.push_back(cyc - t_bs0 + 1);
        t_bs0 = -1;
      end
      nbs++;
    end
    // ---- A memory fill level
    if (i_en && r == 3'(N - 1) && i == 3'(N - 1) && k == 4'(2 * N - 1))
      mat_loaded = load_we ? 1 : 0;
    else if (load_we) mat_loaded++;
    if (load_we) loaded++;
  end

  initial begin
    @(negedge clk);
    rst_n = 1'b1;
    for (int e = 0; e < NMAT * N * N; e++) begin
      if (e < N * N) begin
        in_valid = 1'b0;
        repeat ($urandom % 40) @(negedge clk);
      end
      in_valid = 1'b1;
      while (!in_ready) @(negedge clk);
      @(negedge clk);
    end
    in_valid = 1'b0;
  end

  initial begin
    wait (exp_bs.size() > 0);
    wait (exp_bs.size() == 0);
    repeat (3) @(posedge clk);
    checks += 5;
    if (nb != NMAT * N * N || ni != NMAT * 736 || nbs != NMAT * 288)
      fail($sformatf("step counts %0d %0d %0d", nb, ni, nbs));
    for (int m = 1; m < NMAT; m++) begin
      checks += 2;
      if (tri_len[m] != 738) fail($sformatf("matrix %0d triangularisation %0d cycles, want 738", m, tri_len[m]));
      if (bsub_len[m] != 288) fail($sformatf("matrix %0d back substitution %0d cycles, want 288", m, bsub_len[m]));
    end
    if (n_stall == 0) fail("no stall");
    if (n_early == 0) fail("no row started before it was fully loaded");
    if (n_conc == 0) fail("boundary and internal steps never in the same cycle");
    if (n_overlap == 0) fail("no loading during back substitution");
    if (exp_b.size() != 0 || exp_i.size() != 0) fail("steps missing");
    $display("boundary=%0d internal=%0d bsub=%0d stalls=%0d early rows=%0d concurrent=%0d overlapped loads=%0d",
             nb, ni, nbs, n_stall, n_early, n_conc, n_overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (12000) @(posedge clk);
    failures++;
    $display("watchdog: %0d boundary, %0d internal, %0d bsub steps", nb, ni, nbs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
