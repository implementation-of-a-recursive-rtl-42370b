// a_mem_tb: self-checking testbench for a_mem (N = 8).
//
// Loads a random matrix through the load port and reads every row of
// [A | I] back through both read ports with *_orig high (the right half must
// be the identity; the two ports read different elements at the same time),
// then writes random values into the work row and reads them back with
// *_orig low, checking that the stored matrix is unchanged. The last pass
// sets a matrix size below N, so reads outside the top-left corner must
// return the identity padding diag(A, I).
module a_mem_tb;
  import qrd_pkg::*;
  import fp_tb_pkg::*;

  localparam int N = 8;

  logic       clk = 1'b0;
  logic       load_we = 1'b0, b_orig = 1'b0, i_orig = 1'b0, wr_en = 1'b0;
  logic [2:0] load_row, load_col, b_row, i_row;
  logic [3:0] b_col, i_col, wr_col;
  cfp_t       load_data, b_data, i_data, wr_data;
  cfp_t       ref_a [N][N];
  cfp_t       ref_w [2*N];
  logic [3:0] dim = 4'(N);
  int         checks = 0, failures = 0;

  a_mem #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  // expected original row element of [diag(A, I) | I]
  function automatic cfp_t want(int r, int c);
    if (c < N && r < int'(dim) && c < int'(dim)) return ref_a[r][c];
    return ((c % N) == r) ? CFP_ONE : CFP_ZERO;
  endfunction

  task automatic expect_eq(string what, cfp_t got, cfp_t want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h want %h", what, got, want);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load_row = '0; load_col = '0; load_data = CFP_ZERO;
    b_row = '0; b_col = '0; i_row = '0; i_col = '0; wr_col = '0; wr_data = CFP_ZERO;
    for (int pass = 0; pass < 3; pass++) begin
      @(negedge clk);
      dim = (pass == 2) ? 4'd5 : 4'(N);
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) begin
          ref_a[r][c] = real2cfp(rnd_real(8.0, 6), rnd_real(8.0, 6));
          load_we = 1'b1; load_row = 3'(r); load_col = 3'(c); load_data = ref_a[r][c];
          @(negedge clk);
        end
      load_we = 1'b0;
      b_orig = 1'b1; i_orig = 1'b1;
      for (int r = 0; r < N; r++)
        for (int c = 0; c < 2 * N; c++) begin
          b_row = 3'(r); b_col = 4'(c);
          i_row = 3'(N - 1 - r); i_col = 4'(2 * N - 1 - c);
          #1;
          expect_eq("orig b", b_data, want(r, c));
          expect_eq("orig i", i_data, want(N - 1 - r, 2 * N - 1 - c));
        end
      b_orig = 1'b0; i_orig = 1'b0;
      @(negedge clk);
      for (int c = 0; c < 2 * N; c++) begin
        ref_w[c] = real2cfp(rnd_real(8.0, 6), rnd_real(8.0, 6));
        wr_en = 1'b1; wr_col = 4'(c); wr_data = ref_w[c];
        @(negedge clk);
      end
      wr_en = 1'b0;
      for (int c = 2 * N - 1; c >= 0; c--) begin
        b_col = 4'(c); i_col = 4'((c + 3) % (2 * N));
        #1;
        expect_eq("work b", b_data, ref_w[c]);
        expect_eq("work i", i_data, ref_w[(c + 3) % (2 * N)]);
      end
      // one port on the work row, the other on the stored matrix
      i_orig = 1'b1;
      for (int r = 0; r < N; r++) begin
        i_row = 3'(r); i_col = 4'(N - 1 - r); b_col = 4'(r);
        #1;
        expect_eq("orig after work writes", i_data, want(r, N - 1 - r));
        expect_eq("work beside orig", b_data, ref_w[r]);
      end
      i_orig = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
