// d_mem_tb: self-checking testbench for d_mem (N = 8, 8 x 16 words).
//
// Writes every location with a random value, alternating between the two
// write ports and using both in the same cycle on different rows, then reads
// all locations through both read ports at once (different addresses on the
// two ports), then rewrites a random subset and checks again, including a
// read of the same location on both ports.
module d_mem_tb;
  import qrd_pkg::*;
  import fp_tb_pkg::*;

  localparam int N = 8;

  logic       clk = 1'b0, we0 = 1'b0, we1 = 1'b0;
  logic [2:0] wrow0, wrow1, rrow0, rrow1;
  logic [3:0] wcol0, wcol1, rcol0, rcol1;
  cfp_t       wdata0, wdata1, rdata0, rdata1;
  cfp_t       ref_m [N][2*N];
  int         checks = 0, failures = 0;

  d_mem #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic read_all();
    for (int a = 0; a < N * 2 * N; a++) begin
      int b2 = (a * 37 + 5) % (N * 2 * N);
      rrow0 = 3'(a / (2 * N)); rcol0 = 4'(a % (2 * N));
      rrow1 = 3'(b2 / (2 * N)); rcol1 = 4'(b2 % (2 * N));
      #1;
      checks += 2;
      if (rdata0 != ref_m[a / (2 * N)][a % (2 * N)]) begin
        failures++;
        if (failures < 10) $display("FAIL port 0 at %0d", a);
      end
      if (rdata1 != ref_m[b2 / (2 * N)][b2 % (2 * N)]) begin
        failures++;
        if (failures < 10) $display("FAIL port 1 at %0d", b2);
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wrow0 = '0; wcol0 = '0; wdata0 = CFP_ZERO; wrow1 = '0; wcol1 = '0; wdata1 = CFP_ZERO;
    rrow0 = '0; rcol0 = '0; rrow1 = '0; rcol1 = '0;
    @(negedge clk);
    // port 0 fills rows 0..N/2-1 while port 1 fills rows N/2..N-1
    for (int r = 0; r < N / 2; r++)
      for (int c = 0; c < 2 * N; c++) begin
        ref_m[r][c] = real2cfp(rnd_real(8.0, 6), rnd_real(8.0, 6));
        ref_m[r + N / 2][c] = real2cfp(rnd_real(8.0, 6), rnd_real(8.0, 6));
        we0 = 1'b1; wrow0 = 3'(r); wcol0 = 4'(c); wdata0 = ref_m[r][c];
        we1 = 1'b1; wrow1 = 3'(r + N / 2); wcol1 = 4'(c); wdata1 = ref_m[r + N / 2][c];
        @(negedge clk);
      end
    we0 = 1'b0; we1 = 1'b0;
    read_all();
    for (int n = 0; n < 40; n++) begin
      int r = $urandom % N, c = $urandom % (2 * N);
      ref_m[r][c] = real2cfp(rnd_real(8.0, 6), rnd_real(8.0, 6));
      if (n % 2 == 0) begin we0 = 1'b1; wrow0 = 3'(r); wcol0 = 4'(c); wdata0 = ref_m[r][c]; end
      else            begin we1 = 1'b1; wrow1 = 3'(r); wcol1 = 4'(c); wdata1 = ref_m[r][c]; end
      @(negedge clk);
      we0 = 1'b0; we1 = 1'b0;
    end
    read_all();
    rrow0 = 3'd5; rcol0 = 4'd9; rrow1 = 3'd5; rcol1 = 4'd9;
    #1;
    checks++;
    if (rdata0 != ref_m[5][9] || rdata1 != ref_m[5][9]) begin
      failures++;
      $display("FAIL same address on both ports");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
