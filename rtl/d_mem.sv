// d_mem: the D memory of the folded QRD-RLS core, N rows by 2N columns of
// complex words.
//
// Row i, columns i..N-1 hold row i of the upper triangular factor U (the
// boundary cell writes the diagonal, the internal cell the rest); columns
// N..2N-1 hold row i of Z, the identity matrix rotated along with A. Back
// substitution then overwrites Z[i][j] with the inverse element X[i][j], so
// the right half ends up holding the inverse. Two write ports and two
// asynchronous read ports: during triangularisation the internal cell (port
// 0) and the boundary cell (port 1) each read and write their element in the
// same cycle, always in different rows; back substitution needs U[i][k] and
// X[k][j] in the same cycle. Writes to the same location from both ports in
// one cycle are not allowed (port 1 would win). Nothing is cleared at reset: the controller
// treats the stored values as zero while the first input row passes, so a
// new matrix needs no clearing pass. That the D memory stores the boundary
// and internal cell results follows the design's description; the layout and
// port count are this design's.
module d_mem
  import qrd_pkg::*;
#(
  parameter int unsigned N  = 8,
  localparam int unsigned RW = $clog2(N),
  localparam int unsigned CW = $clog2(2 * N)
) (
  input  logic          clk,
  input  logic          we0,
  input  logic [RW-1:0] wrow0,
  input  logic [CW-1:0] wcol0,
  input  cfp_t          wdata0,
  input  logic          we1,
  input  logic [RW-1:0] wrow1,
  input  logic [CW-1:0] wcol1,
  input  cfp_t          wdata1,
  input  logic [RW-1:0] rrow0,
  input  logic [CW-1:0] rcol0,
  output cfp_t          rdata0,
  input  logic [RW-1:0] rrow1,
  input  logic [CW-1:0] rcol1,
  output cfp_t          rdata1
);

  cfp_t mem [N][2*N];

  always_ff @(posedge clk) begin
    if (we0) mem[wrow0][wcol0] <= wdata0;
    if (we1) mem[wrow1][wcol1] <= wdata1;
  end

  assign rdata0 = mem[rrow0][rcol0];
  assign rdata1 = mem[rrow1][rcol1];

endmodule
