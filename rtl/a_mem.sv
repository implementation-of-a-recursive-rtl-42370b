// a_mem: the A memory of the folded QRD-RLS core. It stores the N x N complex
// input matrix and the one row of [A | I] that is being rotated down the array.
//
// The input matrix is written row-major, one element per cycle, through the
// load port (load_we, load_row, load_col). Two read ports serve the boundary
// cell (b_*) and the internal cell (i_*), which work at the same time. On each
// port *_orig selects the original row *_row of [A | I]: columns 0..N-1 come
// from the stored matrix, columns N..2N-1 are the identity row, generated
// here rather than stored. A matrix smaller than N (dim < N) is stored in the
// top-left corner and padded on read to diag(A, I): elements outside the
// dim x dim corner read as the identity. Otherwise the read comes from the 2N-entry work
// row, which holds the incoming row as rotated by the array rows above; it is
// written at column wr_col on a clock edge with wr_en. Reads are asynchronous
// (combinational), writes take effect at the clock edge, so a value written
// in one cycle is read back in the next. Loading and rotation use separate
// storage, so the next matrix can be loaded while the current one is in the
// array. Storing the input in an A memory follows the design's description;
// the separate work row, the two read ports, the generated identity and the
// padding are this design's choices.
module a_mem
  import qrd_pkg::*;
#(
  parameter int unsigned N  = 8,
  localparam int unsigned RW = $clog2(N),
  localparam int unsigned CW = $clog2(2 * N),
  localparam int unsigned DW = $clog2(N + 1)
) (
  input  logic          clk,
  input  logic [DW-1:0] dim,        // size of the stored matrix (1..N)
  // load port
  input  logic          load_we,
  input  logic [RW-1:0] load_row,
  input  logic [RW-1:0] load_col,
  input  cfp_t          load_data,
  // read port for the boundary cell
  input  logic          b_orig,
  input  logic [RW-1:0] b_row,
  input  logic [CW-1:0] b_col,
  output cfp_t          b_data,
  // read port for the internal cell
  input  logic          i_orig,
  input  logic [RW-1:0] i_row,
  input  logic [CW-1:0] i_col,
  output cfp_t          i_data,
  // work row write
  input  logic          wr_en,
  input  logic [CW-1:0] wr_col,
  input  cfp_t          wr_data
);

  cfp_t mat  [N][N];
  cfp_t work [2*N];

  always_ff @(posedge clk) begin
    if (load_we) mat[load_row][load_col] <= load_data;
    if (wr_en)   work[wr_col] <= wr_data;
  end

  function automatic cfp_t rd(logic orig, logic [RW-1:0] row, logic [CW-1:0] col);
    if (!orig)
      return work[col];
    else if (col < CW'(N) && 32'(row) < 32'(dim) && 32'(col) < 32'(dim))
      return mat[row][col[RW-1:0]];
    else if (col < CW'(N))
      return (col == CW'(row)) ? CFP_ONE : CFP_ZERO;
    else
      return (col - CW'(N) == CW'(row)) ? CFP_ONE : CFP_ZERO;
  endfunction

  assign b_data = rd(b_orig, b_row, b_col);
  assign i_data = rd(i_orig, i_row, i_col);

endmodule
