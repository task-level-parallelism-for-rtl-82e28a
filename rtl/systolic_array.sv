// systolic_array: N x N grid of sa_pe computing GEMM or TRSM on one tile.
//
// Row i of the grid receives its left operand on west_in[i]; column j
// receives its top operand on north_in[j] and its control bit on ctrl_in[j].
// Operands move one PE per cycle east and south; PE(i,j) accumulates
// C[i][j] in place. The feeder must skew the inputs: element k of row i goes
// in at pass cycle i+k, element k of column j at pass cycle k+j, so that
// A[i][k] and B[k][j] meet in PE(i,j) at cycle i+j+k.
//
//  GEMM: acc = C, west = A, north = B, ctrl = 0.  Result C - A*B.
//  TRSM: acc = B, west = strictly lower part of a unit lower-triangular L,
//        north = 0, ctrl_in[j] = 1 in pass cycle j only. Row i then sends its
//        finished result down at step i, and the rows below subtract
//        L[i][k]*X[k][j]: forward substitution, result L^-1 * B.
// A pass takes 3N-2 enabled cycles; acc_out is final after the last one.
// The grid, the east/south operand flow and the per-PE MUX with its control
// signal follow the published array; the skew convention, the token-based
// control and the parallel accumulator load/read are this design's choices.
module systolic_array
  import mf_pkg::*;
#(
  parameter int unsigned N = SA_N
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic              acc_load,
  input  elem_t [N*N-1:0]   acc_in,    // row-major
  input  elem_t [N-1:0]     west_in,
  input  elem_t [N-1:0]     north_in,
  input  logic  [N-1:0]     ctrl_in,
  output elem_t [N*N-1:0]   acc_out    // row-major
);

  elem_t h   [N][N+1];  // h[i][j]: value entering PE(i,j) from the west
  elem_t v   [N+1][N];  // v[i][j]: value entering PE(i,j) from the north
  logic  c   [N+1][N];

  for (genvar i = 0; i < N; i++) begin : g_row
    assign h[i][0] = west_in[i];
  end
  for (genvar j = 0; j < N; j++) begin : g_col
    assign v[0][j] = north_in[j];
    assign c[0][j] = ctrl_in[j];
  end

  for (genvar i = 0; i < N; i++) begin : g_i
    for (genvar j = 0; j < N; j++) begin : g_j
      sa_pe u_pe (
        .clk      (clk),
        .rst_n    (rst_n),
        .en       (en),
        .acc_load (acc_load),
        .acc_in   (acc_in[i*N+j]),
        .west_in  (h[i][j]),
        .north_in (v[i][j]),
        .ctrl_in  (c[i][j]),
        .east_out (h[i][j+1]),
        .south_out(v[i+1][j]),
        .ctrl_out (c[i+1][j]),
        .acc_out  (acc_out[i*N+j])
      );
    end
  end

endmodule
