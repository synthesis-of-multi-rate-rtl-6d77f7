// toep_lower: lower part of the Toeplitz factorization YR = X.
//
// From the multipliers z(i), i = 2..N, made by the upper part it computes
// the unit lower-triangular Y with
//     y(1,1) = 1,  y(i,0) = 0
//     y(i,j) = y(i-1,j-1) + z(i) y(i-1,i-j)     1 <= j <= i
// The second term reads row i-1 backwards: a dependence that is affine,
// not uniform (D = [1 0; 1 -1], D - I of rank one, ratio r = -1), so the
// recurrence is a directional uniform one. With r = -1 it becomes uniform by
// folding the index space along its plane of symmetry: each row is folded
// in the middle, and a linear array of N cells (toep_lower_pe) then has
// only nearest-neighbour links and no switches.
//
// Interface and timing:
//   * start (one tick) sets row 1.
//   * z_in: one token per row, rows 2..N in order, at most one per tick.
//     Cell D handles row i D ticks after the token enters cell 0.
//   * done pulses N ticks after the token of row N entered; Y[r][c]
//     (0-based, c <= r) then holds y(r+1, c+1); entries above the diagonal
//     are 0.
// Follows the thesis: the folding of this r = -1 recurrence into a
// switch-free array. This design's choices: the folded indexing (see
// toep_lower_pe), token interface, fixed point.
module toep_lower
  import mra_pkg::*;
#(
  parameter int N = 7      // matrix order
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  start,
  input  ztok_t z_in,
  output fx_t   Y [N][N],
  output logic  done
);

  ztok_t z_c [N+1];
  fx_t   b_c [N+1];      // b_c[d] enters cell d from the left
  fx_t   mem [N][N];

  assign z_c[0] = z_in;
  assign b_c[0] = '0;    // y(i-1, 0) = 0

  for (genvar d = 0; d < N; d++) begin : g_pe
    toep_lower_pe #(.N(N), .D(d)) u_pe (
      .clk, .rst,
      .load  (start),
      .z_in  (z_c[d]),
      .z_out (z_c[d+1]),
      .b_left(b_c[d]),
      .b_old (b_c[d+1]),
      .mem   (mem[d])
    );
  end

  always_ff @(posedge clk) begin
    if (rst) done <= 1'b0;
    else     done <= z_c[N-1].v && (int'(z_c[N-1].row) == N);
  end

  for (genvar r = 0; r < N; r++) begin : g_row
    for (genvar c = 0; c < N; c++) begin : g_col
      assign Y[r][c] = (c <= r) ? mem[(r - c) % N][r] : '0;
    end
  end

endmodule
