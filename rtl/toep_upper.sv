// toep_upper: upper part of the Toeplitz factorization YR = X.
//
// For a symmetric Toeplitz matrix R with first row t(0..N-1) it computes the
// upper-triangular X and the multipliers z(i), i = 2..N, with
//     x(1,j) = w(1,j) = t(j-1)
//     z(i)   = -w(i-1,i) / x(i-1,i-1)
//     x(i,j) = x(i-1,j-1) + z(i) w(i-1,j)    j >= i
//     w(i,j) = w(i-1,j)   + z(i) x(i-1,j-1)  j >  i
// This part is a uniform recurrence and needs no multi-rate clocking.
//
// Structure: a boundary cell (fz, one divider) and N interior cells
// (toep_upper_pe), cell P owning diagonal j - i = P. The w value each cell
// needs comes from its right neighbour, so the two values z needs,
// x(i-1,i-1) in cell 0 and w(i-1,i) in cell 1, are always next to the
// boundary: every z is made by the same boundary cell. z(i) leaves the
// boundary straight into cell 0 and moves right one cell per tick, so
// cell P works on row i at tick 2(i-2) + P after the start; node (i,j) is
// scheduled at 2i + (j-i) = i + j plus a constant.
//
// Interface and timing:
//   * start (one tick) loads row 1 from t[]; the boundary then issues z(2)
//     on the next tick and one z every second tick up to z(N).
//   * z_tok shows each z(i) with its row on the tick it is issued, for the
//     lower part.
//   * done pulses 2N-2 ticks after the start tick; X[r][c] (0-based,
//     r <= c) then holds x(r+1, c+1); entries below the diagonal are 0.
// Follows the thesis: the recurrences and the boundary/interior cell split
// with a memory per cell. This design's choices: the cell-per-diagonal
// projection, the issue rate, parallel load, fixed point, division by zero
// giving z = 0.
module toep_upper
  import mra_pkg::*;
#(
  parameter int N = 7      // matrix order
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  start,
  input  fx_t   t [N],
  output fx_t   X [N][N],
  output ztok_t z_tok,
  output logic  done
);

  fx_t   x_q [N], w_q [N], w_r [N];
  ztok_t z_c [N+1];
  fx_t   mem [N][N];

  // boundary cell: issue control and fz
  logic          active, gap;
  logic [RW-1:0] row;

  always_ff @(posedge clk) begin
    if (rst) begin
      active <= 1'b0;
      gap    <= 1'b0;
      row    <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        active <= (N >= 2);
        gap    <= 1'b0;
        row    <= RW'(2);
      end else if (active) begin
        gap <= ~gap;
        if (!gap) begin
          row <= row + 1'b1;
          if (int'(row) == N) begin
            active <= 1'b0;
            done   <= 1'b1;
          end
        end
      end
    end
  end

  always_comb begin
    z_c[0].v   = active && !gap && !start;
    z_c[0].row = row;
    z_c[0].z   = fx_div(-w_q[1 % N], x_q[0]);
  end
  assign z_tok = z_c[0];

  for (genvar p = 0; p < N; p++) begin : g_pe
    assign w_r[p] = (p + 1 < N) ? w_q[(p + 1) % N] : '0;
    toep_upper_pe #(.N(N)) u_pe (
      .clk, .rst,
      .load   (start),
      .t_init (t[p]),
      .z_in   (z_c[p]),
      .z_out  (z_c[p+1]),
      .w_right(w_r[p]),
      .x_q    (x_q[p]),
      .w_q    (w_q[p]),
      .mem    (mem[p])
    );
  end

  for (genvar r = 0; r < N; r++) begin : g_row
    for (genvar c = 0; c < N; c++) begin : g_col
      assign X[r][c] = (c >= r) ? mem[(c - r + N) % N][r] : '0;
    end
  end

endmodule
