// toep_upper_pe: interior cell of the Toeplitz upper-part array.
//
// Cell P of the array owns diagonal P of the upper part: the values
// x(i, i+P) and w(i, i+P) for successive rows i. When the multiplier z(i)
// reaches it, the cell computes row i from row i-1:
//     x(i, i+P) = x(i-1, i-1+P) + z(i) * w(i-1, i+P)      (fx)
//     w(i, i+P) = w(i-1, i+P)   + z(i) * x(i-1, i-1+P)    (fw)
// x(i-1, i-1+P) is the cell's own x; w(i-1, i+P) is its right neighbour's
// w, which that cell keeps until it handles row i one tick later. So x
// stays in its cell while w moves one cell left per row. Each new x is written into the cell's memory at address i-1,
// so the memory ends up holding diagonal P of X. z moves on to the right
// neighbour through one register.
//
// Follows the thesis: the recurrences, the fx/fw node functions, the
// memory for X and the registered z path. This design's choices: the
// projection that gives one cell per diagonal, loading row 1 in parallel,
// the fixed-point format of mra_pkg.
module toep_upper_pe
  import mra_pkg::*;
#(
  parameter int N = 7      // matrix order
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  load,       // take row 1: x(1,1+P) = w(1,1+P) = t_init
  input  fx_t   t_init,
  input  ztok_t z_in,
  output ztok_t z_out,
  input  fx_t   w_right,    // right neighbour's w
  output fx_t   x_q,
  output fx_t   w_q,
  output fx_t   mem [N]     // mem[i-1] = x(i, i+P)
);

  fx_t x_new;
  assign x_new = x_q + fx_mul(z_in.z, w_right);

  always_ff @(posedge clk) begin
    if (rst) begin
      x_q   <= '0;
      w_q   <= '0;
      z_out <= '0;
      for (int a = 0; a < N; a++) mem[a] <= '0;
    end else if (load) begin
      x_q   <= t_init;
      w_q   <= t_init;
      z_out <= '0;
      mem[0] <= t_init;
      for (int a = 1; a < N; a++) mem[a] <= '0;
    end else begin
      z_out <= z_in;
      if (z_in.v) begin
        x_q <= x_new;
        w_q <= w_right + fx_mul(z_in.z, x_q);
        if (int'(z_in.row) >= 1 && int'(z_in.row) <= N)
          mem[int'(z_in.row) - 1] <= x_new;
      end
    end
  end

endmodule
