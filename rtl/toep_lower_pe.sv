// toep_lower_pe: cell of the folded Toeplitz lower-part array.
//
// Row i of Y follows from row i-1 as y(i,j) = y(i-1,j-1) + z(i) y(i-1,i-j):
// each entry needs its neighbour on the left and its mirror image across
// the middle of the row. Folding the row onto itself pairs each entry with
// its mirror; cell D then carries two values with the same node function:
//     a = y(i, i-D)        (the row read from the diagonal, "y")
//     b = y(i, D+1)        (the row read from column 1, "v")
// and when z(i) reaches it,
//     a(i) = a(i-1) + z(i) * b_left        (f_y)
//     b(i) = b_left + z(i) * a(i-1)        (f_v)
// where b_left is the left neighbour's b of row i-1. The left neighbour
// works on row i one tick earlier, so it keeps its previous b in a register
// (b_old) for this cell. Each new a is written into memory address i-1,
// which ends up holding the D-th subdiagonal of Y. z moves on to the right
// through one register.
//
// Follows the thesis: the fold that turns the reversed dependence into a
// uniform one, two values per cell with one node function, registered z and
// v paths, no switches (its design (b)). This design's choices: the exact
// indexing of the folded values, parallel initialisation, fixed point.
module toep_lower_pe
  import mra_pkg::*;
#(
  parameter int N = 7,     // matrix order
  parameter int D = 0      // cell index = subdiagonal
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  load,       // row 1: y(1,1) = 1
  input  ztok_t z_in,
  output ztok_t z_out,
  input  fx_t   b_left,     // left neighbour's b of the previous row
  output fx_t   b_old,
  output fx_t   mem [N]     // mem[i-1] = y(i, i-D)
);

  localparam fx_t INIT = (D == 0) ? FX_ONE : '0;

  fx_t a_q, b_q, a_new;
  assign a_new = a_q + fx_mul(z_in.z, b_left);

  always_ff @(posedge clk) begin
    if (rst || load) begin
      a_q   <= INIT;
      b_q   <= INIT;
      b_old <= INIT;
      z_out <= '0;
      mem[0] <= INIT;
      for (int r = 1; r < N; r++) mem[r] <= '0;
    end else begin
      z_out <= z_in;
      if (z_in.v) begin
        a_q   <= a_new;
        b_q   <= b_left + fx_mul(z_in.z, a_q);
        b_old <= b_q;
        if (int'(z_in.row) >= 1 && int'(z_in.row) <= N)
          mem[int'(z_in.row) - 1] <= a_new;
      end
    end
  end

endmodule
