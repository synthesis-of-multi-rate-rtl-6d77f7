// toeplitz: factorization YR = X of a symmetric Toeplitz matrix.
//
// R has first row t(0..N-1). The result is a unit lower-triangular Y and an
// upper-triangular X with YR = X (X is the LU factor of R, Y its inverse
// lower factor). The upper-part array (toep_upper) computes X and the
// multipliers z(i); each z(i) passes through one register into the lower-
// part array (toep_lower), which computes Y. The X/w computation never
// needs Y, so the two arrays form a pipeline linked only by the z stream.
//
// Interface and timing:
//   * start (one tick) with t[] valid begins a factorization.
//   * x_done pulses 2N-2 ticks after start (X final); done pulses 3N-2 ticks
//     after start, when X and Y both hold the result until the next start.
// Values are signed fixed point (mra_pkg: TW bits, TF fraction bits).
// Follows the thesis: the split into two sub-systems and their arrays.
// This design's choices: the register between them, timing, number format.
module toeplitz
  import mra_pkg::*;
#(
  parameter int N = 7      // matrix order
) (
  input  logic clk,
  input  logic rst,
  input  logic start,
  input  fx_t  t [N],
  output fx_t  X [N][N],
  output fx_t  Y [N][N],
  output logic x_done,
  output logic done
);

  ztok_t z_up, z_link;

  toep_upper #(.N(N)) u_upper (
    .clk, .rst, .start, .t, .X, .z_tok(z_up), .done(x_done)
  );

  always_ff @(posedge clk) begin
    if (rst || start) z_link <= '0;
    else              z_link <= z_up;
  end

  toep_lower #(.N(N)) u_lower (
    .clk, .rst, .start, .z_in(z_link), .Y, .done
  );

endmodule
