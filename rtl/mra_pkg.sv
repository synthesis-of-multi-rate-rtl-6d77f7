// mra_pkg: types and arithmetic shared by the multi-rate array designs.
//
// The convolution and decimation arrays work on plain signed integers whose
// widths are module parameters. The Toeplitz factorization divides, so its
// values are signed fixed point: TW bits with TF fraction bits (Q15.16 by
// default). The thesis gives no word lengths or number format; these are
// this design's choices.
//
// fx_mul rounds toward minus infinity (arithmetic shift of the full product).
// fx_div truncates toward zero, like the SystemVerilog '/' operator, and
// returns 0 for a zero divisor (a singular leading minor).
// ztok_t carries one z(i) with its row index along the Toeplitz arrays.
// FX_ONE (1.0) is used by toep_lower_pe and the Toeplitz testbenches; a lint
// run on a filter module alone reports it unused, which is expected.
package mra_pkg;

  localparam int TW = 32;              // Toeplitz word width
  localparam int TF = 16;              // Toeplitz fraction bits
  typedef logic signed [TW-1:0] fx_t;

  localparam fx_t FX_ONE = fx_t'(1) <<< TF;

  // A multiplier z(i) of the Toeplitz factorization on its way along a
  // linear array, with the row i it belongs to.
  localparam int RW = 8;               // row index width: N <= 255
  typedef struct packed {
    logic          v;                  // token valid
    logic [RW-1:0] row;                // i, 2..N
    fx_t           z;
  } ztok_t;

  function automatic fx_t fx_mul(input fx_t a, input fx_t b);
    logic signed [2*TW-1:0] p;
    p = (2*TW)'(a) * (2*TW)'(b);
    return fx_t'(p >>> TF);
  endfunction

  function automatic fx_t fx_div(input fx_t num, input fx_t den);
    logic signed [2*TW-1:0] n, d;
    if (den == '0) return '0;
    n = (2*TW)'(num) <<< TF;
    d = (2*TW)'(den);
    return fx_t'(n / d);
  endfunction

endpackage
