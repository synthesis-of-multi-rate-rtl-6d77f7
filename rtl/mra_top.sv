// mra_top: four arrays for multi-rate and recurrence-equation designs,
// side by side.
//
// The designs share only the clock and reset; each has its own ports,
// prefixed by its name:
//   conv_*  conv_mra   multi-rate array for convolution (clock ratio K)
//   bba_*   conv_bba   bounded broadcast array for convolution (groups of KB)
//   dec_*   decim_mra  multi-rate decimation filter (ratio M)
//   toep_*  toeplitz   Toeplitz factorization YR = X (upper array for X and
//                      the multipliers z, folded lower array for Y)
// All run from one clock, the fast clock of the multi-rate arrays; their
// slow clocks are enables made inside them. Timing of each port group is
// described in the header of the module it belongs to. Parameter defaults
// are the sizes of the thesis' figures: K = 3 with 4 PEs for the
// multi-rate convolution, groups of 3 over 6 PEs for the bounded broadcast
// one, M = 2 with taps h(0..4) for decimation, order 7 for the Toeplitz
// matrix.
module mra_top
  import mra_pkg::*;
#(
  parameter int DW    = 16,  // sample/weight width of the filters
  parameter int AW    = 40,  // accumulator width of the filters
  parameter int K     = 3,   // convolution clock ratio
  parameter int NPE   = 4,   // convolution PEs (outputs per run)
  parameter int KB    = 3,   // broadcast group size of the BBA
  parameter int NB    = 6,   // BBA PEs (samples held)
  parameter int M     = 2,   // decimation factor
  parameter int NH    = 4,   // decimation filter order (NH+1 taps)
  parameter int NT    = 7    // Toeplitz matrix order
) (
  input  logic                 clk,
  input  logic                 rst,
  // convolution
  input  logic                 conv_clr,
  input  logic signed [DW-1:0] conv_w,
  input  logic                 conv_w_valid,
  input  logic                 conv_w_last,
  input  logic signed [DW-1:0] conv_x,
  output logic signed [AW-1:0] conv_y [NPE],
  output logic                 conv_done,
  output logic [NPE-1:0]       conv_mac_active,
  // bounded broadcast convolution
  input  logic                 bba_x_load,
  input  logic signed [DW-1:0] bba_x [NB],
  input  logic signed [DW-1:0] bba_w,
  input  logic                 bba_w_valid,
  input  logic                 bba_w_first,
  input  logic                 bba_w_last,
  output logic signed [AW-1:0] bba_y,
  output logic                 bba_y_valid,
  // decimation filter
  input  logic                 dec_h_load,
  input  logic signed [DW-1:0] dec_h [NH+1],
  input  logic signed [DW-1:0] dec_x,
  output logic signed [AW-1:0] dec_y,
  output logic                 dec_y_valid,
  // Toeplitz factorization
  input  logic                 toep_start,
  input  fx_t                  toep_t [NT],
  output fx_t                  toep_X [NT][NT],
  output fx_t                  toep_Y [NT][NT],
  output logic                 toep_x_done,
  output logic                 toep_done
);

  conv_mra #(.DW(DW), .AW(AW), .K(K), .NPE(NPE)) u_conv (
    .clk, .rst,
    .clr       (conv_clr),
    .w_in      (conv_w),
    .w_valid   (conv_w_valid),
    .w_last    (conv_w_last),
    .x_in      (conv_x),
    .y         (conv_y),
    .done      (conv_done),
    .mac_active(conv_mac_active)
  );

  conv_bba #(.DW(DW), .AW(AW), .K(KB), .NPE(NB)) u_bba (
    .clk, .rst,
    .x_load (bba_x_load),
    .x_in   (bba_x),
    .w_in   (bba_w),
    .w_valid(bba_w_valid),
    .w_first(bba_w_first),
    .w_last (bba_w_last),
    .y_out  (bba_y),
    .y_valid(bba_y_valid)
  );

  decim_mra #(.DW(DW), .AW(AW), .M(M), .N(NH)) u_decim (
    .clk, .rst,
    .h_load (dec_h_load),
    .h_in   (dec_h),
    .x_in   (dec_x),
    .y      (dec_y),
    .y_valid(dec_y_valid)
  );

  toeplitz #(.N(NT)) u_toep (
    .clk, .rst,
    .start (toep_start),
    .t     (toep_t),
    .X     (toep_X),
    .Y     (toep_Y),
    .x_done(toep_x_done),
    .done  (toep_done)
  );

endmodule
