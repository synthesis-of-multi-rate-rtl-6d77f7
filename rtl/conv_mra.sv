// conv_mra: multi-rate array (MRA) for convolution, y_i = sum_j w_j * x_{i+j}.
//
// NPE processing elements in a row, PE i holding output y_i. Weights enter
// at PE 0 and move right one PE per fast tick; samples enter at PE NPE-1 and
// move left one PE per K-1 fast ticks. This is the schedule s = [1/K, 1]
// (node (i,j) starts at j + i/K basic units) with projection along j: the
// multiply-accumulate, the slow operation, gets one basic unit of K fast
// ticks, while data transfers take fractions of it. Every PE does one
// multiply-accumulate per basic unit, each PE one fast tick after its left
// neighbour.
//
// Interface and timing (fast ticks, one per clk):
//   * clr for one tick zeroes all accumulators before a run.
//   * weight w_j (j = 0..k-1) is presented with w_valid at tick T0 + K*j;
//     w_last marks w_{k-1}. Valid weights must be at least K ticks apart.
//   * sample x_e (e = 0..NPE+k-2) is presented at tick
//     T0 + K*e + 1 - (NPE-1)*(K-1), i.e. one sample per K ticks, the first
//     ones ahead of the first weight. x_in is sampled every tick; values
//     between samples are not used.
//   * done pulses at tick T0 + K*k + NPE + 1, when y[0..NPE-1] hold the
//     results. That is (NPE-1) + K*k fast ticks of computation, the thesis'
//     T = (n-1)/K + k basic units, plus one tick each for input and output
//     registers.
// Follows the thesis: the structure and the schedule. This design's
// choices: the single fast clock, the input timing convention, clr/done.
module conv_mra #(
  parameter int DW  = 16,  // sample and weight width
  parameter int AW  = 40,  // accumulator width
  parameter int K   = 3,   // fast-to-slow clock ratio
  parameter int NPE = 4    // number of PEs = outputs per run
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 clr,
  input  logic signed [DW-1:0] w_in,
  input  logic                 w_valid,
  input  logic                 w_last,
  input  logic signed [DW-1:0] x_in,
  output logic signed [AW-1:0] y [NPE],
  output logic                 done,
  output logic [NPE-1:0]       mac_active   // PE i wrote its accumulator
);

  logic signed [DW-1:0] w_c [NPE+1];
  logic                 v_c [NPE+1];
  logic                 l_c [NPE+1];
  logic signed [DW-1:0] x_c [NPE+1];   // x_c[i] enters PE i from the right
  logic [NPE-1:0]       last_d;

  assign w_c[0]   = w_in;
  assign v_c[0]   = w_valid;
  assign l_c[0]   = w_last;
  assign x_c[NPE] = x_in;

  for (genvar i = 0; i < NPE; i++) begin : g_pe
    logic signed [DW-1:0] x_left;
    conv_mra_pe #(.DW(DW), .AW(AW), .K(K)) u_pe (
      .clk, .rst, .clr,
      .w_in (w_c[i]),   .w_vin (v_c[i]),   .w_lin (l_c[i]),
      .w_out(w_c[i+1]), .w_vout(v_c[i+1]), .w_lout(l_c[i+1]),
      .x_in (x_c[i+1]), .x_out (x_left),
      .acc  (y[i]),
      .mac_done (mac_active[i]),
      .last_done(last_d[i])
    );
    assign x_c[i] = x_left;
  end

  assign done = last_d[NPE-1];

endmodule
