// conv_bba: bounded broadcast array (BBA) for convolution,
// y_i = sum_j w_j * x_{i+j}.
//
// The sibling of the multi-rate array: instead of giving data transfers a
// faster clock, a weight is broadcast to a group of K neighbouring PEs in
// one tick, and only the hop from one group to the next costs a register.
// Every operation starts on a whole tick, so the array has one clock.
//
// NPE PEs in a row, PE p holding sample x_p (loaded in parallel). Weights
// enter at the left, one per tick: group 0 (PEs 0..K-1) sees w_in directly,
// group g sees it g ticks later. Partial sums enter at the left as zero and
// move right, through one register per PE and one more at the end of each
// group, each PE adding w * x_p. Following one partial sum, the weight it
// meets at PE p is one tick later than the one it met at PE p-1, so the
// partial sum that meets w_0 at PE i collects y_i = sum_j w_j x_{i+j}. It
// leaves at the right end; the outputs come out last index first.
//
// Interface and timing:
//   * x_load copies x_in[0..NPE-1] into the PEs.
//   * w_j (j = 0..k-1, k <= NPE) comes with w_valid on consecutive ticks
//     T0..T0+k-1, w_first marking w_0 and w_last w_{k-1}. Ticks without
//     w_valid count as zero weights.
//   * y_valid marks the complete outputs y_i, i = NPE-k down to 0: y_i is on
//     y_out at tick T0 + NPE - i + (NPE-1)/K + 1, one per tick.
// Computation spans ticks T0 .. T0 + k - 1 + (NPE-1)/K: k + (NPE-1)/K
// ticks, against T = k - 1 + ceil(n/K) basic units in the thesis for
// n outputs (here n = NPE-k+1 outputs from NPE samples). The finished
// outputs then still travel to the right end.
// Follows the thesis' figure: stationary x, bounded broadcast of w with a
// register between groups, a register per PE and per group on y. This
// design's choices: parallel load of x, the first/last flags that mark
// complete outputs, zero weights between runs.
module conv_bba #(
  parameter int DW  = 16,  // sample and weight width
  parameter int AW  = 40,  // accumulator width
  parameter int K   = 3,   // broadcast group size
  parameter int NPE = 6    // number of PEs (samples held)
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 x_load,
  input  logic signed [DW-1:0] x_in [NPE],
  input  logic signed [DW-1:0] w_in,
  input  logic                 w_valid,
  input  logic                 w_first,
  input  logic                 w_last,
  output logic signed [AW-1:0] y_out,
  output logic                 y_valid
);

  localparam int NG = (NPE + K - 1) / K;   // number of groups

  typedef struct packed {
    logic signed [AW-1:0] s;   // partial sum
    logic                 f;   // has met w_0
    logic                 l;   // has met w_{k-1}
  } slot_t;

  typedef struct packed {
    logic signed [DW-1:0] w;
    logic                 f;
    logic                 l;
  } wbus_t;

  logic signed [DW-1:0] x_r [NPE];
  wbus_t bus  [NG];          // weight seen by group g
  wbus_t bus_q[NG];          // register between group g and g+1
  slot_t pe_q [NPE];         // register after each PE
  slot_t grp_q[NG];          // register at the end of each group

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int p = 0; p < NPE; p++) x_r[p] <= '0;
    end else if (x_load) begin
      for (int p = 0; p < NPE; p++) x_r[p] <= x_in[p];
    end
  end

  // bounded broadcast of w
  always_comb begin
    bus[0].w = w_valid ? w_in : '0;
    bus[0].f = w_valid & w_first;
    bus[0].l = w_valid & w_last;
    for (int g = 1; g < NG; g++) bus[g] = bus_q[g-1];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int g = 0; g < NG; g++) bus_q[g] <= '0;
    end else begin
      for (int g = 0; g < NG; g++) bus_q[g] <= bus[g];
    end
  end

  // partial sums
  slot_t pe_in [NPE];
  always_comb begin
    for (int p = 0; p < NPE; p++) begin
      if (p == 0)          pe_in[p] = '0;
      else if (p % K == 0) pe_in[p] = grp_q[p/K - 1];
      else                 pe_in[p] = pe_q[p-1];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int p = 0; p < NPE; p++) pe_q[p] <= '0;
      for (int g = 0; g < NG; g++) grp_q[g] <= '0;
    end else begin
      for (int p = 0; p < NPE; p++) begin
        pe_q[p].s <= pe_in[p].s + AW'(bus[p/K].w) * AW'(x_r[p]);
        pe_q[p].f <= pe_in[p].f | bus[p/K].f;
        pe_q[p].l <= pe_in[p].l | bus[p/K].l;
      end
      for (int g = 0; g < NG; g++)
        grp_q[g] <= pe_q[(g*K + K - 1 < NPE) ? g*K + K - 1 : NPE - 1];
    end
  end

  assign y_out   = grp_q[NG-1].s;
  assign y_valid = grp_q[NG-1].f & grp_q[NG-1].l;

endmodule
