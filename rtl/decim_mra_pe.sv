// decim_mra_pe: one processing element of the multi-rate decimation filter.
//
// Holds one filter coefficient h_j. Samples pass through M-1 registers
// clocked every fast tick; the last of them is the multiplier's tap. The
// partial sum of an output passes through one register clocked by the slow
// enable (once every M fast ticks): y_out <= y_in + h_j * tap.
//
// Follows the thesis for M = 2 (one sample register per PE, a D on the
// partial-sum path at the slow clock). M-1 sample registers for a general M
// is this design's choice: it keeps the tap of PE j at sample index c - j
// when the partial sum for output c passes, whatever M is.
module decim_mra_pe #(
  parameter int DW = 16,   // sample and coefficient width
  parameter int AW = 40,   // partial-sum width
  parameter int M  = 2     // decimation factor = fast-to-slow clock ratio
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 slow_en,   // slow clock as an enable
  input  logic signed [DW-1:0] h,
  input  logic signed [DW-1:0] x_in,
  output logic signed [DW-1:0] x_out,
  input  logic signed [AW-1:0] y_in,
  output logic signed [AW-1:0] y_out
);

  logic signed [DW-1:0] xr [M-1];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < M-1; k++) xr[k] <= '0;
      y_out <= '0;
    end else begin
      xr[0] <= x_in;
      for (int k = 1; k < M-1; k++) xr[k] <= xr[k-1];
      if (slow_en) y_out <= y_in + AW'(h) * AW'(xr[M-2]);
    end
  end

  assign x_out = xr[M-2];

  initial begin
    if (M < 2) $error("decim_mra_pe: M must be at least 2");
  end

endmodule
