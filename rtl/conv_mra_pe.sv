// conv_mra_pe: one processing element of the multi-rate convolution array.
//
// The PE owns one output y_i and keeps it in an accumulator (outputs stay
// in place, the projection along the tap index j). Two streams pass through
// it at the fast clock:
//   * w (the weights) through one register, so a weight moves one PE per
//     fast tick (1/K of a basic time unit);
//   * x (the samples) through K-1 registers in the opposite direction, so a
//     sample moves one PE per K-1 fast ticks ((K-1)/K of a basic unit).
// When a valid weight reaches the PE it pairs it with the sample at its
// x input (the tap sits before the x registers) and starts a multiply-
// accumulate. The multiply-accumulate is the slow operation: it is given K
// fast ticks (a multi-cycle path) and the accumulator is written K ticks
// after the operands are captured, i.e. on this PE's phase of the slow
// clock. A new weight may arrive on the same edge as the write.
//
// Follows the thesis: the register counts on w and x, the stationary
// accumulator, the K:1 clock ratio. This design's choices: one fast clock
// with the slow clock expressed as a per-PE countdown, a synchronous
// active-high reset, a clear input that zeroes the accumulator, and a 'last'
// flag riding with w so the array can report completion.
module conv_mra_pe #(
  parameter int DW = 16,   // sample and weight width
  parameter int AW = 40,   // accumulator width
  parameter int K  = 3     // fast-to-slow clock ratio
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 clr,        // zero the accumulator
  input  logic signed [DW-1:0] w_in,
  input  logic                 w_vin,
  input  logic                 w_lin,      // this weight is the last one
  output logic signed [DW-1:0] w_out,
  output logic                 w_vout,
  output logic                 w_lout,
  input  logic signed [DW-1:0] x_in,       // also the multiplier's tap
  output logic signed [DW-1:0] x_out,
  output logic signed [AW-1:0] acc,
  output logic                 mac_done,   // accumulator written this edge
  output logic                 last_done   // last product accumulated
);

  logic signed [DW-1:0] xr [K-1];
  logic signed [DW-1:0] opw, opx;
  logic                 pend, plast;
  logic [$clog2(K+1)-1:0] cnt;

  // w path: one fast register
  always_ff @(posedge clk) begin
    if (rst) begin
      w_out  <= '0;
      w_vout <= 1'b0;
      w_lout <= 1'b0;
    end else begin
      w_out  <= w_in;
      w_vout <= w_vin;
      w_lout <= w_lin & w_vin;
    end
  end

  // x path: K-1 fast registers
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < K-1; k++) xr[k] <= '0;
    end else begin
      xr[0] <= x_in;
      for (int k = 1; k < K-1; k++) xr[k] <= xr[k-1];
    end
  end
  assign x_out = xr[K-2];

  // slow multiply-accumulate, K fast ticks from operand capture to write
  wire fire = pend && (cnt == '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      pend      <= 1'b0;
      plast     <= 1'b0;
      cnt       <= '0;
      opw       <= '0;
      opx       <= '0;
      acc       <= '0;
      mac_done  <= 1'b0;
      last_done <= 1'b0;
    end else begin
      mac_done  <= fire;
      last_done <= fire && plast;
      if (clr)
        acc <= '0;
      else if (fire)
        acc <= acc + AW'(opw) * AW'(opx);
      if (w_vout) begin
        opw   <= w_out;
        opx   <= x_in;
        plast <= w_lout;
        pend  <= 1'b1;
        cnt   <= ($clog2(K+1))'(K-1);
      end else begin
        if (fire) pend <= 1'b0;
        if (cnt != '0) cnt <= cnt - 1'b1;
      end
    end
  end

  // weights form the slow stream: two must be at least K fast ticks apart,
  // otherwise a multiply-accumulate would be cut short
  property p_slow_stream;
    @(posedge clk) disable iff (rst) w_vout |-> (cnt == '0);
  endproperty
  a_slow_stream: assert property (p_slow_stream);

  initial begin
    if (K < 2) $error("conv_mra_pe: K must be at least 2");
  end

endmodule
