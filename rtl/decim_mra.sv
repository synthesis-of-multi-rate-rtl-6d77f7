// decim_mra: multi-rate array (MRA) for a decimation filter,
// y(i) = sum_{j=0..N} h(j) * x(M*i - j).
//
// N+1 PEs in a column, PE j holding coefficient h(j). Samples enter at the
// top (PE N) one per fast tick and move down the column through M-1
// registers per PE. Partial sums start at zero at PE N and move down one PE
// per slow tick (M fast ticks), each PE adding h(j) times its tap; finished
// outputs leave PE 0. Samples therefore run M times as fast as partial sums,
// the clock ratio r = M of the DURE x(2i-j) after the thesis' synthesis
// steps. One sample bus and one output bus suffice, where the systolic
// design needs M sample paths.
//
// Interface and timing:
//   * h_load copies h_in into the coefficient registers.
//   * x_in is taken every tick: sample x(e) at tick e after reset (tick 0 is
//     the first tick with rst low). Samples before tick 0 count as zero.
//   * y_valid pulses once every M ticks, from the start; y then holds
//     y(i) = sum_j h(j) x(M*i - j) for consecutive i and stays until the
//     next pulse. y(i) appears at tick M*i + M + N*(M-1); the
//     pulses before y(0) carry y(i) for negative i, which are zero.
//   * Latency from the last sample of y(i), x(M*i), to y(i): M + N*(M-1)
//     ticks. Rate: one output per M samples.
// Follows the thesis: the array and its two rates. This design's choices:
// one fast clock with the slow clock as an enable, the phase of the slow
// enable (chosen so outputs fall on multiples of M), widths, reset.
module decim_mra #(
  parameter int DW = 16,   // sample and coefficient width
  parameter int AW = 40,   // output width
  parameter int M  = 2,    // decimation factor
  parameter int N  = 4     // filter order: N+1 taps h(0..N)
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 h_load,
  input  logic signed [DW-1:0] h_in [N+1],
  input  logic signed [DW-1:0] x_in,
  output logic signed [AW-1:0] y,
  output logic                 y_valid
);

  localparam int PW = (M > 1) ? $clog2(M) : 1;
  localparam int P0 = N % M;   // aligns output centres to multiples of M

  logic signed [DW-1:0] h_r [N+1];
  logic [PW-1:0]        phase;
  logic                 slow_en;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int j = 0; j <= N; j++) h_r[j] <= '0;
    end else if (h_load) begin
      for (int j = 0; j <= N; j++) h_r[j] <= h_in[j];
    end
  end

  // slow clock: one enable every M fast ticks
  always_ff @(posedge clk) begin
    if (rst) phase <= PW'(P0);
    else     phase <= (phase == PW'(M-1)) ? '0 : phase + 1'b1;
  end
  assign slow_en = (phase == PW'(M-1));

  always_ff @(posedge clk) begin
    if (rst) y_valid <= 1'b0;
    else     y_valid <= slow_en;
  end

  logic signed [DW-1:0] x_c [N+2];    // x_c[j+1] enters PE j from above
  logic signed [AW-1:0] y_c [N+2];    // y_c[j+1] enters PE j from above
  assign x_c[N+1] = x_in;
  assign y_c[N+1] = '0;

  for (genvar j = 0; j <= N; j++) begin : g_pe
    decim_mra_pe #(.DW(DW), .AW(AW), .M(M)) u_pe (
      .clk, .rst, .slow_en,
      .h    (h_r[j]),
      .x_in (x_c[j+1]), .x_out(x_c[j]),
      .y_in (y_c[j+1]), .y_out(y_c[j])
    );
  end

  assign y = y_c[0];

endmodule
