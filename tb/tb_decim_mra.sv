// tb_decim_mra: self-checking test of the multi-rate decimation filter.
//
// Streams random samples (one per tick) through the filter with random
// coefficients, reloads the coefficients half way, and compares every
// output with a direct evaluation of y(i) = sum_j h(j) x(M*i - j)
// (samples before tick 0 are zero). Also checks the output rate (one pulse
// every M ticks) and the tick at which each y(i) appears.
module tb_decim_mra;
  localparam int DW = 16, AW = 40, M = 2, N = 4, NS = 400;

  logic clk = 1'b0, rst = 1'b1, h_load = 1'b0;
  logic signed [DW-1:0] h_in [N+1];
  logic signed [DW-1:0] x_in;
  logic signed [AW-1:0] y;
  logic y_valid;
  int checks = 0, failures = 0;

  decim_mra #(.DW(DW), .AW(AW), .M(M), .N(N)) dut (.*);

  always #5 clk = ~clk;

  logic signed [DW-1:0] xs [NS];
  logic signed [DW-1:0] h1 [N+1], h2 [N+1];
  int tick;          // tick index, 0 = first tick out of reset
  int last_valid;
  int nout;

  function automatic logic signed [AW-1:0] ref_y(input int i, input logic signed [DW-1:0] h [N+1]);
    logic signed [AW-1:0] acc = '0;
    for (int j = 0; j <= N; j++)
      if (M*i - j >= 0) acc += AW'(h[j]) * AW'(xs[M*i - j]);
    return acc;
  endfunction

  localparam int LAT = M + N*(M-1);
  localparam int SWITCH = 200;   // tick at which the new coefficients act

  initial begin
    foreach (xs[e]) xs[e] = DW'($urandom);
    foreach (h1[j]) begin h1[j] = DW'($urandom); h2[j] = DW'($urandom); end
    h_in = h1;
    x_in = '0;
    nout = 0; last_valid = -1;
    // coefficients loaded during reset would be cleared: load after it
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 1'b0; h_load = 1'b1;
    // this tick is tick 0; coefficients take effect from tick 1, before
    // any nonzero sample reaches a multiplier
    for (tick = 0; tick < NS; tick++) begin
      x_in = xs[tick];
      h_load = (tick == 0) || (tick == SWITCH);
      h_in = (tick < SWITCH) ? h1 : h2;
      @(posedge clk); #1;
      if (y_valid) begin
        int i;
        i = (tick + 1 - LAT) / M;
        nout++;
        checks++;
        if (last_valid >= 0 && tick + 1 - last_valid != M) begin
          failures++;
          $display("FAIL: output spacing %0d ticks", tick + 1 - last_valid);
        end
        last_valid = tick + 1;
        if ((tick + 1 - LAT) % M == 0) begin
          logic signed [AW-1:0] e;
          // outputs whose taps straddle the coefficient change are skipped
          if (M*i < SWITCH - LAT || M*i - N > SWITCH + 2*N*M) begin
            e = (M*i < SWITCH - LAT) ? ref_y(i, h1) : ref_y(i, h2);
            checks++;
            if (y !== e) begin
              failures++;
              $display("FAIL y(%0d)=%0d expected %0d at tick %0d", i, y, e, tick + 1);
            end
          end
        end else begin
          checks++; failures++;
          $display("FAIL: output at tick %0d is off the expected phase", tick + 1);
        end
      end
      @(negedge clk);
    end
    checks++;
    if (nout != NS / M) begin
      failures++;
      $display("FAIL: %0d outputs for %0d samples", nout, NS);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NS + 100) @(posedge clk);
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
