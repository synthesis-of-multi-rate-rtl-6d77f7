// tb_conv_mra: self-checking test of the multi-rate convolution array.
//
// Runs several convolutions with random weights and samples and tap counts
// k = 1..7. Drives weights and samples at the times the array's header
// prescribes, then checks every output against a direct evaluation of
// y_i = sum_j w_j x_{i+j}, the completion time against
// T0 + K*k + NPE + 1, and the number of multiply-accumulates (NPE*k).
module tb_conv_mra;
  localparam int DW = 16, AW = 40, K = 3, NPE = 4;

  logic clk = 1'b0, rst = 1'b1, clr = 1'b0;
  logic signed [DW-1:0] w_in, x_in;
  logic w_valid, w_last;
  logic signed [AW-1:0] y [NPE];
  logic done;
  logic [NPE-1:0] mac_active;
  int checks = 0, failures = 0;
  int tick = 0;

  conv_mra #(.DW(DW), .AW(AW), .K(K), .NPE(NPE)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) tick <= tick + 1;

  int macs;
  always @(posedge clk) if (!rst) macs <= macs + $countones(mac_active);

  task automatic run(input int k);
    logic signed [DW-1:0] w [];
    logic signed [DW-1:0] x [];
    logic signed [AW-1:0] exp_y;
    int t0, x0, tdone, nx;
    w  = new[k];
    nx = NPE + k - 1;
    x  = new[nx];
    foreach (w[j]) w[j] = DW'($urandom_range(0, 65535));
    foreach (x[e]) x[e] = DW'($urandom_range(0, 65535));
    @(negedge clk); clr = 1'b1; @(negedge clk); clr = 1'b0;
    macs = 0;
    x0 = tick + 2;                         // first sample tick
    t0 = x0 + (NPE-1)*(K-1) - 1;           // first weight tick
    tdone = -1;
    while (tdone < 0) begin
      // drive inputs for the current tick
      w_valid = 1'b0; w_last = 1'b0; w_in = DW'($urandom); x_in = DW'($urandom);
      if (tick >= t0 && (tick - t0) % K == 0 && (tick - t0) / K < k) begin
        w_valid = 1'b1;
        w_in    = w[(tick - t0) / K];
        w_last  = ((tick - t0) / K == k - 1);
      end
      if (tick >= x0 && (tick - x0) % K == 0 && (tick - x0) / K < nx)
        x_in = x[(tick - x0) / K];
      @(posedge clk); #1;
      if (done) tdone = tick;
    end
    checks++;
    if (tdone != t0 + K*k + NPE + 1) begin
      failures++;
      $display("FAIL k=%0d: done at tick %0d, expected %0d", k, tdone, t0 + K*k + NPE + 1);
    end
    for (int i = 0; i < NPE; i++) begin
      exp_y = '0;
      for (int j = 0; j < k; j++) exp_y += AW'(w[j]) * AW'(x[i+j]);
      checks++;
      if (y[i] !== exp_y) begin
        failures++;
        $display("FAIL k=%0d y[%0d]=%0d expected %0d", k, i, y[i], exp_y);
      end
    end
    @(posedge clk); #1;                    // let the counter see the last write
    checks++;
    if (macs != NPE*k) begin
      failures++;
      $display("FAIL k=%0d: %0d multiply-accumulates, expected %0d", k, macs, NPE*k);
    end
  endtask

  initial begin
    w_valid = 0; w_last = 0; w_in = '0; x_in = '0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 1'b0;
    for (int k = 1; k <= 7; k++) run(k);
    run(4); run(4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
