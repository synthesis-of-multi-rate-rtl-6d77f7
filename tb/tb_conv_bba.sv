// tb_conv_bba: self-checking test of the bounded broadcast convolution array.
//
// Loads random samples, streams k = 1..NPE random weights on consecutive
// ticks, and checks that exactly the NPE-k+1 complete outputs appear, in
// the order y_{NPE-k} .. y_0, each at its predicted tick and equal to
// sum_j w_j x_{i+j}. Runs are separated by idle ticks (zero weights).
module tb_conv_bba;
  localparam int DW = 16, AW = 40, K = 3, NPE = 6;
  localparam int NG1 = (NPE - 1) / K;

  logic clk = 1'b0, rst = 1'b1, x_load = 1'b0;
  logic signed [DW-1:0] x_in [NPE];
  logic signed [DW-1:0] w_in = '0;
  logic w_valid = 1'b0, w_first = 1'b0, w_last = 1'b0;
  logic signed [AW-1:0] y_out;
  logic y_valid;
  int checks = 0, failures = 0;

  conv_bba #(.DW(DW), .AW(AW), .K(K), .NPE(NPE)) dut (.*);

  always #5 clk = ~clk;
  int tick = 0;
  always @(posedge clk) tick <= tick + 1;

  task automatic run(input int k);
    logic signed [DW-1:0] w [];
    logic signed [AW-1:0] e;
    int t0, nout, i;
    w = new[k];
    foreach (w[j]) w[j] = DW'($urandom);
    foreach (x_in[p]) x_in[p] = DW'($urandom);
    @(negedge clk); x_load = 1'b1; @(negedge clk); x_load = 1'b0;
    t0 = tick;
    nout = 0;
    for (int n = 0; n < k + NPE + NG1 + 6; n++) begin
      w_valid = (n < k); w_first = (n == 0); w_last = (n == k - 1);
      w_in = (n < k) ? w[n] : DW'($urandom);
      #1;
      if (y_valid) begin
        i = t0 + NPE + NG1 + 1 - tick;      // which output this tick carries
        checks++;
        if (i != NPE - k - nout || i < 0) begin
          failures++;
          $display("FAIL k=%0d: output %0d at tick %0d (index %0d)", k, nout, tick - t0, i);
        end else begin
          e = '0;
          for (int j = 0; j < k; j++) e += AW'(w[j]) * AW'(x_in[i+j]);
          checks++;
          if (y_out !== e) begin
            failures++;
            $display("FAIL k=%0d y[%0d]=%0d expected %0d", k, i, y_out, e);
          end
        end
        nout++;
      end
      @(negedge clk);
    end
    w_valid = 1'b0; w_first = 1'b0; w_last = 1'b0;
    checks++;
    if (nout != NPE - k + 1) begin
      failures++; $display("FAIL k=%0d: %0d outputs", k, nout);
    end
  endtask

  initial begin
    foreach (x_in[p]) x_in[p] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 1'b0;
    for (int k = 1; k <= NPE; k++) run(k);
    run(3); run(4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
