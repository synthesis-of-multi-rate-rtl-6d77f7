// tb_toeplitz: self-checking test of the complete Toeplitz factorization.
//
// For random well-conditioned symmetric Toeplitz matrices R, and for the
// identity, it checks
//   * X and Y bit for bit against the fixed-point reference model,
//   * in real arithmetic, that Y R equals X within a small tolerance, that
//     Y has ones on its diagonal and is lower triangular,
//   * that x_done comes 2N-2 ticks and done 3N-2 ticks after start.
module tb_toeplitz;
  import mra_pkg::*;
  import toep_ref_pkg::*;
  localparam int N = 7;

  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  fx_t t [N];
  fx_t X [N][N], Y [N][N];
  logic x_done, done;
  int checks = 0, failures = 0;

  toeplitz #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic run(input fx_t tt [NMAX]);
    mat_t xe, ye;
    fx_t ze [NMAX+1];
    int n_tick, x_tick;
    real s, err;
    ref_upper(N, tt, xe, ze);
    ref_lower(N, ze, ye);
    for (int k = 0; k < N; k++) t[k] = tt[k];
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    n_tick = 1; x_tick = -1;
    while (!done && n_tick < 200) begin
      if (x_done) x_tick = n_tick;
      @(negedge clk); n_tick++;
    end
    checks += 2;
    if (x_tick != 2*N - 2) begin failures++; $display("FAIL x_done after %0d ticks", x_tick); end
    if (n_tick != 3*N - 2) begin failures++; $display("FAIL done after %0d ticks", n_tick); end
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        checks += 2;
        if (X[r][c] !== xe[r][c]) begin
          failures++; $display("FAIL X[%0d][%0d]=%h expected %h", r, c, X[r][c], xe[r][c]);
        end
        if (Y[r][c] !== ye[r][c]) begin
          failures++; $display("FAIL Y[%0d][%0d]=%h expected %h", r, c, Y[r][c], ye[r][c]);
        end
      end
    // Y R = X in real arithmetic
    err = 0.0;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        s = 0.0;
        for (int k = 0; k < N; k++)
          s += to_real(Y[r][k]) * to_real(tt[(k > c) ? k - c : c - k]);
        s -= to_real(X[r][c]);
        if (s < 0) s = -s;
        if (s > err) err = s;
      end
    checks++;
    if (err > 0.01) begin failures++; $display("FAIL max |YR - X| = %f", err); end
    for (int r = 0; r < N; r++) begin
      checks++;
      if (Y[r][r] !== FX_ONE) begin failures++; $display("FAIL Y[%0d][%0d] is not one", r, r); end
    end
  endtask

  initial begin
    fx_t tt [NMAX];
    for (int k = 0; k < N; k++) t[k] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 1'b0;
    for (int n = 0; n < 6; n++) begin
      rand_t(N, tt);
      run(tt);
    end
    for (int k = 0; k < NMAX; k++) tt[k] = '0;
    tt[0] = FX_ONE;
    run(tt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
