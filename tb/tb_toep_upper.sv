// tb_toep_upper: self-checking test of the Toeplitz upper-part array.
//
// For random symmetric Toeplitz matrices it checks X bit for bit against
// the reference model, each z(i) token (value, row, order, one every second
// tick) and the 2N-2 tick completion time.
module tb_toep_upper;
  import mra_pkg::*;
  import toep_ref_pkg::*;
  localparam int N = 7;

  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  fx_t t [N];
  fx_t X [N][N];
  ztok_t z_tok;
  logic done;
  int checks = 0, failures = 0;

  toep_upper #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic run(input fx_t tt [NMAX]);
    mat_t xe;
    fx_t ze [NMAX+1];
    int n_tick, next_row;
    ref_upper(N, tt, xe, ze);
    for (int k = 0; k < N; k++) t[k] = tt[k];
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0; #1;
    n_tick = 1; next_row = 2;
    while (!done && n_tick < 200) begin
      if (z_tok.v) begin
        checks += 2;
        if (int'(z_tok.row) != next_row || z_tok.z !== ze[next_row]) begin
          failures++;
          $display("FAIL z token row %0d value %h, expected row %0d value %h",
                   z_tok.row, z_tok.z, next_row, ze[next_row]);
        end
        if (n_tick != 1 + 2*(next_row - 2)) begin
          failures++; $display("FAIL z(%0d) at tick %0d", next_row, n_tick);
        end
        next_row++;
      end
      @(negedge clk); #1; n_tick++;
    end
    checks += 2;
    if (next_row != N + 1) begin failures++; $display("FAIL %0d z tokens", next_row - 2); end
    if (n_tick != 2*N - 2) begin failures++; $display("FAIL done after %0d ticks", n_tick); end
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        checks++;
        if (X[r][c] !== xe[r][c]) begin
          failures++; $display("FAIL X[%0d][%0d]=%h expected %h", r, c, X[r][c], xe[r][c]);
        end
      end
  endtask

  initial begin
    fx_t tt [NMAX];
    for (int k = 0; k < N; k++) t[k] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 1'b0;
    for (int n = 0; n < 8; n++) begin
      rand_t(N, tt);
      run(tt);
    end
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
