// tb_toep_lower: self-checking test of the folded Toeplitz lower-part array.
//
// Feeds random multipliers z(2..N) (values in (-1, 1)), once with one
// token per tick and once with random gaps between tokens, and checks Y bit
// for bit against y(i,j) = y(i-1,j-1) + z(i) y(i-1,i-j) evaluated directly,
// and the completion time (N ticks after the last token).
module tb_toep_lower;
  import mra_pkg::*;
  import toep_ref_pkg::*;
  localparam int N = 7;

  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  ztok_t z_in;
  fx_t Y [N][N];
  logic done;
  int checks = 0, failures = 0;

  toep_lower #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic run(input int max_gap);
    mat_t ye;
    fx_t ze [NMAX+1];
    int n_tick;
    for (int i = 0; i <= NMAX; i++) ze[i] = fx_t'(int'($urandom_range(0, 2*65536 - 2)) - 65535);
    ref_lower(N, ze, ye);
    z_in = '0;
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    for (int i = 2; i <= N; i++) begin
      repeat ($urandom_range(0, max_gap)) @(negedge clk);
      z_in.v = 1'b1; z_in.row = RW'(i); z_in.z = ze[i];
      @(negedge clk);
      z_in = '0;
    end
    n_tick = 1;
    while (!done && n_tick < 100) begin @(negedge clk); n_tick++; end
    checks++;
    if (n_tick != N) begin failures++; $display("FAIL done %0d ticks after the last token", n_tick); end
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        checks++;
        if (Y[r][c] !== ye[r][c]) begin
          failures++; $display("FAIL Y[%0d][%0d]=%h expected %h", r, c, Y[r][c], ye[r][c]);
        end
      end
  endtask

  initial begin
    z_in = '0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 1'b0;
    for (int n = 0; n < 4; n++) run(0);
    for (int n = 0; n < 4; n++) run(3);
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
