// tb_mra_top: end-to-end test of mra_top at its default sizes.
//
// Runs the three designs at the same time, each against its own reference:
//   * convolution: runs with k = 1..6 weights; outputs, completion tick and
//     number of slow-clock multiply-accumulates;
//   * bounded broadcast convolution: runs with k = 1..6 weights; each
//     complete output, its order and tick;
//   * decimation: a stream of random samples with a coefficient reload in
//     the middle; every output and the output spacing of M ticks;
//   * Toeplitz: random matrices, the identity and the all-zero matrix (whose
//     zero pivots exercise the division-by-zero rule); X and Y bit for bit
//     and the completion times.
// It counts how often each mechanism happened (slow multiply-accumulates,
// weights broadcast across a group boundary, decimated outputs, coefficient reloads, z multipliers sent between the
// Toeplitz arrays, zero pivots) and fails if one never did.
module tb_mra_top;
  import mra_pkg::*;
  import toep_ref_pkg::*;
  localparam int DW = 16, AW = 40, K = 3, NPE = 4, KB = 3, NB = 6, M = 2, NH = 4, NT = 7;

  logic clk = 1'b0, rst = 1'b1;
  logic conv_clr = 1'b0, conv_w_valid = 1'b0, conv_w_last = 1'b0;
  logic signed [DW-1:0] conv_w = '0, conv_x = '0;
  logic signed [AW-1:0] conv_y [NPE];
  logic conv_done;
  logic [NPE-1:0] conv_mac_active;
  logic bba_x_load = 1'b0, bba_w_valid = 1'b0, bba_w_first = 1'b0, bba_w_last = 1'b0;
  logic signed [DW-1:0] bba_x [NB];
  logic signed [DW-1:0] bba_w = '0;
  logic signed [AW-1:0] bba_y;
  logic bba_y_valid;
  logic dec_h_load = 1'b0;
  logic signed [DW-1:0] dec_h [NH+1];
  logic signed [DW-1:0] dec_x = '0;
  logic signed [AW-1:0] dec_y;
  logic dec_y_valid;
  logic toep_start = 1'b0;
  fx_t toep_t [NT];
  fx_t toep_X [NT][NT], toep_Y [NT][NT];
  logic toep_x_done, toep_done;

  int checks = 0, failures = 0;
  int n_mac = 0, n_conv_runs = 0, n_dec_out = 0, n_reload = 0, n_ztok = 0, n_zero_pivot = 0, n_toep_runs = 0;
  int n_bba_hop = 0, n_bba_out = 0;

  mra_top dut (.*);

  always #5 clk = ~clk;
  int tick = 0;
  always @(posedge clk) tick <= tick + 1;

  always @(posedge clk) if (!rst) begin
    n_mac += $countones(conv_mac_active);
    if (dut.u_toep.z_link.v) n_ztok++;
    if (dut.u_bba.bus[1].w != '0) n_bba_hop++;
    if (dut.u_toep.u_upper.z_tok.v && dut.u_toep.u_upper.x_q[0] == '0) n_zero_pivot++;
  end

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  // ---------------- convolution ----------------
  task automatic conv_run(input int k);
    logic signed [DW-1:0] w [];
    logic signed [DW-1:0] x [];
    logic signed [AW-1:0] e;
    int t0, x0, tdone, nx;
    w = new[k]; nx = NPE + k - 1; x = new[nx];
    foreach (w[j]) w[j] = DW'($urandom);
    foreach (x[j]) x[j] = DW'($urandom);
    @(negedge clk); conv_clr = 1'b1; @(negedge clk); conv_clr = 1'b0;
    x0 = tick + 2; t0 = x0 + (NPE-1)*(K-1) - 1; tdone = -1;
    while (tdone < 0 && tick < t0 + K*k + NPE + 20) begin
      conv_w_valid = 1'b0; conv_w_last = 1'b0; conv_w = DW'($urandom); conv_x = DW'($urandom);
      if (tick >= t0 && (tick - t0) % K == 0 && (tick - t0) / K < k) begin
        conv_w_valid = 1'b1; conv_w = w[(tick - t0) / K]; conv_w_last = ((tick - t0) / K == k - 1);
      end
      if (tick >= x0 && (tick - x0) % K == 0 && (tick - x0) / K < nx) conv_x = x[(tick - x0) / K];
      @(posedge clk); #1;
      if (conv_done) tdone = tick;
    end
    conv_w_valid = 1'b0;
    checks++;
    if (tdone != t0 + K*k + NPE + 1) fail($sformatf("conv k=%0d done at %0d", k, tdone));
    for (int i = 0; i < NPE; i++) begin
      e = '0;
      for (int j = 0; j < k; j++) e += AW'(w[j]) * AW'(x[i+j]);
      checks++;
      if (conv_y[i] !== e) fail($sformatf("conv k=%0d y[%0d]=%0d expected %0d", k, i, conv_y[i], e));
    end
    n_conv_runs++;
  endtask

  // ---------------- bounded broadcast convolution ----------------
  task automatic bba_run(input int k);
    logic signed [DW-1:0] w [];
    logic signed [DW-1:0] xv [NB];
    logic signed [AW-1:0] e;
    int t0, nout, i;
    w = new[k];
    foreach (w[j]) w[j] = DW'($urandom);
    foreach (xv[p]) xv[p] = DW'($urandom);
    bba_x = xv;
    @(negedge clk); bba_x_load = 1'b1; @(negedge clk); bba_x_load = 1'b0;
    t0 = tick; nout = 0;
    for (int n = 0; n < k + NB + (NB-1)/KB + 6; n++) begin
      bba_w_valid = (n < k); bba_w_first = (n == 0); bba_w_last = (n == k - 1);
      bba_w = (n < k) ? w[n] : DW'($urandom);
      #1;
      if (bba_y_valid) begin
        i = t0 + NB + (NB-1)/KB + 1 - tick;
        checks++;
        if (i != NB - k - nout || i < 0) fail($sformatf("bba k=%0d output order", k));
        else begin
          e = '0;
          for (int j = 0; j < k; j++) e += AW'(w[j]) * AW'(xv[i+j]);
          checks++;
          if (bba_y !== e) fail($sformatf("bba k=%0d y[%0d]", k, i));
        end
        nout++; n_bba_out++;
      end
      @(negedge clk);
    end
    bba_w_valid = 1'b0; bba_w_first = 1'b0; bba_w_last = 1'b0;
    checks++;
    if (nout != NB - k + 1) fail($sformatf("bba k=%0d: %0d outputs", k, nout));
  endtask

  // ---------------- decimation ----------------
  localparam int NS = 300, SW = 150, LAT = M + NH*(M-1);
  logic signed [DW-1:0] xs [NS];
  logic signed [DW-1:0] h1 [NH+1], h2 [NH+1];

  function automatic logic signed [AW-1:0] dec_ref(input int i, input logic signed [DW-1:0] h [NH+1]);
    logic signed [AW-1:0] a = '0;
    for (int j = 0; j <= NH; j++) if (M*i - j >= 0) a += AW'(h[j]) * AW'(xs[M*i - j]);
    return a;
  endfunction

  task automatic dec_stream();
    int last = -1;
    foreach (xs[e]) xs[e] = DW'($urandom);
    foreach (h1[j]) begin h1[j] = DW'($urandom); h2[j] = DW'($urandom); end
    // the decimator's tick 0 is the first tick after reset
    for (int s = 0; s < NS; s++) begin
      dec_x = xs[s];
      dec_h_load = (s == 0) || (s == SW);
      dec_h = (s < SW) ? h1 : h2;
      if (s == SW) n_reload++;
      @(posedge clk); #1;
      if (dec_y_valid) begin
        int i;
        n_dec_out++;
        checks++;
        if (last >= 0 && s + 1 - last != M) fail("dec output spacing");
        last = s + 1;
        i = (s + 1 - LAT) / M;
        if ((s + 1 - LAT) % M != 0) begin checks++; fail("dec output phase"); end
        else if (M*i < SW - LAT || M*i - NH > SW + 2*NH*M) begin
          checks++;
          if (dec_y !== ((M*i < SW - LAT) ? dec_ref(i, h1) : dec_ref(i, h2)))
            fail($sformatf("dec y(%0d)=%0d", i, dec_y));
        end
      end
      @(negedge clk);
    end
    dec_h_load = 1'b0;
  endtask

  // ---------------- Toeplitz ----------------
  task automatic toep_run(input fx_t tt [NMAX]);
    mat_t xe, ye;
    fx_t ze [NMAX+1];
    int n;
    ref_upper(NT, tt, xe, ze);
    ref_lower(NT, ze, ye);
    for (int k = 0; k < NT; k++) toep_t[k] = tt[k];
    @(negedge clk); toep_start = 1'b1;
    @(negedge clk); toep_start = 1'b0;
    n = 1;
    while (!toep_done && n < 200) begin @(negedge clk); n++; end
    checks++;
    if (n != 3*NT - 2) fail($sformatf("toeplitz done after %0d ticks", n));
    for (int r = 0; r < NT; r++)
      for (int c = 0; c < NT; c++) begin
        checks += 2;
        if (toep_X[r][c] !== xe[r][c]) fail($sformatf("X[%0d][%0d]", r, c));
        if (toep_Y[r][c] !== ye[r][c]) fail($sformatf("Y[%0d][%0d]", r, c));
      end
    n_toep_runs++;
  endtask

  task automatic toep_all();
    fx_t tt [NMAX];
    for (int n = 0; n < 5; n++) begin rand_t(NT, tt); toep_run(tt); end
    for (int k = 0; k < NMAX; k++) tt[k] = '0;
    toep_run(tt);                 // all zero: every pivot is zero
    tt[0] = FX_ONE;
    toep_run(tt);                 // identity
  endtask

  initial begin
    foreach (dec_h[j]) dec_h[j] = '0;
    foreach (bba_x[p]) bba_x[p] = '0;
    foreach (toep_t[k]) toep_t[k] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 1'b0;
    fork
      begin for (int k = 1; k <= 6; k++) conv_run(k); end
      begin for (int k = 1; k <= NB; k++) bba_run(k); end
      dec_stream();
      toep_all();
    join
    // every mechanism must have happened
    checks += 9;
    if (n_bba_hop == 0)      fail("no weight crossed a broadcast group boundary");
    if (n_bba_out != 21)     fail($sformatf("%0d BBA outputs", n_bba_out));
    if (n_mac != NPE * 21)   fail($sformatf("%0d slow multiply-accumulates", n_mac));
    if (n_conv_runs != 6)    fail("convolution runs");
    if (n_dec_out == 0)      fail("no decimated outputs");
    if (n_reload == 0)       fail("no coefficient reload");
    if (n_ztok != 7*(NT-1))  fail($sformatf("%0d z multipliers passed", n_ztok));
    if (n_zero_pivot == 0)   fail("no zero pivot");
    if (n_toep_runs != 7)    fail("Toeplitz runs");
    $display("mechanisms: bba_hop=%0d bba_out=%0d", n_bba_hop, n_bba_out);
    $display("mechanisms: mac=%0d conv_runs=%0d dec_out=%0d reload=%0d z=%0d zero_pivot=%0d toep_runs=%0d",
             n_mac, n_conv_runs, n_dec_out, n_reload, n_ztok, n_zero_pivot, n_toep_runs);
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
