// tb_ldlc_full: one frame through the decoder at its default configuration
// (N = 1000, 20 iterations at most, 5 clusters of 10 fwbw blocks).
//
// A random integer vector b in {-2..2}^1000 is encoded as x = H^-1 b by
// Gaussian elimination in real arithmetic, with H built from ldlc_pkg as
// the decoder's ROM holds it. White Gaussian noise is added at 5 dB from
// capacity, sigma^2 = 10^-0.5 / (2 pi e), and y is decoded. The decoded
// vector must equal b, the decoder must stop by itself within 20
// iterations, and the variable node stage must have stalled at least once.
module tb_ldlc_full;
  import ldlc_pkg::*;
  import ldlc_ref_pkg::*;

  localparam int N = 1000;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  fx_t  inv_s2, ch_y;
  logic start, ch_valid, ch_ready, out_valid, done, conv, busy;
  logic stall, confl, clampe, ufl;
  logic [9:0] out_idx;
  logic signed [13:0] out_b;
  logic [4:0] iters;

  ldlc_decoder dut (
    .clk(clk), .rst_n(rst_n), .inv_s2(inv_s2), .start(start), .ch_valid(ch_valid),
    .ch_ready(ch_ready), .ch_y(ch_y), .out_valid(out_valid), .out_idx(out_idx),
    .out_b(out_b), .done(done), .iters(iters), .converged(conv), .busy(busy),
    .vn_stall(stall), .vn_conflict(confl), .clamp_evt(clampe), .uflow_evt(ufl));

  int n_stall = 0, n_uflow = 0;
  always @(posedge clk) begin
    if (stall) n_stall++;
    if (ufl)   n_uflow++;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real A [N][N + 1];
  real x [N];
  int  b [N];

  function automatic real gauss();
    real u1, u2;
    u1 = ($urandom_range(1, 1000000)) / 1000001.0;
    u2 = ($urandom_range(0, 1000000)) / 1000001.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  initial begin
    int errs, got, cyc, r;
    real sigma;
    start = 0; ch_valid = 0; ch_y = '0;
    sigma  = $sqrt($pow(10.0, -0.5) / (2.0 * 3.141592653589793 * 2.718281828459045));
    inv_s2 = r2fx(1.0 / (sigma * sigma));
    // encode
    for (int i = 0; i < N; i++) begin r = $urandom_range(0, 4); b[i] = r - 2; end
    for (int rr = 0; rr < N; rr++) begin
      for (int c = 0; c <= N; c++) A[rr][c] = 0.0;
      for (int j = 0; j < 3; j++) A[rr][perm_col(j, rr, N)] = sign_neg(j, rr) ? -HB[j] : HB[j];
      A[rr][N] = b[rr];
    end
    for (int k = 0; k < N; k++) begin
      int piv;
      real best, f, tmp, av;
      piv = k; best = 0;
      for (int rr = k; rr < N; rr++) begin
        av = A[rr][k] < 0 ? -A[rr][k] : A[rr][k];
        if (av > best) begin best = av; piv = rr; end
      end
      if (piv != k) for (int c = k; c <= N; c++) begin tmp = A[k][c]; A[k][c] = A[piv][c]; A[piv][c] = tmp; end
      for (int rr = k + 1; rr < N; rr++) begin
        f = A[rr][k] / A[k][k];
        if (f != 0) for (int c = k; c <= N; c++) A[rr][c] -= f * A[k][c];
      end
    end
    for (int k = N - 1; k >= 0; k--) begin
      real s;
      s = A[k][N];
      for (int c = k + 1; c < N; c++) s -= A[k][c] * x[c];
      x[k] = s / A[k][k];
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    for (int v = 0; v < N; v++) begin
      ch_y = r2fx(x[v] + sigma * gauss());
      ch_valid = 1;
      @(posedge clk);
      while (!ch_ready) @(posedge clk);
      @(negedge clk);
    end
    ch_valid = 0;
    errs = 0; got = 0; cyc = 0;
    while (!done) begin
      @(posedge clk);
      cyc++;
      if (out_valid) begin
        got++;
        if (int'(out_b) != b[out_idx]) errs++;
      end
    end
    $display("sigma=%f: %0d wrong of %0d, %0d iterations, converged=%b, %0d cycles, stalls=%0d underflows=%0d",
             sigma, errs, N, iters, conv, cyc, n_stall, n_uflow);
    checks += 4;
    if (got != N)     failures++;
    if (errs != 0)    failures++;
    if (!conv)        failures++;
    if (n_stall == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
