// tb_ldlc_decoder: end-to-end decoding of lattice codewords.
//
// The testbench builds the same H as the decoder's ROM (from ldlc_pkg), draws
// an integer vector b with entries in {-2..2}, encodes x = H^-1 b by
// Gaussian elimination in real arithmetic, adds white Gaussian noise of
// standard deviation SIGMA and feeds y = x + z to the decoder together with
// 1/SIGMA^2. The decoded integers must equal b. A second decoder limited to
// one iteration, and with its variance floor raised to 0.5 so that the
// floor is reached, must stop on the iteration limit, not by convergence.
// Every mechanism of the design is counted and must occur at least once:
// input stalls of the variable node stage, output conflicts between
// clusters (reported only, since in-order dealing rarely makes them
// collide), variance floor hits, exponential underflows, early stops and
// iteration-limit stops. In the two noisiest frames the messages leaving
// the variable node stage in the first iteration are also compared with the
// real-valued check and variable node models applied to the received y
// (means within 0.1 + 4%, variances within 0.1 + 10%; edges whose
// periodic-extension centre lies near a rounding boundary are skipped), so
// that the routing and memory wiring is checked message by message. Sizes are reduced (N, NCL, NFW) to keep the run
// short; tb_ldlc_full runs the default configuration.
module tb_ldlc_decoder;
  import ldlc_pkg::*;
  import ldlc_ref_pkg::*;

  localparam int N      = 40;
  localparam int NFRAME = 6;
  localparam real SIGMAS [6] = '{0.04, 0.08, 0.04, 0.08, 0.15, 0.22};

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // two decoders: a normal one and one limited to a single iteration
  fx_t  inv_s2, ch_y;
  logic start [2], ch_valid [2], ch_ready [2], out_valid [2], done [2], conv [2], busy [2];
  logic [5:0] out_idx [2];
  logic signed [13:0] out_b [2];
  logic [$clog2(21)-1:0] iters0;
  logic [$clog2(2)-1:0]  iters1;
  logic stall [2], confl [2], clampe [2], ufl [2];

  ldlc_decoder #(.N(N), .MAX_ITER(20), .NCL(2), .NFW(2)) dut0 (
    .clk(clk), .rst_n(rst_n), .inv_s2(inv_s2), .start(start[0]), .ch_valid(ch_valid[0]),
    .ch_ready(ch_ready[0]), .ch_y(ch_y), .out_valid(out_valid[0]), .out_idx(out_idx[0]),
    .out_b(out_b[0]), .done(done[0]), .iters(iters0), .converged(conv[0]), .busy(busy[0]),
    .vn_stall(stall[0]), .vn_conflict(confl[0]), .clamp_evt(clampe[0]), .uflow_evt(ufl[0]));

  ldlc_decoder #(.N(N), .MAX_ITER(1), .NCL(2), .NFW(2), .MINVAR(fx_t'(128))) dut1 (
    .clk(clk), .rst_n(rst_n), .inv_s2(inv_s2), .start(start[1]), .ch_valid(ch_valid[1]),
    .ch_ready(ch_ready[1]), .ch_y(ch_y), .out_valid(out_valid[1]), .out_idx(out_idx[1]),
    .out_b(out_b[1]), .done(done[1]), .iters(iters1), .converged(conv[1]), .busy(busy[1]),
    .vn_stall(stall[1]), .vn_conflict(confl[1]), .clamp_evt(clampe[1]), .uflow_evt(ufl[1]));

  int n_stall = 0, n_confl = 0, n_clamp = 0, n_uflow = 0, n_early = 0, n_limit = 0;
  always @(posedge clk) begin
    if (stall[0]  || stall[1])  n_stall++;
    if (confl[0]  || confl[1])  n_confl++;
    if (clampe[0] || clampe[1]) n_clamp++;
    if (ufl[0]    || ufl[1])    n_uflow++;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // first-iteration message check on dut0
  fx_t yq [N];
  int  inv_row [3][N];
  bit  msg_chk;
  int  n_vnphase = 0, n_msg = 0;
  always @(posedge clk) begin
    if (start[0]) n_vnphase = 0;
    if (dut0.start_vn) n_vnphase++;
  end
  always @(negedge clk) begin
    if (msg_chk && n_vnphase == 1 && dut0.vo_valid) begin
      int v, r;
      rmsg_t cm [3], co [3], in [3], em [3];
      bit ng [3], nr [3], ok;
      real ew, tt, fr;
      v = int'(dut0.vo_v);
      ok = 1;
      for (int j = 0; j < 3; j++) begin
        r = inv_row[j][v];
        for (int k = 0; k < 3; k++) begin
          in[k] = '{m: fx2r(yq[perm_col(k, r, N)]), v: 1.0};
          nr[k] = sign_neg(k, r);
        end
        cnode(in, nr, co);
        cm[j] = co[j];
        ng[j] = nr[j];
        tt = (fx2r(yq[v]) - cm[j].m) * (ng[j] ? -HB[j] : HB[j]);
        fr = tt - $floor(tt);
        if (fr > 0.4 && fr < 0.6) ok = 0;
      end
      if (ok) begin
        vnode(fx2r(yq[v]), cm, ng, fx2r(inv_s2), em, ew);
        for (int l = 0; l < 3; l++) begin
          checks++;
          n_msg++;
          if (!near(fx2r(dut0.vo_msg[l].m), em[l].m, 0.1, 0.04) ||
              !near(fx2r(dut0.vo_msg[l].v), em[l].v, 0.1, 0.1)) begin
            failures++;
            if (failures < 10) $display("FAIL message v=%0d l=%0d got %f,%f expected %f,%f", v, l,
                                        fx2r(dut0.vo_msg[l].m), fx2r(dut0.vo_msg[l].v), em[l].m, em[l].v);
          end
        end
      end
    end
  end

  real H [N][N];
  real x [N];
  int  b [N];

  function automatic real gauss();
    real u1, u2;
    u1 = ($urandom_range(1, 1000000)) / 1000001.0;
    u2 = ($urandom_range(0, 1000000)) / 1000001.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  // Solve H x = b by Gaussian elimination with partial pivoting.
  task automatic encode();
    real A [N][N + 1];
    for (int r = 0; r < N; r++) begin
      for (int c = 0; c < N; c++) A[r][c] = H[r][c];
      A[r][N] = b[r];
    end
    for (int k = 0; k < N; k++) begin
      int piv;
      real best, f, tmp;
      piv = k; best = 0;
      for (int r = k; r < N; r++) if ((A[r][k] < 0 ? -A[r][k] : A[r][k]) > best) begin
        best = (A[r][k] < 0 ? -A[r][k] : A[r][k]); piv = r;
      end
      for (int c = 0; c <= N; c++) begin tmp = A[k][c]; A[k][c] = A[piv][c]; A[piv][c] = tmp; end
      for (int r = k + 1; r < N; r++) begin
        f = A[r][k] / A[k][k];
        if (f != 0) for (int c = k; c <= N; c++) A[r][c] -= f * A[k][c];
      end
    end
    for (int k = N - 1; k >= 0; k--) begin
      real s;
      s = A[k][N];
      for (int c = k + 1; c < N; c++) s -= A[k][c] * x[c];
      x[k] = s / A[k][k];
    end
  endtask

  task automatic run_frame(input int d, input real sigma, output int errs, output int cyc);
    int got;
    errs = 0; got = 0; cyc = 0;
    inv_s2 = r2fx(1.0 / (sigma * sigma));
    @(negedge clk);
    start[d] = 1;
    @(negedge clk);
    start[d] = 0;
    for (int v = 0; v < N; v++) begin
      ch_y = r2fx(x[v] + sigma * gauss());
      if (d == 0) yq[v] = ch_y;
      ch_valid[d] = 1;
      @(posedge clk);
      while (!ch_ready[d]) @(posedge clk);
      @(negedge clk);
    end
    ch_valid[d] = 0;
    while (!done[d]) begin
      @(posedge clk);
      cyc++;
      if (out_valid[d]) begin
        got++;
        if (int'(out_b[d]) != b[out_idx[d]]) errs++;
      end
    end
    checks++;
    if (got != N) failures++;
  endtask

  initial begin
    int errs, cyc;
    real sig;
    for (int d = 0; d < 2; d++) begin start[d] = 0; ch_valid[d] = 0; end
    ch_y = '0; inv_s2 = r2fx(100.0);
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) H[r][c] = 0.0;
    for (int c = 0; c < N; c++)
      for (int j = 0; j < 3; j++) begin
        H[c][perm_col(j, c, N)] = sign_neg(j, c) ? -HB[j] : HB[j];
        inv_row[j][perm_col(j, c, N)] = c;
      end
    msg_chk = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < NFRAME; f++) begin
      int r;
      for (int i = 0; i < N; i++) begin r = $urandom_range(0, 4); b[i] = r - 2; end
      encode();
      sig = SIGMAS[f];
      msg_chk = (sig > 0.1);
      run_frame(0, sig, errs, cyc);
      msg_chk = 0;
      $display("frame %0d sigma=%f: %0d wrong of %0d, %0d iterations, converged=%b, %0d cycles",
               f, sig, errs, N, iters0, conv[0], cyc);
      if (sig < 0.1) begin
        checks++;
        if (errs != 0) failures++;
      end
      if (conv[0]) n_early++;
      checks++;
      if (!conv[0] && iters0 != 20) failures++;
      // the same frame through the one-iteration decoder
      run_frame(1, sig, errs, cyc);
      checks++;
      if (conv[1] || iters1 != 1) failures++;
      else n_limit++;
    end
    $display("first-iteration messages compared: %0d", n_msg);
    checks++;
    if (n_msg < N) failures++;
    $display("events: stall=%0d conflict=%0d clamp=%0d underflow=%0d early_stop=%0d limit_stop=%0d",
             n_stall, n_confl, n_clamp, n_uflow, n_early, n_limit);
    checks += 5;
    if (n_stall == 0) failures++;
    if (n_clamp == 0) failures++;
    if (n_uflow == 0) failures++;
    if (n_early == 0) failures++;
    if (n_limit == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
