// tb_vnu_cluster: a cluster of 3 fwbw blocks fed with random variable nodes
// as fast as it takes them, with random output back-pressure. Nodes must
// leave in the order they entered, each with the messages and estimate of
// the real-valued variable node model (means within 0.1 + 4%, variances
// within 0.1 + 10%). The input must stall at least once (all fwbw blocks
// busy) and more than one node must be in flight at some time.
module tb_vnu_cluster;
  import ldlc_pkg::*;
  import ldlc_ref_pkg::*;

  localparam int NFW = 3;
  localparam int NT  = 300;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  fx_t inv_s2, in_y, out_w;
  logic in_valid, in_ready, out_valid, out_ready, cl, uf;
  logic [9:0] in_v, out_v;
  gmsg_t in_cm [3], out_msg [3];
  logic in_neg [3];
  rmsg_t exp_msg [NT][3];
  real   exp_w [NT];
  int    nin = 0, nout = 0, stalls = 0, maxfly = 0;

  always #5 clk = ~clk;

  vnu_cluster #(.NFW(NFW), .NEXT(3), .VW(10)) dut (
    .clk(clk), .rst_n(rst_n), .inv_s2(inv_s2), .in_valid(in_valid), .in_ready(in_ready),
    .in_v(in_v), .in_y(in_y), .in_cm(in_cm), .in_neg(in_neg),
    .out_valid(out_valid), .out_ready(out_ready), .out_v(out_v), .out_msg(out_msg), .out_w(out_w),
    .clamp_evt(cl), .uflow_evt(uf));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic new_node(input int t);
    rmsg_t rcm [3];
    bit ng [3];
    int r;
    forever begin
      bit ok;
      ok = 1;
      r = $urandom_range(0, 600);
      in_y = r2fx((r - 300) / 100.0);
      for (int j = 0; j < 3; j++) begin
        real tt, fr;
        r = $urandom_range(0, 600);
        in_cm[j].m = r2fx((r - 300) / 100.0);
        in_cm[j].v = r2fx($urandom_range(30, 300) / 100.0);
        in_neg[j]  = (j == 0) ? 1'b0 : 1'($urandom_range(0, 1));
        tt = (fx2r(in_y) - fx2r(in_cm[j].m)) * (in_neg[j] ? -HB[j] : HB[j]);
        fr = tt - $floor(tt);
        if (fr > 0.45 && fr < 0.55) ok = 0;
      end
      if (ok) break;
    end
    for (int j = 0; j < 3; j++) begin
      rcm[j] = '{m: fx2r(in_cm[j].m), v: fx2r(in_cm[j].v)};
      ng[j]  = in_neg[j];
    end
    vnode(fx2r(in_y), rcm, ng, fx2r(inv_s2), exp_msg[t], exp_w[t]);
    in_v = 10'(t);
  endtask

  // producer
  initial begin
    in_valid = 0; in_v = 0; in_y = 0; inv_s2 = r2fx(3.0);
    for (int j = 0; j < 3; j++) begin in_cm[j] = '0; in_neg[j] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    new_node(0);
    in_valid = 1;
    while (nin < NT) begin
      @(posedge clk);
      if (in_ready) nin++; else stalls++;
      @(negedge clk);
      if (nin < NT && in_v != 10'(nin)) new_node(nin);
      in_valid = (nin < NT);
    end
  end

  // consumer
  initial begin
    out_ready = 0;
    forever begin
      @(negedge clk);
      out_ready = 1'($urandom_range(0, 3) != 0);
      if (nin - nout > maxfly) maxfly = nin - nout;
      @(posedge clk);
      if (out_valid && out_ready) begin
        checks++;
        if (out_v != 10'(nout)) failures++;
        for (int l = 0; l < 3; l++) begin
          checks++;
          if (!near(fx2r(out_msg[l].m), exp_msg[nout][l].m, 0.1, 0.04) ||
              !near(fx2r(out_msg[l].v), exp_msg[nout][l].v, 0.1, 0.1)) begin
            failures++;
            if (failures < 10) $display("FAIL node %0d l=%0d %f,%f / %f,%f", nout, l, fx2r(out_msg[l].m),
                                        fx2r(out_msg[l].v), exp_msg[nout][l].m, exp_msg[nout][l].v);
          end
        end
        checks++;
        if (!near(fx2r(out_w), exp_w[nout], 0.1, 0.04)) failures++;
        nout++;
        if (nout == NT) begin
          checks += 2;
          if (stalls == 0) failures++;
          if (maxfly < 2) failures++;
          $display("stalls=%0d max_in_flight=%0d", stalls, maxfly);
          $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
          $finish;
        end
      end
    end
  end
endmodule
