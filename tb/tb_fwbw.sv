// tb_fwbw: random variable nodes (channel value, three check messages,
// edge signs, 1/sigma^2) through one fwbw block, with random output
// back-pressure. FW_1..FW_3 and BW_1..BW_3 are compared with the
// forward-backward recursion computed in real arithmetic (means within
// 0.08 + 3%, variances within 0.08 + 8%); the latency from acceptance to
// out_valid must be 4 cycles and the block must not accept while busy.
module tb_fwbw;
  import ldlc_pkg::*;
  import ldlc_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  fx_t inv_s2, in_y;
  logic in_valid, in_ready, out_valid, out_ready, cl, uf;
  logic [9:0] in_v, out_v;
  gmsg_t in_cm [3], out_fw [3], out_bw [3];
  logic in_neg [3];

  always #5 clk = ~clk;

  fwbw #(.NEXT(3), .VW(10)) dut (
    .clk(clk), .rst_n(rst_n), .inv_s2(inv_s2), .in_valid(in_valid), .in_ready(in_ready),
    .in_v(in_v), .in_y(in_y), .in_cm(in_cm), .in_neg(in_neg),
    .out_valid(out_valid), .out_ready(out_ready), .out_v(out_v),
    .out_fw(out_fw), .out_bw(out_bw), .clamp_evt(cl), .uflow_evt(uf));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; out_ready = 0; in_v = 0; in_y = 0; inv_s2 = r2fx(10.0);
    for (int j = 0; j < 3; j++) begin in_cm[j] = '0; in_neg[j] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      rmsg_t rcm [3], efw [3], ebw [3];
      bit    ng [3];
      real   yr, is2;
      int    lat, r;
      @(negedge clk);
      // random node, kept away from rounding ties of the extension centre
      forever begin
        bit ok;
        ok = 1;
        r  = $urandom_range(0, 600);
        in_y = r2fx((r - 300) / 100.0);
        inv_s2 = r2fx($urandom_range(1, 4));
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
      yr = fx2r(in_y); is2 = fx2r(inv_s2);
      for (int j = 0; j < 3; j++) begin
        rcm[j] = '{m: fx2r(in_cm[j].m), v: fx2r(in_cm[j].v)};
        ng[j]  = in_neg[j];
      end
      fwbw(yr, rcm, ng, 3, is2, 2.0, efw, ebw);
      in_v = 10'(t);
      in_valid = 1;
      checks++;
      if (!in_ready) failures++;
      @(posedge clk);
      @(negedge clk);
      in_valid = 0;
      lat = 0;
      while (!out_valid) begin
        checks++;
        if (in_ready) failures++;            // busy: must not accept
        @(negedge clk);
        lat++;
      end
      checks++;
      if (lat != 4) begin
        failures++;
        $display("FAIL latency %0d", lat);
      end
      repeat ($urandom_range(0, 3)) @(negedge clk);   // hold under back-pressure
      checks++;
      if (!out_valid || out_v != 10'(t)) failures++;
      for (int j = 0; j < 3; j++) begin
        checks++;
        if (!near(fx2r(out_fw[j].m), efw[j].m, 0.08, 0.03) || !near(fx2r(out_fw[j].v), efw[j].v, 0.08, 0.08) ||
            !near(fx2r(out_bw[j].m), ebw[j].m, 0.08, 0.03) || !near(fx2r(out_bw[j].v), ebw[j].v, 0.08, 0.08)) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d j=%0d fw %f,%f / %f,%f  bw %f,%f / %f,%f", t, j,
            fx2r(out_fw[j].m), fx2r(out_fw[j].v), efw[j].m, efw[j].v,
            fx2r(out_bw[j].m), fx2r(out_bw[j].v), ebw[j].m, ebw[j].v);
        end
      end
      out_ready = 1;
      @(negedge clk);
      out_ready = 0;
      checks++;
      if (out_valid || !in_ready) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
