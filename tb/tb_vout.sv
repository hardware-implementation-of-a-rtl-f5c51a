// tb_vout: random FW/BW message sets through the VOut block with random
// back-pressure. Each outgoing message must equal FW_l*BW_l and the estimate
// the mean of FW_2*BW_1 (within 0.03 + 2%), and out_valid must rise 4 cycles
// (D+1) after the set is taken.
module tb_vout;
  import ldlc_pkg::*;
  import ldlc_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [9:0] in_v, out_v;
  gmsg_t in_fw [3], in_bw [3], out_msg [3];
  fx_t out_w;

  always #5 clk = ~clk;

  vout #(.VW(10)) dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready), .in_v(in_v),
    .in_fw(in_fw), .in_bw(in_bw), .out_valid(out_valid), .out_ready(out_ready), .out_v(out_v),
    .out_msg(out_msg), .out_w(out_w));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; out_ready = 0; in_v = 0;
    for (int j = 0; j < 3; j++) begin in_fw[j] = '0; in_bw[j] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      rmsg_t f [3], b [3], e;
      int lat, r;
      @(negedge clk);
      for (int j = 0; j < 3; j++) begin
        r = $urandom_range(0, 1000); in_fw[j].m = r2fx((r - 500) / 100.0);
        r = $urandom_range(0, 1000); in_bw[j].m = r2fx((r - 500) / 100.0);
        in_fw[j].v = r2fx($urandom_range(10, 500) / 100.0);
        in_bw[j].v = r2fx($urandom_range(10, 500) / 100.0);
        f[j] = '{m: fx2r(in_fw[j].m), v: fx2r(in_fw[j].v)};
        b[j] = '{m: fx2r(in_bw[j].m), v: fx2r(in_bw[j].v)};
      end
      in_v = 10'(t);
      in_valid = 1;
      checks++;
      if (!in_ready) failures++;
      @(negedge clk);
      in_valid = 0;
      lat = 0;
      while (!out_valid) begin @(negedge clk); lat++; end
      checks++;
      if (lat != 4) begin failures++; $display("FAIL latency %0d", lat); end
      repeat ($urandom_range(0, 2)) @(negedge clk);
      for (int l = 0; l < 3; l++) begin
        e = gprod(f[l], b[l]);
        checks++;
        if (!near(fx2r(out_msg[l].m), e.m, 0.03, 0.02) || !near(fx2r(out_msg[l].v), e.v, 0.03, 0.02)) begin
          failures++;
          if (failures < 10) $display("FAIL l=%0d %f,%f / %f,%f", l, fx2r(out_msg[l].m), fx2r(out_msg[l].v), e.m, e.v);
        end
      end
      e = gprod(f[1], b[0]);
      checks++;
      if (!near(fx2r(out_w), e.m, 0.03, 0.02) || out_v != 10'(t) || !out_valid) failures++;
      out_ready = 1;
      @(negedge clk);
      out_ready = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
