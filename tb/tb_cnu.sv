// tb_cnu: drives one random message set per cycle into the check node unit
// and checks each result, one cycle later, against the real-valued check
// node rule (means within 0.04 + 1%, variances within 0.04 + 2%). The
// one-cycle latency is checked by comparing with the set applied on the
// previous cycle.
module tb_cnu;
  import ldlc_pkg::*;
  import ldlc_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid;
  gmsg_t in_msg [3], out_msg [3];
  logic in_neg [3];
  logic out_valid;
  rmsg_t exp_q [3];
  bit    exp_v;

  always #5 clk = ~clk;

  cnu dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_msg(in_msg), .in_neg(in_neg),
           .out_valid(out_valid), .out_msg(out_msg));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0;
    for (int j = 0; j < 3; j++) begin in_msg[j] = '0; in_neg[j] = 0; end
    exp_v = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      rmsg_t ri [3], ro [3];
      bit    ng [3];
      int    rr;
      @(negedge clk);
      // check the previous set
      checks++;
      if (out_valid !== exp_v) failures++;
      if (exp_v) for (int p = 0; p < 3; p++) begin
        checks++;
        if (!near(fx2r(out_msg[p].m), exp_q[p].m, 0.04, 0.01) ||
            !near(fx2r(out_msg[p].v), exp_q[p].v, 0.04, 0.02)) begin
          failures++;
          if (failures < 10) $display("FAIL p=%0d m=%f/%f v=%f/%f", p, fx2r(out_msg[p].m), exp_q[p].m,
                                      fx2r(out_msg[p].v), exp_q[p].v);
        end
      end
      in_valid = (t % 7 != 3);
      for (int j = 0; j < 3; j++) begin
        rr = $urandom_range(0, 1600);
        ri[j].m = (rr - 800) / 100.0;
        ri[j].v = $urandom_range(10, 800) / 100.0;
        ng[j]   = (j == 0) ? 0 : 1'($urandom_range(0, 1));
        in_msg[j].m = r2fx(ri[j].m);
        in_msg[j].v = r2fx(ri[j].v);
        in_neg[j]   = ng[j];
        ri[j].m = fx2r(in_msg[j].m);
        ri[j].v = fx2r(in_msg[j].v);
      end
      cnode(ri, ng, ro);
      exp_q = ro;
      exp_v = in_valid;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
