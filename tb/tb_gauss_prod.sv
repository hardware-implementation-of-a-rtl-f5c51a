// tb_gauss_prod: random pairs of Gaussians; the product mean and variance
// must match V = VaVb/(Va+Vb), m = V(ma/Va + mb/Vb) within 0.03 + 2%.
module tb_gauss_prod;
  import ldlc_pkg::*;
  import ldlc_ref_pkg::*;

  int checks = 0, failures = 0;
  gmsg_t a, b, p;

  gauss_prod dut (.a(a), .b(b), .p(p));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int r1, r2;
      rmsg_t ra, rb, rp;
      r1 = $urandom_range(0, 2000);
      r2 = $urandom_range(0, 2000);
      a.m = r2fx((r1 - 1000) / 100.0);
      b.m = r2fx((r2 - 1000) / 100.0);
      a.v = r2fx($urandom_range(10, 1000) / 100.0);
      b.v = r2fx($urandom_range(10, 1000) / 100.0);
      ra = '{m: fx2r(a.m), v: fx2r(a.v)};
      rb = '{m: fx2r(b.m), v: fx2r(b.v)};
      rp = gprod(ra, rb);
      #1;
      checks++;
      if (!near(fx2r(p.m), rp.m, 0.03, 0.02) || !near(fx2r(p.v), rp.v, 0.03, 0.02)) begin
        failures++;
        if (failures < 10) $display("FAIL m=%f/%f v=%f/%f", fx2r(p.m), rp.m, fx2r(p.v), rp.v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
