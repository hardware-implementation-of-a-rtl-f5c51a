// tb_mix_product: random single Gaussians times three-component mixtures.
// Checks the product variance, means and weights against the closed forms
// (variance and means within 0.03 + 2%, weights within 0.03), and that the
// underflow flag is set only where the true weight is below 2^-8.
module tb_mix_product;
  import ldlc_pkg::*;
  import ldlc_ref_pkg::*;

  int checks = 0, failures = 0;
  gmsg_t ga;
  fx_t mb [3], mf [3], cf [3];
  fx_t vb, vf, inv_s2;
  logic [2:0] uf;

  mix_product #(.NEXT(3)) dut (.ga(ga), .mb(mb), .vb(vb), .inv_s2(inv_s2),
                               .vf(vf), .mf(mf), .cf(cf), .uflow(uf));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nuf = 0;
    for (int t = 0; t < 2000; t++) begin
      int r;
      real ma, va, vbr, is2, e, vfe, mfe, ce;
      r = $urandom_range(0, 600);
      ga.m = r2fx((r - 300) / 100.0);
      ga.v = r2fx($urandom_range(10, 300) / 100.0);
      vb   = r2fx($urandom_range(10, 300) / 100.0);
      inv_s2 = r2fx($urandom_range(1, 60));
      for (int i = 0; i < 3; i++) begin
        r = $urandom_range(0, 200);
        mb[i] = qadd(ga.m, r2fx((r - 100) / 100.0 + (i - 1) * 1.0));
      end
      #1;
      ma = fx2r(ga.m); va = fx2r(ga.v); vbr = fx2r(vb); is2 = fx2r(inv_s2);
      vfe = va * vbr / (va + vbr);
      checks++;
      if (!near(fx2r(vf), vfe, 0.03, 0.02)) failures++;
      for (int i = 0; i < 3; i++) begin
        mfe = (ma * vbr + fx2r(mb[i]) * va) / (va + vbr);
        e   = ma - fx2r(mb[i]);
        ce  = $exp(-e * e * is2 / (2.0 * (va + vbr)));
        checks++;
        if (!near(fx2r(mf[i]), mfe, 0.03, 0.02) || !near(fx2r(cf[i]), ce, 0.03, 0.0) ||
            (uf[i] && ce > 1.0 / 256.0)) begin
          failures++;
          if (failures < 10) $display("FAIL i=%0d mf=%f/%f cf=%f/%f uf=%b", i, fx2r(mf[i]), mfe, fx2r(cf[i]), ce, uf[i]);
        end
        if (uf[i]) nuf++;
      end
    end
    checks++;
    if (nuf == 0) failures++;          // underflow path must have been taken
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
