// tb_gmr: random three-component mixtures with a common variance are reduced
// and compared with second-moment matching computed in real arithmetic
// (mean within 0.03 + 2%, variance within 0.03 + 3%), including the floor of
// 0.1 on the variance and the all-zero-weight fallback. The tolerance grows
// as 0.004/sum(c) because every weight carries only 8 fractional bits.
module tb_gmr;
  import ldlc_pkg::*;
  import ldlc_ref_pkg::*;

  int checks = 0, failures = 0;
  fx_t vin, inv_s2;
  fx_t m [3], c [3];
  gmsg_t o;
  logic clamped, allzero;

  gmr #(.NEXT(3)) dut (.vin(vin), .m(m), .c(c), .inv_s2(inv_s2), .out(o), .clamped(clamped), .allzero(allzero));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ncl = 0;
    for (int t = 0; t < 2000; t++) begin
      int r;
      real cs, mm, vv, ci [3], mi [3];
      vin    = r2fx($urandom_range(2, 200) / 100.0);
      inv_s2 = r2fx($urandom_range(1, 40));
      cs = 0;
      for (int i = 0; i < 3; i++) begin
        r = $urandom_range(0, 400);
        m[i] = r2fx((r - 200) / 100.0);
        c[i] = (t % 50 == 0) ? '0 : fx_t'($urandom_range(0, 256));
        ci[i] = fx2r(c[i]); mi[i] = fx2r(m[i]);
        cs += ci[i];
      end
      if (cs == 0) begin
        mm = mi[1]; vv = fx2r(vin);
      end else begin
        mm = 0; for (int i = 0; i < 3; i++) mm += ci[i] / cs * mi[i];
        vv = fx2r(vin);
        for (int i = 0; i < 3; i++) vv += ci[i] / cs * (mi[i] - mm) * (mi[i] - mm) * fx2r(inv_s2);
      end
      if (vv < 0.1) vv = 0.1;
      #1;
      checks++;
      if (!near(fx2r(o.m), mm, 0.03 + ((cs > 0) ? 0.004 / cs : 0.0), 0.02) ||
          !near(fx2r(o.v), vv, 0.03 + ((cs > 0) ? 0.004 / cs : 0.0), 0.03) || allzero != (cs == 0)) begin
        failures++;
        if (failures < 10) $display("FAIL m=%f/%f v=%f/%f", fx2r(o.m), mm, fx2r(o.v), vv);
      end
      if (clamped) ncl++;
    end
    checks++;
    if (ncl == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
