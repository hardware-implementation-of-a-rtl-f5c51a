// tb_nr_div: checks the Newton-Raphson divider against real division.
// Random numerators and denominators of both signs and of magnitudes from
// 1/8 to 1000 are applied; every quotient that is in range must be within
// 2% + 0.02 of u/a. Zero denominators must saturate with the sign of u.
module tb_nr_div;
  import ldlc_pkg::*;
  import ldlc_ref_pkg::*;

  int checks = 0, failures = 0;
  fx_t u [2];
  fx_t a;
  fx_t y [2];

  nr_div #(.NU(2)) dut (.u(u), .a(a), .y(y));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      real ur [2], ar, q;
      int  ex, rr;
      ex = $urandom_range(0, 13);                       // |a| in [2^-3, 2^10)
      ar = (1.0 + $urandom_range(0, 1023) / 1024.0) * (2.0 ** (ex - 3));
      if ($urandom_range(0, 1)) ar = -ar;
      for (int k = 0; k < 2; k++) begin
        rr    = $urandom_range(0, 2000);
        ur[k] = (rr - 1000) / 100.0;
        u[k]  = r2fx(ur[k]);
      end
      a = r2fx(ar);
      #1;
      for (int k = 0; k < 2; k++) begin
        q = fx2r(u[k]) / fx2r(a);
        if (q < 4000.0 && q > -4000.0) begin
          checks++;
          if (!near(fx2r(y[k]), q, 0.02, 0.02)) begin
            failures++;
            if (failures < 10) $display("FAIL %f / %f = %f, got %f", fx2r(u[k]), fx2r(a), q, fx2r(y[k]));
          end
        end
      end
    end
    u[0] = r2fx(3.0); u[1] = r2fx(-3.0); a = '0;
    #1;
    checks++;
    if (y[0] != FX_MAX || y[1] != FX_MIN) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
