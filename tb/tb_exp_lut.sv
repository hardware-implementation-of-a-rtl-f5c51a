// tb_exp_lut: checks exp(-a/2) from the split tables against $exp over every
// argument from 0 to 20.0 in steps of one LSB: the result must be within
// 3 LSB, and the underflow flag must be set exactly for a >= 16.
module tb_exp_lut;
  import ldlc_pkg::*;
  import ldlc_ref_pkg::*;

  int checks = 0, failures = 0;
  fx_t a, y;
  logic uf;

  exp_lut dut (.a(a), .y(y), .uflow(uf));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k <= 20 * 256; k++) begin
      a = fx_t'(k);
      #1;
      checks++;
      if (!near(fx2r(y), $exp(-fx2r(a) / 2.0), 3.0 / 256.0, 0.0) || uf != (k >= 16 * 256)) begin
        failures++;
        if (failures < 10) $display("FAIL a=%f y=%f exp=%f uf=%b", fx2r(a), fx2r(y), $exp(-fx2r(a) / 2.0), uf);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
