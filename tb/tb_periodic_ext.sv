// tb_periodic_ext: random check messages, channel values, slots and signs.
// The component means must be mbar + i/h for consecutive integers i
// (spacing 1/|h| within 0.02), the middle one must lie within half a period
// (+0.03) of the channel value, and the variance must pass through.
module tb_periodic_ext;
  import ldlc_pkg::*;
  import ldlc_ref_pkg::*;

  int checks = 0, failures = 0;
  gmsg_t cm;
  logic [1:0] slot;
  logic neg;
  fx_t y, vo;
  fx_t mean [3];

  periodic_ext #(.NEXT(3)) dut (.cm(cm), .slot(slot), .neg(neg), .y(y), .mean(mean), .var_o(vo));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int r1, r2;
      real per, h, mid, off;
      r1 = $urandom_range(0, 1000);
      r2 = $urandom_range(0, 1000);
      cm.m = r2fx((r1 - 500) / 100.0);
      cm.v = r2fx($urandom_range(10, 500) / 100.0);
      y    = r2fx((r2 - 500) / 100.0);
      slot = 2'($urandom_range(0, 2));
      neg  = 1'($urandom_range(0, 1));
      #1;
      h   = HB[slot];
      per = 1.0 / h;
      mid = fx2r(mean[1]);
      off = mid - fx2r(y);
      if (off < 0) off = -off;
      checks++;
      if (!near(fx2r(mean[1]) - fx2r(mean[0]), neg ? -per : per, 0.02, 0.0) ||
          !near(fx2r(mean[2]) - fx2r(mean[1]), neg ? -per : per, 0.02, 0.0) ||
          off > per / 2.0 + 0.03 || vo != cm.v) begin
        failures++;
        if (failures < 10) $display("FAIL y=%f m=%f slot=%0d neg=%b -> %f %f %f", fx2r(y), fx2r(cm.m), slot, neg,
                                    fx2r(mean[0]), fx2r(mean[1]), fx2r(mean[2]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
