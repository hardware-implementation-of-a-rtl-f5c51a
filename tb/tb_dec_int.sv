// tb_dec_int: the integer decision unit at N = 40 with the real parity
// check ROM. Random estimates w are written, a sweep is started, and every
// decided integer b_c must equal round(sum_j H[c][j] w_j) computed in real
// arithmetic from the stored fixed-point w (rows whose sum lies within 0.02
// of a rounding boundary are skipped). Sweeps are repeated: with w
// unchanged `changed` must stay low; after one w moves by 1.0 it must be
// high. `done` must pulse once per sweep, N cycles after start.
module tb_dec_int;
  import ldlc_pkg::*;
  import ldlc_ref_pkg::*;

  localparam int N = 40, AW = 6, BW = 14;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic w_we, start, busy, done, changed;
  logic [AW-1:0] w_v, rom_c, rd_c;
  fx_t w_val;
  logic [AW-1:0] rom_col [D], b_row [D], c_row [D];
  logic rom_neg [D], b_neg [D];
  logic signed [BW-1:0] rd_b;
  fx_t w [N];

  always #5 clk = ~clk;

  dec_int #(.N(N)) dut (
    .clk(clk), .rst_n(rst_n), .w_we(w_we), .w_v(w_v), .w_val(w_val), .start(start),
    .busy(busy), .done(done), .changed(changed), .rom_c(rom_c), .rom_col(rom_col),
    .rom_neg(rom_neg), .rd_c(rd_c), .rd_b(rd_b));
  h_rom #(.N(N)) rom (
    .a_c(rom_c), .a_col(rom_col), .a_neg(rom_neg), .b_v(6'd0), .b_row(b_row), .b_neg(b_neg),
    .c_v(6'd0), .c_row(c_row));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_w(input int v, input fx_t val);
    @(negedge clk);
    w_we = 1; w_v = AW'(v); w_val = val; w[v] = val;
    @(negedge clk);
    w_we = 0;
  endtask

  task automatic sweep(input int exp_changed);
    int cyc, ndone;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1; ndone = 0;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != N + 1) begin failures++; $display("FAIL sweep took %0d cycles", cyc); end
    if (exp_changed >= 0) begin
      checks++;
      if (changed != 1'(exp_changed)) begin failures++; $display("FAIL changed=%b", changed); end
    end
    @(negedge clk);
    checks++;
    if (done || busy) failures++;
    for (int c = 0; c < N; c++) begin
      real s, fr;
      s = 0;
      for (int j = 0; j < D; j++)
        s += (sign_neg(j, c) ? -HB[j] : HB[j]) * fx2r(w[perm_col(j, c, N)]);
      fr = s - $floor(s);
      if (fr > 0.48 && fr < 0.52) continue;
      rd_c = AW'(c);
      #1;
      checks++;
      if (int'(rd_b) != int'($floor(s + 0.5))) begin
        failures++;
        if (failures < 10) $display("FAIL row %0d got %0d expected %f", c, rd_b, s);
      end
    end
  endtask

  initial begin
    int r;
    w_we = 0; w_v = 0; w_val = 0; start = 0; rd_c = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 20; round++) begin
      for (int v = 0; v < N; v++) begin
        r = $urandom_range(0, 2000);
        write_w(v, r2fx((r - 1000) / 250.0));
      end
      sweep(-1);
      sweep(0);
      r = $urandom_range(0, N - 1);
      write_w(r, qadd(w[r], FX_ONE));
      sweep(1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
