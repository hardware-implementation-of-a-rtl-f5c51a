// tb_h_rom: the parity-check ROM at N = 40 and at the default N = 1000.
// Port A must give, for each row c, the columns perm_col(j, c) and signs of
// the package functions. Every slot j must be a permutation (each column
// once), the three columns of a row must differ, and ports B and C must be
// the exact inverse: for column v, row b_row[j] holds v in slot j with the
// same sign, and c_row equals b_row.
module tb_h_rom;
  import ldlc_pkg::*;

  int checks = 0, failures = 0;

  logic [5:0] a40, b40, c40, ac40 [D], br40 [D], cr40 [D];
  logic       an40 [D], bn40 [D];
  logic [9:0] a1k, b1k, c1k, ac1k [D], br1k [D], cr1k [D];
  logic       an1k [D], bn1k [D];

  h_rom #(.N(40)) dut40 (
    .a_c(a40), .a_col(ac40), .a_neg(an40), .b_v(b40), .b_row(br40), .b_neg(bn40),
    .c_v(c40), .c_row(cr40));
  h_rom dut1k (
    .a_c(a1k), .a_col(ac1k), .a_neg(an1k), .b_v(b1k), .b_row(br1k), .b_neg(bn1k),
    .c_v(c1k), .c_row(cr1k));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check40();
    int hits [D][40];
    for (int j = 0; j < D; j++) for (int v = 0; v < 40; v++) hits[j][v] = 0;
    for (int c = 0; c < 40; c++) begin
      a40 = 6'(c); #1;
      for (int j = 0; j < D; j++) begin
        checks++;
        if (int'(ac40[j]) != perm_col(j, c, 40) || an40[j] != sign_neg(j, c)) failures++;
        hits[j][ac40[j]]++;
      end
      checks++;
      if (ac40[0] == ac40[1] || ac40[0] == ac40[2] || ac40[1] == ac40[2]) failures++;
    end
    for (int j = 0; j < D; j++) for (int v = 0; v < 40; v++) begin
      checks++;
      if (hits[j][v] != 1) failures++;
    end
    for (int v = 0; v < 40; v++) begin
      b40 = 6'(v); c40 = 6'(v); #1;
      for (int j = 0; j < D; j++) begin
        checks++;
        if (perm_col(j, int'(br40[j]), 40) != v || bn40[j] != sign_neg(j, int'(br40[j])) ||
            cr40[j] != br40[j]) failures++;
      end
    end
  endtask

  task automatic check1k();
    int hits [D][1000];
    for (int j = 0; j < D; j++) for (int v = 0; v < 1000; v++) hits[j][v] = 0;
    for (int c = 0; c < 1000; c++) begin
      a1k = 10'(c); #1;
      for (int j = 0; j < D; j++) begin
        checks++;
        if (int'(ac1k[j]) != perm_col(j, c, 1000) || an1k[j] != sign_neg(j, c)) failures++;
        hits[j][ac1k[j]]++;
      end
      checks++;
      if (ac1k[0] == ac1k[1] || ac1k[0] == ac1k[2] || ac1k[1] == ac1k[2]) failures++;
    end
    for (int j = 0; j < D; j++) for (int v = 0; v < 1000; v++) begin
      checks++;
      if (hits[j][v] != 1) failures++;
    end
    for (int v = 0; v < 1000; v++) begin
      b1k = 10'(v); c1k = 10'(v); #1;
      for (int j = 0; j < D; j++) begin
        checks++;
        if (perm_col(j, int'(br1k[j]), 1000) != v || bn1k[j] != sign_neg(j, int'(br1k[j])) ||
            cr1k[j] != br1k[j]) failures++;
      end
    end
  endtask

  initial begin
    #1;
    check40();
    check1k();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
