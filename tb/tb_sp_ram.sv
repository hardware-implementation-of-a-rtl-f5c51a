// tb_sp_ram: random writes, reads and idle cycles on a 13 x 20 memory,
// compared with a model array. A read returns the stored word one clock
// after re; rdata holds its value while re is low and during writes.
module tb_sp_ram;
  localparam int DW = 20, DEPTH = 13, AW = 4;

  int checks = 0, failures = 0;
  logic clk = 0;
  logic we, re;
  logic [AW-1:0] addr;
  logic [DW-1:0] wdata, rdata, model [DEPTH], held;
  bit   valid [DEPTH];

  always #5 clk = ~clk;

  sp_ram #(.DW(DW), .DEPTH(DEPTH)) dut (
    .clk(clk), .we(we), .re(re), .addr(addr), .wdata(wdata), .rdata(rdata));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int op;
    bit rd, have;
    we = 0; re = 0; addr = 0; wdata = 0; have = 0; held = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1; addr = AW'(i); wdata = DW'($urandom); model[i] = wdata;
    end
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      if (have) begin
        checks++;
        if (rdata !== held) begin
          failures++;
          if (failures < 10) $display("FAIL cycle %0d got %h expected %h", k, rdata, held);
        end
      end
      op = $urandom_range(0, 2);
      addr = AW'($urandom_range(0, DEPTH - 1));
      wdata = DW'($urandom);
      we = (op == 0);
      re = (op == 1) || ($urandom_range(0, 1) == 1); // re with we: write wins
      if (we) model[addr] = wdata;
      else if (re) begin held = model[addr]; have = 1; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
