// tb_msg_router: the message router at N = 40 with the real parity check
// ROM and model memories (one-cycle synchronous reads, random contents).
// Check phase: check nodes 0..N-1 must come out in order, one per cycle,
// each with the three variable-side messages stored at its address and the
// signs of its row. Variable phase, with random vn_ready: variable nodes
// 0..N-1 must be handed over in order, exactly once, each with its channel
// value, the check-side messages from the three rows that hold it, and
// those rows' signs; data must stay stable while vn_ready is low. busy must
// fall after each phase. Both phases run 5 times with fresh contents.
module tb_msg_router;
  import ldlc_pkg::*;

  localparam int N = 40, AW = 6;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic start_cn, start_vn, busy;
  logic [AW-1:0] rom_c, rom_v, vm_addr, ch_addr, cn_c, vn_v;
  logic [AW-1:0] cm_addr [D], a_col [D], b_row [D], c_row [D];
  logic rom_c_neg [D], rom_v_neg [D], cn_neg [D], vn_neg [D];
  logic vm_re, cm_re, ch_re, cn_valid, vn_valid, vn_ready;
  gmsg_t vm_rdata [D], cm_rdata [D], cn_msg [D], vn_cm [D];
  fx_t ch_rdata, vn_y;
  gmsg_t vmem [D][N], cmem [D][N];
  fx_t chm [N];
  int  inv_row [D][N];

  always #5 clk = ~clk;

  msg_router #(.N(N)) dut (
    .clk(clk), .rst_n(rst_n), .start_cn(start_cn), .start_vn(start_vn), .busy(busy),
    .rom_c(rom_c), .rom_c_neg(rom_c_neg), .rom_v(rom_v), .rom_v_row(b_row), .rom_v_neg(rom_v_neg),
    .vm_re(vm_re), .vm_addr(vm_addr), .vm_rdata(vm_rdata),
    .cm_re(cm_re), .cm_addr(cm_addr), .cm_rdata(cm_rdata),
    .ch_re(ch_re), .ch_addr(ch_addr), .ch_rdata(ch_rdata),
    .cn_valid(cn_valid), .cn_c(cn_c), .cn_msg(cn_msg), .cn_neg(cn_neg),
    .vn_valid(vn_valid), .vn_ready(vn_ready), .vn_v(vn_v), .vn_y(vn_y), .vn_cm(vn_cm),
    .vn_neg(vn_neg));
  h_rom #(.N(N)) rom (
    .a_c(rom_c), .a_col(a_col), .a_neg(rom_c_neg), .b_v(rom_v), .b_row(b_row), .b_neg(rom_v_neg),
    .c_v(6'd0), .c_row(c_row));

  always_ff @(posedge clk) begin
    if (vm_re) for (int j = 0; j < D; j++) vm_rdata[j] <= vmem[j][vm_addr];
    if (cm_re) for (int j = 0; j < D; j++) cm_rdata[j] <= cmem[j][cm_addr[j]];
    if (ch_re) ch_rdata <= chm[ch_addr];
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fill();
    for (int j = 0; j < D; j++) for (int c = 0; c < N; c++) begin
      vmem[j][c] = '{m: fx_t'($urandom), v: fx_t'($urandom)};
      cmem[j][c] = '{m: fx_t'($urandom), v: fx_t'($urandom)};
    end
    for (int v = 0; v < N; v++) chm[v] = fx_t'($urandom);
  endtask

  task automatic cn_phase();
    int n, cyc;
    @(negedge clk);
    start_cn = 1;
    @(negedge clk);
    start_cn = 0;
    n = 0; cyc = 0;
    while (busy && cyc < 4 * N) begin
      if (cn_valid) begin
        bit bad;
        bad = (int'(cn_c) != n);
        for (int j = 0; j < D; j++)
          if (cn_msg[j] != vmem[j][n] || cn_neg[j] != sign_neg(j, n)) bad = 1;
        checks++;
        if (bad) begin failures++; if (failures < 10) $display("FAIL cn %0d", n); end
        n++;
      end
      @(negedge clk);
      cyc++;
    end
    checks += 2;
    if (n != N) begin failures++; $display("FAIL %0d check nodes", n); end
    if (cyc > N + 4) begin failures++; $display("FAIL check phase took %0d cycles", cyc); end
  endtask

  task automatic vn_phase(output int stalls);
    int n, cyc;
    gmsg_t held [D];
    fx_t held_y;
    bit waiting;
    @(negedge clk);
    start_vn = 1;
    @(negedge clk);
    start_vn = 0;
    n = 0; cyc = 0; stalls = 0; waiting = 0;
    while (busy && cyc < 10 * N) begin
      vn_ready = 1'($urandom_range(0, 2) != 0);
      #1;
      if (vn_valid) begin
        bit bad;
        int r;
        bad = (int'(vn_v) != n) || (vn_y != chm[n]);
        for (int j = 0; j < D; j++) begin
          r = inv_row[j][n];
          if (vn_cm[j] != cmem[j][r] || vn_neg[j] != sign_neg(j, r)) bad = 1;
        end
        if (waiting && (vn_y != held_y || vn_cm != held)) bad = 1;
        checks++;
        if (bad) begin failures++; if (failures < 10) $display("FAIL vn %0d", n); end
        if (vn_ready) begin n++; waiting = 0; end
        else begin stalls++; waiting = 1; held = vn_cm; held_y = vn_y; end
      end
      @(negedge clk);
      cyc++;
    end
    vn_ready = 0;
    checks++;
    if (n != N) begin failures++; $display("FAIL %0d variable nodes", n); end
  endtask

  initial begin
    int st, tot;
    start_cn = 0; start_vn = 0; vn_ready = 0; tot = 0;
    for (int j = 0; j < D; j++) for (int c = 0; c < N; c++) inv_row[j][perm_col(j, c, N)] = c;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 5; k++) begin
      fill();
      cn_phase();
      vn_phase(st);
      tot += st;
    end
    checks++;
    if (tot == 0) failures++;
    $display("stalls=%0d", tot);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
