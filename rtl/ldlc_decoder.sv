// ldlc_decoder: fixed-point single-Gaussian decoder for a low-density
// lattice code, with one check node unit and a pipelined variable node
// stage equivalent to NCL*NFW = 50 variable node units.
//
// A frame is decoded in four phases, sequenced by the controller here:
//   load   N channel values y_v arrive on ch_y (ch_valid/ch_ready). Each is
//          stored in the channel memory and, as the initial variable message
//          (y_v, 1.0 sigma^2), on all D edges of v.
//   check  the router streams check nodes 0..N-1, one per cycle, through
//          the cnu; its results go to the check node message memory.
//   var    the router streams variable nodes 0..N-1 into vn_proc (stalling
//          when the cluster in turn is busy); its results go back to the
//          variable node message memory and the estimates w_v to dec_int.
//   decide dec_int forms b = round(H w) and compares it with the previous
//          iteration.
// check-var-decide repeats until b has come out the same in STABLE+1
// successive iterations (`converged`) or MAX_ITER iterations have run. The decoded integers then
// leave on out_b / out_idx (out_valid, one per cycle, no back-pressure) and
// `done` pulses with the iteration count on `iters`.
// inv_s2 is 1/sigma^2 of the channel in Q12.8 and must be stable during a
// frame. vn_stall, vn_conflict, clamp_evt and uflow_evt are event flags for
// monitoring: an input stall of the variable node stage, two or more
// clusters with an output waiting, a variance raised to the floor, an
// exponential that underflowed.
// The phase structure, the block partition, the 20-iteration limit, the
// number format and the cluster sizes follow the document; the phases do
// not overlap, and the stopping test, the memory timing and the handshakes
// are this design's choices.
module ldlc_decoder
  import ldlc_pkg::*;
#(
  parameter int N        = 1000,     // block length
  parameter int MAX_ITER = 20,       // decoding iterations at most
  parameter int NCL      = 5,        // VNU clusters
  parameter int NFW      = 10,       // FWBW blocks per cluster
  parameter int NEXT     = 3,        // periodic-extension components
  parameter fx_t MINVAR  = fx_t'(26), // variance floor, 0.1 sigma^2
  parameter int STABLE   = 2,        // unchanged decisions needed to stop
  parameter int AW       = (N > 1) ? $clog2(N) : 1,
  parameter int BW       = W - WF + 1,
  parameter int IW       = $clog2(MAX_ITER + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  fx_t                  inv_s2,
  input  logic                 start,
  input  logic                 ch_valid,
  output logic                 ch_ready,
  input  fx_t                  ch_y,
  output logic                 out_valid,
  output logic [AW-1:0]        out_idx,
  output logic signed [BW-1:0] out_b,
  output logic                 done,
  output logic [IW-1:0]        iters,
  output logic                 converged,
  output logic                 busy,
  output logic                 vn_stall,
  output logic                 vn_conflict,
  output logic                 clamp_evt,
  output logic                 uflow_evt
);

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_CN, S_VN, S_DEC, S_OUT} state_t;

  state_t        state;
  logic [AW-1:0] cnt;               // load / write-back / output counter
  logic [IW-1:0] iter;
  logic [IW-1:0] same;              // iterations in a row with b unchanged
  logic [IW-1:0] same_n;

  // ---------------- H ROM ----------------
  logic [AW-1:0] ra_c, rb_v, rc_v;
  logic [AW-1:0] ra_col [D], rb_row [D], rc_row [D];
  logic          ra_neg [D], rb_neg [D];

  h_rom #(.N(N)) u_rom (
    .a_c(ra_c), .a_col(ra_col), .a_neg(ra_neg),
    .b_v(rb_v), .b_row(rb_row), .b_neg(rb_neg),
    .c_v(rc_v), .c_row(rc_row));

  // ---------------- router ----------------
  logic          start_cn, start_vn, r_busy;
  logic [AW-1:0] r_rom_c;
  logic          r_vm_re, r_cm_re, r_ch_re;
  logic [AW-1:0] r_vm_addr, r_ch_addr;
  logic [AW-1:0] r_cm_addr [D];
  gmsg_t         vm_rdata [D], cm_rdata [D];
  fx_t           ch_rdata;
  logic          cn_valid;
  logic [AW-1:0] cn_c;
  gmsg_t         cn_msg [D];
  logic          cn_neg [D];
  logic          vn_valid, vn_ready;
  logic [AW-1:0] vn_v;
  fx_t           vn_y;
  gmsg_t         vn_cm [D];
  logic          vn_neg [D];

  msg_router #(.N(N)) u_router (
    .clk(clk), .rst_n(rst_n), .start_cn(start_cn), .start_vn(start_vn), .busy(r_busy),
    .rom_c(r_rom_c), .rom_c_neg(ra_neg), .rom_v(rb_v), .rom_v_row(rb_row), .rom_v_neg(rb_neg),
    .vm_re(r_vm_re), .vm_addr(r_vm_addr), .vm_rdata(vm_rdata),
    .cm_re(r_cm_re), .cm_addr(r_cm_addr), .cm_rdata(cm_rdata),
    .ch_re(r_ch_re), .ch_addr(r_ch_addr), .ch_rdata(ch_rdata),
    .cn_valid(cn_valid), .cn_c(cn_c), .cn_msg(cn_msg), .cn_neg(cn_neg),
    .vn_valid(vn_valid), .vn_ready(vn_ready), .vn_v(vn_v), .vn_y(vn_y),
    .vn_cm(vn_cm), .vn_neg(vn_neg));

  // ---------------- check node message processing ----------------
  logic          cnu_valid;
  gmsg_t         cnu_msg [D];
  logic [AW-1:0] cnu_c;

  cnu u_cnu (
    .clk(clk), .rst_n(rst_n), .in_valid(cn_valid), .in_msg(cn_msg), .in_neg(cn_neg),
    .out_valid(cnu_valid), .out_msg(cnu_msg));

  always_ff @(posedge clk) if (cn_valid) cnu_c <= cn_c;

  // ---------------- variable node message processing ----------------
  logic          vo_valid;
  logic [AW-1:0] vo_v;
  gmsg_t         vo_msg [D];
  fx_t           vo_w;
  logic          vo_conflict, vo_clamp, vo_uflow;

  vn_proc #(.NCL(NCL), .NFW(NFW), .NEXT(NEXT), .VW(AW), .MINVAR(MINVAR)) u_vnp (
    .clk(clk), .rst_n(rst_n), .inv_s2(inv_s2),
    .in_valid(vn_valid), .in_ready(vn_ready), .in_v(vn_v), .in_y(vn_y),
    .in_cm(vn_cm), .in_neg(vn_neg),
    .out_valid(vo_valid), .out_v(vo_v), .out_msg(vo_msg), .out_w(vo_w),
    .conflict(vo_conflict), .clamp_evt(vo_clamp), .uflow_evt(vo_uflow));

  // ---------------- memories ----------------
  logic load_we;
  assign ch_ready = (state == S_LOAD);
  assign load_we  = ch_valid && ch_ready;
  assign rc_v     = load_we ? cnt : vo_v;

  for (genvar j = 0; j < D; j++) begin : g_bank
    logic  vm_we, cm_we;
    gmsg_t vm_wd;
    assign vm_we = load_we || vo_valid;
    assign vm_wd = load_we ? '{m: ch_y, v: fx_t'(1 << WF)} : vo_msg[j];
    assign cm_we = cnu_valid;

    // variable node message memory, bank j, in check-node order
    sp_ram #(.DW($bits(gmsg_t)), .DEPTH(N)) u_vmem (
      .clk(clk), .we(vm_we), .re(r_vm_re),
      .addr(vm_we ? rc_row[j] : r_vm_addr),
      .wdata(vm_wd), .rdata(vm_rdata[j]));

    // check node message memory, bank j
    sp_ram #(.DW($bits(gmsg_t)), .DEPTH(N)) u_cmem (
      .clk(clk), .we(cm_we), .re(r_cm_re),
      .addr(cm_we ? cnu_c : r_cm_addr[j]),
      .wdata(cnu_msg[j]), .rdata(cm_rdata[j]));
  end

  // channel message memory
  sp_ram #(.DW(W), .DEPTH(N)) u_chmem (
    .clk(clk), .we(load_we), .re(r_ch_re),
    .addr(load_we ? cnt : r_ch_addr), .wdata(ch_y), .rdata(ch_rdata));

  // ---------------- decoded integer computation ----------------
  logic          dec_start, dec_busy, dec_done, dec_changed;
  logic [AW-1:0] dec_rom_c;

  assign ra_c = (state == S_DEC) ? dec_rom_c : r_rom_c;

  dec_int #(.N(N), .BW(BW)) u_dec (
    .clk(clk), .rst_n(rst_n),
    .w_we(vo_valid), .w_v(vo_v), .w_val(vo_w),
    .start(dec_start), .busy(dec_busy), .done(dec_done), .changed(dec_changed),
    .rom_c(dec_rom_c), .rom_col(ra_col), .rom_neg(ra_neg),
    .rd_c(cnt), .rd_b(out_b));

  // ---------------- controller ----------------
  assign busy        = (state != S_IDLE);
  assign out_valid   = (state == S_OUT);
  assign out_idx     = cnt;
  assign vn_stall    = vn_valid && !vn_ready;
  assign vn_conflict = vo_conflict;
  assign clamp_evt   = vo_clamp;
  assign uflow_evt   = vo_uflow;

  assign same_n = (iter != '0 && !dec_changed) ? same + IW'(1) : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cnt       <= '0;
      iter      <= '0;
      same      <= '0;
      iters     <= '0;
      converged <= 1'b0;
      done      <= 1'b0;
      start_cn  <= 1'b0;
      start_vn  <= 1'b0;
      dec_start <= 1'b0;
    end else begin
      done      <= 1'b0;
      start_cn  <= 1'b0;
      start_vn  <= 1'b0;
      dec_start <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state     <= S_LOAD;
          cnt       <= '0;
          iter      <= '0;
          same      <= '0;
          converged <= 1'b0;
        end
        S_LOAD: if (load_we) begin
          if (cnt == AW'(N - 1)) begin
            cnt      <= '0;
            state    <= S_CN;
            start_cn <= 1'b1;
          end else begin
            cnt <= cnt + AW'(1);
          end
        end
        S_CN: if (cnu_valid && cnu_c == AW'(N - 1)) begin
          state    <= S_VN;
          start_vn <= 1'b1;
          cnt      <= '0;
        end
        S_VN: if (vo_valid) begin
          if (cnt == AW'(N - 1)) begin
            cnt       <= '0;
            state     <= S_DEC;
            dec_start <= 1'b1;
          end else begin
            cnt <= cnt + AW'(1);
          end
        end
        S_DEC: if (dec_done) begin
          iter <= iter + IW'(1);
          same <= same_n;
          if (int'(same_n) == STABLE || iter + IW'(1) == IW'(MAX_ITER)) begin
            converged <= (int'(same_n) == STABLE);
            state     <= S_OUT;
            cnt       <= '0;
          end else begin
            state    <= S_CN;
            start_cn <= 1'b1;
          end
        end
        S_OUT: begin
          if (cnt == AW'(N - 1)) begin
            state <= S_IDLE;
            done  <= 1'b1;
            iters <= iter;
            cnt   <= '0;
          end else begin
            cnt <= cnt + AW'(1);
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
