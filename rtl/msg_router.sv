// msg_router: message routing network between the message memories and the
// two processing blocks.
//
// Check phase (`start_cn`): for c = 0..N-1, one per cycle, it reads the D
// variable-to-check messages of check node c (bank j, address c, since the
// variable node memory is kept in check-node order) and presents them one
// cycle later on CN_input with the edge signs of c.
// Variable phase (`start_vn`): for v = 0..N-1 it looks up the check nodes
// row_j(v) joined to v, reads bank j of the check node memory at row_j(v)
// and the channel value of v, and presents them one cycle later on VN_input
// with the edge signs. When VN_input is not taken (`vn_ready` low) it holds
// the node and re-reads the same addresses, so the stream stalls without
// loss. `busy` is high from the start pulse until the last node has been
// handed over. Looking connections and weights up in ROMs and fetching the
// messages per node follow the document; the fetch order and the stall
// handling are this design's choices.
module msg_router
  import ldlc_pkg::*;
#(
  parameter int N  = 1000,
  parameter int AW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start_cn,
  input  logic          start_vn,
  output logic          busy,
  // H ROM lookups
  output logic [AW-1:0] rom_c,
  input  logic          rom_c_neg [D],
  output logic [AW-1:0] rom_v,
  input  logic [AW-1:0] rom_v_row [D],
  input  logic          rom_v_neg [D],
  // variable node message memory, read side
  output logic          vm_re,
  output logic [AW-1:0] vm_addr,
  input  gmsg_t         vm_rdata [D],
  // check node message memory, read side
  output logic          cm_re,
  output logic [AW-1:0] cm_addr [D],
  input  gmsg_t         cm_rdata [D],
  // channel memory, read side
  output logic          ch_re,
  output logic [AW-1:0] ch_addr,
  input  fx_t           ch_rdata,
  // CN_input
  output logic          cn_valid,
  output logic [AW-1:0] cn_c,
  output gmsg_t         cn_msg [D],
  output logic          cn_neg [D],
  // VN_input
  output logic          vn_valid,
  input  logic          vn_ready,
  output logic [AW-1:0] vn_v,
  output fx_t           vn_y,
  output gmsg_t         vn_cm  [D],
  output logic          vn_neg [D]
);

  typedef enum logic [1:0] {M_IDLE, M_CN, M_VN} mode_t;

  mode_t         mode;
  logic [AW-1:0] cnt;          // next node to issue
  logic          issuing;      // nodes left to issue
  logic          s1_valid;
  logic [AW-1:0] s1_idx;
  logic          s1_neg [D];
  logic          advance;
  logic [AW-1:0] addr;

  // Variable phase: advance when stage 1 is empty or being taken.
  assign advance = (mode == M_CN) ? 1'b1 : (!s1_valid || vn_ready);
  assign addr    = (mode == M_VN && !advance) ? s1_idx : cnt;

  assign rom_c   = cnt;
  assign rom_v   = addr;
  assign vm_re   = (mode == M_CN) && issuing;
  assign vm_addr = cnt;
  assign cm_re   = (mode == M_VN);
  assign ch_re   = (mode == M_VN);
  assign ch_addr = addr;
  always_comb for (int j = 0; j < D; j++) cm_addr[j] = rom_v_row[j];

  assign busy     = (mode != M_IDLE);
  assign cn_valid = (mode == M_CN) && s1_valid;
  assign cn_c     = s1_idx;
  assign cn_msg   = vm_rdata;
  assign cn_neg   = s1_neg;
  assign vn_valid = (mode == M_VN) && s1_valid;
  assign vn_v     = s1_idx;
  assign vn_y     = ch_rdata;
  assign vn_cm    = cm_rdata;
  assign vn_neg   = s1_neg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode     <= M_IDLE;
      cnt      <= '0;
      issuing  <= 1'b0;
      s1_valid <= 1'b0;
      s1_idx   <= '0;
      for (int j = 0; j < D; j++) s1_neg[j] <= 1'b0;
    end else if (start_cn || start_vn) begin
      mode     <= start_cn ? M_CN : M_VN;
      cnt      <= '0;
      issuing  <= 1'b1;
      s1_valid <= 1'b0;
    end else if (mode != M_IDLE && advance) begin
      s1_valid <= issuing;
      if (issuing) begin
        s1_idx <= cnt;
        s1_neg <= (mode == M_CN) ? rom_c_neg : rom_v_neg;
        if (cnt == AW'(N - 1)) issuing <= 1'b0;
        else                   cnt     <= cnt + AW'(1);
      end else if (!s1_valid) begin
        mode <= M_IDLE;
      end
    end
  end

endmodule
