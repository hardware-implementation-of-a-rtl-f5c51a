// cnu: check node unit. From the d = 3 messages (m_l, V_l) arriving at one
// check node it forms, for every edge p, the outgoing message
//   mbar_p = -sum_{l != p} (h_l/h_p) m_l,   Vbar_p = sum_{l != p} (h_l/h_p)^2 V_l.
// The weight of slot l is sgn_l * HBAR[l], so each ratio is a constant from
// ldlc_pkg with sign sgn_l xor sgn_p; its square needs no sign. The
// structure (six multipliers and three adders per output, followed by a sign
// flip for the mean) follows the document. One message set is accepted
// every cycle when `in_valid` is high and the result appears one cycle
// later, registered, with `out_valid`; there is no back-pressure.
module cnu
  import ldlc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  gmsg_t in_msg  [D],
  input  logic  in_neg  [D],     // edge weight sign per slot
  output logic  out_valid,
  output gmsg_t out_msg [D]
);

  gmsg_t nxt [D];

  always_comb begin
    for (int p = 0; p < D; p++) begin
      fx_t sm, sv, r;
      sm = '0;
      sv = '0;
      for (int l = 0; l < D; l++) begin
        if (l != p) begin
          r  = (in_neg[l] ^ in_neg[p]) ? qneg(RATIO[l][p]) : RATIO[l][p];
          sm = qadd(sm, qmul(r, in_msg[l].m));
          sv = qadd(sv, qmul(RATIO_SQ[l][p], in_msg[l].v));
        end
      end
      nxt[p].m = qneg(sm);
      nxt[p].v = sv;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int p = 0; p < D; p++) out_msg[p] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_msg <= nxt;
    end
  end

endmodule
