// vout: VOut computation block, the output stage of a variable node.
//
// From the forward and backward messages of one node it forms the D
// outgoing variable-to-check messages (m_l, V_l) = FW_l * BW_l and the
// estimate w = mean(FW_2 * BW_1) of the transmitted coordinate, as the
// document prescribes. One gauss_prod is reused over D+1 cycles, one
// product per cycle. A node is taken on `in_valid && in_ready`; the results
// stay on the outputs with `out_valid` until `out_ready`. Latency from
// acceptance to `out_valid` is D+1 = 4 cycles (the document's version,
// sharing smaller arithmetic, takes 10).
module vout
  import ldlc_pkg::*;
#(
  parameter int VW = 10
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [VW-1:0] in_v,
  input  gmsg_t         in_fw [D],
  input  gmsg_t         in_bw [D],
  output logic          out_valid,
  input  logic          out_ready,
  output logic [VW-1:0] out_v,
  output gmsg_t         out_msg [D],
  output fx_t           out_w
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DONE} state_t;

  state_t     state;
  logic [2:0] k;
  gmsg_t      fw [D];
  gmsg_t      bw [D];
  gmsg_t      pa, pb, pp;

  always_comb begin
    if (k < 3'(D)) begin
      pa = fw[k[1:0]];
      pb = bw[k[1:0]];
    end else begin
      pa = fw[1];
      pb = bw[0];
    end
  end

  gauss_prod u_prod (.a(pa), .b(pb), .p(pp));

  assign in_ready  = (state == S_IDLE);
  assign out_valid = (state == S_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      k     <= '0;
      out_v <= '0;
      out_w <= '0;
      for (int j = 0; j < D; j++) begin
        fw[j] <= '0; bw[j] <= '0; out_msg[j] <= '0;
      end
    end else begin
      unique case (state)
        S_IDLE: if (in_valid) begin
          fw    <= in_fw;
          bw    <= in_bw;
          out_v <= in_v;
          k     <= '0;
          state <= S_RUN;
        end
        S_RUN: begin
          if (k < 3'(D)) out_msg[k[1:0]] <= pp;
          else           out_w <= pp.m;
          if (k == 3'(D)) state <= S_DONE;
          k <= k + 3'd1;
        end
        S_DONE: if (out_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
