// vn_proc: variable node message processing block, NCL vnu_cluster blocks
// side by side (5 by default, the equivalent of 50 variable node units).
//
// Nodes arrive one per cycle on the VN_input handshake and are dealt to the
// clusters in turn, node k to cluster k mod NCL, as in the document's timing
// (node 0 to cluster 0, node 1 to cluster 1, ...). `in_ready` is low while
// the cluster in turn cannot take a node, which stalls the input stream.
// On the output side a round-robin arbiter passes one finished node per
// cycle to VN_output; `conflict` is high in a cycle when more than one
// cluster has a node waiting. The document does not say how the outputs of
// the clusters are merged; the arbiter is this design's choice.
module vn_proc
  import ldlc_pkg::*;
#(
  parameter int NCL  = 5,
  parameter int NFW  = 10,
  parameter int NEXT = 3,
  parameter int VW   = 10,
  parameter fx_t MINVAR = fx_t'(26)         // variance floor, 0.1 sigma^2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  fx_t           inv_s2,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [VW-1:0] in_v,
  input  fx_t           in_y,
  input  gmsg_t         in_cm  [D],
  input  logic          in_neg [D],
  output logic          out_valid,
  output logic [VW-1:0] out_v,
  output gmsg_t         out_msg [D],
  output fx_t           out_w,
  output logic          conflict,
  output logic          clamp_evt,
  output logic          uflow_evt
);

  localparam int CW = (NCL > 1) ? $clog2(NCL) : 1;

  logic [CW-1:0] cin, grant, rr;
  logic          c_ready [NCL];
  logic          c_valid [NCL];
  logic [VW-1:0] c_v     [NCL];
  gmsg_t         c_msg   [NCL][D];
  fx_t           c_w     [NCL];
  logic [NCL-1:0] c_clamp, c_uflow;
  logic          any;
  int            nvalid;

  for (genvar g = 0; g < NCL; g++) begin : g_cl
    vnu_cluster #(.NFW(NFW), .NEXT(NEXT), .VW(VW), .MINVAR(MINVAR)) u_cl (
      .clk(clk), .rst_n(rst_n), .inv_s2(inv_s2),
      .in_valid(in_valid && cin == CW'(g)), .in_ready(c_ready[g]),
      .in_v(in_v), .in_y(in_y), .in_cm(in_cm), .in_neg(in_neg),
      .out_valid(c_valid[g]), .out_ready(any && grant == CW'(g)),
      .out_v(c_v[g]), .out_msg(c_msg[g]), .out_w(c_w[g]),
      .clamp_evt(c_clamp[g]), .uflow_evt(c_uflow[g]));
  end

  assign in_ready = c_ready[cin];

  // Round-robin: the first waiting cluster at or after rr.
  always_comb begin
    int idx;
    any    = 1'b0;
    grant  = '0;
    nvalid = 0;
    for (int i = 0; i < NCL; i++) if (c_valid[i]) nvalid++;
    for (int i = NCL - 1; i >= 0; i--) begin
      idx = (int'(rr) + i) % NCL;
      if (c_valid[idx]) begin
        any   = 1'b1;
        grant = CW'(idx);
      end
    end
  end

  assign out_valid = any;
  assign out_v     = c_v[grant];
  assign out_msg   = c_msg[grant];
  assign out_w     = c_w[grant];
  assign conflict  = (nvalid > 1);
  assign clamp_evt = |c_clamp;
  assign uflow_evt = |c_uflow;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cin <= '0;
      rr  <= '0;
    end else begin
      if (in_valid && in_ready) cin <= (cin == CW'(NCL - 1)) ? '0 : cin + CW'(1);
      if (any) rr <= (grant == CW'(NCL - 1)) ? '0 : grant + CW'(1);
    end
  end

endmodule
