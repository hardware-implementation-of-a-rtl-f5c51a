// vnu_cluster: two-stage pipelined group of variable node units.
//
// Stage 1 is NFW fwbw blocks, stage 2 one vout block shared by all of them,
// which is the document's VNUcluster (10 FWBW blocks and one VOut block by
// default). Nodes enter in order: the k-th node taken goes to fwbw
// (k mod NFW), and `in_ready` is that block's idle flag, so the cluster
// stalls its input when the next block in turn is still busy. Stage 2
// serves the fwbw blocks in the same cyclic order, so nodes leave in the
// order they came. Per node the latency is that of fwbw (4 cycles) plus one
// hand-over cycle plus that of vout (4 cycles) before `out_valid`; the
// output is held until `out_ready`.
module vnu_cluster
  import ldlc_pkg::*;
#(
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
  input  logic          out_ready,
  output logic [VW-1:0] out_v,
  output gmsg_t         out_msg [D],
  output fx_t           out_w,
  output logic          clamp_evt,
  output logic          uflow_evt
);

  localparam int PW = (NFW > 1) ? $clog2(NFW) : 1;

  logic [PW-1:0] in_ptr, out_ptr;

  logic          f_in_ready  [NFW];
  logic          f_out_valid [NFW];
  logic [VW-1:0] f_out_v     [NFW];
  gmsg_t         f_fw        [NFW][D];
  gmsg_t         f_bw        [NFW][D];
  logic [NFW-1:0] f_clamp, f_uflow;

  logic          vo_in_ready;

  for (genvar g = 0; g < NFW; g++) begin : g_fwbw
    fwbw #(.NEXT(NEXT), .VW(VW), .MINVAR(MINVAR)) u_fwbw (
      .clk(clk), .rst_n(rst_n), .inv_s2(inv_s2),
      .in_valid(in_valid && in_ptr == PW'(g)), .in_ready(f_in_ready[g]),
      .in_v(in_v), .in_y(in_y), .in_cm(in_cm), .in_neg(in_neg),
      .out_valid(f_out_valid[g]), .out_ready(vo_in_ready && out_ptr == PW'(g)),
      .out_v(f_out_v[g]), .out_fw(f_fw[g]), .out_bw(f_bw[g]),
      .clamp_evt(f_clamp[g]), .uflow_evt(f_uflow[g]));
  end

  assign in_ready  = f_in_ready[in_ptr];
  assign clamp_evt = |f_clamp;
  assign uflow_evt = |f_uflow;

  vout #(.VW(VW)) u_vout (
    .clk(clk), .rst_n(rst_n),
    .in_valid(f_out_valid[out_ptr]), .in_ready(vo_in_ready),
    .in_v(f_out_v[out_ptr]), .in_fw(f_fw[out_ptr]), .in_bw(f_bw[out_ptr]),
    .out_valid(out_valid), .out_ready(out_ready),
    .out_v(out_v), .out_msg(out_msg), .out_w(out_w));

  function automatic logic [PW-1:0] wrap_inc(input logic [PW-1:0] p);
    return (p == PW'(NFW - 1)) ? '0 : p + PW'(1);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_ptr  <= '0;
      out_ptr <= '0;
    end else begin
      if (in_valid && in_ready)                    in_ptr  <= wrap_inc(in_ptr);
      if (f_out_valid[out_ptr] && vo_in_ready)     out_ptr <= wrap_inc(out_ptr);
    end
  end

endmodule
