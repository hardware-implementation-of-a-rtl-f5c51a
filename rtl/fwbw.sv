// fwbw: forward-backward computation block of one variable node.
//
// On `in_valid && in_ready` it takes the D = 3 check-to-variable messages of
// a variable node, their edge signs and the channel value y, and registers
// their periodic extensions MP_1..MP_D. It then runs the forward-backward
// recursion
//   FW_1 = BW_D = (y, CH_VAR)
//   FW_{j+1} = GMR(FW_j * MP_j),  BW_{D-j} = GMR(BW_{D-j+1} * MP_{D-j+1})
// for j = 1..D-1, the forward and backward lanes side by side, each a
// mix_product followed by a gmr with a register between them. A lane step
// takes two cycles (product, reduction), so the results are ready
// 2*(D-1) cycles after the input is taken, and stay on the outputs, with
// `out_valid`, until `out_ready`. The block takes a new node only when
// idle. The recursion, the initial variance of 2 (two lanes each carry the
// channel message, their product has variance 1) and the split into
// product and reduction follow the document; the two-cycle step and the
// handshake are this design's own (the document reports a resource-shared
// implementation taking 109 cycles). Slot j of a variable node uses the
// edge of generating-sequence element j.
module fwbw
  import ldlc_pkg::*;
#(
  parameter int  NEXT   = 3,
  parameter int  VW     = 10,                 // width of the node tag
  parameter fx_t CH_VAR = fx_t'(2 << WF),     // initial FW/BW variance
  parameter fx_t MINVAR = fx_t'(26)           // variance floor, 0.1 sigma^2
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
  output gmsg_t         out_fw [D],
  output gmsg_t         out_bw [D],
  output logic          clamp_evt,            // a reduction hit the variance floor
  output logic          uflow_evt             // an exponential underflowed
);

  typedef enum logic [1:0] {S_IDLE, S_PROD, S_RED, S_DONE} state_t;

  state_t            state;
  logic [1:0]        step;                    // j - 1
  fx_t               mp_m [D][NEXT];          // periodic extensions
  fx_t               mp_v [D];
  fx_t               ext_m [D][NEXT];
  fx_t               ext_v [D];

  // Periodic extension of the incoming messages.
  for (genvar j = 0; j < D; j++) begin : g_ext
    periodic_ext #(.NEXT(NEXT)) u_ext (
      .cm(in_cm[j]), .slot(2'(j)), .neg(in_neg[j]), .y(in_y),
      .mean(ext_m[j]), .var_o(ext_v[j]));
  end

  // Forward lane uses FW_step and MP_step; backward lane BW_{D-1-step}, MP_{D-1-step}.
  logic [1:0] fi, bi;
  assign fi = step;
  assign bi = 2'(D - 1) - step;

  fx_t  f_vf, b_vf, f_vf_q, b_vf_q;
  fx_t  f_mf [NEXT], b_mf [NEXT], f_cf [NEXT], b_cf [NEXT];
  fx_t  f_mf_q [NEXT], b_mf_q [NEXT], f_cf_q [NEXT], b_cf_q [NEXT];
  logic [NEXT-1:0] f_uf, b_uf;
  gmsg_t f_red, b_red;
  logic  f_cl, b_cl, f_az, b_az;

  mix_product #(.NEXT(NEXT)) u_fprod (
    .ga(out_fw[fi]), .mb(mp_m[fi]), .vb(mp_v[fi]), .inv_s2(inv_s2),
    .vf(f_vf), .mf(f_mf), .cf(f_cf), .uflow(f_uf));
  mix_product #(.NEXT(NEXT)) u_bprod (
    .ga(out_bw[bi]), .mb(mp_m[bi]), .vb(mp_v[bi]), .inv_s2(inv_s2),
    .vf(b_vf), .mf(b_mf), .cf(b_cf), .uflow(b_uf));

  gmr #(.NEXT(NEXT), .MINVAR(MINVAR)) u_fgmr (
    .vin(f_vf_q), .m(f_mf_q), .c(f_cf_q), .inv_s2(inv_s2),
    .out(f_red), .clamped(f_cl), .allzero(f_az));
  gmr #(.NEXT(NEXT), .MINVAR(MINVAR)) u_bgmr (
    .vin(b_vf_q), .m(b_mf_q), .c(b_cf_q), .inv_s2(inv_s2),
    .out(b_red), .clamped(b_cl), .allzero(b_az));

  assign in_ready  = (state == S_IDLE);
  assign out_valid = (state == S_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      step      <= '0;
      out_v     <= '0;
      clamp_evt <= 1'b0;
      uflow_evt <= 1'b0;
      f_vf_q    <= '0;
      b_vf_q    <= '0;
      for (int j = 0; j < D; j++) begin
        out_fw[j] <= '0;
        out_bw[j] <= '0;
        mp_v[j]   <= '0;
        for (int k = 0; k < NEXT; k++) mp_m[j][k] <= '0;
      end
      for (int k = 0; k < NEXT; k++) begin
        f_mf_q[k] <= '0; b_mf_q[k] <= '0; f_cf_q[k] <= '0; b_cf_q[k] <= '0;
      end
    end else begin
      clamp_evt <= 1'b0;
      uflow_evt <= 1'b0;
      unique case (state)
        S_IDLE: if (in_valid) begin
          out_v         <= in_v;
          mp_m          <= ext_m;
          mp_v          <= ext_v;
          out_fw[0]     <= '{m: in_y, v: CH_VAR};
          out_bw[D-1]   <= '{m: in_y, v: CH_VAR};
          step          <= '0;
          state         <= S_PROD;
        end
        S_PROD: begin
          f_vf_q <= f_vf;  f_mf_q <= f_mf;  f_cf_q <= f_cf;
          b_vf_q <= b_vf;  b_mf_q <= b_mf;  b_cf_q <= b_cf;
          uflow_evt <= |{f_uf, b_uf};
          state  <= S_RED;
        end
        S_RED: begin
          out_fw[fi + 2'd1] <= f_red;
          out_bw[bi - 2'd1] <= b_red;
          clamp_evt <= f_cl | b_cl;
          if (step == 2'(D - 2)) state <= S_DONE;
          else begin
            step  <= step + 2'd1;
            state <= S_PROD;
          end
        end
        S_DONE: if (out_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
