// mix_product: product of a normalised single Gaussian (ma, Va) with a
// periodically extended mixture whose NEXT components share the variance Vb
// (purely combinational).
//
// Every product component has the variance VF = Va*Vb/(Va+Vb) and the mean
// mF_i = (ma*Vb + m_i*Va)/(Va+Vb), the same as VF*(ma/Va + m_i/Vb). Its
// weight is exp(-(ma - m_i)^2 / (2 (Va+Vb) sigma^2)): the constant factor of
// the exact product weight is dropped because all components share it and
// the reduction that follows normalises the weights, as in the document.
// Variances are relative to sigma^2 and means absolute, hence the factor
// inv_s2 = 1/sigma^2 in the exponent. One nr_div shares the reciprocal of
// Va+Vb among all 2*NEXT+1 quotients; NEXT exp_lut instances give the
// weights. `uflow` marks components whose weight underflowed to zero.
module mix_product
  import ldlc_pkg::*;
#(
  parameter int NEXT = 3
) (
  input  gmsg_t ga,                  // single Gaussian (FW or BW message)
  input  fx_t   mb   [NEXT],         // mixture means
  input  fx_t   vb,                  // mixture variance
  input  fx_t   inv_s2,              // 1/sigma^2
  output fx_t   vf,                  // common product variance
  output fx_t   mf   [NEXT],         // product means
  output fx_t   cf   [NEXT],         // product weights (not normalised)
  output logic  [NEXT-1:0] uflow
);

  localparam int NU = 2 * NEXT + 1;

  fx_t num [NU];
  fx_t quo [NU];
  fx_t den;

  always_comb begin
    den    = qadd(ga.v, vb);
    num[0] = qmul(ga.v, vb);
    for (int i = 0; i < NEXT; i++) begin
      fx_t dm;
      dm              = qsub(ga.m, mb[i]);
      num[1 + i]      = qadd(qmul(ga.m, vb), qmul(mb[i], ga.v));
      num[1 + NEXT + i] = qmul(qmul(dm, inv_s2), dm);
    end
  end

  nr_div #(.NU(NU)) u_div (.u(num), .a(den), .y(quo));

  assign vf = quo[0];

  for (genvar i = 0; i < NEXT; i++) begin : g_comp
    assign mf[i] = quo[1 + i];
    exp_lut u_exp (.a(quo[1 + NEXT + i]), .y(cf[i]), .uflow(uflow[i]));
  end

endmodule
