// gmr: Gaussian mixture reduction by second-moment matching
// (purely combinational).
//
// A mixture of NEXT components with means m_i, weights c_i and a common
// variance V is replaced by the single Gaussian with
//   m = sum c_i m_i / C,  V' = V + sum c_i (m_i - m)^2 / sigma^2 / C,  C = sum c_i,
// which is the document's moment-matching rule (normalise r_i = c_i/C, then
// match mean and variance) for equal component variances, in units of
// sigma^2. Dividing the weighted sums by C, rather than each weight, is this
// design's choice for precision; the two divisions are in series because
// the variance needs the mean. V' is then raised to at least MINVAR
// (0.1 sigma^2, the document's floor), flagged on `clamped`. When every
// weight underflowed to zero the middle component is taken alone; this
// fallback is this design's choice.
module gmr
  import ldlc_pkg::*;
#(
  parameter int  NEXT   = 3,
  parameter fx_t MINVAR = fx_t'(26)    // 0.1 in Q12.8 (26/256)
) (
  input  fx_t   vin,
  input  fx_t   m   [NEXT],
  input  fx_t   c   [NEXT],
  input  fx_t   inv_s2,
  output gmsg_t out,
  output logic  clamped,
  output logic  allzero
);

  fx_t csum, wm, wv, mm, vq;
  fx_t n_m [1], q_m [1], n_v [1], q_v [1];

  // Weighted sums are divided by the weight total only at the end, which
  // keeps small weights from vanishing in the normalised r_i.
  always_comb begin
    csum = '0;
    wm   = '0;
    for (int i = 0; i < NEXT; i++) begin
      csum = qadd(csum, c[i]);
      wm   = qadd(wm, qmul(c[i], m[i]));
    end
    n_m[0] = wm;
  end

  nr_div #(.NU(1)) u_div_m (.u(n_m), .a(csum), .y(q_m));

  always_comb begin
    fx_t d;
    allzero = (csum == '0);
    mm      = allzero ? m[(NEXT - 1) / 2] : q_m[0];
    wv      = '0;
    for (int i = 0; i < NEXT; i++) begin
      d  = qsub(m[i], mm);
      wv = qadd(wv, qmul(c[i], qmul(qmul(d, inv_s2), d)));
    end
    n_v[0] = wv;
  end

  nr_div #(.NU(1)) u_div_v (.u(n_v), .a(csum), .y(q_v));

  always_comb begin
    vq      = allzero ? vin : qadd(vin, q_v[0]);
    clamped = (vq < MINVAR);
    out.m   = mm;
    out.v   = clamped ? MINVAR : vq;
  end

endmodule
