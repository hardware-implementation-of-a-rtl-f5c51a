// ldlc_ref_pkg: floating-point reference models for the decoder testbenches.
//
// Each function restates, in `real` arithmetic, the mathematics a block is
// meant to compute (Gaussian products, periodic extension, moment matching,
// the forward-backward recursion, the check node rule), without the
// fixed-point tricks of the RTL (table seeds, Newton-Raphson, split
// exponent tables). Testbenches compare the RTL against these with a
// tolerance that covers Q12.8 rounding.
package ldlc_ref_pkg;

  localparam int  D     = 3;
  localparam real SQ3   = 1.7320508075688772;
  localparam real HB [3] = '{1.0, 1.0 / 1.7320508075688772, 1.0 / 1.7320508075688772};

  typedef struct {
    real m;
    real v;
  } rmsg_t;

  function automatic real fx2r(input logic signed [20:0] x);
    return real'(x) / 256.0;
  endfunction

  function automatic logic signed [20:0] r2fx(input real r);
    real t;
    t = r * 256.0;
    if (t > 1048575.0) t = 1048575.0;
    if (t < -1048576.0) t = -1048576.0;
    return 21'(longint'($floor(t + 0.5)));
  endfunction

  function automatic bit near(input real got, input real exp, input real abs_tol, input real rel_tol);
    real e;
    e = got - exp;
    if (e < 0) e = -e;
    return e <= abs_tol + rel_tol * ((exp < 0) ? -exp : exp);
  endfunction

  function automatic rmsg_t gprod(input rmsg_t a, input rmsg_t b);
    rmsg_t p;
    p.v = a.v * b.v / (a.v + b.v);
    p.m = p.v * (a.m / a.v + b.m / b.v);
    return p;
  endfunction

  // Periodic extension of (mbar, vbar) on an edge of slot j with sign s,
  // NEXT components centred on the shift nearest the channel value y.
  function automatic void pext(input rmsg_t cm, input int j, input bit neg, input real y,
                               input int next, output real mean [8]);
    real h;
    int  i0;
    h  = neg ? -HB[j] : HB[j];
    i0 = int'($floor((y - cm.m) * h + 0.5));
    for (int k = 0; k < next; k++) mean[k] = cm.m + real'(i0 + k - (next - 1) / 2) / h;
  endfunction

  // GMR(ga * mixture) with common mixture variance vb, in units of sigma^2.
  function automatic rmsg_t prod_gmr(input rmsg_t ga, input real mb [8], input real vb,
                                     input int next, input real inv_s2, input real minvar);
    real vf, c [8], mf [8], cs, mm, vv;
    rmsg_t o;
    vf = ga.v * vb / (ga.v + vb);
    cs = 0.0;
    for (int i = 0; i < next; i++) begin
      mf[i] = (ga.m * vb + mb[i] * ga.v) / (ga.v + vb);
      c[i]  = $exp(-(ga.m - mb[i]) * (ga.m - mb[i]) * inv_s2 / (2.0 * (ga.v + vb)));
      cs   += c[i];
    end
    if (cs < 1.0 / 512.0) begin
      o.m = mf[(next - 1) / 2];
      o.v = vf;
      return o;
    end
    mm = 0.0;
    for (int i = 0; i < next; i++) mm += c[i] / cs * mf[i];
    vv = vf;
    for (int i = 0; i < next; i++) vv += c[i] / cs * (mf[i] - mm) * (mf[i] - mm) * inv_s2;
    if (vv < minvar) vv = minvar;
    o.m = mm;
    o.v = vv;
    return o;
  endfunction

  // Forward-backward recursion of one degree-3 variable node.
  function automatic void fwbw(input real y, input rmsg_t cm [3], input bit neg [3],
                               input int next, input real inv_s2, input real chvar,
                               output rmsg_t fw [3], output rmsg_t bw [3]);
    real mp [3][8];
    for (int j = 0; j < 3; j++) pext(cm[j], j, neg[j], y, next, mp[j]);
    fw[0] = '{m: y, v: chvar};
    bw[2] = '{m: y, v: chvar};
    for (int s = 0; s < 2; s++) begin
      fw[s + 1] = prod_gmr(fw[s], mp[s], cm[s].v, next, inv_s2, 0.1);
      bw[1 - s] = prod_gmr(bw[2 - s], mp[2 - s], cm[2 - s].v, next, inv_s2, 0.1);
    end
  endfunction

  // Complete variable node: outgoing messages FW_l*BW_l and the estimate.
  function automatic void vnode(input real y, input rmsg_t cm [3], input bit neg [3],
                                input real inv_s2, output rmsg_t out [3], output real w);
    rmsg_t fw [3], bw [3], e;
    fwbw(y, cm, neg, 3, inv_s2, 2.0, fw, bw);
    for (int l = 0; l < 3; l++) out[l] = gprod(fw[l], bw[l]);
    e = gprod(fw[1], bw[0]);
    w = e.m;
  endfunction

  // Check node rule for slot weights s_j * HB[j].
  function automatic void cnode(input rmsg_t in [3], input bit neg [3], output rmsg_t out [3]);
    for (int p = 0; p < 3; p++) begin
      real hp, hl;
      hp = neg[p] ? -HB[p] : HB[p];
      out[p] = '{m: 0.0, v: 0.0};
      for (int l = 0; l < 3; l++) if (l != p) begin
        hl = neg[l] ? -HB[l] : HB[l];
        out[p].m -= hl / hp * in[l].m;
        out[p].v += (hl / hp) * (hl / hp) * in[l].v;
      end
    end
  endfunction

endpackage
