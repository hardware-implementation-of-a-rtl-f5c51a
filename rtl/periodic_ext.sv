// periodic_ext: periodic extension of one check-to-variable message
// (purely combinational).
//
// A message (mbar, Vbar) arriving on an edge of weight h becomes the
// Gaussian mixture with means mbar + i/h, all of variance Vbar and equal
// weight. Only NEXT consecutive integers i are kept, centred on
// i0 = round((y - mbar) * h), the shift that brings a component closest to
// the channel value y; the document restricts i to components near the
// channel message without giving their number, so NEXT and the centring rule
// are this design's choices. The weight of slot `slot` is
// (neg ? -1 : 1) * HBAR[slot] and 1/h comes from INV_HBAR.
module periodic_ext
  import ldlc_pkg::*;
#(
  parameter int NEXT = 3               // components kept per mixture
) (
  input  gmsg_t      cm,               // incoming check node message
  input  logic [1:0] slot,             // edge slot, selects |h|
  input  logic       neg,              // sign of the edge weight
  input  fx_t        y,                // channel value of the variable node
  output fx_t        mean [NEXT],      // component means
  output fx_t        var_o             // common component variance
);

  fx_t h, invh, t;
  logic signed [W-WF:0] i0;

  always_comb begin
    h    = neg ? qneg(HBAR[slot])     : HBAR[slot];
    invh = neg ? qneg(INV_HBAR[slot]) : INV_HBAR[slot];
    t    = qmul(qsub(y, cm.m), h);
    i0   = (W-WF+1)'((64'(t) + 64'(1 << (WF - 1))) >>> WF);
    for (int k = 0; k < NEXT; k++)
      mean[k] = qadd(cm.m, sat((64'(i0) + 64'(k) - 64'(longint'((NEXT - 1) / 2))) * 64'(invh)));
    var_o = cm.v;
  end

endmodule
