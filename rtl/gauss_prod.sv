// gauss_prod: product of two single Gaussians, renormalised
// (purely combinational).
//
//   V = Va*Vb/(Va+Vb),  m = (ma*Vb + mb*Va)/(Va+Vb)
// which equals the document's m = V*(ma/Va + mb/Vb) with one shared
// reciprocal instead of three divisions. Used by the output stage of a
// variable node, where both factors are already normalised.
module gauss_prod
  import ldlc_pkg::*;
(
  input  gmsg_t a,
  input  gmsg_t b,
  output gmsg_t p
);

  fx_t num [2];
  fx_t quo [2];

  always_comb begin
    num[0] = qmul(a.v, b.v);
    num[1] = qadd(qmul(a.m, b.v), qmul(b.m, a.v));
  end

  nr_div #(.NU(2)) u_div (.u(num), .a(qadd(a.v, b.v)), .y(quo));

  assign p.v = quo[0];
  assign p.m = quo[1];

endmodule
