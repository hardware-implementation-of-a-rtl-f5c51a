// nr_div: fixed-point division u[k]/a for NU numerators sharing one
// denominator, by Newton-Raphson reciprocal (purely combinational).
//
// The denominator is split as a = q * s * 2^P with q = sign(a) and
// 1 <= s < 2. The three bits of s after its leading one index an 8-entry
// table of initial guesses 1/sqrt(s_lo*s_hi), one per eighth of [1,2)
// (the reciprocal of the geometric mean of the sub-interval ends). NR_ITER
// Newton-Raphson steps x <- x*(2 - s*x) refine the guess, every step in the
// Q12.8 format of the datapath. Each quotient is then
// q * ((u * x) >> P), shifted left instead when P is negative, with
// saturation; the product u * x is kept at full width until that shift. Splitting, table, iteration count and final scaling follow
// the document's division method; sharing one reciprocal among several
// numerators, and returning a saturated value of the numerator's sign for
// a zero denominator, are this design's choices.
module nr_div
  import ldlc_pkg::*;
#(
  parameter int NU      = 1,   // numerators sharing the denominator
  parameter int NR_ITER = 2    // Newton-Raphson iterations
) (
  input  fx_t u [NU],
  input  fx_t a,
  output fx_t y [NU]
);

  typedef logic [7:0][W-1:0] lut8_t;

  // Integer square root of a non-negative 64-bit value.
  function automatic longint isqrt(input longint v);
    longint r, bit_;
    r = 0;
    bit_ = longint'(1) <<< 62;
    while (bit_ > v) bit_ = bit_ >>> 2;
    while (bit_ != 0) begin
      if (v >= r + bit_) begin
        v = v - r - bit_;
        r = (r >>> 1) + bit_;
      end else begin
        r = r >>> 1;
      end
      bit_ = bit_ >>> 2;
    end
    return r;
  endfunction

  // Entry i = round(2^WF * 8 / sqrt((8+i)*(9+i))).
  function automatic lut8_t gen_lut();
    lut8_t t;
    longint root, val;
    for (int i = 0; i < 8; i++) begin
      root = isqrt((longint'(8 + i) * longint'(9 + i)) <<< 40);     // sqrt(p) * 2^20
      val  = ((longint'(8) <<< (WF + 21)) / root + 1) >>> 1;
      t[i] = val[W-1:0];
    end
    return t;
  endfunction

  localparam lut8_t RLUT = gen_lut();

  logic        neg;
  logic [W-1:0] mag;
  int          lead;          // position of the leading one of |a|
  int          p;             // exponent P
  fx_t         s;             // normalised 1 <= s < 2 in Q12.8
  logic [2:0]  idx;
  fx_t         x [NR_ITER+1];

  always_comb begin
    neg  = a[W-1];
    mag  = neg ? W'(-64'(a)) : W'(a);
    if (mag[W-1]) mag = {1'b0, {(W-1){1'b1}}};   // -2^(W-1) has no positive twin
    lead = 0;
    for (int b = 0; b < W; b++)
      if (mag[b]) lead = b;
    p = lead - WF;
    if (p >= 0) s = fx_t'(mag >> p);
    else        s = fx_t'(mag << (-p));
    idx  = s[WF-1 -: 3];
    x[0] = fx_t'(RLUT[idx]);
    for (int k = 0; k < NR_ITER; k++)
      x[k+1] = qmul(x[k], qsub(fx_t'(2 << WF), qmul(s, x[k])));
  end

  for (genvar g = 0; g < NU; g++) begin : g_num
    logic signed [2*W-1:0] t;
    logic signed [63:0]    sc;
    int                    sh;
    always_comb begin
      // u * x carries 2*WF fractional bits; one shift by WF + P both
      // returns to Q12.8 and applies 2^-P, without rounding in between.
      t  = (2*W)'(u[g]) * (2*W)'(x[NR_ITER]);
      sh = WF + p;
      if (sh >= 0) sc = 64'(t) >>> sh;
      else         sc = 64'(t) <<< (-sh);
      if (mag == '0) y[g] = u[g][W-1] ? FX_MIN : FX_MAX;
      else           y[g] = neg ? qneg(sat(sc)) : sat(sc);
    end
  end

endmodule
