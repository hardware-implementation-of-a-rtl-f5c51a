// exp_lut: exp(-a/2) for a non-negative Q12.8 argument, from two small
// look-up tables (purely combinational).
//
// The argument is cut into three bit fields, a = I2*2^P2 + I1*2^P1 + I0*2^P0
// with P0 = -WF, P2 the smallest exponent for which exp(-2^P2/2) underflows
// Q12.8 (P2 = 4: exp(-8) is below half an LSB) and P1 = floor((P0+P2)/2).
// With the default format I0 = a[5:0], I1 = a[11:6] and I2 = a[20:12]. When
// I2 is non-zero the result is 0 (underflow, flagged on `uflow`); otherwise
// it is the Q12.8 product of LUT1[I1] = exp(-I1*2^P1/2) and
// LUT0[I0] = exp(-I0*2^P0/2). The decomposition, the choice of P0, P1, P2 and
// the two tables follow the document; the table entries are computed at
// elaboration with integer arithmetic and rounded to nearest.
module exp_lut
  import ldlc_pkg::*;
#(
  parameter int P2 = 4            // LSB position of I2 (power of two)
) (
  input  fx_t a,                  // a >= 0
  output fx_t y,                  // exp(-a/2)
  output logic uflow              // I2 != 0, result forced to 0
);

  localparam int P0  = -WF;
  localparam int P1  = ((P0 + P2) < 0 && ((P0 + P2) % 2 != 0)) ? (P0 + P2 - 1) / 2 : (P0 + P2) / 2;
  localparam int B0  = P1 - P0;             // bits of I0
  localparam int B1  = P2 - P1;             // bits of I1
  localparam int LO2 = P2 + WF;             // bit index of I2's LSB in a

  typedef logic [(1<<B0)-1:0][W-1:0] lut0_t;
  typedef logic [(1<<B1)-1:0][W-1:0] lut1_t;

  localparam int FB = 30;                   // fraction bits of the generator

  // exp(-2^-sh) in 2^-FB fixed point, by its Taylor series.
  function automatic longint exp_small(input int sh);
    longint term, sum;
    sum  = longint'(1) <<< FB;
    term = longint'(1) <<< FB;
    for (int k = 1; k < 16; k++) begin
      term = -((term >>> sh) / longint'(k));
      sum  = sum + term;
    end
    return sum;
  endfunction

  // k-th power of a 2^-FB fixed-point value, rounded to Q12.8.
  function automatic logic [W-1:0] pow_q(input longint base, input int k);
    longint acc;
    acc = longint'(1) <<< FB;
    for (int i = 0; i < k; i++) acc = (acc * base) >>> FB;
    return W'((acc + (longint'(1) <<< (FB - WF - 1))) >>> (FB - WF));
  endfunction

  // LUT0[k] = exp(-k * 2^P0 / 2) = exp(-k * 2^-(WF+1)),
  // LUT1[k] = exp(-k * 2^P1 / 2) = exp(-k * 2^(P1-1)).
  function automatic lut0_t gen_lut0();
    lut0_t t;
    longint b = exp_small(-(P0 - 1));
    for (int k = 0; k < (1 << B0); k++) t[k] = pow_q(b, k);
    return t;
  endfunction

  function automatic lut1_t gen_lut1();
    lut1_t t;
    longint b = exp_small(-(P1 - 1));
    for (int k = 0; k < (1 << B1); k++) t[k] = pow_q(b, k);
    return t;
  endfunction

  localparam lut0_t LUT0 = gen_lut0();
  localparam lut1_t LUT1 = gen_lut1();

  logic [B0-1:0] i0;
  logic [B1-1:0] i1;

  always_comb begin
    i0    = a[B0-1:0];
    i1    = a[B0 +: B1];
    uflow = (a[W-1:LO2] != '0);
    y     = uflow ? '0 : qmul(fx_t'(LUT1[i1]), fx_t'(LUT0[i0]));
  end

endmodule
