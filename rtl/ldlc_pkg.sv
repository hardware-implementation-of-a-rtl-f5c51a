// ldlc_pkg: shared number format, message types, code constants and
// fixed-point helper functions of the single-Gaussian LDLC decoder.
//
// Numbers are signed fixed point Q12.8: one sign bit, 12 integer bits and 8
// fractional bits, 21 bits in all (the word length chosen by the quantization
// study the design follows). Multiplication truncates toward minus infinity
// and every arithmetic result saturates at the ends of the range.
// Variances are stored relative to the channel noise variance sigma^2, so a
// variance of 1.0 means sigma^2; means are absolute.
//
// The code is a degree-3 Latin-square LDLC. Check node c connects through
// its slot j (j = 0,1,2) to variable node pi_j(c) = (A_j*c + B_j) mod N with
// weight s_j(c)*HBAR[j], where HBAR = {1, 1/sqrt(3), 1/sqrt(3)} is the
// generating sequence. Because every check row and every variable column
// holds exactly one edge of each slot, the slot index also names the
// message-memory bank of an edge on both sides of the graph. The affine
// permutations and the sign hash are this design's own choice (the
// construction it follows draws random permutations); they are defined
// here so the ROM and any testbench can build the same matrix.
package ldlc_pkg;

  localparam int W  = 21;            // word length
  localparam int WF = 8;             // fractional bits
  localparam int D  = 3;             // row and column degree

  typedef logic signed [W-1:0] fx_t;

  localparam fx_t FX_MAX = fx_t'({1'b0, {(W-1){1'b1}}});
  localparam fx_t FX_MIN = fx_t'({1'b1, {(W-1){1'b0}}});
  localparam fx_t FX_ONE = fx_t'(1 << WF);

  // A Gaussian message: mean and (relative) variance.
  typedef struct packed {
    fx_t m;
    fx_t v;
  } gmsg_t;

  // Generating sequence, its reciprocals and the weight ratios
  // |h_l|/|h_p| used by the check node, all rounded to Q12.8.
  // 1/sqrt(3) = 0.57735 -> 148/256, sqrt(3) = 1.73205 -> 443/256.
  localparam fx_t HBAR     [D] = '{fx_t'(256), fx_t'(148), fx_t'(148)};
  localparam fx_t INV_HBAR [D] = '{fx_t'(256), fx_t'(443), fx_t'(443)};
  // RATIO[l][p] = HBAR[l]/HBAR[p]; RATIO_SQ = its square.
  localparam fx_t RATIO    [D][D] = '{'{fx_t'(256), fx_t'(443), fx_t'(443)},
                                      '{fx_t'(148), fx_t'(256), fx_t'(256)},
                                      '{fx_t'(148), fx_t'(256), fx_t'(256)}};
  localparam fx_t RATIO_SQ [D][D] = '{'{fx_t'(256), fx_t'(768), fx_t'(768)},
                                      '{fx_t'(85),  fx_t'(256), fx_t'(256)},
                                      '{fx_t'(85),  fx_t'(256), fx_t'(256)}};

  // Column permutations pi_j(c) = (PERM_A[j]*c + PERM_B[j]) mod N.
  // Valid for N a multiple of 4 that is divisible by neither 3 nor 7.
  localparam int PERM_A [D] = '{1, 3, 7};
  localparam int PERM_B [D] = '{0, 101, 331};

  function automatic int perm_col(input int j, input int c, input int n);
    return int'((longint'(PERM_A[j]) * longint'(c) + longint'(PERM_B[j])) % longint'(n));
  endfunction

  // Sign of edge (c, j): slot 0 is always positive, slots 1 and 2 take a
  // bit of a multiplicative hash of c.
  function automatic logic sign_neg(input int j, input int c);
    logic [63:0] h;
    h = 64'(c) * 64'd2654435761;
    return (j == 0) ? 1'b0 : h[13 + j];
  endfunction

  function automatic fx_t sat(input logic signed [63:0] x);
    if (x > 64'(FX_MAX)) return FX_MAX;
    if (x < 64'(FX_MIN)) return FX_MIN;
    return fx_t'(x);
  endfunction

  function automatic fx_t qadd(input fx_t a, input fx_t b);
    return sat(64'(a) + 64'(b));
  endfunction

  function automatic fx_t qsub(input fx_t a, input fx_t b);
    return sat(64'(a) - 64'(b));
  endfunction

  function automatic fx_t qmul(input fx_t a, input fx_t b);
    logic signed [2*W-1:0] p;
    p = (2*W)'(a) * (2*W)'(b);
    return sat(64'(p >>> WF));
  endfunction

  function automatic fx_t qneg(input fx_t a);
    return sat(-64'(a));
  endfunction

endpackage
