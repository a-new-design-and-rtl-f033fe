// dct_pkg: widths, data types and index maps shared by the 8x8 2-D DCT/IDCT.
//
// The transform works on a permuted copy of the 8x8 block. pmap() is the
// even/odd-reversed order used on both axes (0,2,4,6,7,5,3,1); tmap() is the
// per-row reordering 4*n2+1 = (4*t+1)*(4*n1+1) mod 32 that turns the 2-D sum
// into eight 1-D sums. Constant-multiplier coefficients are cos(k*pi/16)
// rounded to COEF_W bits (1 sign bit, COEF_W-1 fraction bits). Internal words
// are INT_W-bit two's complement fixed point; the forward transform keeps
// FRAC_F fraction bits and the inverse FRAC_I (own choice, sized so that the
// largest intermediate of each direction fits in INT_W bits).
package dct_pkg;

  parameter int unsigned PIX_W  = 9;   // pixel width, range -256..255
  parameter int unsigned DCT_W  = 12;  // transform coefficient width, -2048..2047
  parameter int unsigned COEF_W = 12;  // constant-multiplier coefficient width
  parameter int unsigned INT_W  = 18;  // internal wordlength
  parameter int unsigned FRAC_F = 1;   // fraction bits, forward transform
  parameter int unsigned FRAC_I = 4;   // fraction bits, inverse transform

  typedef logic signed [INT_W-1:0]  word_t;
  typedef logic signed [PIX_W-1:0]  pix_t;
  typedef logic signed [DCT_W-1:0]  coef_t;
  typedef logic signed [COEF_W-1:0] cosq_t;

  typedef struct packed {
    word_t re;
    word_t im;
  } cword_t;

  // Data order of both axes: n -> 2n for n < 4, 15 - 2n otherwise.
  function automatic int unsigned pmap(int unsigned n);
    return (n < 4) ? 2 * n : 15 - 2 * n;
  endfunction

  // Column index n2 that lands at position t of row n1.
  function automatic int unsigned tmap(int unsigned n1, int unsigned t);
    return ((((4 * t + 1) * (4 * n1 + 1)) % 32) - 1) / 4;
  endfunction

  // cos(k*pi/16) * 2^30 for k = 0..8, rounded; other k follow by symmetry.
  localparam longint COS30 [9] = '{
    64'd1073741824, 64'd1053110176, 64'd992008094, 64'd892783698, 64'd759250125,
    64'd596538995,  64'd410903207,  64'd209476638, 64'd0
  };

  // round(cos(k*pi/16) * 2^(COEF_W-1)), clipped to the largest positive
  // code. Valid for COEF_W up to 31.
  function automatic cosq_t cosq(int k);
    int     m;
    bit     neg;
    longint v;
    m   = k % 32;
    if (m < 0) m = m + 32;
    if (m > 16) m = 32 - m;          // cos(2pi - a) = cos(a)
    neg = (m > 8);
    if (neg) m = 16 - m;             // cos(pi - a) = -cos(a)
    v = (COS30[m] + (longint'(1) <<< (30 - COEF_W))) >>> (31 - COEF_W);
    if (v > (longint'(1) <<< (COEF_W - 1)) - 1) v = (longint'(1) <<< (COEF_W - 1)) - 1;
    return neg ? cosq_t'(-v) : cosq_t'(v);
  endfunction

  // Fixed-point product of a word and a coefficient, rounded back to word scale.
  function automatic word_t cmul(word_t a, cosq_t c);
    logic signed [INT_W+COEF_W-1:0] p;
    p = a * c;
    p = p + (INT_W + COEF_W)'(longint'(1) << (COEF_W - 2));
    return word_t'(p >>> (COEF_W - 1));
  endfunction

  // Halving with round-half-up.
  function automatic word_t half(word_t a);
    return word_t'((a + word_t'(1)) >>> 1);
  endfunction

endpackage
