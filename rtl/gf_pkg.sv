// Galois-field helpers shared by the syndrome-calculation blocks.
//
// Elements of GF(2^m) are held in polynomial basis: bit k of a word is the
// coefficient of alpha^k, where alpha is a root of the field's primitive
// polynomial.  All functions here are constant functions: they are evaluated
// at elaboration time to build the binary constant matrices of the
// syndrome calculator, and generate no logic of their own.
//
// The field polynomial is not fixed by the design; default_poly() returns a
// common primitive polynomial for each field size (x^8+x^4+x^3+x^2+1 for
// GF(2^8), x^4+x+1 for GF(2^4), which is the field of the alpha^12 example
// the constant-multiplier matrices are checked against).
package gf_pkg;

  // Widest field supported by the helpers.
  localparam int unsigned GF_MAX_M = 16;

  typedef logic [GF_MAX_M-1:0] gf_word_t;

  // A standard primitive polynomial for GF(2^m), bit k = coefficient of x^k.
  function automatic int unsigned default_poly(int unsigned m);
    case (m)
      3:       return 'h0000B;
      4:       return 'h00013;
      5:       return 'h00025;
      6:       return 'h00043;
      7:       return 'h00089;
      8:       return 'h0011D;
      9:       return 'h00211;
      10:      return 'h00409;
      11:      return 'h00805;
      12:      return 'h01053;
      13:      return 'h0201B;
      14:      return 'h04443;
      15:      return 'h08003;
      16:      return 'h1100B;
      default: return 'h0011D;
    endcase
  endfunction

  // Multiply an element by alpha (shift and reduce).
  function automatic gf_word_t gf_mul_alpha(gf_word_t a, int unsigned m,
                                            int unsigned poly);
    gf_word_t r;
    logic     carry;
    carry = a[m-1];
    r     = (a << 1) & gf_word_t'((1 << m) - 1);
    if (carry) r = r ^ gf_word_t'(poly & ((1 << m) - 1));
    return r;
  endfunction

  // alpha^e for any non-negative exponent e (reduced modulo 2^m - 1).
  function automatic gf_word_t gf_alpha_pow(int unsigned e, int unsigned m,
                                            int unsigned poly);
    gf_word_t    r;
    int unsigned k;
    k = e % ((1 << m) - 1);
    r = gf_word_t'(1);
    for (int unsigned s = 0; s < k; s++) r = gf_mul_alpha(r, m, poly);
    return r;
  endfunction

  // General product of two field elements (shift-and-add).
  function automatic gf_word_t gf_mul(gf_word_t a, gf_word_t b, int unsigned m,
                                      int unsigned poly);
    gf_word_t r;
    gf_word_t sh;
    r  = '0;
    sh = a;
    for (int unsigned k = 0; k < m; k++) begin
      if (b[k]) r = r ^ sh;
      sh = gf_mul_alpha(sh, m, poly);
    end
    return r;
  endfunction

endpackage
