// Reference Galois-field and Reed-Solomon arithmetic for the testbenches.
//
// Written independently of the design's own helpers: a product is formed as
// a carry-less (polynomial) product and then reduced modulo the field
// polynomial, and syndromes are evaluated term by term from powers of alpha
// rather than by Horner's rule.  Symbols are at most 16 bits wide.
package tb_gf_pkg;

  typedef logic [15:0] sym_t;

  // Carry-less multiply, then reduce modulo poly (degree m).
  function automatic sym_t ref_mul(sym_t a, sym_t b, int m, int poly);
    logic [31:0] prod;
    prod = '0;
    for (int k = 0; k < m; k++)
      if (b[k]) prod = prod ^ (32'(a) << k);
    for (int k = 2 * m - 2; k >= m; k--)
      if (prod[k]) prod = prod ^ (32'(poly) << (k - m));
    return sym_t'(prod);
  endfunction

  // alpha^e by square-and-multiply.
  function automatic sym_t ref_pow_alpha(int e, int m, int poly);
    sym_t r;
    sym_t b;
    int   x;
    r = 16'd1;
    b = 16'd2;
    x = e % ((1 << m) - 1);
    while (x > 0) begin
      if (x[0]) r = ref_mul(r, b, m, poly);
      b = ref_mul(b, b, m, poly);
      x = x >> 1;
    end
    return r;
  endfunction

  // S_i = sum_k c[k] * alpha^(i*k), k = 0..n-1.
  function automatic sym_t ref_syndrome(input sym_t c[], input int i, int m, int poly);
    sym_t s;
    s = '0;
    for (int k = 0; k < c.size(); k++)
      if (c[k] != 0) s = s ^ ref_mul(c[k], ref_pow_alpha(i * k, m, poly), m, poly);
    return s;
  endfunction

  // Generator polynomial g(x) = prod_{i=1}^{2t} (x + alpha^i), coefficients
  // lowest degree first (2t+1 of them).
  function automatic void ref_generator(output sym_t g[], input int t, int m, int poly);
    sym_t ng[];
    g    = new[1];
    g[0] = 16'd1;
    for (int i = 1; i <= 2 * t; i++) begin
      ng = new[g.size() + 1];
      foreach (ng[k]) ng[k] = '0;
      foreach (g[k]) begin
        ng[k + 1] = ng[k + 1] ^ g[k];
        ng[k]     = ng[k] ^ ref_mul(g[k], ref_pow_alpha(i, m, poly), m, poly);
      end
      g = ng;
    end
  endfunction

  // A random valid codeword c(x) = u(x) g(x), deg u < n - 2t.
  function automatic void ref_codeword(output sym_t c[], input int n, int t, int m, int poly);
    sym_t g[];
    sym_t u;
    ref_generator(g, t, m, poly);
    c = new[n];
    foreach (c[k]) c[k] = '0;
    for (int j = 0; j < n - 2 * t; j++) begin
      u = sym_t'($urandom) & sym_t'((1 << m) - 1);
      foreach (g[k]) c[j + k] = c[j + k] ^ ref_mul(u, g[k], m, poly);
    end
  endfunction

endpackage
