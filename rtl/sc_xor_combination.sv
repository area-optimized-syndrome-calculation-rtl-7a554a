// XOR combination of the p-parallel syndrome calculator.
//
// One iteration of all 2t syndrome recurrences as a single constant binary
// matrix multiplication over GF(2):
//
//   delta_i(j+1) = sum_{l=0}^{p-1} r_l(j) * alpha^(i*l) + delta_i(j) * alpha^(i*p)
//
// for i = 1..2t.  Writing each constant multiplication by alpha^e as an m x m
// binary matrix (row b holds the bits of alpha^(e+b)), the whole iteration is
// the input vector [R(j) Delta(j)] (m*p + 2t*m bits) times one constant
// matrix [X_R; X_Delta] of size (m*p + 2t*m) x 2t*m.  X_R holds the
// received-symbol multipliers of every syndrome; X_Delta is block diagonal
// with the feedback multipliers alpha^(i*p).  There are no separate
// finite-field adders: the additions are part of the matrix product.
//
// The matrix is built at elaboration from the field parameters and handed to
// cse_xor_network, which realises it as XOR gates and shares common
// sub-expressions across all syndromes and all lanes.  CSE_TERMS bounds how
// many shared terms the elaboration-time search may create.  The complete
// search (until no pair of terms is shared by two or more outputs) is the
// intended setting.  Each round scans every pair of matrix rows.  For the
// full GF(2^8), p = 8, t = 8 matrix (192 x 128) the complete search takes 474
// rounds and brings the network from 3768 to 1678 two-input XOR gates, but
// it far exceeds the constant-evaluation step limit of common front ends.
// The default therefore extracts the first 32 shared terms, the most widely
// shared ones (3768 -> 2847 gates), and leaves the remaining sharing to
// logic synthesis.  Small configurations run the complete search.
//
// Bit order: symbol bit k is the coefficient of alpha^k.  Lane l of r_in
// carries the symbol multiplied by alpha^(i*l), i.e. the lowest-degree
// symbol of the p-symbol group sits in lane 0.  Index i-1 of delta and
// delta_next belongs to syndrome S_i.  Purely combinational.
module sc_xor_combination #(
  parameter int unsigned M         = 8,                     // symbol width
  parameter int unsigned P         = 8,                     // parallel factor
  parameter int unsigned T         = 8,                     // correctable symbols
  parameter int unsigned POLY      = gf_pkg::default_poly(M),
  parameter int unsigned CSE_TERMS = 32
) (
  input  logic [P-1:0][M-1:0]   r_in,
  input  logic [2*T-1:0][M-1:0] delta,
  output logic [2*T-1:0][M-1:0] delta_next
);
  import gf_pkg::*;

  localparam int unsigned N_IN  = M * P + 2 * T * M;
  localparam int unsigned N_OUT = 2 * T * M;

  // [X_R; X_Delta], bit r*N_OUT + c set when input bit r feeds output bit c.
  typedef logic [N_IN*N_OUT-1:0] matrix_t;

  function automatic matrix_t build_matrix();
    matrix_t               x;
    gf_word_t              ai;
    gf_word_t              base;
    gf_word_t              v;
    int unsigned           col;
    int unsigned           row;
    x  = matrix_t'(0);
    ai = gf_word_t'(1);
    for (int unsigned i = 1; i <= 2 * T; i++) begin
      ai   = gf_mul_alpha(ai, M, POLY);        // alpha^i
      base = gf_word_t'(1);                    // alpha^(i*l)
      for (int unsigned l = 0; l <= P; l++) begin
        v = base;                              // alpha^(i*l + b)
        for (int unsigned b = 0; b < M; b++) begin
          row = (l < P) ? l * M + b : M * P + (i - 1) * M + b;
          col = (i - 1) * M;
          x[row*N_OUT + col +: M] = v[M-1:0];
          v = gf_mul_alpha(v, M, POLY);
        end
        base = gf_mul(base, ai, M, POLY);
      end
    end
    return x;
  endfunction

  localparam matrix_t XMAT = build_matrix();

  cse_xor_network #(
    .N_IN     (N_IN),
    .N_OUT    (N_OUT),
    .MATRIX   (XMAT),
    .MAX_TERMS(CSE_TERMS)
  ) u_xor (
    .in_bits ({delta, r_in}),
    .out_bits(delta_next)
  );

endmodule
