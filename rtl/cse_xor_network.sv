// Constant binary matrix multiplier with shared common sub-expressions.
//
// Computes out_bits = in_bits x MATRIX over GF(2): output c is the XOR of
// every input r whose matrix entry (r, c) is 1.  Any constant finite-field
// multiplication, or a whole bank of them, reduces to such a matrix, and the
// logic is nothing but XOR gates.
//
// How it works: at elaboration a constant function runs the iterative
// pairwise matching procedure on the matrix.  Rows are terms (inputs at
// first) and columns are outputs.  Each round looks at every pair of rows,
// counts the columns in which both have a 1, and takes the pair with the
// highest count.  That pair becomes a new term v = x ^ y (one shared XOR
// gate): the pair's 1s are cleared in those columns and a new row holding
// v's 1s is appended.  Rounds repeat until no pair of terms is shared by two
// or more outputs, or until MAX_TERMS new terms exist.  The netlist is then
// generated from the result: one XOR per new term, and for each output an XOR
// tree over the terms left in its column.  For the x alpha^12 multiplier in
// GF(2^4) (the default matrix) this turns 6 XOR gates into 3.
//
// Ties between pairs of equal count go to the first pair in row order
// (lowest first row, then lowest second row); the procedure does not fix a
// tie rule.  Setting MAX_TERMS to 0 skips the search and gives a plain XOR
// tree per output, which the syndrome calculator uses at sizes where the
// elaboration-time search would exceed the tools' constant-evaluation limits.
//
// Interface: purely combinational, no clock.  XOR_COUNT reports the number of
// two-input XOR gates in the generated network, NEW_TERMS the number of
// shared terms found; the internal nets xor_count and new_terms carry the
// same numbers for inspection from a testbench.
module cse_xor_network #(
  parameter int unsigned N_IN   = 4,
  parameter int unsigned N_OUT  = 4,
  // Bit r*N_OUT + c is 1 when input r contributes to output c.
  // Default: multiplication by alpha^12 in GF(2^4), x^4+x+1.
  parameter logic [N_IN*N_OUT-1:0] MATRIX = 16'h19DF,
  // Upper bound on shared terms; each new term removes at least two 1s from
  // the matrix, so N_IN*N_OUT/2 never cuts the search short.
  parameter int unsigned MAX_TERMS = N_IN * N_OUT / 2
) (
  input  logic [N_IN-1:0]  in_bits,
  output logic [N_OUT-1:0] out_bits
);

  localparam int unsigned NT    = (MAX_TERMS == 0) ? 1 : MAX_TERMS;
  localparam int unsigned N_TOT = N_IN + NT;

  typedef logic [N_OUT-1:0] row_t;

  typedef struct packed {
    logic [N_TOT-1:0][N_OUT-1:0] rows;  // final use of each term per output
    logic [NT-1:0][31:0]         opa;   // first operand of each new term
    logic [NT-1:0][31:0]         opb;   // second operand of each new term
    logic [31:0]                 n_new; // number of new terms
  } cse_t;

  function automatic cse_t cse_build();
    cse_t        s;
    int unsigned pc [N_TOT];  // number of 1s in each row
    int unsigned n;
    int unsigned best;
    int unsigned ba;
    int unsigned bb;
    int unsigned cnt;
    row_t        common;
    s = cse_t'(0);
    for (int unsigned r = 0; r < N_TOT; r++) pc[r] = 0;
    for (int unsigned r = 0; r < N_IN; r++) begin
      s.rows[r] = MATRIX[r*N_OUT +: N_OUT];
      pc[r]     = $countones(s.rows[r]);
    end
    n = N_IN;
    for (int unsigned k = 0; k < MAX_TERMS; k++) begin
      best = 1;
      ba   = 0;
      bb   = 0;
      // A pair can share no more columns than its sparser row holds.
      for (int unsigned a = 0; a < n; a++) begin
        if (pc[a] > best) begin
          for (int unsigned b = a + 1; b < n; b++) begin
            if (pc[b] > best) begin
              cnt = $countones(s.rows[a] & s.rows[b]);
              if (cnt > best) begin
                best = cnt;
                ba   = a;
                bb   = b;
              end
            end
          end
        end
      end
      if (best < 2) break;
      common     = s.rows[ba] & s.rows[bb];
      s.rows[ba] = s.rows[ba] & ~common;
      s.rows[bb] = s.rows[bb] & ~common;
      s.rows[n]  = common;
      pc[ba]     = pc[ba] - best;
      pc[bb]     = pc[bb] - best;
      pc[n]      = best;
      s.opa[k]   = ba;
      s.opb[k]   = bb;
      s.n_new    = k + 1;
      n          = n + 1;
    end
    return s;
  endfunction

  localparam cse_t CSE = cse_build();

  // Final matrix transposed: element c lists the terms that feed output c.
  typedef logic [N_OUT-1:0][N_TOT-1:0] cols_t;

  function automatic cols_t transpose(cse_t s);
    cols_t m;
    row_t  row;
    m = cols_t'(0);
    for (int unsigned r = 0; r < N_TOT; r++) begin
      row = s.rows[r];
      for (int unsigned c = 0; c < N_OUT; c++) begin
        if (row[c]) m[c][r] = 1'b1;
      end
    end
    return m;
  endfunction

  localparam cols_t COLS = transpose(CSE);

  function automatic int unsigned count_xors(cols_t m, int unsigned n_new);
    int unsigned x;
    int unsigned ones;
    x = n_new;
    for (int unsigned c = 0; c < N_OUT; c++) begin
      ones = $countones(m[c]);
      if (ones > 1) x += ones - 1;
    end
    return x;
  endfunction

  localparam int unsigned NEW_TERMS = CSE.n_new;
  localparam int unsigned XOR_COUNT = count_xors(COLS, NEW_TERMS);

  // The two counts as nets, for testbenches and waveform viewers.
  logic [31:0] xor_count;
  logic [31:0] new_terms;
  assign xor_count = XOR_COUNT;
  assign new_terms = NEW_TERMS;

  // All terms: the inputs followed by the shared terms.
  logic [N_TOT-1:0] terms;
  assign terms[N_IN-1:0] = in_bits;

  for (genvar k = 0; k < NT; k++) begin : g_term
    localparam int unsigned A = CSE.opa[k];
    localparam int unsigned B = CSE.opb[k];
    logic va;
    logic vb;
    logic v;
    if (k >= NEW_TERMS) begin : g_unused
      assign va = 1'b0;
      assign vb = 1'b0;
    end else begin : g_used
      if (A < N_IN) begin : g_a_in
        assign va = in_bits[A];
      end else begin : g_a_term
        assign va = g_term[A - N_IN].v;
      end
      if (B < N_IN) begin : g_b_in
        assign vb = in_bits[B];
      end else begin : g_b_term
        assign vb = g_term[B - N_IN].v;
      end
    end
    assign v = va ^ vb;
    assign terms[N_IN + k] = v;
  end

  // Each output is the XOR of the terms still marked in its column.
  for (genvar c = 0; c < N_OUT; c++) begin : g_out
    assign out_bits[c] = ^(terms & COLS[c]);
  end

endmodule
