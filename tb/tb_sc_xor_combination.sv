// Self-checking testbench for sc_xor_combination.
//
// For random received symbols r_l and random syndrome registers delta_i the
// outputs must equal delta_i * alpha^(i*p) + sum_l r_l * alpha^(i*l), worked
// out with the reference field arithmetic.  Three configurations:
//  * the default GF(2^8), p = 8, t = 8 with its bounded sharing search;
//  * GF(2^4), p = 3, t = 2 with the complete search;
//  * GF(2^8), p = 4, t = 1 with the complete search.
// For the two complete searches the shared network must use fewer XOR gates
// than the unshared matrix.  The gate and shared-term counts are also
// compared with those of a separate software model of the same greedy
// search (same tie rule): 68 gates / 15 terms, 98 / 24, and 2847 gates after
// the default 32 terms.
module tb_sc_xor_combination;
  import tb_gf_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;

  // Default configuration.
  logic [7:0][7:0]  r_a;
  logic [15:0][7:0] d_a;
  logic [15:0][7:0] n_a;
  sc_xor_combination dut_a (.r_in(r_a), .delta(d_a), .delta_next(n_a));

  // GF(2^4), p = 3, t = 2, complete search.
  logic [2:0][3:0]  r_b;
  logic [3:0][3:0]  d_b;
  logic [3:0][3:0]  n_b;
  sc_xor_combination #(.M(4), .P(3), .T(2), .CSE_TERMS(1000)) dut_b
    (.r_in(r_b), .delta(d_b), .delta_next(n_b));

  // GF(2^8), p = 4, t = 1, complete search.
  logic [3:0][7:0]  r_c;
  logic [1:0][7:0]  d_c;
  logic [1:0][7:0]  n_c;
  sc_xor_combination #(.M(8), .P(4), .T(1), .CSE_TERMS(1000)) dut_c
    (.r_in(r_c), .delta(d_c), .delta_next(n_c));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Expected delta_i(j+1) for one syndrome.
  function automatic sym_t expect_next(sym_t r[], sym_t d, int i, int p, int m, int poly);
    sym_t e;
    e = ref_mul(d, ref_pow_alpha(i * p, m, poly), m, poly);
    for (int l = 0; l < p; l++)
      e = e ^ ref_mul(r[l], ref_pow_alpha(i * l, m, poly), m, poly);
    return e;
  endfunction

  // XOR gates of the unshared matrix: sum over outputs of (ones - 1).
  function automatic int unshared_xors(int m, int p, int t);
    int x;
    x = 0;
    for (int i = 1; i <= 2 * t; i++)
      for (int q = 0; q < m; q++) begin
        int ones = 0;
        for (int l = 0; l <= p; l++)
          for (int b = 0; b < m; b++) begin
            sym_t v = ref_pow_alpha(b + i * l, m, (m == 4) ? 'h13 : 'h11d);
            ones += int'(v[q]);
          end
        if (ones > 1) x += ones - 1;
      end
    return x;
  endfunction

  sym_t rv[];

  initial begin
    int ub;
    int uc;
    ub = unshared_xors(4, 3, 2);
    uc = unshared_xors(8, 4, 1);
    $display("GF(16) p=3 t=2: %0d XOR shared, %0d unshared", dut_b.u_xor.xor_count, ub);
    $display("GF(256) p=4 t=1: %0d XOR shared, %0d unshared", dut_c.u_xor.xor_count, uc);
    check(dut_b.u_xor.xor_count < ub, "GF(16) network not smaller than unshared");
    check(dut_c.u_xor.xor_count < uc, "GF(256) p=4 network not smaller than unshared");
    $display("default: %0d XOR after %0d shared terms", dut_a.u_xor.xor_count,
             dut_a.u_xor.new_terms);
    check(dut_b.u_xor.xor_count == 68 && dut_b.u_xor.new_terms == 15, "GF(16) counts");
    check(dut_c.u_xor.xor_count == 98 && dut_c.u_xor.new_terms == 24, "GF(256) p=4 counts");
    check(dut_a.u_xor.xor_count == 2847 && dut_a.u_xor.new_terms == 32, "default counts");

    for (int n = 0; n < 300; n++) begin
      r_a = {$urandom, $urandom};
      d_a = {$urandom, $urandom, $urandom, $urandom};
      r_b = 12'($urandom);
      d_b = 16'($urandom);
      r_c = $urandom;
      d_c = 16'($urandom);
      #1;
      rv = new[8];
      foreach (rv[l]) rv[l] = sym_t'(r_a[l]);
      for (int i = 1; i <= 16; i++)
        check(sym_t'(n_a[i-1]) == expect_next(rv, sym_t'(d_a[i-1]), i, 8, 8, 'h11d),
              $sformatf("default S%0d", i));
      rv = new[3];
      foreach (rv[l]) rv[l] = sym_t'(r_b[l]);
      for (int i = 1; i <= 4; i++)
        check(sym_t'(n_b[i-1]) == expect_next(rv, sym_t'(d_b[i-1]), i, 3, 4, 'h13),
              $sformatf("GF(16) S%0d", i));
      rv = new[4];
      foreach (rv[l]) rv[l] = sym_t'(r_c[l]);
      for (int i = 1; i <= 2; i++)
        check(sym_t'(n_c[i-1]) == expect_next(rv, sym_t'(d_c[i-1]), i, 4, 8, 'h11d),
              $sformatf("GF(256) p=4 S%0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
