// One RS(255, 255-2t, t) configuration of rs_syndrome_calc with its own
// stimulus and checker, used by tb_sc_workloads.
//
// Sends NW words back to back (even-numbered ones error-free, odd-numbered
// ones with up to t symbol errors), compares every syndrome with the
// reference evaluation and checks that each result arrives ceil(255/p)
// cycles after the word's first beat.  The sharing search is switched off
// (CSE_TERMS = 0): it changes the gate structure, not the function, and is
// exercised by the other testbenches.
module tb_sc_config #(
  parameter int P  = 8,
  parameter int T  = 8,
  parameter int NW = 4
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output bit   done
);
  import tb_gf_pkg::*;

  localparam int M    = 8;
  localparam int N    = 255;
  localparam int POLY = 'h11d;
  localparam int NB   = (N + P - 1) / P;

  logic                  in_valid;
  logic [P-1:0][M-1:0]   in_sym;
  logic                  out_valid;
  logic [2*T-1:0][M-1:0] syndrome;
  logic                  syn_error;

  rs_syndrome_calc #(.M(M), .P(P), .T(T), .N(N), .CSE_TERMS(0)) dut (
    .clk, .rst_n, .in_valid, .in_sym, .out_valid, .syndrome, .syn_error
  );

  typedef logic [2*T-1:0][15:0] synd_t;
  synd_t exp_q[$];
  int    start_q[$];
  int    cyc = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL p=%0d t=%0d: %s", P, T, what);
    end
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && out_valid) begin
      check(exp_q.size() > 0, "result without a word");
      if (exp_q.size() > 0) begin
        for (int i = 0; i < 2 * T; i++)
          check(16'(syndrome[i]) == exp_q[0][i], $sformatf("S%0d = %h", i + 1, syndrome[i]));
        check(syn_error == (exp_q[0] != '0), "syn_error");
        check(cyc - start_q[0] == NB, $sformatf("latency %0d", cyc - start_q[0]));
        exp_q.delete(0);
        start_q.delete(0);
      end
    end
  end

  initial begin
    sym_t c[];
    synd_t e;
    checks   = 0;
    failures = 0;
    done     = 1'b0;
    in_valid = 1'b0;
    in_sym   = '0;
    @(posedge rst_n);
    for (int w = 0; w < NW; w++) begin
      ref_codeword(c, N, T, M, POLY);
      if (w % 2 == 1)
        for (int k = 0; k < $urandom_range(1, T); k++) begin
          automatic int pos = $urandom_range(0, N - 1);
          c[pos] = c[pos] ^ sym_t'($urandom_range(1, 255));
        end
      for (int i = 1; i <= 2 * T; i++) e[i-1] = ref_syndrome(c, i, M, POLY);
      exp_q.push_back(e);
      for (int j = 0; j < NB; j++) begin
        @(posedge clk);
        if (j == 0) start_q.push_back(cyc + 1);  // sampled at the next edge
        in_valid <= 1'b1;
        for (int l = 0; l < P; l++) begin
          automatic int k = NB * P - P * (j + 1) + l;
          in_sym[l] <= (k < N) ? M'(c[k]) : M'($urandom);
        end
      end
    end
    @(posedge clk);
    in_valid <= 1'b0;
    repeat (3) @(posedge clk);
    check(exp_q.size() == 0, "missing results");
    done = 1'b1;
  end
endmodule
