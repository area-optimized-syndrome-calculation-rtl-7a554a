// End-to-end testbench for rs_syndrome_calc at its default configuration,
// RS(255, 239, 8) over GF(2^8) with 8 symbols per clock.
//
// Random codewords are built as multiples of the generator polynomial
// g(x) = (x + alpha)(x + alpha^2)...(x + alpha^16); some receive 1 to 8
// random symbol errors, some are replaced by random words.  Each word is fed
// highest degree first, 8 symbols per beat, 32 beats per word (the top lane
// of the first beat is the pad position above degree 254).  A scoreboard
// compares every result with syndromes evaluated term by term.
//
// Timing checks: out_valid must come exactly one cycle after a word's last
// beat, and 32 cycles after its first beat when the beats are back to back.
//
// Every mechanism must occur at least once, or a failure is counted:
// an error-free word (all syndromes zero, syn_error low), a corrupted word
// (syn_error high), a word fed with idle cycles between its beats, a word
// following the previous one back to back, and a first beat whose pad lane
// carries a nonzero value that must be ignored.
module tb_rs_syndrome_calc;
  import tb_gf_pkg::*;

  localparam int M    = 8;
  localparam int P    = 8;
  localparam int T    = 8;
  localparam int N    = 255;
  localparam int POLY = 'h11d;
  localparam int NB   = (N + P - 1) / P;
  localparam int NWORDS = 40;

  logic                  clk = 1'b0;
  logic                  rst_n;
  logic                  in_valid;
  logic [P-1:0][M-1:0]   in_sym;
  logic                  out_valid;
  logic [2*T-1:0][M-1:0] syndrome;
  logic                  syn_error;

  rs_syndrome_calc dut (
    .clk, .rst_n, .in_valid, .in_sym, .out_valid, .syndrome, .syn_error
  );

  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;
  int n_clean  = 0;
  int n_corrupt = 0;
  int n_stalled = 0;
  int n_b2b    = 0;
  int n_pad    = 0;
  int n_results = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  typedef logic [2*T-1:0][15:0] synd_t;
  synd_t exp_q[$];
  bit    stall_q[$];   // word had idle cycles between its beats

  // ---------------------------------------------------------------- monitor
  longint cyc = 0;
  int     beat_cnt = 0;
  longint first_edge;
  longint last_edge = -10;
  bit     last_stalled;
  longint prev_last_edge = -10;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && out_valid) begin
      synd_t e;
      bit    st;
      bit    zero;
      n_results++;
      check(exp_q.size() > 0, "result without a word");
      if (exp_q.size() > 0) begin
        e    = exp_q[0];
        st   = stall_q[0];
        exp_q.delete(0);
        stall_q.delete(0);
        zero = 1'b1;
        for (int i = 0; i < 2 * T; i++) begin
          check(sym_t'(syndrome[i]) == e[i],
                $sformatf("word %0d S%0d = %h, expected %h", n_results, i + 1, syndrome[i], e[i]));
          if (e[i] != 0) zero = 1'b0;
        end
        check(syn_error == !zero, $sformatf("word %0d syn_error %0b", n_results, syn_error));
        check(cyc == last_edge + 1,
              $sformatf("word %0d: out_valid %0d cycles after last beat", n_results, cyc - last_edge));
        if (!st)
          check(cyc - first_edge == longint'(NB),
                $sformatf("word %0d: latency %0d, expected %0d", n_results, cyc - first_edge, NB));
        if (st) n_stalled++;
        if (zero) n_clean++;
        else n_corrupt++;
      end
    end
    if (rst_n && in_valid) begin
      if (beat_cnt == 0) begin
        // Results are checked above, before a new word overwrites these.
        first_edge = cyc;
        if (cyc == last_edge + 1) n_b2b++;
      end
      beat_cnt++;
      if (beat_cnt == NB) begin
        last_edge = cyc;
        beat_cnt  = 0;
      end
    end
  end

  // ----------------------------------------------------------------- driver
  task automatic send_word(sym_t c[], bit stall, bit pad_garbage);
    synd_t e;
    for (int i = 1; i <= 2 * T; i++) e[i-1] = ref_syndrome(c, i, M, POLY);
    exp_q.push_back(e);
    stall_q.push_back(stall);
    for (int j = 0; j < NB; j++) begin
      if (stall && ($urandom_range(0, 2) == 0)) begin
        @(posedge clk);
        in_valid <= 1'b0;
        in_sym   <= {$urandom, $urandom};
        @(posedge clk);
      end else begin
        @(posedge clk);
      end
      in_valid <= 1'b1;
      for (int l = 0; l < P; l++) begin
        int k;
        k = NB * P - P * (j + 1) + l;
        if (k < N) in_sym[l] <= M'(c[k]);
        else begin
          in_sym[l] <= pad_garbage ? M'($urandom_range(1, 255)) : '0;
          if (pad_garbage) n_pad++;
        end
      end
    end
  endtask

  task automatic idle(int cycles);
    repeat (cycles) begin
      @(posedge clk);
      in_valid <= 1'b0;
    end
  endtask

  initial begin
    sym_t c[];
    int   kind;
    rst_n    = 1'b0;
    in_valid = 1'b0;
    in_sym   = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    // Clean word first, then a corrupted one back to back.
    ref_codeword(c, N, T, M, POLY);
    send_word(c, 1'b0, 1'b0);
    ref_codeword(c, N, T, M, POLY);
    c[17] = c[17] ^ 16'h5a;
    send_word(c, 1'b0, 1'b1);
    for (int w = 0; w < NWORDS; w++) begin
      kind = $urandom_range(0, 3);
      ref_codeword(c, N, T, M, POLY);
      if (kind == 1) begin
        automatic int ne = $urandom_range(1, T);
        for (int e = 0; e < ne; e++) begin
          automatic int pos = $urandom_range(0, N - 1);
          c[pos] = c[pos] ^ sym_t'($urandom_range(1, 255));
        end
      end else if (kind == 2) begin
        foreach (c[k]) c[k] = sym_t'($urandom_range(0, 255));
      end
      send_word(c, $urandom_range(0, 2) == 0, $urandom_range(0, 1) == 1);
      if ($urandom_range(0, 4) == 0) idle($urandom_range(1, 5));
    end
    idle(5);
    check(n_results == NWORDS + 2, $sformatf("%0d results for %0d words", n_results, NWORDS + 2));
    check(exp_q.size() == 0, "words without a result");
    $display("words: %0d clean, %0d corrupted, %0d stalled, %0d back to back, %0d pad lanes driven",
             n_clean, n_corrupt, n_stalled, n_b2b, n_pad);
    check(n_clean > 0, "no error-free word");
    check(n_corrupt > 0, "no corrupted word");
    check(n_stalled > 0, "no word with idle cycles");
    check(n_b2b > 0, "no back-to-back words");
    check(n_pad > 0, "no pad lane driven");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end


  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
