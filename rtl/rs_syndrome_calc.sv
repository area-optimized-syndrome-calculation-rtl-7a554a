// p-parallel syndrome calculator for a Reed-Solomon RS(n, n-2t, t) decoder.
//
// The syndromes of a received word R(x) = r_0 + r_1 x + ... + r_(n-1) x^(n-1)
// are S_i = R(alpha^i), i = 1..2t; all zero means no error was detected.
// The block evaluates all 2t of them at once by Horner's rule, consuming
// p symbols per clock, highest degree first:
//
//   delta_i(j+1) = delta_i(j) * alpha^(i*p) + sum_l r_l(j) * alpha^(i*l)
//
// Structure: 2t m-bit registers (delta) and one combinational XOR matrix
// (sc_xor_combination) that computes every next delta from the p input
// symbols and the current deltas in a single constant binary matrix product.
// After the last group of the word the registers hold S_1..S_2t.
//
// Input order: a word takes NB = ceil(n/p) beats.  In beat j (0-based,
// counted from the start of the word), lane l carries r_(NB*p - p*(j+1) + l):
// the first beat holds the highest-degree symbols, lane 0 always holds the
// lowest-degree symbol of its group.  When p does not divide n (p = 8 with
// n = 255), the top NB*p - n lanes of the first beat stand for coefficients
// of degree n and above; the block forces them to zero, so whatever is on
// them is ignored.
//
// Handshake: in_valid qualifies a beat; beats of one word may be separated
// by idle cycles and words may follow each other back to back.  The block
// counts beats itself, so the first valid beat after reset starts a word.
// There is no back-pressure.  out_valid pulses for one cycle, the cycle after
// the word's last beat; syndrome and syn_error hold the result in that cycle
// (syndrome index i-1 is S_i).  syn_error is 1 when any syndrome is nonzero.
// Latency from the first beat of a word to out_valid is NB cycles when the
// beats arrive back to back (32 cycles for n = 255, p = 8).
//
// The recurrence, the single matrix multiplication and the parameter values
// (GF(2^8), p = 8, t = 8, n = 255) follow the published design.  The beat
// counter, the zero-padding of the first beat, the reset (asynchronous,
// active low, clearing the counter and the registers) and the one-cycle
// result pulse are this implementation's choices.
module rs_syndrome_calc #(
  parameter int unsigned M         = 8,    // bits per symbol, GF(2^M)
  parameter int unsigned P         = 8,    // symbols per clock
  parameter int unsigned T         = 8,    // correctable symbol errors
  parameter int unsigned N         = 255,  // codeword length in symbols
  parameter int unsigned POLY      = gf_pkg::default_poly(M),
  parameter int unsigned CSE_TERMS = 32    // see sc_xor_combination
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [P-1:0][M-1:0]   in_sym,
  output logic                  out_valid,
  output logic [2*T-1:0][M-1:0] syndrome,
  output logic                  syn_error
);

  localparam int unsigned NB    = (N + P - 1) / P;  // beats per word
  localparam int unsigned PAD   = NB * P - N;       // zero lanes in beat 0
  localparam int unsigned CNT_W = (NB > 1) ? $clog2(NB) : 1;

  typedef logic [CNT_W-1:0] cnt_t;

  cnt_t                  beat_q;
  logic [2*T-1:0][M-1:0] delta_q;
  logic [2*T-1:0][M-1:0] delta_in;
  logic [2*T-1:0][M-1:0] delta_next;
  logic [P-1:0][M-1:0]   sym_in;
  logic                  first_beat;
  logic                  last_beat;
  logic                  out_valid_q;

  assign first_beat = (beat_q == '0);
  assign last_beat  = (beat_q == cnt_t'(NB - 1));

  // A word starts from delta = 0; lanes above degree n-1 are zero.
  always_comb begin
    delta_in = first_beat ? '0 : delta_q;
    sym_in   = in_sym;
    if (first_beat) begin
      for (int unsigned l = P - PAD; l < P; l++) sym_in[l] = '0;
    end
  end

  sc_xor_combination #(
    .M        (M),
    .P        (P),
    .T        (T),
    .POLY     (POLY),
    .CSE_TERMS(CSE_TERMS)
  ) u_xor (
    .r_in      (sym_in),
    .delta     (delta_in),
    .delta_next(delta_next)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      beat_q      <= '0;
      delta_q     <= '0;
      out_valid_q <= 1'b0;
    end else begin
      // The beat counter never leaves 0..NB-1.
      a_beat_range: assert (int'(beat_q) < int'(NB))
        else $error("beat counter out of range");
      out_valid_q <= in_valid && last_beat;
      if (in_valid) begin
        delta_q <= delta_next;
        beat_q  <= last_beat ? '0 : beat_q + cnt_t'(1);
      end
    end
  end

  assign out_valid = out_valid_q;
  assign syndrome  = delta_q;
  assign syn_error = |delta_q;

endmodule
