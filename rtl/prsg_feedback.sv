// prsg_feedback -- the "linear function" of the generator: eight XNOR gates,
// one per feedback polynomial of the selected word length.
//
// For word length n and pattern p, output fb[p] is the XNOR of the register
// stages d(k-1) for every term x^k of polynomial (n, p) in
// prsg_pkg::TAP_MASK, i.e. the complement of their parity. All eight values
// are formed at once and offered to the 8x1 pattern multiplexer, as in the
// published structure (eight XNOR gates in front of an 8x1 mux). Only the
// taps of the current n are read, so stages d(n)..d15 never influence the
// feedback. The port n is clamped to 2..16 (this design's choice for values
// the published design does not define).
//
// Purely combinational: fb follows state and n within the same cycle.
module prsg_feedback
  import prsg_pkg::*;
(
  input  state_t    state,  // register contents, bit i = stage d(i)
  input  word_len_t n,      // word length (degree of the polynomials)
  output feedback_t fb      // fb[p]: feedback bit of polynomial p
);

  word_len_t n_eff;  // word length clamped to N_MIN..N_MAX

  always_comb begin
    n_eff = clamp_word_len(n);
    for (int unsigned p = 0; p < NUM_PATTERNS; p++) begin
      fb[p] = ~^(state & TAP_MASK[n_eff][p]);
    end
  end

endmodule
