// prsg_top -- programmable n-bit pseudo-random sequence generator.
//
// A 16-stage linear feedback shift register with XNOR feedback whose
// characteristic polynomial is chosen at run time from 120 polynomials: the
// word length n (2..16) picks the degree, the 3-bit pattern selector s picks
// one of eight polynomials of that degree (prsg_pkg::TAP_MASK). Structure, as
// published: the feedback network (eight XNOR gates, prsg_feedback) forms the
// feedback bit of all eight polynomials, the 8x1 multiplexer (prsg_mux8)
// passes the selected one into d0, and the register (prsg_shift_reg) shifts
// d0 -> d1 -> ... -> d15 on every clock.
//
// Interface and timing:
//   clk  rising-edge clock; one new word per cycle.
//   rst  synchronous, active high; clears the register to the all-zero word,
//        the first word of every sequence.
//   n    word length, sampled every cycle; values outside 2..16 are clamped.
//   s    pattern selector, sampled every cycle.
//   q    the word, q[0] = d0 ... q[15] = d15, declared [0:15] so that
//        q[0:n-1] read as a binary number (q[0] most significant) is the
//        word as usually printed (00, 10, 08, ... for n = 5, s = 0). Stages
//        beyond the word length, q[n]..q[15], read as 0.
// After rst is released the word sequence starts at 0 and returns to 0 after
// the cycle length of the selected polynomial (2^n - 1 for a primitive one).
// Changing n or s without a reset continues from the present register
// contents with the new polynomial. Masking the stages beyond n, and the
// clamping of n, are choices of this design.
module prsg_top
  import prsg_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  word_len_t        n,
  input  pattern_t         s,
  output logic [0:N_MAX-1] q
);

  state_t    state;     // register contents, bit i = d(i)
  feedback_t fb;        // feedback bit of each of the eight polynomials
  logic      fb_sel;    // selected feedback bit, into d0
  state_t    word_mask; // stages d0..d(n-1)

  prsg_feedback u_feedback (
    .state (state),
    .n     (n),
    .fb    (fb)
  );

  prsg_mux8 u_mux (
    .in  (fb),
    .sel (s),
    .out (fb_sel)
  );

  prsg_shift_reg #(
    .WIDTH (N_MAX)
  ) u_reg (
    .clk (clk),
    .rst (rst),
    .din (fb_sel),
    .d   (state)
  );

  always_comb begin
    word_mask = active_mask(clamp_word_len(n));
    for (int unsigned i = 0; i < N_MAX; i++) q[i] = state[i] & word_mask[i];
  end

endmodule
