// prsg_pkg -- constants, types and the polynomial table of the programmable
// n-bit pseudo-random sequence generator (PRSG).
//
// The generator is a 16-stage shift register d0..d15 whose first stage is fed
// by one of eight XNOR feedback functions, picked by a 3-bit pattern selector.
// Which register stages each XNOR gate reads depends on the word length n
// (2..16). TAP_MASK below holds, for every (n, s), the characteristic
// polynomial of that feedback written as a tap mask: a term x^k of the
// polynomial (1 <= k <= n) sets bit k-1, i.e. a tap on stage d(k-1); the
// constant term 1 is the feedback into d0 itself. The 120 polynomials are the
// published ones. With XNOR feedback the all-zero state is a legal state (the
// reset state) and the all-ones state of the n active stages is the lock-up
// state.
//
// One entry departs from the published sequence-length table: for n = 16,
// s = 3 (x^16 + x^14 + x^11 + 1) the published length is 2045, while the
// polynomial as printed, wired like every other entry, cycles after 2046
// states. The polynomial is kept as printed.
package prsg_pkg;

  // Number of flip-flops in the register (and the largest word length).
  localparam int unsigned N_MAX = 16;
  // Smallest supported word length (degree of the polynomial).
  localparam int unsigned N_MIN = 2;
  // Number of feedback polynomials per word length (inputs of the 8x1 mux).
  localparam int unsigned NUM_PATTERNS = 8;

  // Register contents: bit i is flip-flop d(i), bit 0 is the stage the
  // feedback enters.
  typedef logic [N_MAX-1:0] state_t;
  // Pattern selector s.
  typedef logic [$clog2(NUM_PATTERNS)-1:0] pattern_t;
  // Word length n as applied at the port (5 bits, values 0..31).
  typedef logic [4:0] word_len_t;
  // One feedback bit per pattern.
  typedef logic [NUM_PATTERNS-1:0] feedback_t;

  // Tap masks, indexed [n][s]. Row n, column s is the polynomial of that
  // word length and pattern selector.
  localparam state_t TAP_MASK [N_MIN:N_MAX][NUM_PATTERNS] = '{
    '{16'h0003, 16'h0003, 16'h0003, 16'h0003, 16'h0003, 16'h0003, 16'h0003, 16'h0003},  // n = 2
    '{16'h0005, 16'h0006, 16'h0007, 16'h0005, 16'h0006, 16'h0007, 16'h0006, 16'h0007},  // n = 3
    '{16'h000b, 16'h000d, 16'h000c, 16'h000a, 16'h0009, 16'h000e, 16'h0009, 16'h000f},  // n = 4
    '{16'h0017, 16'h0019, 16'h001a, 16'h0016, 16'h0011, 16'h0014, 16'h0012, 16'h001d},  // n = 5
    '{16'h002d, 16'h0032, 16'h0034, 16'h0029, 16'h0022, 16'h0028, 16'h0024, 16'h002b},  // n = 6
    '{16'h0059, 16'h0064, 16'h0061, 16'h0052, 16'h0044, 16'h0050, 16'h0048, 16'h0055},  // n = 7
    '{16'h00b1, 16'h00c8, 16'h00c2, 16'h00a4, 16'h0088, 16'h00a0, 16'h0090, 16'h00aa},  // n = 8
    '{16'h0162, 16'h0181, 16'h0184, 16'h0148, 16'h0110, 16'h0140, 16'h0120, 16'h0154},  // n = 9
    '{16'h02c4, 16'h0302, 16'h0308, 16'h0290, 16'h0220, 16'h0280, 16'h0240, 16'h02a8},  // n = 10
    '{16'h0588, 16'h0604, 16'h0610, 16'h0520, 16'h0440, 16'h0500, 16'h0480, 16'h0550},  // n = 11
    '{16'h0b10, 16'h0c08, 16'h0c20, 16'h0a40, 16'h0880, 16'h0a00, 16'h0900, 16'h0aa0},  // n = 12
    '{16'h1620, 16'h1810, 16'h1840, 16'h1480, 16'h1100, 16'h1400, 16'h1200, 16'h1540},  // n = 13
    '{16'h2c40, 16'h3020, 16'h3080, 16'h2900, 16'h2200, 16'h2800, 16'h2400, 16'h2a80},  // n = 14
    '{16'h5880, 16'h6040, 16'h6100, 16'h5200, 16'h4400, 16'h5000, 16'h4800, 16'h5500},  // n = 15
    '{16'hb100, 16'hc080, 16'hc200, 16'ha400, 16'h8800, 16'ha000, 16'h9000, 16'haa00}   // n = 16
  };

  // Word length actually used for a port value: values below N_MIN run as
  // N_MIN, values above N_MAX run as N_MAX (a choice of this design; the
  // published design only defines n = 2..16).
  function automatic word_len_t clamp_word_len(word_len_t n);
    if (n < word_len_t'(N_MIN)) return word_len_t'(N_MIN);
    if (n > word_len_t'(N_MAX)) return word_len_t'(N_MAX);
    return n;
  endfunction

  // Mask of the n active stages d0..d(n-1), for n = N_MIN..N_MAX.
  function automatic state_t active_mask(word_len_t n);
    state_t m;
    for (int unsigned i = 0; i < N_MAX; i++) m[i] = (word_len_t'(i) < n);
    return m;
  endfunction

endpackage
