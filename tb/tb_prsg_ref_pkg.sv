// tb_prsg_ref_pkg -- reference data for the PRSG testbenches, kept apart
// from the design's own tap table.
//
// POLY[n][s] lists the exponents of the published feedback polynomial for word
// length n and pattern selector s, highest first, padded with 0 (the constant
// term, which is not a register tap). CYCLE_LEN[n][s] is the published length
// of the sequence that starts from the all-zero word. One entry is corrected:
// n = 16, s = 3 is published as 2045, but x^16 + x^14 + x^11 + 1 wired like
// every other entry cycles after 2046 words. SEQ_N5[s] is the published word
// sequence for n = 5 (word = q[0:4], q[0] most significant), starting at the
// reset word 00; SEQ_N5_LEN[s] is its length.
//
// ref_next() is an independent model of one clock of the generator: it shifts
// all 16 stages and forms the XNOR feedback from the exponent list.
package tb_prsg_ref_pkg;

  localparam int POLY [2:16][8][5] = '{
    '{'{2, 1, 0, 0, 0}, '{2, 1, 0, 0, 0}, '{2, 1, 0, 0, 0}, '{2, 1, 0, 0, 0}, '{2, 1, 0, 0, 0}, '{2, 1, 0, 0, 0}, '{2, 1, 0, 0, 0}, '{2, 1, 0, 0, 0}},
    '{'{3, 1, 0, 0, 0}, '{3, 2, 0, 0, 0}, '{3, 2, 1, 0, 0}, '{3, 1, 0, 0, 0}, '{3, 2, 0, 0, 0}, '{3, 2, 1, 0, 0}, '{3, 2, 0, 0, 0}, '{3, 2, 1, 0, 0}},
    '{'{4, 2, 1, 0, 0}, '{4, 3, 1, 0, 0}, '{4, 3, 0, 0, 0}, '{4, 2, 0, 0, 0}, '{4, 1, 0, 0, 0}, '{4, 3, 2, 0, 0}, '{4, 1, 0, 0, 0}, '{4, 3, 2, 1, 0}},
    '{'{5, 3, 2, 1, 0}, '{5, 4, 1, 0, 0}, '{5, 4, 2, 0, 0}, '{5, 3, 2, 0, 0}, '{5, 1, 0, 0, 0}, '{5, 3, 0, 0, 0}, '{5, 2, 0, 0, 0}, '{5, 4, 3, 1, 0}},
    '{'{6, 4, 3, 1, 0}, '{6, 5, 2, 0, 0}, '{6, 5, 3, 0, 0}, '{6, 4, 1, 0, 0}, '{6, 2, 0, 0, 0}, '{6, 4, 0, 0, 0}, '{6, 3, 0, 0, 0}, '{6, 4, 2, 1, 0}},
    '{'{7, 5, 4, 1, 0}, '{7, 6, 3, 0, 0}, '{7, 6, 1, 0, 0}, '{7, 5, 2, 0, 0}, '{7, 3, 0, 0, 0}, '{7, 5, 0, 0, 0}, '{7, 4, 0, 0, 0}, '{7, 5, 3, 1, 0}},
    '{'{8, 6, 5, 1, 0}, '{8, 7, 4, 0, 0}, '{8, 7, 2, 0, 0}, '{8, 6, 3, 0, 0}, '{8, 4, 0, 0, 0}, '{8, 6, 0, 0, 0}, '{8, 5, 0, 0, 0}, '{8, 6, 4, 2, 0}},
    '{'{9, 7, 6, 2, 0}, '{9, 8, 1, 0, 0}, '{9, 8, 3, 0, 0}, '{9, 7, 4, 0, 0}, '{9, 5, 0, 0, 0}, '{9, 7, 0, 0, 0}, '{9, 6, 0, 0, 0}, '{9, 7, 5, 3, 0}},
    '{'{10, 8, 7, 3, 0}, '{10, 9, 2, 0, 0}, '{10, 9, 4, 0, 0}, '{10, 8, 5, 0, 0}, '{10, 6, 0, 0, 0}, '{10, 8, 0, 0, 0}, '{10, 7, 0, 0, 0}, '{10, 8, 6, 4, 0}},
    '{'{11, 9, 8, 4, 0}, '{11, 10, 3, 0, 0}, '{11, 10, 5, 0, 0}, '{11, 9, 6, 0, 0}, '{11, 7, 0, 0, 0}, '{11, 9, 0, 0, 0}, '{11, 8, 0, 0, 0}, '{11, 9, 7, 5, 0}},
    '{'{12, 10, 9, 5, 0}, '{12, 11, 4, 0, 0}, '{12, 11, 6, 0, 0}, '{12, 10, 7, 0, 0}, '{12, 8, 0, 0, 0}, '{12, 10, 0, 0, 0}, '{12, 9, 0, 0, 0}, '{12, 10, 8, 6, 0}},
    '{'{13, 11, 10, 6, 0}, '{13, 12, 5, 0, 0}, '{13, 12, 7, 0, 0}, '{13, 11, 8, 0, 0}, '{13, 9, 0, 0, 0}, '{13, 11, 0, 0, 0}, '{13, 10, 0, 0, 0}, '{13, 11, 9, 7, 0}},
    '{'{14, 12, 11, 7, 0}, '{14, 13, 6, 0, 0}, '{14, 13, 8, 0, 0}, '{14, 12, 9, 0, 0}, '{14, 10, 0, 0, 0}, '{14, 12, 0, 0, 0}, '{14, 11, 0, 0, 0}, '{14, 12, 10, 8, 0}},
    '{'{15, 13, 12, 8, 0}, '{15, 14, 7, 0, 0}, '{15, 14, 9, 0, 0}, '{15, 13, 10, 0, 0}, '{15, 11, 0, 0, 0}, '{15, 13, 0, 0, 0}, '{15, 12, 0, 0, 0}, '{15, 13, 11, 9, 0}},
    '{'{16, 14, 13, 9, 0}, '{16, 15, 8, 0, 0}, '{16, 15, 10, 0, 0}, '{16, 14, 11, 0, 0}, '{16, 12, 0, 0, 0}, '{16, 14, 0, 0, 0}, '{16, 13, 0, 0, 0}, '{16, 14, 12, 10, 0}}
  };

  localparam int CYCLE_LEN [2:16][8] = '{
    '{3, 3, 3, 3, 3, 3, 3, 3},
    '{7, 7, 4, 7, 7, 4, 7, 4},
    '{14, 12, 15, 6, 15, 14, 15, 5},
    '{31, 8, 30, 12, 21, 31, 31, 31},
    '{63, 42, 28, 42, 14, 14, 9, 21},
    '{93, 124, 12, 20, 127, 93, 127, 127},
    '{255, 254, 254, 210, 12, 30, 217, 10},
    '{381, 16, 508, 372, 511, 465, 21, 105},
    '{105, 146, 210, 1022, 62, 42, 1023, 62},
    '{2047, 1860, 868, 204, 1533, 2047, 1953, 595},
    '{2667, 1302, 3810, 930, 28, 126, 45, 30},
    '{8191, 4088, 1524, 2380, 7161, 1785, 8001, 2555},
    '{14329, 1778, 2190, 16382, 186, 254, 5115, 254},
    '{24573, 10540, 1020, 10668, 32767, 4599, 63, 7905},
    '{13107, 9362, 49146, 2046, 60, 126, 57337, 434}
  };

  localparam int SEQ_N5_LEN [8] = '{31, 8, 30, 12, 21, 31, 31, 31};

  localparam logic [4:0] SEQ_N5 [8][31] = '{
    '{5'h00, 5'h10, 5'h08, 5'h04, 5'h02, 5'h11, 5'h18, 5'h1C, 5'h0E, 5'h17, 5'h0B, 5'h15, 5'h0A, 5'h05, 5'h12, 5'h09, 5'h14, 5'h1A, 5'h1D, 5'h1E, 5'h0F, 5'h07, 5'h13, 5'h19, 5'h0C, 5'h16, 5'h1B, 5'h0D, 5'h06, 5'h03, 5'h01},
    '{5'h00, 5'h10, 5'h08, 5'h14, 5'h0A, 5'h05, 5'h02, 5'h01, 5'h00, 5'h00, 5'h00, 5'h00, 5'h00, 5'h00, 5'h00, 5'h00, 5'h00, 5'h00, 5'h00, 5'h00, 5'h00, 5'h00, 5'h00, 5'h00, 5'h00, 5'h00, 5'h00, 5'h00, 5'h00, 5'h00, 5'h00},
    '{5'h00, 5'h10, 5'h18, 5'h0C, 5'h06, 5'h03, 5'h11, 5'h08, 5'h04, 5'h12, 5'h09, 5'h14, 5'h1A, 5'h1D, 5'h1E, 5'h1F, 5'h0F, 5'h07, 5'h13, 5'h19, 5'h1C, 5'h0E, 5'h17, 5'h1B, 5'h0D, 5'h16, 5'h0B, 5'h05, 5'h02, 5'h01, 5'h00},
    '{5'h00, 5'h10, 5'h18, 5'h0C, 5'h16, 5'h0B, 5'h15, 5'h1A, 5'h0D, 5'h06, 5'h03, 5'h01, 5'h00, 5'h00, 5'h00, 5'h00, 5'h00, 5'h00, 5'h00, 5'h00, 5'h00, 5'h00, 5'h00, 5'h00, 5'h00, 5'h00, 5'h00, 5'h00, 5'h00, 5'h00, 5'h00},
    '{5'h00, 5'h10, 5'h08, 5'h14, 5'h0A, 5'h15, 5'h1A, 5'h0D, 5'h06, 5'h13, 5'h19, 5'h1C, 5'h0E, 5'h17, 5'h1B, 5'h1D, 5'h1E, 5'h0F, 5'h07, 5'h03, 5'h01, 5'h00, 5'h00, 5'h00, 5'h00, 5'h00, 5'h00, 5'h00, 5'h00, 5'h00, 5'h00},
    '{5'h00, 5'h10, 5'h18, 5'h1C, 5'h0E, 5'h07, 5'h13, 5'h09, 5'h04, 5'h02, 5'h11, 5'h08, 5'h14, 5'h0A, 5'h15, 5'h1A, 5'h1D, 5'h1E, 5'h0F, 5'h17, 5'h1B, 5'h0D, 5'h16, 5'h0B, 5'h05, 5'h12, 5'h19, 5'h0C, 5'h06, 5'h03, 5'h01},
    '{5'h00, 5'h10, 5'h18, 5'h0C, 5'h06, 5'h13, 5'h09, 5'h14, 5'h1A, 5'h0D, 5'h16, 5'h1B, 5'h1D, 5'h1E, 5'h0F, 5'h17, 5'h0B, 5'h15, 5'h0A, 5'h05, 5'h02, 5'h11, 5'h08, 5'h04, 5'h12, 5'h19, 5'h1C, 5'h0E, 5'h07, 5'h03, 5'h01},
    '{5'h00, 5'h10, 5'h08, 5'h14, 5'h1A, 5'h1D, 5'h0E, 5'h17, 5'h1B, 5'h0D, 5'h16, 5'h0B, 5'h15, 5'h0A, 5'h05, 5'h12, 5'h19, 5'h1C, 5'h1E, 5'h0F, 5'h07, 5'h03, 5'h11, 5'h18, 5'h0C, 5'h06, 5'h13, 5'h09, 5'h04, 5'h02, 5'h01}
  };

  // Word length actually used for a port value (2..16).
  function automatic int eff_n(int n);
    return (n < 2) ? 2 : (n > 16) ? 16 : n;
  endfunction

  // One clock of the reference generator: 16-bit register, bit i = stage d(i).
  function automatic logic [15:0] ref_next(logic [15:0] st, int n, int s);
    logic fb;
    int   ne;
    ne = eff_n(n);
    fb = 1'b1;
    for (int j = 0; j < 5; j++) begin
      if (POLY[ne][s][j] > 0) fb = fb ^ st[POLY[ne][s][j]-1];
    end
    return {st[14:0], fb};
  endfunction

  // The word seen at the port for register contents st: stages beyond the
  // word length read 0; returned with q[0] at bit 15 (the port's [0:15] order).
  function automatic logic [15:0] ref_word(logic [15:0] st, int n);
    logic [15:0] w;
    int          ne;
    ne = eff_n(n);
    for (int i = 0; i < 16; i++) w[15-i] = (i < ne) ? st[i] : 1'b0;
    return w;
  endfunction

endpackage
