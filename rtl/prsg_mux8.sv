// prsg_mux8 -- the 8x1 pattern multiplexer.
//
// Passes the feedback bit of the polynomial chosen by the 3-bit pattern
// selector s to the first register stage d0: out = in[sel]. Purely
// combinational; a change of sel takes effect on the next clock edge of the
// register it feeds. The published design names this block and its size; the
// plain indexed select is its obvious realisation.
module prsg_mux8
  import prsg_pkg::*;
(
  input  feedback_t in,   // one feedback bit per polynomial
  input  pattern_t  sel,  // pattern selector s
  output logic      out   // selected feedback bit
);

  always_comb out = in[sel];

endmodule
