// tb_prsg_feedback -- self-checking testbench of the XNOR feedback network.
// For every port value of n (0..31, so the clamping is exercised) and many
// random register words, checks all eight feedback bits against the XNOR of
// the stages named by the published polynomial's exponents.
module tb_prsg_feedback;
  import prsg_pkg::*;
  import tb_prsg_ref_pkg::*;

  state_t    state;
  word_len_t n;
  feedback_t fb;
  int        checks = 0;
  int        failures = 0;

  prsg_feedback dut (.state(state), .n(n), .fb(fb));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int nv = 0; nv < 32; nv++) begin
      for (int t = 0; t < 300; t++) begin
        n     = word_len_t'(nv);
        // include the all-zero and all-ones words
        state = (t == 0) ? '0 : (t == 1) ? '1 : state_t'($urandom);
        #1;
        for (int p = 0; p < 8; p++) begin
          logic [15:0] nxt;
          nxt = ref_next(state, nv, p);
          checks++;
          if (fb[p] !== nxt[0]) begin
            failures++;
            $display("n=%0d s=%0d state=%04h fb=%0b expected %0b", nv, p, state, fb[p], nxt[0]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
