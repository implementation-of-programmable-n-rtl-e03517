// tb_prsg_mux8 -- self-checking testbench of the 8x1 pattern multiplexer.
// Applies every one of the 256 input words with every selector value and
// checks that the output is the selected input bit.
module tb_prsg_mux8;
  import prsg_pkg::*;

  feedback_t in;
  pattern_t  sel;
  logic      out;
  int        checks = 0;
  int        failures = 0;

  prsg_mux8 dut (.in(in), .sel(sel), .out(out));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int w = 0; w < 256; w++) begin
      for (int p = 0; p < 8; p++) begin
        in  = feedback_t'(w);
        sel = pattern_t'(p);
        #1;
        checks++;
        if (out !== 1'((w >> p) & 1)) begin
          failures++;
          $display("mismatch: in=%02h sel=%0d out=%0b", w, p, out);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
