// tb_prsg_top -- end-to-end, full-size testbench of the programmable PRSG.
//
// Runs the generator at its default size (16 stages) through:
//  1. the published n = 5 word sequences for all eight pattern selectors,
//     word by word, including the return to 00 at the end of each period;
//  2. every one of the 120 (n, s) polynomials from reset until the word
//     returns to zero, comparing every word with an independent reference
//     model and the period with the published sequence length;
//  3. pattern and word-length switches without a reset, and reset in the
//     middle of a sequence;
//  4. out-of-range word lengths (clamped to 2..16).
// Each mechanism is counted and a mechanism that never happened is a failure.
// Timing checked: q is 0 while rst is high, and the first non-zero word
// appears exactly one clock after rst is released.
module tb_prsg_top;
  import tb_prsg_ref_pkg::*;

  logic        clk = 1'b0;
  logic        rst;
  logic [4:0]  n;
  logic [2:0]  s;
  logic [0:15] q;

  int checks = 0;
  int failures = 0;
  // mechanism counters
  int cnt_reset = 0, cnt_wrap = 0, cnt_s_switch = 0, cnt_n_switch = 0;
  int cnt_clamp = 0, cnt_mid_reset = 0, cnt_full_period = 0;

  logic [15:0] model;  // reference register contents, bit i = stage d(i)

  prsg_top dut (.clk(clk), .rst(rst), .n(n), .s(s), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Compare the port with the reference model (sampled after the edge).
  task automatic check_word(string what);
    logic [15:0] exp_w;
    exp_w = ref_word(model, int'(n));
    checks++;
    if (q !== exp_w) begin
      failures++;
      if (failures < 20)
        $display("%s: n=%0d s=%0d q=%04h expected %04h", what, n, s, q, exp_w);
    end
  endtask

  // Hold reset for two clocks with the given n, s; check q = 0 meanwhile.
  task automatic do_reset(int nv, int sv);
    n   = 5'(nv);
    s   = 3'(sv);
    rst = 1'b1;
    repeat (2) @(posedge clk);
    @(negedge clk);
    checks++;
    if (q !== '0) begin failures++; $display("q not 0 during reset"); end
    model = '0;
    cnt_reset++;
    rst = 1'b0;
  endtask

  // One clock: advance the model and the design, then compare.
  task automatic step(string what);
    @(posedge clk);
    model = ref_next(model, int'(n), int'(s));
    @(negedge clk);
    check_word(what);
  endtask

  // Word q[0:nv-1] read with q[0] most significant.
  function automatic int word_value(int nv);
    int v = 0;
    for (int i = 0; i < nv; i++) v = (v << 1) | int'(q[i]);
    return v;
  endfunction

  initial begin
    rst = 1'b1;
    n   = 5'd5;
    s   = 3'd0;

    // 1. Published n = 5 sequences.
    for (int sv = 0; sv < 8; sv++) begin
      do_reset(5, sv);
      for (int k = 0; k < SEQ_N5_LEN[sv]; k++) begin
        checks++;
        if (word_value(5) != int'(SEQ_N5[sv][k]) || q[5:15] != '0) begin
          failures++;
          $display("n=5 s=%0d word %0d: q=%02h expected %02h", sv, k, word_value(5), SEQ_N5[sv][k]);
        end
        step("n5");
      end
      checks++;  // back at 00 after the published length
      if (q !== '0) begin failures++; $display("n=5 s=%0d: no return to 00", sv); end
      else cnt_wrap++;
    end

    // 2. All 120 polynomials: every word against the model, period against
    //    the published length.
    for (int nv = 2; nv <= 16; nv++) begin
      for (int sv = 0; sv < 8; sv++) begin
        int len;
        do_reset(nv, sv);
        len = 0;
        do begin
          step("table");
          len++;
        end while (q !== '0 && len <= 70000);
        checks++;
        if (len != CYCLE_LEN[nv][sv]) begin
          failures++;
          $display("n=%0d s=%0d: period %0d, expected %0d", nv, sv, len, CYCLE_LEN[nv][sv]);
        end else begin
          cnt_wrap++;
          if (len == (1 << nv) - 1) cnt_full_period++;
        end
      end
    end

    // 3. Switches without reset, and a reset in mid-sequence.
    do_reset(8, 0);
    for (int r = 0; r < 40; r++) begin
      repeat (7) step("run");
      if (r % 2 == 0) begin
        s = 3'($urandom_range(7));
        cnt_s_switch++;
      end else begin
        n = 5'($urandom_range(16, 2));
        cnt_n_switch++;
      end
    end
    repeat (3) step("run");
    do_reset(int'(n), int'(s));
    cnt_mid_reset++;
    repeat (20) step("after mid reset");

    // 4. Out-of-range word lengths behave as 2 or 16.
    foreach (n_bad[i]) begin
      do_reset(n_bad[i], i % 8);
      cnt_clamp++;
      repeat (100) step("clamp");
    end

    if (cnt_reset == 0)       begin failures++; $display("reset never applied"); end
    if (cnt_wrap == 0)        begin failures++; $display("no sequence wrapped"); end
    if (cnt_full_period == 0) begin failures++; $display("no maximal-length sequence"); end
    if (cnt_s_switch == 0)    begin failures++; $display("no pattern switch"); end
    if (cnt_n_switch == 0)    begin failures++; $display("no word-length switch"); end
    if (cnt_mid_reset == 0)   begin failures++; $display("no mid-sequence reset"); end
    if (cnt_clamp == 0)       begin failures++; $display("no out-of-range n"); end
    $display("mechanisms: resets=%0d wraps=%0d maximal=%0d s_switch=%0d n_switch=%0d mid_reset=%0d clamp=%0d",
             cnt_reset, cnt_wrap, cnt_full_period, cnt_s_switch, cnt_n_switch, cnt_mid_reset, cnt_clamp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_bad [5] = '{0, 1, 17, 24, 31};
endmodule
