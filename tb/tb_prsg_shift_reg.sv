// tb_prsg_shift_reg -- self-checking testbench of the 16-stage register.
// Shifts a random bit stream in and compares every stage, every cycle, with
// the bit that entered i+1 clocks earlier; checks that a synchronous reset
// clears all stages on the next edge and not before.
module tb_prsg_shift_reg;
  localparam int W = 16;

  logic         clk = 1'b0;
  logic         rst;
  logic         din;
  logic [W-1:0] d;
  int           checks = 0;
  int           failures = 0;
  logic         hist [$];  // most recent bit first

  prsg_shift_reg dut (.clk(clk), .rst(rst), .din(din), .d(d));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_stages();
    for (int i = 0; i < W; i++) begin
      logic exp_bit;
      exp_bit = (i < hist.size()) ? hist[i] : 1'b0;
      checks++;
      if (d[i] !== exp_bit) begin
        failures++;
        $display("t=%0t stage d%0d = %0b, expected %0b", $time, i, d[i], exp_bit);
      end
    end
  endtask

  initial begin
    rst = 1'b1;
    din = 1'b1;
    @(posedge clk);
    @(negedge clk);
    checks++;
    if (d !== '0) begin failures++; $display("reset did not clear the register"); end
    rst = 1'b0;
    for (int round = 0; round < 2; round++) begin
      hist.delete();
      for (int c = 0; c < 200; c++) begin
        din = 1'($urandom);
        @(posedge clk);
        hist.push_front(din);
        @(negedge clk);
        check_stages();
      end
      // Reset takes effect at the next edge only.
      rst = 1'b1;
      #1;
      check_stages();  // contents unchanged until the edge
      @(posedge clk);
      @(negedge clk);
      checks++;
      if (d !== '0) begin failures++; $display("reset did not clear the register"); end
      rst = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
