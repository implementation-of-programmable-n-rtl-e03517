// prsg_shift_reg -- the chain of D flip-flops d0..d(WIDTH-1) of the generator.
//
// On every rising clock edge d0 takes the serial input din and every other
// stage takes the value of the stage before it (linear shifting, as in the
// published design). WIDTH defaults to the published 16 flip-flops.
//
// Reset is synchronous and active high and clears every stage, so the
// register starts from the all-zero state, the first state of each published
// sequence; the reset polarity and its synchronous timing are this design's
// choice. Output d is the register contents, d[i] = stage d(i), valid one
// clock edge after din is sampled into d0.
module prsg_shift_reg #(
  parameter int unsigned WIDTH = 16  // number of flip-flops
) (
  input  logic             clk,
  input  logic             rst,  // synchronous, active high: clear all stages
  input  logic             din,  // serial input into d0
  output logic [WIDTH-1:0] d     // stage contents, d[0] = d0
);

  if (WIDTH < 2) begin : g_width_check
    $error("prsg_shift_reg: WIDTH must be at least 2");
  end

  always_ff @(posedge clk) begin
    if (rst) d <= '0;
    else     d <= {d[WIDTH-2:0], din};
  end

endmodule
