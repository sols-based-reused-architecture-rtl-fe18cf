// t_ff: T (toggle) flip-flop with an active-low asynchronous clear; driven by
// the data bit, it is the Miller branch of the encoder.
//
// On every falling edge of clk, q inverts if t is 1 and holds if t is 0.
// With one data bit per clock period and each bit cell starting at the
// rising edge, the falling edge is the middle of the bit, so a 1 produces a
// mid-bit transition and a 0 none. While clr is 0, q is forced to 0.
// Inputs x_in (as t), clk and clr come from the architecture; the falling
// edge and the active-low asynchronous clear are this design's choices.
module t_ff (
  input  logic clk,
  input  logic clr,  // active low
  input  logic t,
  output logic q
);

  always_ff @(negedge clk or negedge clr)
    if (!clr)  q <= 1'b0;
    else if (t) q <= ~q;

endmodule
