// d_ffb: D flip-flop with an active-low asynchronous clear; it holds the one
// state bit of the FM0/Manchester datapath.
//
// q takes d on every rising edge of clk. While clr is 0, q is forced to 0
// at once and held there, which is how Manchester mode pins the feedback to
// a constant. clk is the gated encoder clock (see clock_gate).
// Rising-edge capture and the asynchronous, active-low clear are this
// design's choices: the architecture names the flip-flop and its clr pin
// and sets clr = 0 for Manchester and clr = 1 for FM0, which is what makes
// clear active-low.
module d_ffb (
  input  logic clk,
  input  logic clr,  // active low
  input  logic d,
  output logic q
);

  always_ff @(posedge clk or negedge clr)
    if (!clr) q <= 1'b0;
    else      q <= d;

endmodule
