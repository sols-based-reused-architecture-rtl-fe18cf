// clock_gate: glitch-free clock gate, so that a flip-flop whose branch is not
// in use receives no clock edges and burns no dynamic power.
//
// The enable is held in a level-sensitive latch that is transparent only
// during the clock phase in which the gated clock cannot change:
//   FALLING = 0 (for rising-edge flip-flops): the latch is open while clk is
//     low and gclk = clk & en_l, so gclk sits low when disabled.
//   FALLING = 1 (for falling-edge flip-flops): the latch is open while clk is
//     high and gclk = clk | ~en_l, so gclk sits high when disabled.
// An enable change therefore takes effect from the next active edge that
// follows the opposite phase; en may change at any time without glitches.
// The latch is intentional: it is the standard integrated-clock-gate cell.
// Gating the unused branch follows the architecture's stated use of clock
// gating; the latch-based cell and its enables are this design's choice.
module clock_gate #(
  parameter bit FALLING = 1'b0  // 0: gate for posedge flops, 1: for negedge flops
) (
  input  logic clk,
  input  logic en,
  output logic gclk
);

  logic en_l;

  always_latch
    if (clk == FALLING) en_l = en;

  assign gclk = FALLING ? (clk | ~en_l) : (clk & en_l);

endmodule
