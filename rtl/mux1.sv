// mux1: one-bit 2:1 multiplexer, y = sel ? b : a.
//
// The encoder uses three of these: the mode1 mux that picks what the
// FM0/Manchester datapath feeds forward, the clk mux that picks the first or
// second half of each bit cell, and the mode2 mux that picks the output
// branch. Purely combinational, no clock.
// The block name is the one the architecture's schematics use; the port
// names a, b, sel, y and the rule that sel = 1 picks b are this design's.
module mux1 (
  input  logic a,    // selected when sel = 0
  input  logic b,    // selected when sel = 1
  input  logic sel,
  output logic y
);

  always_comb y = sel ? b : a;

endmodule
