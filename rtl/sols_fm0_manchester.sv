// sols_fm0_manchester: the fully reused FM0 / Manchester datapath. One data
// bit per clock period enters on x_in; y carries the coded level for the
// current half of the bit cell (first half while clk is high, second half
// while clk is low), so y runs at twice the bit rate with clk as the selector.
//
// Structure (similarity-oriented logic simplification, SOLS): the mode1 mux
// picks the stored state q (FM0) or x_in (Manchester); the clk mux passes it
// in the first half and xnor(q, x_in) in the second; an inverter drives y.
// One flip-flop, d_ffb, keeps the last second-half level B:
//   FM0,        mode1 = 0, clr = 1:  first half ~B,  second half B' = B ^ x_in,
//               so every cell starts with a transition and a 0 adds one mid-bit.
//   Manchester, mode1 = 1, clr = 0:  q is held at 0, first half ~x_in, second
//               half x_in, so a 1 is low-then-high and a 0 high-then-low.
// d_ffb captures on the rising clock edge that ends the cell, i.e. the value
// y had in the second half. It is wired to the inverted xnor output, the
// value the clk mux passes during that half, so that the capture does not
// race with the clk mux turning over on the same edge; logically this is the
// inverter output of the published structure at the moment of capture.
// Timing: x_in must be stable from just after one rising edge of clk to the
// next. gclk is the (gated) clock of d_ffb; tie it to clk if no gating is used.
// The gates and their wiring follow the architecture; the capture edge,
// half-cell order and the race-free tap of the flip-flop input are this
// design's choices.
module sols_fm0_manchester (
  input  logic x_in,
  input  logic clk,    // bit clock, also the half-cell selector
  input  logic gclk,   // clock of d_ffb (gated copy of clk)
  input  logic mode1,
  input  logic clr,    // active low
  output logic y,      // FM0 / Manchester coded output
  output logic q       // stored state B
);

  logic xnor_o;   // xnor(q, x_in)
  logic m_a1;     // mode1 mux output
  logic m_a2;     // clk mux output

  assign xnor_o = ~(q ^ x_in);

  mux1 u_a1 (.a(q),      .b(x_in), .sel(mode1), .y(m_a1));
  mux1 u_a2 (.a(xnor_o), .b(m_a1), .sel(clk),   .y(m_a2));

  assign y = ~m_a2;

  d_ffb u_a3 (.clk(gclk), .clr(clr), .d(~xnor_o), .q(q));

endmodule
