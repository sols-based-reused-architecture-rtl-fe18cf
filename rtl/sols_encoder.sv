// sols_encoder: combined FM0 / Manchester / Miller line encoder for DSRC
// baseband transmitters. One data bit per clock period enters on x_in;
// enc_out carries the coded waveform, two half-cells per bit (first half
// while clk is high, second half while clk is low).
//
// Two branches share the input. The FM0/Manchester branch is the reused
// single-flip-flop datapath of sols_fm0_manchester; the Miller branch is a
// toggle flip-flop fed with x_in, which makes a mid-bit transition for every
// 1. The mode2 mux picks the branch. Control settings (see sols_pkg):
//   FM0:        mode1 = 0, clr = 1, mode2 = 1
//   Manchester: mode1 = 1, clr = 0, mode2 = 1
//   Miller:     mode1 = 0, clr = 1, mode2 = 0
// clr is an active-low clear of both flip-flops; pulse it low once to give
// FM0 and Miller a known starting level (both start from 0).
// Clock gating: each flip-flop is clocked through a clock_gate enabled only
// while its branch is selected (mode2 = 1 for d_ffb, mode2 = 0 for t_ff), so
// the idle branch keeps its state and sees no clock edges.
// Timing: change x_in and the mode bits just after a rising edge of clk; a
// new mode is in force for the bit cell that starts at that edge.
// The branches, the gates and the mode table follow the architecture. The
// Miller branch is exactly the toggle flip-flop the architecture draws: it
// does not add the bit-boundary transition that the textbook Miller code
// puts between two consecutive 0s. Edge choices, the clear polarity and the
// gating enables are this design's own.
module sols_encoder (
  input  logic x_in,
  input  logic clk,
  input  logic mode1,
  input  logic clr,      // active low
  input  logic mode2,    // 1: FM0/Manchester, 0: Miller
  output logic enc_out   // fm0 / miller / manchester output
);

  logic gclk_d, gclk_t;
  logic fm_y, miller_q;

  clock_gate #(.FALLING(1'b0)) u_cg_d (.clk(clk), .en(mode2),  .gclk(gclk_d));
  clock_gate #(.FALLING(1'b1)) u_cg_t (.clk(clk), .en(!mode2), .gclk(gclk_t));

  sols_fm0_manchester u_fm (
    .x_in(x_in), .clk(clk), .gclk(gclk_d), .mode1(mode1), .clr(clr),
    .y(fm_y), .q()
  );

  t_ff u_tff (.clk(gclk_t), .clr(clr), .t(x_in), .q(miller_q));

  mux1 u_mode2 (.a(miller_q), .b(fm_y), .sel(mode2), .y(enc_out));

endmodule
