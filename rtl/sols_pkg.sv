// sols_pkg: shared types and the mode table of the combined FM0 / Manchester /
// Miller encoder.
//
// The encoder is steered by three plain control bits: mode1 (selects what the
// FM0/Manchester datapath feeds back), clr (active-low clear of both state
// flip-flops) and mode2 (selects the FM0/Manchester branch or the Miller
// branch at the output). ctrl_for() returns the settings for each code.
// The mode1 and clr values for every code, and mode2 = 1 for FM0/Manchester
// and mode2 = 0 for Miller, follow the published mode table of this
// architecture; the enum and struct are this design's own packaging.
package sols_pkg;

  typedef enum logic [1:0] {
    CODE_FM0        = 2'd0,
    CODE_MANCHESTER = 2'd1,
    CODE_MILLER     = 2'd2
  } code_e;

  typedef struct packed {
    logic mode1;  // 1: feed x_in to the first mux, 0: feed the stored state
    logic clr;    // 0: clear both flip-flops, 1: let them run
    logic mode2;  // 1: FM0/Manchester branch at the output, 0: Miller branch
  } sols_ctrl_t;

  function automatic sols_ctrl_t ctrl_for(code_e code);
    unique case (code)
      CODE_FM0:        return '{mode1: 1'b0, clr: 1'b1, mode2: 1'b1};
      CODE_MANCHESTER: return '{mode1: 1'b1, clr: 1'b0, mode2: 1'b1};
      default:         return '{mode1: 1'b0, clr: 1'b1, mode2: 1'b0};
    endcase
  endfunction

endpackage
