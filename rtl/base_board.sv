// base_board -- trigger fan-out and busy fan-in of the ATLAS base board on a COB.
//
// The base board carries no programmable logic of its own: a 3-to-1 multiplexer
// picks the trigger stream from the front transition module (FTM), the backplane
// or the local generator in the DTM RCE, and a fan-out buffer copies it to every
// RCE of the COB. In the other direction the busy lines of the RCEs are masked
// and ORed into one busy for the board. Both the multiplexer select and the
// busy mask are set by the DTM RCE. These two functions follow the description;
// the fan-out here is per RCE (N_RCE elements, the DTM included) and the mask
// bit is 1 for "ignore this RCE", which are this design's choices.
// The path is purely combinational, as on the passive board.
module base_board
  import nrc_pkg::*;
#(
  parameter int unsigned N_RCE = 9          // RCEs on a COB: 4 DPM bays x 2 + DTM
) (
  input  ttc_src_e              src_sel,    // from the DTM RCE
  input  ttc_t                  ttc_ftm,
  input  ttc_t                  ttc_bp,
  input  ttc_t                  ttc_local,
  output ttc_t                  ttc_sel,    // the selected stream (drives the backplane when master)
  output ttc_t [N_RCE-1:0]      ttc_out,    // fanned-out copies, one per RCE
  input  logic [N_RCE-1:0]      busy_in,    // busy from each RCE
  input  logic [N_RCE-1:0]      busy_mask,  // 1 = ignore that RCE's busy
  output logic                  busy_sum
);
  always_comb begin
    unique case (src_sel)
      SRC_FTM:       ttc_sel = ttc_ftm;
      SRC_BACKPLANE: ttc_sel = ttc_bp;
      SRC_LOCAL:     ttc_sel = ttc_local;
      default:       ttc_sel = '0;
    endcase
  end

  assign ttc_out  = {N_RCE{ttc_sel}};
  assign busy_sum = |(busy_in & ~busy_mask);
endmodule
