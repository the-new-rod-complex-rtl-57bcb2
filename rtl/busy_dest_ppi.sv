// busy_dest_ppi -- gathers the back-pressure of a COB and routes it (DTM RCE).
//
// The busy sum of the COB's own RCEs (from the base board fan-in) is combined,
// under configuration, with the busy lines arriving over the backplane from the
// other COBs. The result can optionally be sent to the front transition module
// (FTM), towards the LTP and Busy Module, and optionally to the backplane, so
// that one master DTM collects the busy of the whole shelf while the slave DTMs
// only forward theirs. This routing follows the description; the per-line
// backplane enable mask, the registered outputs (one clock of latency) and the
// busy-time counter on the FTM output are this design's choices.
module busy_dest_ppi #(
  parameter int unsigned N_BP  = 5,         // backplane busy lines (one per COB slot)
  parameter int unsigned CNT_W = 32
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              busy_cob,       // masked OR of this COB's RCEs
  input  logic [N_BP-1:0]   busy_bp_in,     // busy lines from the backplane
  input  logic [N_BP-1:0]   bp_enable,      // 1 = include that backplane line
  input  logic              to_ftm_en,      // drive the sum to the FTM
  input  logic              to_bp_en,       // drive the sum to the backplane
  output logic              busy_ftm,
  output logic              busy_bp_out,
  output logic [CNT_W-1:0]  ftm_busy_cycles
);
  logic sum;
  assign sum = busy_cob | (|(busy_bp_in & bp_enable));

  always_ff @(posedge clk) begin
    if (rst) begin
      busy_ftm        <= 1'b0;
      busy_bp_out     <= 1'b0;
      ftm_busy_cycles <= '0;
    end else begin
      busy_ftm    <= to_ftm_en & sum;
      busy_bp_out <= to_bp_en & sum;
      if (busy_ftm && ftm_busy_cycles != '1) ftm_busy_cycles <= ftm_busy_cycles + 1'b1;
    end
  end
endmodule
