// dtm_rce -- firmware of the RCE in the DTM bay of a COB.
//
// Holds the two plug-ins that make a COB part of the shelf-wide trigger and
// busy planes: ttc_tx_ppi, which chooses the COB's trigger source (FTM,
// backplane or its own generator) and says whether this COB drives the
// backplane, and busy_dest_ppi, which routes the COB's busy sum and the
// backplane busy lines to the FTM and to the backplane. It also hands the busy
// mask of the base board fan-in out of its configuration, registered. The
// configuration register (dtm_cfg_t) stands in for the DTM software, which is
// not part of this design. In the shelf one DTM is master (it receives the LTP
// trigger and sends the shelf busy to the Busy Module), the others are slaves.
module dtm_rce
  import nrc_pkg::*;
#(
  parameter int unsigned N_BP = 5
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              bc_tick,
  input  dtm_cfg_t          cfg,
  input  logic              sw_l1a,
  input  logic [7:0]        sw_ttype,
  input  logic              sw_ecr,
  // to / from the base board
  output ttc_src_e          src_sel,
  output ttc_t              ttc_local,
  output logic              bp_drive,
  output logic [8:0]        busy_mask,
  input  logic              busy_cob,
  // busy routing
  input  logic [N_BP-1:0]   busy_bp_in,
  output logic              busy_ftm,
  output logic              busy_bp_out,
  // statistics
  output logic [31:0]       l1a_generated,
  output logic [31:0]       ftm_busy_cycles
);
  always_ff @(posedge clk) begin
    if (rst) busy_mask <= '0;
    else     busy_mask <= cfg.busy_mask;
  end

  ttc_tx_ppi u_ttc_tx (
    .clk, .rst, .bc_tick,
    .master(cfg.master), .src_cfg(cfg.src),
    .sw_l1a, .sw_ttype, .sw_ecr,
    .gen_enable(cfg.gen_enable), .gen_period(cfg.gen_period), .gen_count(cfg.gen_count),
    .src_sel, .bp_drive, .ttc_local, .l1a_generated
  );

  busy_dest_ppi #(.N_BP(N_BP)) u_busy_dst (
    .clk, .rst,
    .busy_cob, .busy_bp_in,
    .bp_enable(cfg.bp_enable[N_BP-1:0]),
    .to_ftm_en(cfg.to_ftm_en), .to_bp_en(cfg.to_bp_en),
    .busy_ftm, .busy_bp_out, .ftm_busy_cycles
  );
endmodule
