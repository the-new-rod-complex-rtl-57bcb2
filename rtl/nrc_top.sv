// nrc_top -- the New ROD Complex: one ATCA shelf of five COBs.
//
// The complex reads out the 32 chambers of the ATLAS Cathode Strip Chambers.
// Four FEX COBs carry eight FEX RCEs each, one per chamber: every FEX RCE
// operates its chamber's five ASM-II boards over a control fibre, takes in the
// raw samples of each triggered event over five G-Link lanes and reduces them
// to hit bits (fex_rce). The fifth COB carries eight Formatter RCEs, each
// driving two of the sixteen Read-Out Links to the ROS with S-Link
// (formatter_rce). Every COB has a DTM RCE (dtm_rce) and a base board
// (base_board).
// Software-visible counters of every FEX RCE (busy, lost SCA reads, dropped
// samples) and of every DTM (generated L1As, busy cycles sent to the FTM) are
// brought out as ports.
//
// Trigger plane: the master DTM (normally on the Formatter COB) selects the
// LTP trigger arriving through its FTM, or its own generator, and drives it on
// the backplane; slave COBs select the backplane. Each base board fans the
// selected stream out to the RCEs of its COB. Busy plane: each base board ORs
// the busy of its RCEs under a mask; slave DTMs send that sum to the
// backplane, and the master DTM ORs the backplane lines with its own and sends
// the result to the Busy Module through its FTM.
//
// Not part of this design and brought out as ports: the Ethernet network that
// carries FEX results to the Formatter RCEs, the cluster-finding and
// formatting software, and the software configuration (cfg inputs and
// strobes). The backplane is modelled as one trigger bus driven by the COBs
// whose DTM is master and one busy line per COB.
//
// Slave COBs see the trigger one bunch crossing after the master COB.
// Timing: all logic runs on the fabric clock clk; bc_tick marks the 40 MHz
// bunch-crossing (and G-Link word) rate, one clock in CLK_PER_BC. Trigger
// inputs ttc_ftm are sampled on bc_tick.
module nrc_top
  import nrc_pkg::*;
#(
  parameter int unsigned N_FEX_COB    = 4,
  parameter int unsigned FEX_PER_COB  = 8,
  parameter int unsigned N_FMT_RCE    = 8,
  parameter int unsigned ROL_PER_FMT  = 2,
  parameter int unsigned CLK_PER_BC   = 11,   // fabric clock / 40 MHz
  parameter int unsigned N_SLOT       = 4,
  parameter int unsigned LOCK_TIMEOUT = 1024,
  localparam int unsigned N_COB = N_FEX_COB + 1,
  localparam int unsigned N_FEX = N_FEX_COB * FEX_PER_COB,
  localparam int unsigned N_ROL = N_FMT_RCE * ROL_PER_FMT
) (
  input  logic                                         clk,
  input  logic                                         rst,
  output logic                                         bc_tick,
  // FTMs and DTM software
  input  ttc_t     [N_COB-1:0]                         ttc_ftm,
  output logic     [N_COB-1:0]                         busy_ftm,
  input  dtm_cfg_t [N_COB-1:0]                         dtm_cfg,
  input  logic     [N_COB-1:0]                         sw_l1a,
  input  logic     [N_COB-1:0][7:0]                    sw_ttype,
  input  logic     [N_COB-1:0]                         sw_ecr,
  // FEX RCE software
  input  fex_cfg_t                                     fex_cfg,
  input  logic     [N_FEX-1:0]                         tbl_we,
  input  logic     [2:0]                               tbl_layer,
  input  logic     [7:0]                               tbl_ch,
  input  logic     [SAMPLE_W-1:0]                      tbl_ped,
  input  logic     [SAMPLE_W-1:0]                      tbl_thr,
  input  logic                                         tbl_bad,
  input  logic     [N_FEX-1:0]                         sw_busy_set,
  input  logic     [N_FEX-1:0]                         sw_busy_clr,
  // chambers
  output ctrl_word_t [N_FEX-1:0]                       ctrl_word,
  output logic     [N_FEX-1:0]                         ctrl_valid,
  input  logic     [N_FEX-1:0][N_LAYERS-1:0][LANE_W-1:0] lane_data,
  input  logic     [N_FEX-1:0][N_LAYERS-1:0]           lane_dav,
  input  logic     [N_FEX-1:0][N_LAYERS-1:0]           lane_lock,
  input  logic     [N_FEX-1:0][N_LAYERS-1:0]           relink,
  output logic     [N_FEX-1:0][N_LAYERS-1:0]           link_en,
  // feature-extracted data towards the cluster-finding software
  output logic     [N_FEX-1:0]                         res_valid,
  output logic     [N_FEX-1:0][15:0]                   res_seq,
  output logic     [N_FEX-1:0][7:0]                    res_ch,
  output logic     [N_FEX-1:0][N_LAYERS-1:0][MAX_SLICES-1:0] res_hits,
  output logic     [N_FEX-1:0]                         res_last,
  output logic     [N_FEX-1:0]                         res_err,
  input  logic     [N_FEX-1:0]                         fex_tis_pop,
  output tis_t     [N_FEX-1:0]                         fex_tis,
  output logic     [N_FEX-1:0]                         fex_tis_valid,
  output logic     [N_FEX-1:0]                         fex_busy,
  output logic     [N_FEX-1:0]                         sca_overrun,
  output logic     [N_FEX-1:0]                         input_overflow,
  output logic     [N_FEX-1:0][N_LAYERS-1:0]           lock_timeout,
  output logic     [N_FEX-1:0][31:0]                   fex_busy_cycles,
  output logic     [N_FEX-1:0][31:0]                   fex_busy_count,
  output logic     [N_FEX-1:0][15:0]                   fex_lost_reads,
  output logic     [N_FEX-1:0][15:0]                   fex_dropped,
  output logic     [N_COB-1:0][31:0]                   dtm_l1a_generated,
  output logic     [N_COB-1:0][31:0]                   dtm_ftm_busy_cycles,
  // Formatter RCEs
  input  logic     [N_FMT_RCE-1:0]                     fmt_tis_pop,
  output tis_t     [N_FMT_RCE-1:0]                     fmt_tis,
  output logic     [N_FMT_RCE-1:0]                     fmt_tis_valid,
  input  logic     [N_ROL-1:0]                         post_valid,
  input  logic     [N_ROL-1:0][31:0]                   post_data,
  input  logic     [N_ROL-1:0]                         post_last,
  output logic     [N_ROL-1:0]                         post_ready,
  // Read-Out Links
  output logic     [N_ROL-1:0]                         rol_valid,
  output logic     [N_ROL-1:0][31:0]                   rol_data,
  output logic     [N_ROL-1:0]                         rol_ctrl,
  input  logic     [N_ROL-1:0]                         rol_full,
  input  logic     [N_ROL-1:0]                         rol_down,
  output logic     [N_ROL-1:0][31:0]                   rol_frags
);
  localparam int unsigned N_RCE = 9;   // RCEs per COB seen by the base board

  // ------------------------------------------------------ bunch-crossing tick
  logic [$clog2(CLK_PER_BC+1)-1:0] tick_cnt;
  always_ff @(posedge clk) begin
    if (rst) begin
      tick_cnt <= '0;
      bc_tick  <= 1'b0;
    end else begin
      bc_tick  <= (tick_cnt == '0);
      tick_cnt <= (tick_cnt == ($clog2(CLK_PER_BC+1))'(CLK_PER_BC - 1)) ? '0 : tick_cnt + 1'b1;
    end
  end

  // ------------------------------------------------------ DTMs and base boards
  ttc_t     [N_COB-1:0]             ttc_sel, ttc_local;
  ttc_t     [N_COB-1:0][N_RCE-1:0]  ttc_fan;
  ttc_src_e [N_COB-1:0]             src_sel;
  logic     [N_COB-1:0]             bp_drive, busy_cob, bp_busy;
  logic     [N_COB-1:0][8:0]        busy_mask;
  logic     [N_COB-1:0][N_RCE-1:0]  rce_busy;
  ttc_t                             bp_ttc;

  // backplane trigger bus: driven by the master COB, re-timed by one bunch
  // crossing (the backplane driver registers the stream)
  always_ff @(posedge clk) begin
    if (rst) begin
      bp_ttc <= '0;
    end else if (bc_tick) begin
      bp_ttc <= '0;
      for (int c = 0; c < N_COB; c++)
        if (bp_drive[c]) bp_ttc <= ttc_sel[c];
    end
  end

  for (genvar c = 0; c < N_COB; c++) begin : g_cob
    dtm_rce #(.N_BP(N_COB)) u_dtm (
      .clk, .rst, .bc_tick,
      .cfg(dtm_cfg[c]), .sw_l1a(sw_l1a[c]), .sw_ttype(sw_ttype[c]), .sw_ecr(sw_ecr[c]),
      .src_sel(src_sel[c]), .ttc_local(ttc_local[c]), .bp_drive(bp_drive[c]),
      .busy_mask(busy_mask[c]), .busy_cob(busy_cob[c]),
      .busy_bp_in(bp_busy), .busy_ftm(busy_ftm[c]), .busy_bp_out(bp_busy[c]),
      .l1a_generated(dtm_l1a_generated[c]), .ftm_busy_cycles(dtm_ftm_busy_cycles[c])
    );

    base_board #(.N_RCE(N_RCE)) u_base (
      .src_sel(src_sel[c]),
      .ttc_ftm(ttc_ftm[c]), .ttc_bp(bp_ttc), .ttc_local(ttc_local[c]),
      .ttc_sel(ttc_sel[c]), .ttc_out(ttc_fan[c]),
      .busy_in(rce_busy[c]), .busy_mask(busy_mask[c]), .busy_sum(busy_cob[c])
    );
  end

  // ------------------------------------------------------ FEX COBs
  for (genvar c = 0; c < N_FEX_COB; c++) begin : g_fex_cob
    for (genvar r = 0; r < FEX_PER_COB; r++) begin : g_rce
      localparam int unsigned I = c * FEX_PER_COB + r;
      fex_rce #(.N_SLOT(N_SLOT), .LOCK_TIMEOUT(LOCK_TIMEOUT)) u_fex (
        .clk, .rst, .bc_tick,
        .ttc(ttc_fan[c][r]), .cfg(fex_cfg),
        .tbl_we(tbl_we[I]), .tbl_layer, .tbl_ch, .tbl_ped, .tbl_thr, .tbl_bad,
        .sw_busy_set(sw_busy_set[I]), .sw_busy_clr(sw_busy_clr[I]),
        .ctrl_word(ctrl_word[I]), .ctrl_valid(ctrl_valid[I]),
        .lane_data(lane_data[I]), .lane_dav(lane_dav[I]), .lane_lock(lane_lock[I]),
        .relink(relink[I]), .link_en(link_en[I]),
        .res_valid(res_valid[I]), .res_seq(res_seq[I]), .res_ch(res_ch[I]),
        .res_hits(res_hits[I]), .res_last(res_last[I]), .res_err(res_err[I]),
        .tis_pop(fex_tis_pop[I]), .tis(fex_tis[I]), .tis_valid(fex_tis_valid[I]),
        .busy(fex_busy[I]), .sca_overrun(sca_overrun[I]),
        .input_overflow(input_overflow[I]), .lock_timeout(lock_timeout[I]),
        .busy_cycles(fex_busy_cycles[I]), .busy_count(fex_busy_count[I]),
        .lost_reads(fex_lost_reads[I]), .dropped(fex_dropped[I])
      );
      assign rce_busy[c][r] = fex_busy[I];
    end
    for (genvar r = FEX_PER_COB; r < N_RCE; r++) begin : g_idle
      assign rce_busy[c][r] = 1'b0;    // DTM and unused positions
    end
  end

  // ------------------------------------------------------ Formatter COB
  for (genvar f = 0; f < N_FMT_RCE; f++) begin : g_fmt
    logic tis_af;
    formatter_rce #(.N_ROL(ROL_PER_FMT)) u_fmt (
      .clk, .rst, .bc_tick,
      .ttc(ttc_fan[N_FEX_COB][f]),
      .tis_pop(fmt_tis_pop[f]), .tis(fmt_tis[f]), .tis_valid(fmt_tis_valid[f]),
      .tis_almost_full(tis_af),
      .post_valid(post_valid[f*ROL_PER_FMT +: ROL_PER_FMT]),
      .post_data(post_data[f*ROL_PER_FMT +: ROL_PER_FMT]),
      .post_last(post_last[f*ROL_PER_FMT +: ROL_PER_FMT]),
      .post_ready(post_ready[f*ROL_PER_FMT +: ROL_PER_FMT]),
      .link_valid(rol_valid[f*ROL_PER_FMT +: ROL_PER_FMT]),
      .link_data(rol_data[f*ROL_PER_FMT +: ROL_PER_FMT]),
      .link_ctrl(rol_ctrl[f*ROL_PER_FMT +: ROL_PER_FMT]),
      .link_full(rol_full[f*ROL_PER_FMT +: ROL_PER_FMT]),
      .link_down(rol_down[f*ROL_PER_FMT +: ROL_PER_FMT]),
      .frags_sent(rol_frags[f*ROL_PER_FMT +: ROL_PER_FMT])
    );
  end
  // The Formatter RCEs have no busy source; the rest of the fan-in is idle.
  assign rce_busy[N_FEX_COB] = '0;

  initial begin
    assert (N_FMT_RCE <= N_RCE - 1 && FEX_PER_COB <= N_RCE - 1)
      else $error("nrc_top: more RCEs than a COB holds");
    assert (CLK_PER_BC >= 3) else $error("nrc_top: the lanes need three clocks per word");
  end
  assert property (@(posedge clk) disable iff (rst) $onehot0(bp_drive))
    else $error("nrc_top: more than one COB drives the backplane trigger");
endmodule
