// fex_rce -- firmware of a FEX RCE: one CSC chamber from trigger to hit bits.
//
// A trigger on the COB's trigger stream is turned by the TTC receiver into a
// Trigger Information Structure (for software) and a trigger pulse to the SCA
// controller. The SCA controller sends the read commands for the triggered
// time slices to the chamber's five ASM-IIs over the control fibre; their
// digitised samples come back on five G-Link lanes into the Input plug-in,
// which stores each complete event in a buffer slot. Each completed slot is
// handed to the FEX plug-in, whose hit bits leave the RCE as a stream for the
// cluster-finding software, and the slot is then returned. The busy source
// ORs the almost-full flags of the Input buffer and the TIS FIFO with the
// software busy bit.
// Statistics for software leave as ports: busy cycles and assertions from the
// busy source, SCA reads of overwritten cells, and samples dropped because the
// slot buffer was full.
// In the RCE the hand-over from the Input plug-in to the FEX plug-in goes
// through the processor, which receives the completion interrupt and passes
// the pointer on; here that step is done directly in firmware (next completed
// slot to the FEX plug-in as soon as it is idle, slot returned when it is
// done), which is this design's simplification.
module fex_rce
  import nrc_pkg::*;
#(
  parameter int unsigned N_SLOT       = 4,
  parameter int unsigned AF_SLOTS     = 3,
  parameter int unsigned LOCK_TIMEOUT = 1024,
  localparam int unsigned SLOT_W      = $clog2(N_SLOT)
) (
  input  logic                                   clk,
  input  logic                                   rst,
  input  logic                                   bc_tick,
  input  ttc_t                                   ttc,
  input  fex_cfg_t                               cfg,
  // pedestal / threshold / bad-channel table
  input  logic                                   tbl_we,
  input  logic [2:0]                             tbl_layer,
  input  logic [7:0]                             tbl_ch,
  input  logic [SAMPLE_W-1:0]                    tbl_ped,
  input  logic [SAMPLE_W-1:0]                    tbl_thr,
  input  logic                                   tbl_bad,
  // software busy control
  input  logic                                   sw_busy_set,
  input  logic                                   sw_busy_clr,
  // chamber links
  output ctrl_word_t                             ctrl_word,
  output logic                                   ctrl_valid,
  input  logic [N_LAYERS-1:0][LANE_W-1:0]        lane_data,
  input  logic [N_LAYERS-1:0]                    lane_dav,
  input  logic [N_LAYERS-1:0]                    lane_lock,
  input  logic [N_LAYERS-1:0]                    relink,
  output logic [N_LAYERS-1:0]                    link_en,
  // feature-extracted output
  output logic                                   res_valid,
  output logic [15:0]                            res_seq,
  output logic [7:0]                             res_ch,
  output logic [N_LAYERS-1:0][MAX_SLICES-1:0]    res_hits,
  output logic                                   res_last,
  output logic                                   res_err,
  // trigger information
  input  logic                                   tis_pop,
  output tis_t                                   tis,
  output logic                                   tis_valid,
  // back-pressure and status
  output logic                                   busy,
  output logic                                   sca_overrun,
  output logic                                   input_overflow,
  output logic [N_LAYERS-1:0]                    lock_timeout,
  // statistics for software
  output logic [31:0]                            busy_cycles,   // clocks with busy high
  output logic [31:0]                            busy_count,    // busy assertions
  output logic [15:0]                            lost_reads,    // SCA reads of overwritten cells
  output logic [15:0]                            dropped        // samples dropped, slot buffer full
);
  logic        trig;
  logic [23:0] trig_l1id;
  logic        tis_af, tis_ovf;
  logic [4:0]  tis_count;

  ttc_rx_ppi u_ttc_rx (
    .clk, .rst, .bc_tick, .ttc,
    .trig, .trig_l1id,
    .tis_pop, .tis, .tis_valid,
    .almost_full(tis_af), .overflow(tis_ovf), .tis_count
  );

  logic        rd_issue, trig_ovf;
  logic [23:0] rd_l1id;
  logic [3:0]  rd_slice;
  logic [7:0]  rd_cell;
  logic [5:0]  pending;

  sca_controller u_sca (
    .clk, .rst, .bc_tick,
    .cfg_wclk40(cfg.wclk40), .cfg_adc_div(cfg.adc_div), .cfg_latency(cfg.latency),
    .cfg_nslices({1'b0, cfg.nslices}), .cfg_bad_cell(cfg.bad_cell),
    .trig, .trig_l1id,
    .ctrl_word, .ctrl_valid,
    .rd_issue, .rd_l1id, .rd_slice, .rd_cell,
    .overrun(sca_overrun), .trig_overflow(trig_ovf), .lost_reads, .pending
  );

  logic                                       evt_valid, evt_err, evt_pop;
  logic [SLOT_W-1:0]                          evt_slot;
  logic [15:0]                                evt_seq;
  logic                                       in_af;
  logic [N_LAYERS-1:0]                        deconv_ovf;
  logic                                       rd_en;
  logic [SLOT_W-1:0]                          rd_slot;
  logic [7:0]                                 rd_ch;
  logic [N_LAYERS-1:0][MAX_SLICES-1:0][WORD_W-1:0] rd_data;
  logic                                       fex_busy, fex_done;
  logic [SLOT_W-1:0]                          done_slot;

  input_ppi #(.N_SLOT(N_SLOT), .AF_SLOTS(AF_SLOTS), .LOCK_TIMEOUT(LOCK_TIMEOUT)) u_input (
    .clk, .rst, .cfg_nslices(cfg.nslices),
    .lane_data, .lane_dav, .lane_lock, .relink, .link_en, .lock_timeout,
    .deconv_overflow(deconv_ovf),
    .evt_valid, .evt_slot, .evt_seq, .evt_err, .evt_pop,
    .rd_en, .rd_slot, .rd_ch, .rd_data,
    .rel_valid(fex_done), .rel_slot(done_slot),
    .almost_full(in_af), .overflow(input_overflow), .dropped
  );

  // hand-over of completed slots to the FEX plug-in
  assign evt_pop = evt_valid && !fex_busy && !fex_done;

  fex_ppi #(.SLOT_W(SLOT_W), .TAG_W(17)) u_fex (
    .clk, .rst,
    .cfg_nslices(cfg.nslices), .cfg_pass_through(cfg.pass_through),
    .tbl_we, .tbl_layer, .tbl_ch, .tbl_ped, .tbl_thr, .tbl_bad,
    .start(evt_pop), .start_slot(evt_slot), .start_tag({evt_err, evt_seq}), .busy(fex_busy),
    .rd_en, .rd_slot, .rd_ch, .rd_data,
    .res_valid, .res_ch, .res_hits, .res_last, .res_tag({res_err, res_seq}),
    .done(fex_done), .done_slot
  );

  logic [1:0][31:0] src_cycles;
  logic             sw_busy;

  busy_source_ppi #(.N_SRC(2)) u_busy_src (
    .clk, .rst,
    .almost_full({tis_af, in_af}),
    .sw_set(sw_busy_set), .sw_clr(sw_busy_clr),
    .busy, .sw_busy,
    .src_busy_cycles(src_cycles), .busy_cycles, .busy_count
  );
endmodule
