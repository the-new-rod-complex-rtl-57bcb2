// ttc_tx_ppi -- trigger source control and local trigger generator (DTM RCE).
//
// Software chooses where the COB's trigger stream comes from: the FTM (the LTP),
// the backplane, or this plug-in's own generator. The choice is output as the
// select of the base board multiplexer. A master plug-in (one per shelf) takes
// the central trigger from the FTM and also drives the backplane; slaves select
// the backplane. The generator produces, on bunch-crossing ticks (bc_tick):
// a bunch counter reset every BC_PER_ORBIT ticks, an L1A on each software
// strobe, a programmable run of periodic L1As (gen_count triggers, gen_period
// ticks apart, gen_count = 0 runs until disabled) and an ECR on software strobe.
// Source selection, master/slave operation and software-made triggers follow the
// description; the periodic pattern generator and its register set are this
// design's own way of making "arbitrary trigger patterns". Outputs are registered.
module ttc_tx_ppi
  import nrc_pkg::*;
#(
  parameter int unsigned PERIOD_W = 16,
  parameter int unsigned CNT_W    = 32
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                bc_tick,      // one per 25 ns bunch crossing
  input  logic                master,       // drive the backplane
  input  ttc_src_e            src_cfg,      // requested source
  input  logic                sw_l1a,       // one L1A on the next tick
  input  logic [7:0]          sw_ttype,
  input  logic                sw_ecr,       // one ECR on the next tick
  input  logic                gen_enable,
  input  logic [PERIOD_W-1:0] gen_period,   // ticks between generated L1As (>= 1)
  input  logic [CNT_W-1:0]    gen_count,    // generated L1As to make, 0 = unlimited
  output ttc_src_e            src_sel,      // to the base board multiplexer
  output logic                bp_drive,     // this COB drives the backplane
  output ttc_t                ttc_local,    // generated stream, valid on bc_tick
  output logic [CNT_W-1:0]    l1a_generated
);
  logic [11:0]         bc_cnt;
  logic [PERIOD_W-1:0] per_cnt;
  logic                l1a_req, ecr_req;
  logic [7:0]          ttype_req;
  logic                gen_fire;
  logic                gen_more;

  assign gen_more = (gen_count == '0) || (l1a_generated < gen_count);
  assign gen_fire = gen_enable && gen_more && (per_cnt == '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      src_sel       <= SRC_FTM;
      bp_drive      <= 1'b0;
      ttc_local     <= '0;
      bc_cnt        <= '0;
      per_cnt       <= '0;
      l1a_req       <= 1'b0;
      ecr_req       <= 1'b0;
      ttype_req     <= '0;
      l1a_generated <= '0;
    end else begin
      src_sel  <= src_cfg;
      bp_drive <= master;
      if (sw_l1a) begin
        l1a_req   <= 1'b1;
        ttype_req <= sw_ttype;
      end
      if (sw_ecr) ecr_req <= 1'b1;
      if (!gen_enable) per_cnt <= '0;
      if (bc_tick) begin
        bc_cnt <= (bc_cnt == 12'(BC_PER_ORBIT - 1)) ? '0 : bc_cnt + 1'b1;
        ttc_local.bcr   <= (bc_cnt == 12'(BC_PER_ORBIT - 1));
        ttc_local.ecr   <= ecr_req && !sw_ecr;
        ttc_local.l1a   <= (l1a_req && !sw_l1a) || gen_fire;
        ttc_local.ttype <= (l1a_req && !sw_l1a) ? ttype_req : 8'h01;
        if (ecr_req && !sw_ecr) ecr_req <= 1'b0;
        if (l1a_req && !sw_l1a) l1a_req <= 1'b0;
        if ((l1a_req && !sw_l1a) || gen_fire) l1a_generated <= l1a_generated + 1'b1;
        if (gen_enable) per_cnt <= (per_cnt == '0) ? gen_period - 1'b1 : per_cnt - 1'b1;
      end
    end
  end

  // A master takes its trigger from outside or makes it; it must not listen to
  // the backplane it drives.
  assert property (@(posedge clk) disable iff (rst) !(bp_drive && src_sel == SRC_BACKPLANE))
    else $error("ttc_tx_ppi: master selects the backplane");
endmodule
