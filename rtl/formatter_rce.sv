// formatter_rce -- firmware of a Formatter RCE.
//
// A Formatter RCE receives the feature-extracted data of its chambers over
// Ethernet, formats the CSC fragments in software and sends them on its
// Read-Out Links. Its firmware part is a TTC receiver plug-in, whose Trigger
// Information Structures software uses for the event header, and N_ROL S-Link
// plug-ins (two per RCE: 16 ROLs on 8 Formatter RCEs). The Ethernet plug-in and
// the formatting software are not part of this design; their side of the
// plug-ins is brought out as ports. The S-Link plug-ins send one word per
// bunch-crossing tick (40 MHz, 160 MB/s).
module formatter_rce
  import nrc_pkg::*;
#(
  parameter int unsigned N_ROL      = 2,
  parameter int unsigned FIFO_DEPTH = 512
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    bc_tick,
  input  ttc_t                    ttc,
  // trigger information for the event header
  input  logic                    tis_pop,
  output tis_t                    tis,
  output logic                    tis_valid,
  output logic                    tis_almost_full,
  // fragments posted by software, per ROL
  input  logic [N_ROL-1:0]        post_valid,
  input  logic [N_ROL-1:0][31:0]  post_data,
  input  logic [N_ROL-1:0]        post_last,
  output logic [N_ROL-1:0]        post_ready,
  // Read-Out Links
  output logic [N_ROL-1:0]        link_valid,
  output logic [N_ROL-1:0][31:0]  link_data,
  output logic [N_ROL-1:0]        link_ctrl,
  input  logic [N_ROL-1:0]        link_full,
  input  logic [N_ROL-1:0]        link_down,
  output logic [N_ROL-1:0][31:0]  frags_sent
);
  logic        trig, tis_ovf;
  logic [23:0] trig_l1id;
  logic [4:0]  tis_count;

  ttc_rx_ppi u_ttc_rx (
    .clk, .rst, .bc_tick, .ttc,
    .trig, .trig_l1id,
    .tis_pop, .tis, .tis_valid,
    .almost_full(tis_almost_full), .overflow(tis_ovf), .tis_count
  );

  for (genvar r = 0; r < N_ROL; r++) begin : g_rol
    logic [$clog2(FIFO_DEPTH):0] space;
    logic [31:0] words, xoff;
    slink_ppi #(.FIFO_DEPTH(FIFO_DEPTH)) u_slink (
      .clk, .rst, .link_tick(bc_tick),
      .post_valid(post_valid[r]), .post_data(post_data[r]), .post_last(post_last[r]),
      .post_ready(post_ready[r]), .post_space(space),
      .link_valid(link_valid[r]), .link_data(link_data[r]), .link_ctrl(link_ctrl[r]),
      .link_full(link_full[r]), .link_down(link_down[r]),
      .words_sent(words), .frags_sent(frags_sent[r]), .xoff_ticks(xoff)
    );
  end
endmodule
