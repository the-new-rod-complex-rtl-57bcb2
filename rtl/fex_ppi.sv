// fex_ppi -- Feature Extraction plug-in: hit bits for one chamber event.
//
// For an event slot of the Input plug-in's buffer, the plug-in walks the 192
// channels, one channel per clock, reading all time slices of all five layers
// at once. For each layer and channel it subtracts the channel's pedestal from
// every sample and compares the result with the channel's threshold. An
// out-of-time cut then looks at the slope between successive time slices: if
// the samples never rise (each is at most the one before), the pulse is already
// decaying and the channel is rejected. A bad-channel mask removes listed
// channels. The result per channel is a bit per time slice and layer, sent out
// as a stream {channel, hits[layer][slice]} with a last flag and the tag given
// at start, so one event gives
// the 4 x 192 x 5 bit array. In pass-through mode (pedestal runs) every sample
// of every channel is selected.
// Timing: start is taken when idle; the first result comes 2 clocks later and
// one follows every clock; done pulses with the slot together with the last one, so an
// event takes 192 + 2 clocks.
// From the description: pedestal comparison, thresholds, the slope-based
// out-of-time cut, the bad-channel mask, the bit array layout and the
// pass-through process; the pedestal table holds one entry per channel and
// layer (a quarter of the data array). The exact cut (strict greater-than
// threshold, "never rises" as the decaying test), the per-channel threshold,
// the table write port and the one-channel-per-clock schedule are this
// design's choices. The table is kept as one memory per layer, each read at
// the current channel, so that synthesis sees five plain 192-entry memories.
module fex_ppi
  import nrc_pkg::*;
#(
  parameter int unsigned SLOT_W = 2,
  parameter int unsigned TAG_W  = 17      // caller's event tag, returned with results
) (
  input  logic                                  clk,
  input  logic                                  rst,
  input  logic [2:0]                            cfg_nslices,
  input  logic                                  cfg_pass_through,
  // pedestal / threshold / bad-channel table
  input  logic                                  tbl_we,
  input  logic [2:0]                            tbl_layer,
  input  logic [7:0]                            tbl_ch,
  input  logic [SAMPLE_W-1:0]                   tbl_ped,
  input  logic [SAMPLE_W-1:0]                   tbl_thr,
  input  logic                                  tbl_bad,
  // event to process
  input  logic                                  start,
  input  logic [SLOT_W-1:0]                     start_slot,
  input  logic [TAG_W-1:0]                      start_tag,
  output logic                                  busy,
  // event buffer read port (one clock latency)
  output logic                                  rd_en,
  output logic [SLOT_W-1:0]                     rd_slot,
  output logic [7:0]                            rd_ch,
  input  logic [N_LAYERS-1:0][MAX_SLICES-1:0][WORD_W-1:0] rd_data,
  // results
  output logic                                  res_valid,
  output logic [7:0]                            res_ch,
  output logic [N_LAYERS-1:0][MAX_SLICES-1:0]   res_hits,
  output logic                                  res_last,
  output logic [TAG_W-1:0]                      res_tag,
  output logic                                  done,
  output logic [SLOT_W-1:0]                     done_slot
);
  typedef struct packed {
    logic [SAMPLE_W-1:0] ped;
    logic [SAMPLE_W-1:0] thr;
    logic                bad;
  } tbl_entry_t;

  tbl_entry_t tbl_q [N_LAYERS];

  logic [7:0] ch;
  logic [TAG_W-1:0] cur_tag;
  logic       s1_valid, s1_last;
  logic [7:0] s1_ch;

  // table: one memory per layer, written by configuration, read in step with
  // the buffer
  for (genvar l = 0; l < N_LAYERS; l++) begin : g_tbl
    tbl_entry_t tbl [N_CH];
    always_ff @(posedge clk) begin
      if (tbl_we && tbl_layer == 3'(l)) tbl[tbl_ch] <= '{ped: tbl_ped, thr: tbl_thr, bad: tbl_bad};
      tbl_q[l] <= tbl[ch];
    end
  end

  // channel sequencer (stage 0)
  assign rd_en = busy;
  assign rd_ch = ch;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy     <= 1'b0;
      ch       <= '0;
      rd_slot  <= '0;
      cur_tag  <= '0;
      s1_valid <= 1'b0;
      s1_last  <= 1'b0;
      s1_ch    <= '0;
    end else begin
      s1_valid <= busy;
      s1_last  <= busy && (ch == 8'(N_CH - 1));
      s1_ch    <= ch;
      if (!busy) begin
        ch <= '0;
        if (start) begin
          busy    <= 1'b1;
          rd_slot <= start_slot;
          cur_tag <= start_tag;
        end
      end else if (ch == 8'(N_CH - 1)) begin
        busy <= 1'b0;
        ch   <= '0;
      end else begin
        ch <= ch + 1'b1;
      end
    end
  end

  // cut (stage 1 -> registered result, stage 2)
  logic [N_LAYERS-1:0][MAX_SLICES-1:0] hits_c;
  always_comb begin
    for (int l = 0; l < N_LAYERS; l++) begin
      logic rises;
      rises = 1'b0;
      for (int s = 1; s < MAX_SLICES; s++)
        if (s < int'(cfg_nslices) && rd_data[l][s] > rd_data[l][s-1]) rises = 1'b1;
      if (cfg_nslices == 3'd1) rises = 1'b1;   // a single slice has no slope to cut on
      for (int s = 0; s < MAX_SLICES; s++) begin
        logic signed [SAMPLE_W+1:0] v;
        v = signed'({2'b00, rd_data[l][s][SAMPLE_W-1:0]}) - signed'({2'b00, tbl_q[l].ped});
        if (s >= int'(cfg_nslices))
          hits_c[l][s] = 1'b0;
        else if (cfg_pass_through)
          hits_c[l][s] = 1'b1;
        else
          hits_c[l][s] = (v > signed'({2'b00, tbl_q[l].thr})) && rises && !tbl_q[l].bad;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      res_valid <= 1'b0;
      res_last  <= 1'b0;
      res_ch    <= '0;
      res_hits  <= '0;
      res_tag   <= '0;
      done      <= 1'b0;
      done_slot <= '0;
    end else begin
      res_valid <= s1_valid;
      res_last  <= s1_last;
      res_ch    <= s1_ch;
      res_hits  <= hits_c;
      res_tag   <= cur_tag;
      done      <= s1_last;
      done_slot <= rd_slot;
    end
  end
endmodule
