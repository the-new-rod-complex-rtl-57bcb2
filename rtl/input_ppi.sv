// input_ppi -- Input plug-in of a FEX RCE: receives one chamber's raw data.
//
// Five lanes, one per ASM-II (layer), each two G-Link fibres at 640 Mb/s. Every
// lane has a glink_deconv that unpacks the 12-bit samples; each sample is zero
// extended to 16 bits and stored in an event buffer, which plays the role of
// the memory the plug-in's DMA engine writes. The buffer holds N_SLOT events of
// cfg_nslices (up to 4) time slices x 192 channels x 5 layers; per layer it is
// one RAM word per (slot, channel) holding all time slices, so the FEX plug-in
// reads all samples of a channel of all five layers in one clock.
// The samples of a lane arrive time slice by time slice, channel 0 first. Each
// lane fills slots in ring order on its own; when every enabled lane has
// finished a slot, the slot is complete and a descriptor {slot, sequence
// number, error} is queued for the consumer (the "interrupt with a pointer").
// The consumer returns a slot with rel_valid. Slots being filled or waiting for
// the consumer count as used; almost_full (to the busy source) rises when
// AF_SLOTS are used. Samples arriving for a slot that has not been returned are
// dropped, counted and mark that slot's next descriptor as in error.
// G-Link lock is monitored per lane: a lane that stays unlocked for
// LOCK_TIMEOUT clocks is disabled (link_en low) until software re-enables it
// with relink; a disabled lane is not waited for. Re-enabling puts the lane
// at the start of the slot that completes next, so it is done between events.
// From the description: 5 lanes, 12-bit samples zero-extended to 16 bits, the
// 4 x 192 x 5 event of about 8 kB, lock monitoring with disabling, the buffer
// with back-pressure at almost-full. The slot organisation, N_SLOT, AF_SLOTS,
// LOCK_TIMEOUT and the drop policy are this design's choices.
module input_ppi
  import nrc_pkg::*;
#(
  parameter int unsigned N_SLOT       = 4,
  parameter int unsigned AF_SLOTS     = 3,
  parameter int unsigned LOCK_TIMEOUT = 1024,
  localparam int unsigned SLOT_W      = (N_SLOT > 1) ? $clog2(N_SLOT) : 1
) (
  input  logic                                         clk,
  input  logic                                         rst,
  input  logic [2:0]                                   cfg_nslices,  // 1..4
  // G-Link lanes
  input  logic [N_LAYERS-1:0][LANE_W-1:0]              lane_data,
  input  logic [N_LAYERS-1:0]                          lane_dav,
  input  logic [N_LAYERS-1:0]                          lane_lock,
  input  logic [N_LAYERS-1:0]                          relink,
  output logic [N_LAYERS-1:0]                          link_en,
  output logic [N_LAYERS-1:0]                          lock_timeout, // sticky
  output logic [N_LAYERS-1:0]                          deconv_overflow,
  // completed events
  output logic                                         evt_valid,
  output logic [SLOT_W-1:0]                            evt_slot,
  output logic [15:0]                                  evt_seq,
  output logic                                         evt_err,
  input  logic                                         evt_pop,
  // buffer read port (one clock latency)
  input  logic                                         rd_en,
  input  logic [SLOT_W-1:0]                            rd_slot,
  input  logic [7:0]                                   rd_ch,
  output logic [N_LAYERS-1:0][MAX_SLICES-1:0][WORD_W-1:0] rd_data,
  // slot return
  input  logic                                         rel_valid,
  input  logic [SLOT_W-1:0]                            rel_slot,
  // back-pressure and statistics
  output logic                                         almost_full,
  output logic                                         overflow,     // sticky
  output logic [15:0]                                  dropped
);
  localparam int unsigned DEPTH = N_SLOT * N_CH;
  localparam int unsigned AW    = $clog2(DEPTH);

  logic [N_LAYERS-1:0]                s_valid;
  logic [N_LAYERS-1:0][SAMPLE_W-1:0]  s_data;
  logic [N_LAYERS-1:0][7:0]           lane_ch;
  logic [N_LAYERS-1:0][2:0]           lane_slice;
  logic [N_LAYERS-1:0][SLOT_W-1:0]    lane_slot;
  logic [N_LAYERS-1:0][$clog2(LOCK_TIMEOUT+1)-1:0] unlock_cnt;
  logic [N_SLOT-1:0][N_LAYERS-1:0]    done_bits;
  logic [N_SLOT-1:0]                  ready, filling, slot_err;
  logic [SLOT_W-1:0]                  cslot;
  logic [15:0]                        seq;
  logic                               complete;
  logic [N_LAYERS-1:0]                lane_last, lane_drop, lane_wr;
  logic [$clog2(N_SLOT+1)-1:0]        used;
  logic                               cq_empty, cq_full, cq_af, cq_ovf;
  logic [$clog2(N_SLOT):0]            cq_count;
  logic [SLOT_W+16:0]                 cq_dout;

  function automatic logic [SLOT_W-1:0] slot_inc(input logic [SLOT_W-1:0] s);
    return (s == SLOT_W'(N_SLOT - 1)) ? '0 : s + 1'b1;
  endfunction

  // ---------------------------------------------------------------- lanes
  for (genvar l = 0; l < N_LAYERS; l++) begin : g_lane
    logic [MAX_SLICES-1:0][WORD_W-1:0] mem [DEPTH];
    logic [AW-1:0] waddr, raddr;

    glink_deconv u_deconv (
      .clk, .rst,
      .clear(relink[l]),
      .in_valid(lane_dav[l] && lane_lock[l] && link_en[l]),
      .in_word(lane_data[l]),
      .out_valid(s_valid[l]),
      .out_sample(s_data[l]),
      .overflow(deconv_overflow[l])
    );

    assign lane_last[l] = (lane_ch[l] == 8'(N_CH - 1)) && (lane_slice[l] + 1'b1 >= cfg_nslices);
    assign lane_drop[l] = s_valid[l] && ready[lane_slot[l]];
    assign lane_wr[l]   = s_valid[l] && !ready[lane_slot[l]];
    assign waddr        = AW'(lane_slot[l]) * AW'(N_CH) + AW'(lane_ch[l]);
    assign raddr        = AW'(rd_slot) * AW'(N_CH) + AW'(rd_ch);

    always_ff @(posedge clk) begin
      if (lane_wr[l]) mem[waddr][lane_slice[l][1:0]] <= WORD_W'(s_data[l]);
      if (rd_en)      rd_data[l] <= mem[raddr];
    end

    always_ff @(posedge clk) begin
      if (rst) begin
        lane_ch[l]      <= '0;
        lane_slice[l]   <= '0;
        lane_slot[l]    <= '0;
        link_en[l]      <= 1'b1;
        lock_timeout[l] <= 1'b0;
        unlock_cnt[l]   <= '0;
      end else begin
        if (relink[l]) begin
          // rejoin at the slot the next complete event goes to
          lane_ch[l]    <= '0;
          lane_slice[l] <= '0;
          lane_slot[l]  <= cslot;
        end else if (s_valid[l]) begin
          if (lane_last[l]) begin
            lane_ch[l]    <= '0;
            lane_slice[l] <= '0;
            lane_slot[l]  <= slot_inc(lane_slot[l]);
          end else if (lane_ch[l] == 8'(N_CH - 1)) begin
            lane_ch[l]    <= '0;
            lane_slice[l] <= lane_slice[l] + 1'b1;
          end else begin
            lane_ch[l] <= lane_ch[l] + 1'b1;
          end
        end
        // lock supervision
        if (relink[l]) begin
          link_en[l]    <= 1'b1;
          unlock_cnt[l] <= '0;
        end else if (lane_lock[l]) begin
          unlock_cnt[l] <= '0;
        end else if (link_en[l]) begin
          if (unlock_cnt[l] >= ($clog2(LOCK_TIMEOUT+1))'(LOCK_TIMEOUT - 1)) begin
            link_en[l]      <= 1'b0;
            lock_timeout[l] <= 1'b1;
          end else begin
            unlock_cnt[l] <= unlock_cnt[l] + 1'b1;
          end
        end
      end
    end
  end

  // ------------------------------------------------------- slot bookkeeping
  assign complete = (link_en != '0) && ((done_bits[cslot] & link_en) == link_en) && !ready[cslot] && !cq_full;

  always_comb begin
    used = '0;
    for (int s = 0; s < N_SLOT; s++) used = used + ($clog2(N_SLOT+1))'(ready[s] || filling[s]);
  end
  assign almost_full = (used >= ($clog2(N_SLOT+1))'(AF_SLOTS));

  always_ff @(posedge clk) begin
    if (rst) begin
      done_bits <= '0;
      ready     <= '0;
      filling   <= '0;
      slot_err  <= '0;
      cslot     <= '0;
      seq       <= '0;
      overflow  <= 1'b0;
      dropped   <= '0;
    end else begin
      for (int l = 0; l < N_LAYERS; l++) begin
        if (s_valid[l]) begin
          if (lane_wr[l])   filling[lane_slot[l]] <= 1'b1;
          if (lane_last[l]) done_bits[lane_slot[l]][l] <= 1'b1;
          if (lane_drop[l]) slot_err[lane_slot[l]] <= 1'b1;
        end
      end
      if (|lane_drop) begin
        overflow <= 1'b1;
        if (dropped != '1) dropped <= dropped + 1'b1;
      end
      if (rel_valid) ready[rel_slot] <= 1'b0;
      if (complete) begin
        ready[cslot]     <= 1'b1;
        filling[cslot]   <= 1'b0;
        done_bits[cslot] <= '0;
        slot_err[cslot]  <= 1'b0;
        cslot            <= slot_inc(cslot);
        seq              <= seq + 1'b1;
      end
    end
  end

  sync_fifo #(.WIDTH(SLOT_W + 17), .DEPTH(1 << $clog2(N_SLOT)), .AF_LEVEL(N_SLOT)) u_cmpl (
    .clk, .rst,
    .push(complete), .din({slot_err[cslot], seq, cslot}),
    .pop(evt_pop), .dout(cq_dout),
    .empty(cq_empty), .full(cq_full), .almost_full(cq_af),
    .overflow(cq_ovf), .count(cq_count)
  );
  assign evt_valid = !cq_empty;
  assign evt_slot  = cq_dout[SLOT_W-1:0];
  assign evt_seq   = cq_dout[SLOT_W+15:SLOT_W];
  assign evt_err   = cq_dout[SLOT_W+16];

  initial assert (N_SLOT >= 2 && AF_SLOTS <= N_SLOT) else $error("input_ppi: bad slot parameters");
  assert property (@(posedge clk) disable iff (rst) cfg_nslices >= 1 && cfg_nslices <= 3'(MAX_SLICES))
    else $error("input_ppi: cfg_nslices out of range");
endmodule
