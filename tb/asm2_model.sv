// asm2_model -- behavioural model of one chamber's five ASM-II boards (testbench only).
//
// Not synthesizable logic of the design: it stands in for the on-detector
// electronics. It follows the control words of an SCA controller: each write
// strobe stores the write number of the cell being written (cells advance
// 0..143 and wrap), each read word queues that cell. Queued cells are sent,
// one after the other, on the five lanes: 192 channels of 12 bits packed LSB
// first into 72 words of 32 bits, one word per bunch-crossing tick, after a
// latency of DELAY ticks counted from the read word (a read that
// arrives while an earlier one is still being sent follows it directly). The sample of layer l, channel ch written at write
// number w is value(w, l, ch): a pedestal plus, on a sparse set of strips, a
// pulse that rises over six writes and then drops. The samples of each group
// of NSLICES reads (one event) are kept in ev_samples for the testbench to
// compute the expected feature extraction.
module asm2_model
  import nrc_pkg::*;
#(
  parameter int NSLICES = 4,
  parameter int DELAY   = 4,
  parameter int SEED    = 0
) (
  input  logic                             clk,
  input  logic                             rst,
  input  logic                             bc_tick,
  input  ctrl_word_t                       ctrl_word,
  input  logic                             ctrl_valid,
  output logic [N_LAYERS-1:0][LANE_W-1:0]  lane_data,
  output logic [N_LAYERS-1:0]              lane_dav
);
  int wcell = 0, wserial = 0;
  int serial_of_cell [N_CELL];
  int readq[$];
  longint readt[$];     // tick count at which each read word arrived
  longint ticks = 0;
  int n_reads = 0;
  int n_events = 0;
  logic [11:0] ev_samples [16][MAX_SLICES][N_LAYERS][N_CH];

  function automatic int ped(int l, int ch);
    return 200 + (l * 37 + ch * 13) % 100;
  endfunction

  function automatic logic [11:0] value(int w, int l, int ch);
    int v;
    v = ped(l, ch) + ((ch * 5 + w) % 3) - 1;
    if ((ch + 7 * l + SEED) % 16 == 0) v += 60 * (w % 6);
    return 12'(v);
  endfunction

  initial begin
    for (int c = 0; c < N_CELL; c++) serial_of_cell[c] = 0;
    lane_data = '0;
    lane_dav  = '0;
  end

  always @(posedge clk) begin
    if (bc_tick) ticks++;
    if (ctrl_valid && !rst) begin
      if (ctrl_word.kind == CW_READ) begin
        readq.push_back(serial_of_cell[ctrl_word.addr]);
        readt.push_back(ticks);
      end
      if (ctrl_word.wclk) begin
        serial_of_cell[wcell] = wserial;
        wserial++;
        wcell = (wcell + 1) % N_CELL;
      end
    end
  end

  initial begin
    @(negedge rst);
    forever begin
      int w, sl, ev;
      longint t0;
      logic [N_LAYERS-1:0][SAMPLE_W*N_CH-1:0] bits;
      @(posedge clk);
      if (readq.size() == 0) continue;
      w  = readq.pop_front();
      t0 = readt.pop_front();
      sl = n_reads % NSLICES;
      ev = n_reads / NSLICES;
      for (int l = 0; l < N_LAYERS; l++)
        for (int ch = 0; ch < N_CH; ch++) begin
          bits[l][ch*12 +: 12] = value(w, l, ch);
          ev_samples[ev % 16][sl][l][ch] = value(w, l, ch);
        end
      n_reads++;
      while (ticks < t0 + DELAY) @(posedge clk iff bc_tick);
      for (int k = 0; k < N_CH * SAMPLE_W / LANE_W; k++) begin
        @(posedge clk iff bc_tick);
        @(negedge clk);
        for (int l = 0; l < N_LAYERS; l++) lane_data[l] = bits[l][k*32 +: 32];
        lane_dav = '1;
        @(negedge clk);
        lane_dav = '0;
      end
      if (sl == NSLICES - 1) n_events++;
    end
  end
endmodule
