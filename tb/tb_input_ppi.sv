// tb_input_ppi -- self-checking test of the Input plug-in.
// Five lanes carry packed 12-bit samples (LSB first, 8 samples per 3 words) of
// generated events, a word every 3 clocks with a per-lane phase. After each
// completion the whole slot is read back through the read port and compared
// with the generated samples, zero-extended to 16 bits. Then the buffer is
// left full to check almost-full back-pressure and the drop of a fifth event,
// and one lane's G-Link lock is removed to check that it is disabled after the
// timeout and that events then complete without it.
module tb_input_ppi;
  import nrc_pkg::*;
  localparam int NS = 4;
  logic clk = 0, rst = 1;
  logic [2:0] cfg_nslices = 3'(NS);
  logic [N_LAYERS-1:0][LANE_W-1:0] lane_data = '0;
  logic [N_LAYERS-1:0] lane_dav = '0, lane_lock = '1, relink = '0;
  logic [N_LAYERS-1:0] link_en, lock_timeout, deconv_overflow;
  logic evt_valid, evt_err, evt_pop = 0;
  logic [1:0] evt_slot;
  logic [15:0] evt_seq, dropped;
  logic rd_en = 0;
  logic [1:0] rd_slot = 0;
  logic [7:0] rd_ch = 0;
  logic [N_LAYERS-1:0][MAX_SLICES-1:0][WORD_W-1:0] rd_data;
  logic rel_valid = 0;
  logic [1:0] rel_slot = 0;
  logic almost_full, overflow;
  int checks = 0, failures = 0;

  input_ppi #(.N_SLOT(4), .AF_SLOTS(3), .LOCK_TIMEOUT(64)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s at %0t", msg, $time); end
  endtask

  function automatic logic [11:0] sample(int ev, int lane, int sl, int ch);
    return 12'((ev * 173 + lane * 1031 + sl * 301 + ch * 7) ^ (ch << 4));
  endfunction

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_lane(int ev, int lane);
    logic [SAMPLE_W*8-1:0] bits;
    repeat (lane) @(posedge clk);
    for (int sl = 0; sl < NS; sl++)
      for (int g = 0; g < N_CH / 8; g++) begin
        for (int k = 0; k < 8; k++) bits[k*12 +: 12] = sample(ev, lane, sl, g * 8 + k);
        for (int w = 0; w < 3; w++) begin
          @(negedge clk);
          lane_data[lane] = bits[w*32 +: 32];
          lane_dav[lane]  = 1;
          @(negedge clk);
          lane_dav[lane]  = 0;
          @(negedge clk);
        end
      end
  endtask

  task automatic send_event(int ev);
    fork
      send_lane(ev, 0); send_lane(ev, 1); send_lane(ev, 2); send_lane(ev, 3); send_lane(ev, 4);
    join
    repeat (20) @(posedge clk);
  endtask

  task automatic verify_slot(int ev, int slot, logic [N_LAYERS-1:0] lanes);
    int bad = 0;
    for (int ch = 0; ch < N_CH; ch++) begin
      @(negedge clk);
      rd_en = 1; rd_slot = 2'(slot); rd_ch = 8'(ch);
      @(negedge clk);
      rd_en = 0;
      for (int l = 0; l < N_LAYERS; l++)
        if (lanes[l])
          for (int sl = 0; sl < NS; sl++)
            if (rd_data[l][sl] !== {4'h0, sample(ev, l, sl, ch)}) bad++;
    end
    check(bad == 0, "slot contents equal the sent samples");
    if (bad != 0) $display("  %0d samples wrong in event %0d", bad, ev);
  endtask

  task automatic pop_and_release(int ev, logic [N_LAYERS-1:0] lanes, logic do_rel);
    int slot;
    check(evt_valid, "completion reported");
    slot = evt_slot;
    check(!evt_err, "completion without error");
    verify_slot(ev, slot, lanes);
    @(negedge clk); evt_pop = 1;
    @(negedge clk); evt_pop = 0;
    if (do_rel) begin
      rel_valid = 1; rel_slot = 2'(slot);
      @(negedge clk); rel_valid = 0;
    end
  endtask

  initial begin
    int seq0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // normal operation
    for (int ev = 0; ev < 5; ev++) begin
      send_event(ev);
      check(int'(evt_seq) == ev, "sequence number");
      pop_and_release(ev, '1, 1);
    end
    check(!almost_full && !overflow, "no back-pressure when slots are returned");
    // back-pressure: keep slots
    for (int ev = 10; ev < 13; ev++) send_event(ev);
    check(almost_full, "almost-full with three slots used");
    send_event(13);
    check(!overflow, "fourth event still fits");
    send_event(14);
    check(overflow && dropped > 0, "fifth event dropped");
    for (int ev = 10; ev < 14; ev++) pop_and_release(ev, '1, 1);
    check(!almost_full, "back-pressure released");
    // the dropped event lands in the next slot again with an error mark
    repeat (5) @(posedge clk);
    if (evt_valid) begin
      check(evt_err, "event with dropped samples marked");
      @(negedge clk); evt_pop = 1; rel_valid = 1; rel_slot = evt_slot;
      @(negedge clk); evt_pop = 0; rel_valid = 0;
    end
    // lock loss on lane 4
    @(negedge clk); lane_lock[4] = 0;
    repeat (100) @(posedge clk);
    check(!link_en[4] && lock_timeout[4], "lane disabled after lock timeout");
    check(link_en[3:0] == '1, "other lanes stay enabled");
    fork
      send_lane(20, 0); send_lane(20, 1); send_lane(20, 2); send_lane(20, 3);
    join
    repeat (20) @(posedge clk);
    pop_and_release(20, 5'b01111, 1);
    // relink
    @(negedge clk); lane_lock[4] = 1; relink[4] = 1;
    @(negedge clk); relink[4] = 0;
    check(link_en[4], "lane re-enabled by software");
    send_event(21);
    pop_and_release(21, '1, 1);
    check(deconv_overflow == '0, "no unpacking overflow at one word per 3 clocks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
