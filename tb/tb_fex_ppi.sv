// tb_fex_ppi -- self-checking test of the Feature Extraction plug-in.
// The testbench plays the event buffer (read data one clock after the
// address), loads a random pedestal/threshold/bad-channel table and fills
// events with rising pulses, decaying pulses and noise. Every result is
// compared with hits computed here from the same numbers: sample - pedestal >
// threshold, rejected when the samples never rise, and masked when bad. Also
// checked: the 2-clock latency and one channel per clock, the tag and slot
// returned, pass-through mode and a two-slice configuration.
module tb_fex_ppi;
  import nrc_pkg::*;
  logic clk = 0, rst = 1;
  logic [2:0] cfg_nslices = 4;
  logic cfg_pass_through = 0;
  logic tbl_we = 0, tbl_bad = 0;
  logic [2:0] tbl_layer = 0;
  logic [7:0] tbl_ch = 0;
  logic [11:0] tbl_ped = 0, tbl_thr = 0;
  logic start = 0, busy;
  logic [1:0] start_slot = 0;
  logic [16:0] start_tag = 0, res_tag;
  logic rd_en;
  logic [1:0] rd_slot;
  logic [7:0] rd_ch;
  logic [N_LAYERS-1:0][MAX_SLICES-1:0][WORD_W-1:0] rd_data;
  logic res_valid, res_last, done;
  logic [7:0] res_ch;
  logic [N_LAYERS-1:0][MAX_SLICES-1:0] res_hits;
  logic [1:0] done_slot;
  int checks = 0, failures = 0;

  logic [N_LAYERS-1:0][MAX_SLICES-1:0][WORD_W-1:0] buffer [4][N_CH];
  logic [11:0] ped [N_LAYERS][N_CH], thr [N_LAYERS][N_CH];
  logic        bad [N_LAYERS][N_CH];
  int n_hit_total = 0, n_oot = 0;

  fex_ppi #(.SLOT_W(2), .TAG_W(17)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (rd_en) rd_data <= buffer[rd_slot][rd_ch];

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s at %0t", msg, $time); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [MAX_SLICES-1:0] expect_hits(int slot, int l, int ch, int ns, logic pt);
    logic [MAX_SLICES-1:0] h;
    logic rises;
    rises = (ns == 1);
    for (int s = 1; s < ns; s++) if (buffer[slot][ch][l][s] > buffer[slot][ch][l][s-1]) rises = 1;
    for (int s = 0; s < MAX_SLICES; s++) begin
      int v;
      v = int'(buffer[slot][ch][l][s]) - int'(ped[l][ch]);
      if (s >= ns) h[s] = 0;
      else if (pt) h[s] = 1;
      else h[s] = (v > int'(thr[l][ch])) && rises && !bad[l][ch];
    end
    return h;
  endfunction

  task automatic fill(int slot);
    for (int ch = 0; ch < N_CH; ch++)
      for (int l = 0; l < N_LAYERS; l++) begin
        int kind, amp;
        kind = $urandom % 4;
        amp  = 30 + $urandom % 400;
        for (int s = 0; s < MAX_SLICES; s++) begin
          int v;
          case (kind)
            0: v = ped[l][ch] + amp * (s + 1) / 4;              // rising pulse
            1: v = ped[l][ch] + amp * (4 - s) / 4;              // decaying tail
            2: v = ped[l][ch] + (s == 2 ? amp : amp / 3);       // peak in slice 2
            default: v = ped[l][ch] + int'($urandom % 30) - 15; // noise
          endcase
          if (v < 0) v = 0;
          if (v > 4095) v = 4095;
          buffer[slot][ch][l][s] = 16'(v);
        end
      end
  endtask

  task automatic run_event(int slot, int tag, int ns, logic pt);
    int t_start, t_first, n_res, ch_exp;
    @(negedge clk);
    cfg_nslices = 3'(ns); cfg_pass_through = pt;
    start = 1; start_slot = 2'(slot); start_tag = 17'(tag);
    @(posedge clk); t_start = $time / 10;
    @(negedge clk); start = 0;
    n_res = 0; ch_exp = 0; t_first = -1;
    while (n_res < N_CH) begin
      @(posedge clk); #1;
      if (res_valid) begin
        logic ok;
        if (t_first < 0) t_first = $time / 10;
        ok = (res_ch == 8'(ch_exp)) && (res_tag == 17'(tag));
        for (int l = 0; l < N_LAYERS; l++) begin
          logic [MAX_SLICES-1:0] e;
          e = expect_hits(slot, l, ch_exp, ns, pt);
          if (res_hits[l] != e) ok = 0;
          n_hit_total += $countones(e);
        end
        checks++;
        if (!ok) begin failures++; $display("FAIL: channel %0d of slot %0d", ch_exp, slot); end
        if (ch_exp == N_CH - 1) begin
          check(res_last && done && done_slot == 2'(slot), "last flag and done with slot");
        end
        ch_exp++; n_res++;
      end else if (n_res > 0) begin
        check(0, "one channel per clock");
        n_res = N_CH;
      end
    end
    check(t_first - t_start == 2, "first result 2 clocks after start");
    if (t_first - t_start != 2) $display("  latency %0d", t_first - t_start);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int l = 0; l < N_LAYERS; l++)
      for (int ch = 0; ch < N_CH; ch++) begin
        ped[l][ch] = 12'(100 + $urandom % 200);
        thr[l][ch] = 12'(20 + $urandom % 60);
        bad[l][ch] = ($urandom % 20 == 0);
        @(negedge clk);
        tbl_we = 1; tbl_layer = 3'(l); tbl_ch = 8'(ch);
        tbl_ped = ped[l][ch]; tbl_thr = thr[l][ch]; tbl_bad = bad[l][ch];
      end
    @(negedge clk) tbl_we = 0;
    for (int s = 0; s < 4; s++) fill(s);
    run_event(2, 1234, 4, 0);
    run_event(0, 77, 4, 0);
    run_event(3, 5, 2, 0);
    run_event(1, 9, 4, 1);
    check(n_hit_total > 1000, "events produce hits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
