// tb_fex_rce -- self-checking test of a FEX RCE with a model of its chamber.
// Triggers enter on the trigger stream; the SCA controller's read commands go
// to a behavioural model of the five ASM-IIs, whose data come back on the five
// lanes. For every event the hit bits leaving the RCE are compared with hits
// computed here from the samples the model sent (pedestal subtraction,
// threshold, slope cut, bad-channel mask). Also checked: one TIS per trigger
// with consecutive L1IDs, busy held after reset until software releases it,
// and busy raised by the TIS FIFO when software stops draining it.
module tb_fex_rce;
  import nrc_pkg::*;
  localparam int THR = 40;
  logic clk = 0, rst = 1, bc_tick = 0;
  ttc_t ttc = '0;
  fex_cfg_t cfg;
  logic tbl_we = 0, tbl_bad = 0;
  logic [2:0] tbl_layer = 0;
  logic [7:0] tbl_ch = 0;
  logic [11:0] tbl_ped = 0, tbl_thr = 0;
  logic sw_busy_set = 0, sw_busy_clr = 0;
  ctrl_word_t ctrl_word;
  logic ctrl_valid;
  logic [N_LAYERS-1:0][LANE_W-1:0] lane_data;
  logic [N_LAYERS-1:0] lane_dav, lane_lock = '1, relink = '0, link_en, lock_timeout;
  logic res_valid, res_last, res_err;
  logic [15:0] res_seq;
  logic [7:0] res_ch;
  logic [N_LAYERS-1:0][MAX_SLICES-1:0] res_hits;
  logic tis_pop = 0, tis_valid, busy, sca_overrun, input_overflow;
  tis_t tis;
  logic [31:0] busy_cycles, busy_count;
  logic [15:0] lost_reads, dropped;
  int checks = 0, failures = 0, n_res = 0, n_events = 0, n_hits = 0, tick_div = 0;

  fex_rce #(.N_SLOT(4), .LOCK_TIMEOUT(64)) dut (.*);
  asm2_model #(.NSLICES(4)) fe (.clk, .rst, .bc_tick, .ctrl_word, .ctrl_valid, .lane_data, .lane_dav);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    tick_div <= (tick_div == 3) ? 0 : tick_div + 1;
    bc_tick  <= !rst && (tick_div == 3);
  end

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s at %0t", msg, $time); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic is_bad(int l, int ch);
    return (l == 1 && ch == 9) || (l == 3 && ch == 16 * 3 - 21);
  endfunction

  // result checker
  always @(posedge clk) if (res_valid && !rst) begin
    int e;
    logic ok;
    e = int'(res_seq) % 16;
    ok = !res_err && (int'(res_ch) == n_res % N_CH);
    for (int l = 0; l < N_LAYERS; l++) begin
      logic rises;
      rises = 0;
      for (int s = 1; s < 4; s++) if (fe.ev_samples[e][s][l][res_ch] > fe.ev_samples[e][s-1][l][res_ch]) rises = 1;
      for (int s = 0; s < 4; s++) begin
        logic h;
        h = (int'(fe.ev_samples[e][s][l][res_ch]) - fe.ped(l, int'(res_ch)) > THR) && rises && !is_bad(l, int'(res_ch));
        if (res_hits[l][s] != h) ok = 0;
        if (h) n_hits++;
      end
    end
    checks++;
    if (!ok) begin failures++; $display("FAIL: event %0d channel %0d", res_seq, res_ch); end
    n_res++;
    if (res_last) n_events++;
  end

  task automatic bc_l1a();
    @(posedge clk iff bc_tick);
    @(negedge clk); ttc.l1a = 1; ttc.ttype = 8'h11;
    @(posedge clk iff bc_tick);
    @(negedge clk); ttc.l1a = 0;
  endtask

  initial begin
    cfg = '0;
    cfg.wclk40 = 0; cfg.adc_div = 6; cfg.latency = 30; cfg.nslices = 4;
    cfg.bad_cell = '0; cfg.bad_cell[40] = 1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int l = 0; l < N_LAYERS; l++)
      for (int ch = 0; ch < N_CH; ch++) begin
        @(negedge clk);
        tbl_we = 1; tbl_layer = 3'(l); tbl_ch = 8'(ch);
        tbl_ped = 12'(fe.ped(l, ch)); tbl_thr = 12'(THR); tbl_bad = is_bad(l, ch);
      end
    @(negedge clk) tbl_we = 0;
    check(busy, "busy after reset");
    @(negedge clk) sw_busy_clr = 1;
    @(negedge clk) sw_busy_clr = 0;
    repeat (3) @(posedge clk);
    check(!busy, "busy released by software");
    // events, well separated
    for (int t = 0; t < 6; t++) begin
      bc_l1a();
      repeat (4 * (500 + 13 * t)) @(posedge clk);
    end
    repeat (4 * 400) @(posedge clk);
    check(n_events == 6, "six events feature-extracted");
    check(n_hits > 50, "events carry hits");
    for (int t = 0; t < 6; t++) begin
      check(tis_valid && tis.l1id == 24'(t) && tis.ttype == 8'h11, "TIS per trigger");
      @(negedge clk) tis_pop = 1;
      @(negedge clk) tis_pop = 0;
    end
    check(!tis_valid, "no extra TIS");
    // stop draining the TIS FIFO: back-pressure
    for (int t = 0; t < 12; t++) begin
      bc_l1a();
      repeat (4 * 400) @(posedge clk);
    end
    repeat (4 * 600) @(posedge clk);
    check(busy, "busy from TIS FIFO almost-full");
    check(n_events == 18, "all events processed");
    check(!sca_overrun, "no SCA overrun at this rate");
    check(!input_overflow, "no input overflow at this rate");
    check(lost_reads == 0 && dropped == 0, "statistics: nothing lost");
    check(busy_count == 1 && busy_cycles > 0, $sformatf("statistics: one busy assertion (TIS FIFO) after the release, %0d", busy_count));
    $display("events=%0d hits=%0d", n_events, n_hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
