// tb_workload_rate -- trigger-rate workload on one FEX RCE at its default
// parameters, with a model of its chamber.
// Nominal configuration: 20 MHz SCA write clock, 6.67 MHz ADC clock, four
// slices per trigger, latency 30 writes, one bunch crossing every 4 clocks.
// One slice read takes 12 ADC periods = 72 crossings (1.8 us), so an event
// needs 288 crossings (7.2 us), about 139 kHz sustained. Three runs:
//   1. 100 kHz periodic (400 crossings apart): no overrun, no busy, every
//      event extracted and checked, reads exactly 72 crossings apart within
//      an event;
//   2. the 139 kHz limit (288 crossings apart): still no overrun;
//   3. 200 kHz (200 crossings apart): reads fall behind, the SCA cells are
//      overwritten before they are read, and overrun must be flagged.
// In every run each extracted channel is compared with hits computed from the
// samples the chamber model sent.
module tb_workload_rate;
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
  logic tis_pop, tis_valid, busy, sca_overrun, input_overflow;
  tis_t tis;
  logic [31:0] busy_cycles, busy_count;
  logic [15:0] lost_reads, dropped;
  int checks = 0, failures = 0, n_res = 0, n_events = 0, tick_div = 0;
  int n_busy = 0, n_trig = 0, n_reads = 0, n_gap_bad = 0;
  longint ticks = 0, last_read = 0;

  fex_rce dut (.*);
  asm2_model #(.NSLICES(4)) fe (.clk, .rst, .bc_tick, .ctrl_word, .ctrl_valid, .lane_data, .lane_dav);

  assign tis_pop = tis_valid && !rst;

  always #5 clk = ~clk;
  always @(posedge clk) begin
    tick_div <= (tick_div == 3) ? 0 : tick_div + 1;
    bc_tick  <= !rst && (tick_div == 3);
    if (bc_tick) ticks <= ticks + 1;
  end

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s at %0t", msg, $time); end
  endtask

  initial begin
    repeat (1200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // read spacing inside an event: slices 1..3 follow the previous read by
  // exactly 12 ADC periods
  always @(posedge clk) if (ctrl_valid && ctrl_word.kind == CW_READ && !rst) begin
    if (n_reads % 4 != 0 && ticks - last_read != 72) n_gap_bad++;
    last_read = ticks;
    n_reads++;
  end

  always @(posedge clk) if (busy && !rst && n_trig > 0) n_busy++;

  always @(posedge clk) if (res_valid && !rst) begin
    int e;
    logic ok;
    e = int'(res_seq) % 16;
    ok = !res_err && (int'(res_ch) == n_res % N_CH) && (int'(res_seq) == n_events);
    for (int l = 0; l < N_LAYERS; l++) begin
      logic rises;
      rises = 0;
      for (int s = 1; s < 4; s++) if (fe.ev_samples[e][s][l][res_ch] > fe.ev_samples[e][s-1][l][res_ch]) rises = 1;
      for (int s = 0; s < 4; s++)
        if (res_hits[l][s] != ((int'(fe.ev_samples[e][s][l][res_ch]) - fe.ped(l, int'(res_ch)) > THR) && rises))
          ok = 0;
    end
    checks++;
    if (!ok) begin failures++; $display("FAIL: event %0d channel %0d", res_seq, res_ch); end
    n_res++;
    if (res_last) n_events++;
  end

  task automatic run(int spacing, int n);
    for (int t = 0; t < n; t++) begin
      @(posedge clk iff bc_tick);
      @(negedge clk); ttc.l1a = 1; n_trig++;
      @(posedge clk iff bc_tick);
      @(negedge clk); ttc.l1a = 0;
      repeat (spacing - 1) @(posedge clk iff bc_tick);
    end
    repeat (4 * 2000) @(posedge clk);
  endtask

  initial begin
    cfg = '0;
    cfg.wclk40 = 0; cfg.adc_div = 6; cfg.latency = 30; cfg.nslices = 4;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int l = 0; l < N_LAYERS; l++)
      for (int ch = 0; ch < N_CH; ch++) begin
        @(negedge clk);
        tbl_we = 1; tbl_layer = 3'(l); tbl_ch = 8'(ch);
        tbl_ped = 12'(fe.ped(l, ch)); tbl_thr = 12'(THR); tbl_bad = 0;
      end
    @(negedge clk) tbl_we = 0;
    @(negedge clk) sw_busy_clr = 1;
    @(negedge clk) sw_busy_clr = 0;
    repeat (8) @(posedge clk);

    run(400, 30);    // 100 kHz
    check(n_events == 30, "100 kHz: all events extracted");
    check(!sca_overrun && !input_overflow, "100 kHz: no overrun");
    check(n_busy == 0, "100 kHz: no busy");
    check(n_gap_bad == 0 && n_reads == 120, "100 kHz: reads 72 crossings apart");
    $display("100 kHz: events=%0d reads=%0d busy clocks=%0d", n_events, n_reads, n_busy);

    run(288, 30);    // 139 kHz, the limit of four 1.8 us reads
    check(n_events == 60, "139 kHz: all events extracted");
    check(!sca_overrun && !input_overflow, "139 kHz: no overrun");
    check(n_gap_bad == 0, "139 kHz: reads 72 crossings apart");
    $display("139 kHz: events=%0d reads=%0d busy clocks=%0d", n_events, n_reads, n_busy);

    run(200, 20);    // 200 kHz, above the limit
    repeat (4 * 6000) @(posedge clk);
    check(n_events == 80, "200 kHz: all events still extracted");
    check(sca_overrun && lost_reads > 0, "200 kHz: overrun flagged");
    $display("200 kHz: events=%0d lost reads=%0d", n_events, lost_reads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
