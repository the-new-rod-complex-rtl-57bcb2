// tb_nrc_top -- end-to-end test of the complete readout complex at its full
// size: four FEX COBs of eight FEX RCEs (32 chambers), one Formatter COB of
// eight Formatter RCEs (16 Read-Out Links), five DTMs, no parameter changed.
// Each FEX RCE is connected to a behavioural model of its chamber's five
// ASM-II boards. The Formatter COB's DTM is the master; the FEX COB DTMs
// take the trigger from the backplane.
//
// Checked, with each mechanism counted and a mechanism that never occurs
// counted as a failure:
//   - FTM-sourced triggers reach all 40 RCEs (backplane distribution to the
//     FEX COBs, own base board on the Formatter COB), one TIS per trigger
//     with consecutive L1IDs and the right trigger type;
//   - DTM software L1As and the periodic generator as local sources;
//   - every feature-extracted channel of every event of every chamber
//     against hits computed from the samples the chamber model sent;
//   - pass-through mode (all hits set);
//   - busy: software busy after reset, and a TIS FIFO left undrained on one
//     FEX RCE, both reaching the FTM through the slave DTM, the backplane
//     and the master DTM, and both released;
//   - SCA overrun on a burst of closely spaced triggers;
//   - lane lock loss timing out, disabling the lane, and relink restoring it;
//   - all 16 ROLs framing posted fragments under random ROS flow control;
//   - a partitioned trigger domain: one FEX COB on its own DTM's trigger.
module tb_nrc_top;
  import nrc_pkg::*;
  localparam int NF = 32, NFMT = 8, NROL = 16, NCOB = 5, MCOB = 4;
  localparam int THR = 40;
  localparam logic [7:0] TT_FTM = 8'h5A, TT_SW = 8'h22, TT_GEN = 8'h01;

  logic clk = 0, rst = 1, bc_tick;
  ttc_t     [NCOB-1:0] ttc_ftm = '0;
  logic     [NCOB-1:0] busy_ftm;
  dtm_cfg_t [NCOB-1:0] dtm_cfg;
  logic     [NCOB-1:0] sw_l1a = '0, sw_ecr = '0;
  logic     [NCOB-1:0][7:0] sw_ttype = '0;
  fex_cfg_t fex_cfg;
  logic [NF-1:0] tbl_we = '0, sw_busy_set = '0, sw_busy_clr = '0;
  logic [2:0] tbl_layer = '0;
  logic [7:0] tbl_ch = '0;
  logic [SAMPLE_W-1:0] tbl_ped = '0, tbl_thr = '0;
  logic tbl_bad = 0;
  ctrl_word_t [NF-1:0] ctrl_word;
  logic [NF-1:0] ctrl_valid;
  logic [NF-1:0][N_LAYERS-1:0][LANE_W-1:0] lane_data;
  logic [NF-1:0][N_LAYERS-1:0] lane_dav, lane_lock = '1, relink = '0, link_en, lock_timeout;
  logic [NF-1:0] res_valid, res_last, res_err, fex_tis_pop, fex_tis_valid, fex_busy;
  logic [NF-1:0] sca_overrun, input_overflow;
  logic [NF-1:0][15:0] res_seq;
  logic [NF-1:0][7:0] res_ch;
  logic [NF-1:0][N_LAYERS-1:0][MAX_SLICES-1:0] res_hits;
  tis_t [NF-1:0] fex_tis;
  logic [NF-1:0][31:0] fex_busy_cycles, fex_busy_count;
  logic [NF-1:0][15:0] fex_lost_reads, fex_dropped;
  logic [NCOB-1:0][31:0] dtm_l1a_generated, dtm_ftm_busy_cycles;
  logic [NFMT-1:0] fmt_tis_pop, fmt_tis_valid;
  tis_t [NFMT-1:0] fmt_tis;
  logic [NROL-1:0] post_valid = '0, post_last = '0, post_ready, rol_valid, rol_ctrl;
  logic [NROL-1:0] rol_full = '0, rol_down = '0;
  logic [NROL-1:0][31:0] post_data = '0, rol_data, rol_frags;

  nrc_top dut (.*);

  int checks = 0, failures = 0;
  int n_trig = 0;                // triggers issued so far
  int m_ftm = 0, m_sw = 0, m_gen = 0, m_bp = 0, m_busy_sw = 0, m_busy_fifo = 0;
  int m_part = 0, m_pass = 0, m_overrun = 0, m_lock = 0, m_relink = 0, m_xoff = 0, m_frames = 0;
  logic [NF-1:0] hold_tis = '0;
  logic [NF-1:0] ev_done;
  int tis_seen [NF];
  logic [NFMT-1:0] fmt_done;

  always #2 clk = ~clk;

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s at %0t", msg, $time); end
  endtask

  initial begin
    repeat (1500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic is_bad(int l, int ch);
    return (l == 2 && ch == 32) || (l == 4 && ch == 100);
  endfunction

  // ------------------------------------------------------- chambers and FEX checks
  assign fex_tis_pop = fex_tis_valid & ~hold_tis & {NF{!rst}};

  for (genvar i = 0; i < NF; i++) begin : g_ch
    int n_res = 0, n_ev = 0, n_tis = 0;
    asm2_model #(.NSLICES(4), .SEED(i)) u_m (
      .clk, .rst, .bc_tick, .ctrl_word(ctrl_word[i]), .ctrl_valid(ctrl_valid[i]),
      .lane_data(lane_data[i]), .lane_dav(lane_dav[i])
    );
    assign ev_done[i] = (n_ev == n_trig) && (n_tis == n_trig);
    assign tis_seen[i] = n_tis;

    always @(posedge clk) if (res_valid[i] && !rst) begin
      int e, ch;
      logic ok;
      e  = int'(res_seq[i]) % 16;
      ch = int'(res_ch[i]);
      ok = !res_err[i] && (ch == n_res % N_CH) && (int'(res_seq[i]) == n_ev);
      for (int l = 0; l < N_LAYERS; l++) begin
        logic rises;
        rises = 0;
        for (int s = 1; s < 4; s++) if (u_m.ev_samples[e][s][l][ch] > u_m.ev_samples[e][s-1][l][ch]) rises = 1;
        for (int s = 0; s < 4; s++) begin
          logic h;
          h = fex_cfg.pass_through ||
              ((int'(u_m.ev_samples[e][s][l][ch]) - u_m.ped(l, ch) > THR) && rises && !is_bad(l, ch));
          if (res_hits[i][l][s] != h) ok = 0;
        end
      end
      checks++;
      if (!ok) begin failures++; $display("FAIL: RCE %0d event %0d channel %0d", i, res_seq[i], ch); end
      if (fex_cfg.pass_through && res_hits[i] == '1) m_pass++;
      n_res++;
      if (res_last[i]) n_ev++;
    end

    always @(posedge clk) if (fex_tis_pop[i]) begin
      check(fex_tis[i].l1id == 24'(n_tis), "FEX TIS L1ID sequence");
      n_tis++;
      if (fex_tis[i].ttype == TT_FTM) m_bp++;
    end
  end

  // ------------------------------------------------------- Formatter TIS
  assign fmt_tis_pop = fmt_tis_valid & {NFMT{!rst}};
  for (genvar f = 0; f < NFMT; f++) begin : g_fmt
    int n_tis = 0;
    assign fmt_done[f] = (n_tis == n_trig);
    always @(posedge clk) if (fmt_tis_pop[f]) begin
      check(fmt_tis[f].l1id == 24'(n_tis), $sformatf("Formatter TIS L1ID sequence %0d %0d", fmt_tis[f].l1id, n_tis));
      n_tis++;
      if (f == 0) begin
        if (fmt_tis[f].ttype == TT_FTM) m_ftm++;
        if (fmt_tis[f].ttype == TT_SW)  m_sw++;
        if (fmt_tis[f].ttype == TT_GEN) m_gen++;
      end
    end
  end

  // ------------------------------------------------------- Read-Out Links
  logic [32:0] expq [NROL][$];
  int frags_posted [NROL];
  logic [NROL-1:0] stop_q = '0;
  always @(posedge clk) begin
    for (int r = 0; r < NROL; r++) if (rol_valid[r] && !rst) begin
      logic [32:0] e;
      checks++;
      if (expq[r].size() == 0) begin failures++; $display("FAIL: ROL %0d unexpected word", r); end
      else begin
        e = expq[r].pop_front();
        if ({rol_ctrl[r], rol_data[r]} !== e) begin
          failures++; $display("FAIL: ROL %0d word %h expected %h", r, {rol_ctrl[r], rol_data[r]}, e);
        end
        if (e == {1'b1, 32'hE0F0_0000}) m_frames++;
      end
      if (stop_q[r]) begin failures++; $display("FAIL: ROL %0d sent during XOFF", r); end
    end
    stop_q <= rol_full | rol_down;
  end
  always @(negedge clk) if (bc_tick && !rst) begin
    for (int r = 0; r < NROL; r++) begin
      rol_full[r] = ($urandom_range(5) == 0);
      if (rol_full[r] && expq[r].size() != 0) m_xoff++;
    end
  end
  for (genvar r = 0; r < NROL; r++) begin : g_post
    initial begin
      frags_posted[r] = 0;
      @(negedge rst);
      repeat (200) @(negedge clk);
      for (int f = 0; f < 8; f++) begin
        int len;
        len = 1 + $urandom_range(40);
        expq[r].push_back({1'b1, 32'hB0F0_0000});
        for (int k = 0; k < len; k++) begin
          logic [31:0] d;
          d = {8'(r), 8'(f), 16'(k)};
          post_valid[r] = 1; post_data[r] = d; post_last[r] = (k == len - 1);
          @(posedge clk);
          while (!post_ready[r]) @(posedge clk);
          expq[r].push_back({1'b0, d});
          @(negedge clk);
        end
        post_valid[r] = 0; post_last[r] = 0;
        expq[r].push_back({1'b1, 32'hE0F0_0000});
        frags_posted[r]++;
        repeat ($urandom_range(2000)) @(negedge clk);
      end
    end
  end

  // ------------------------------------------------------- stimulus
  task automatic wait_bc(int n);
    repeat (n) @(posedge clk iff bc_tick);
  endtask

  task automatic ftm_l1a();
    @(posedge clk iff bc_tick);
    @(negedge clk); ttc_ftm[MCOB].l1a = 1; ttc_ftm[MCOB].ttype = TT_FTM;
    n_trig++;
    @(posedge clk iff bc_tick);
    @(negedge clk); ttc_ftm[MCOB].l1a = 0;
  endtask

  task automatic wait_events(string what);
    int t;
    t = 0;
    while (!(&ev_done && &fmt_done) && t < 200000) begin @(posedge clk); t++; end
    check(&ev_done && &fmt_done, what);
  endtask

  initial begin
    for (int c = 0; c < NCOB; c++) begin
      dtm_cfg[c] = '0;
      dtm_cfg[c].src = SRC_BACKPLANE;
      dtm_cfg[c].to_bp_en = 1;
    end
    dtm_cfg[MCOB].master    = 1;
    dtm_cfg[MCOB].src       = SRC_FTM;
    dtm_cfg[MCOB].to_bp_en  = 0;
    dtm_cfg[MCOB].to_ftm_en = 1;
    dtm_cfg[MCOB].bp_enable = 5'b01111;
    fex_cfg = '0;
    fex_cfg.wclk40 = 0; fex_cfg.adc_div = 6; fex_cfg.latency = 30; fex_cfg.nslices = 4;
    fex_cfg.bad_cell[77] = 1;
    repeat (5) @(posedge clk);
    @(negedge clk) rst = 0;

    // tables: the same pedestals in every chamber, loaded by broadcast
    for (int l = 0; l < N_LAYERS; l++)
      for (int ch = 0; ch < N_CH; ch++) begin
        @(negedge clk);
        tbl_we = '1; tbl_layer = 3'(l); tbl_ch = 8'(ch);
        tbl_ped = 12'(g_ch[0].u_m.ped(l, ch)); tbl_thr = 12'(THR); tbl_bad = is_bad(l, ch);
      end
    @(negedge clk) tbl_we = '0;

    // software busy after reset reaches the FTM; release it
    wait_bc(4);
    check(busy_ftm[MCOB] && !busy_ftm[0], "software busy reaches the FTM");
    if (busy_ftm[MCOB]) m_busy_sw++;
    @(negedge clk) sw_busy_clr = '1;
    @(negedge clk) sw_busy_clr = '0;
    wait_bc(4);
    check(!busy_ftm[MCOB], "busy released");

    // FTM triggers, distributed over the backplane
    for (int t = 0; t < 2; t++) begin ftm_l1a(); wait_bc(400); end
    wait_events("FTM-triggered events complete");

    // lock loss on one lane between events, then relink
    @(negedge clk) lane_lock[5][2] = 0;
    repeat (1100) @(posedge clk);
    check(lock_timeout[5][2] && !link_en[5][2], "lock loss disables the lane");
    if (lock_timeout[5][2]) m_lock++;
    check(link_en[5][1:0] == 2'b11 && link_en[4] == '1, "other lanes stay enabled");
    @(negedge clk) lane_lock[5][2] = 1; relink[5][2] = 1;
    @(negedge clk) relink[5][2] = 0;
    @(posedge clk);
    check(link_en[5][2], "relink enables the lane");
    if (link_en[5][2]) m_relink++;

    // local sources on the master DTM: software L1As, then the generator
    @(negedge clk) dtm_cfg[MCOB].src = SRC_LOCAL;
    wait_bc(2);
    for (int t = 0; t < 2; t++) begin
      @(negedge clk); sw_l1a[MCOB] = 1; sw_ttype[MCOB] = TT_SW; n_trig++;
      @(negedge clk); sw_l1a[MCOB] = 0;
      wait_bc(400);
    end
    @(negedge clk);
    dtm_cfg[MCOB].gen_period = 16'd400; dtm_cfg[MCOB].gen_count = 32'd4; dtm_cfg[MCOB].gen_enable = 1;
    n_trig += 2;
    wait_bc(1000);
    @(negedge clk) dtm_cfg[MCOB].gen_enable = 0;
    wait_events("locally triggered events complete (relinked lane included)");
    check(!(|sca_overrun) && !(|input_overflow), "no overrun at low rate");

    // burst of closely spaced triggers with one TIS FIFO left undrained:
    // the FEX busy reaches the FTM, and the SCA cells are overwritten
    @(negedge clk) dtm_cfg[MCOB].src = SRC_FTM; hold_tis[9] = 1;
    wait_bc(2);
    for (int t = 0; t < 13; t++) begin ftm_l1a(); wait_bc(8); end
    wait_bc(40);
    check(busy_ftm[MCOB] && fex_busy[9] && !(|fex_busy[8:0]) && !(|fex_busy[31:10]),
          "undrained TIS FIFO: busy from RCE 9 reaches the FTM");
    if (busy_ftm[MCOB]) m_busy_fifo++;
    @(negedge clk) hold_tis[9] = 0;
    wait_bc(40);
    check(!busy_ftm[MCOB], "busy drops when the TIS FIFO is drained");
    wait_events("burst events complete");
    check(&sca_overrun, "SCA overrun flagged in every FEX RCE");
    if (&sca_overrun) m_overrun++;
    check(fex_lost_reads[0] > 0 && fex_dropped[0] == 0, "statistics: lost reads counted, no samples dropped");
    check(fex_busy_count[9] == 1 && fex_busy_count[8] == 0, $sformatf("statistics: busy assertions per FEX RCE %0d %0d", fex_busy_count[9], fex_busy_count[8]));
    check(dtm_l1a_generated[MCOB] == 4 && dtm_ftm_busy_cycles[MCOB] > 0, "statistics: master DTM counters");

    // pass-through
    @(negedge clk) fex_cfg.pass_through = 1;
    ftm_l1a();
    wait_events("pass-through event complete");
    @(negedge clk) fex_cfg.pass_through = 0;

    // links drain
    begin
      int t;
      t = 0;
      while (t < 400000) begin
        int left;
        left = 0;
        for (int r = 0; r < NROL; r++) left += expq[r].size() + (8 - frags_posted[r]);
        if (left == 0) break;
        @(posedge clk); t++;
      end
    end
    for (int r = 0; r < NROL; r++) begin
      check(expq[r].size() == 0 && frags_posted[r] == 8, "ROL drained");
      check(rol_frags[r] == 8, "ROL fragment counter");
    end

    // trigger partition: FEX COB 0 becomes its own domain on its DTM's
    // generator; only its eight RCEs see that trigger
    @(negedge clk) dtm_cfg[0].src = SRC_LOCAL;
    wait_bc(2);
    @(negedge clk); sw_l1a[0] = 1; sw_ttype[0] = 8'h77;
    @(negedge clk); sw_l1a[0] = 0;
    wait_bc(1500);
    begin
      logic ok;
      ok = 1;
      for (int i = 0; i < NF; i++)
        if (tis_seen[i] != ((i < 8) ? n_trig + 1 : n_trig)) ok = 0;
      check(ok && &fmt_done, "partitioned trigger reaches only its own COB");
      if (ok) m_part++;
    end

    $display("mechanisms: ftm=%0d sw=%0d gen=%0d backplane=%0d busy_sw=%0d busy_fifo=%0d pass=%0d overrun=%0d lock=%0d relink=%0d xoff=%0d frames=%0d partition=%0d triggers=%0d",
             m_ftm, m_sw, m_gen, m_bp, m_busy_sw, m_busy_fifo, m_pass, m_overrun, m_lock, m_relink, m_xoff, m_frames, m_part, n_trig);
    check(m_ftm > 0, "mechanism: FTM trigger source");
    check(m_sw > 0, "mechanism: software L1A");
    check(m_gen > 0, "mechanism: trigger generator");
    check(m_bp > 0, "mechanism: backplane distribution");
    check(m_busy_sw > 0, "mechanism: software busy");
    check(m_busy_fifo > 0, "mechanism: FIFO busy back-pressure");
    check(m_pass > 0, "mechanism: pass-through");
    check(m_overrun > 0, "mechanism: SCA overrun");
    check(m_lock > 0, "mechanism: lock timeout");
    check(m_relink > 0, "mechanism: relink");
    check(m_xoff > 0, "mechanism: S-Link flow control");
    check(m_frames > 0, "mechanism: S-Link framing");
    check(m_part > 0, "mechanism: trigger partition");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
