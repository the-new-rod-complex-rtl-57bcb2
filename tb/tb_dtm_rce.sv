// tb_dtm_rce -- self-checking test of the DTM RCE (trigger source and busy
// collection of one COB). Random configurations and busy inputs are applied
// every clock and the registered outputs are compared with a reference
// model one clock later: source select, backplane drive, busy mask, busy to
// the FTM and busy to the backplane. A second phase counts L1As on the local
// stream: software L1As and ECRs each appear once, with the requested trigger
// type, and the periodic generator stops after the programmed count.
module tb_dtm_rce;
  import nrc_pkg::*;
  logic clk = 0, rst = 1, bc_tick = 0;
  dtm_cfg_t cfg;
  logic sw_l1a = 0, sw_ecr = 0;
  logic [7:0] sw_ttype = 0;
  ttc_src_e src_sel;
  ttc_t ttc_local;
  logic bp_drive, busy_cob = 0, busy_ftm, busy_bp_out;
  logic [8:0] busy_mask;
  logic [4:0] busy_bp_in = 0;
  logic [31:0] l1a_generated, ftm_busy_cycles;
  int checks = 0, failures = 0, n_l1a = 0, n_ecr = 0, n_bcr = 0, n_ftm_busy = 0;
  logic [7:0] last_ttype;

  dtm_rce dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s at %0t", msg, $time); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (bc_tick && !rst) begin
    if (ttc_local.l1a) begin n_l1a++; last_ttype = ttc_local.ttype; end
    if (ttc_local.ecr) n_ecr++;
    if (ttc_local.bcr) n_bcr++;
  end

  initial begin
    dtm_cfg_t prev_cfg;
    logic prev_cob;
    logic [4:0] prev_bp;
    cfg = '0;
    cfg.src = SRC_FTM;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // phase 1: registered configuration and busy paths
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      prev_cfg = cfg; prev_cob = busy_cob; prev_bp = busy_bp_in;
      cfg.master    = $urandom_range(1);
      cfg.src       = cfg.master ? ttc_src_e'($urandom_range(1) * 2)
                                 : ttc_src_e'($urandom_range(2));
      cfg.busy_mask = 9'($urandom);
      cfg.bp_enable = 5'($urandom);
      cfg.to_ftm_en = $urandom_range(1);
      cfg.to_bp_en  = $urandom_range(1);
      busy_cob      = ($urandom_range(3) == 0);
      busy_bp_in    = 5'($urandom);
      @(posedge clk); #1;
      check(src_sel == cfg.src && bp_drive == cfg.master, "source select and drive");
      check(busy_mask == cfg.busy_mask, "busy mask");
      check(busy_ftm == (cfg.to_ftm_en && (busy_cob || |(busy_bp_in & cfg.bp_enable))), "busy to FTM");
      check(busy_bp_out == (cfg.to_bp_en && (busy_cob || |(busy_bp_in & cfg.bp_enable))), "busy to backplane");
      if (busy_ftm) n_ftm_busy++;
    end
    @(negedge clk);
    cfg = '0; cfg.master = 1; cfg.src = SRC_LOCAL; busy_cob = 0; busy_bp_in = 0;
    repeat (2) @(posedge clk);
    check(ftm_busy_cycles == 32'(n_ftm_busy), "FTM busy cycle counter");
    // phase 2: local trigger stream, bunch crossing every 4 clocks
    fork
      forever begin
        @(negedge clk) bc_tick = 0;
        repeat (3) @(negedge clk);
        bc_tick = 1;
      end
    join_none
    repeat (20) @(posedge clk);
    n_l1a = 0; n_ecr = 0;
    for (int k = 0; k < 7; k++) begin
      @(negedge clk); sw_l1a = 1; sw_ttype = 8'(8'h40 + k);
      @(negedge clk); sw_l1a = 0;
      repeat (40) @(posedge clk);
      check(n_l1a == k + 1 && last_ttype == 8'(8'h40 + k), "software L1A with its trigger type");
    end
    @(negedge clk); sw_ecr = 1;
    @(negedge clk); sw_ecr = 0;
    repeat (40) @(posedge clk);
    check(n_ecr == 1, "software ECR");
    check(l1a_generated == 7, "generated-L1A counter");
    @(negedge clk); cfg.gen_period = 16'd10; cfg.gen_count = 32'd12; cfg.gen_enable = 1;
    repeat (4 * 10 * 20) @(posedge clk);
    check(n_l1a == 12, "generator stops at its count");
    check(last_ttype == 8'h01, "generated trigger type");
    repeat (4 * 3564 + 40) @(posedge clk);
    check(n_bcr >= 1, "bunch-counter reset each orbit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
