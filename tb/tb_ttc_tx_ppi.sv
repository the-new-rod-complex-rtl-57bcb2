// tb_ttc_tx_ppi -- self-checking test of the TTC transmitter plug-in.
// Checks the source select and master outputs, one L1A (with its trigger type)
// per software strobe, one ECR per strobe, a BCR every 3564 bunch crossings,
// and the periodic generator's spacing and count.
module tb_ttc_tx_ppi;
  import nrc_pkg::*;
  logic clk = 0, rst = 1, bc_tick = 0;
  logic master = 0;
  ttc_src_e src_cfg = SRC_FTM;
  logic sw_l1a = 0, sw_ecr = 0, gen_enable = 0;
  logic [7:0] sw_ttype = 0;
  logic [15:0] gen_period = 0;
  logic [31:0] gen_count = 0;
  ttc_src_e src_sel;
  logic bp_drive;
  ttc_t ttc_local;
  logic [31:0] l1a_generated;
  int checks = 0, failures = 0;
  int tick_no = 0, last_bcr = -1, n_bcr = 0, n_l1a = 0, n_ecr = 0, last_l1a = -1;
  int spacing_bad = 0, bcr_bad = 0;
  logic [7:0] last_ttype;

  ttc_tx_ppi dut (.*);
  always #5 clk = ~clk;
  // a bunch-crossing tick every second clock
  always @(posedge clk) bc_tick <= rst ? 1'b0 : !bc_tick;

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s at %0t", msg, $time); end
  endtask

  // sample the stream on each tick, as a receiver does
  always @(posedge clk) if (!rst && bc_tick) begin
    tick_no++;
    if (ttc_local.bcr) begin
      if (last_bcr >= 0 && tick_no - last_bcr != BC_PER_ORBIT) bcr_bad++;
      last_bcr = tick_no; n_bcr++;
    end
    if (ttc_local.l1a) begin
      if (gen_enable && last_l1a >= 0 && tick_no - last_l1a != int'(gen_period)) spacing_bad++;
      last_l1a = tick_no; n_l1a++; last_ttype = ttc_local.ttype;
    end
    if (ttc_local.ecr) n_ecr++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    master <= 1; src_cfg <= SRC_LOCAL;
    repeat (3) @(posedge clk);
    check(src_sel == SRC_LOCAL && bp_drive, "source and master follow software");
    // single software triggers
    for (int k = 0; k < 5; k++) begin
      @(posedge clk); sw_l1a <= 1; sw_ttype <= 8'(8'h40 + k);
      @(posedge clk); sw_l1a <= 0;
      repeat (10) @(posedge clk);
      check(n_l1a == k + 1, "one L1A per software strobe");
      check(last_ttype == 8'(8'h40 + k), "trigger type of software L1A");
    end
    @(posedge clk); sw_ecr <= 1;
    @(posedge clk); sw_ecr <= 0;
    repeat (10) @(posedge clk);
    check(n_ecr == 1, "one ECR per strobe");
    // periodic generator: 20 triggers 37 ticks apart
    n_l1a = 0; last_l1a = -1;
    gen_period <= 37; gen_count <= 32'd25;  // 5 software L1As already counted
    gen_enable <= 1;
    repeat (2 * 37 * 30) @(posedge clk);
    check(n_l1a == 20, "generator stops after gen_count");
    check(spacing_bad == 0, "generator spacing");
    check(l1a_generated == 25, "generated L1A counter");
    gen_enable <= 0;
    repeat (2 * 3564 * 3) @(posedge clk);
    check(n_bcr >= 3, "BCR generated every orbit");
    check(bcr_bad == 0, "orbit length 3564");
    // slave configuration
    master <= 0; src_cfg <= SRC_BACKPLANE;
    repeat (3) @(posedge clk);
    check(src_sel == SRC_BACKPLANE && !bp_drive, "slave configuration");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
