// tb_ttc_rx_ppi -- self-checking test of the TTC receiver plug-in.
// A random trigger stream with BCRs (every 3564 ticks) and occasional ECRs is
// applied. A reference model of the counters predicts every Trigger
// Information Structure, which is compared as software drains the FIFO. The
// trigger pulse to the SCA controller, the almost-full back-pressure and the
// overflow flag are also checked.
module tb_ttc_rx_ppi;
  import nrc_pkg::*;
  logic clk = 0, rst = 1, bc_tick = 0;
  ttc_t ttc = '0;
  logic trig, tis_pop = 0, tis_valid, almost_full, overflow;
  logic [23:0] trig_l1id;
  tis_t tis;
  logic [4:0] tis_count;
  int checks = 0, failures = 0, n_trig = 0, n_tis = 0;
  tis_t expq[$];
  logic [11:0] m_bcid = 0;
  logic [31:0] m_orbit = 0;
  logic [23:0] m_l1id = 0;
  logic [7:0]  m_ecr = 0;
  int bc_in_orbit = 0;

  ttc_rx_ppi dut (.*);
  always #5 clk = ~clk;

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

  always @(posedge clk) if (trig) begin
    n_trig++;
    check(trig_l1id == expq[expq.size()-1].l1id, "trigger pulse carries the L1ID");
  end

  // drive one bunch crossing: the stream is set up, then sampled on the tick
  task automatic bc(input logic l1a, input logic ecr);
    @(negedge clk);
    ttc.bcr   = (bc_in_orbit == 0);
    ttc.l1a   = l1a;
    ttc.ecr   = ecr;
    ttc.ttype = 8'($urandom);
    bc_tick   = 1;
    // reference model
    if (ttc.bcr) begin m_bcid = 0; end
    if (l1a) expq.push_back('{ecr_cnt: m_ecr, l1id: m_l1id, bcid: m_bcid, orbit: m_orbit + (ttc.bcr ? 0 : 0), ttype: ttc.ttype});
    @(negedge clk);
    bc_tick = 0;
    if (ttc.bcr) begin m_orbit++; m_bcid = 1; end
    else m_bcid = (m_bcid == 12'(BC_PER_ORBIT - 1)) ? 0 : m_bcid + 1;
    if (ecr) begin m_ecr++; m_l1id = 0; end
    else if (l1a) m_l1id++;
    bc_in_orbit = (bc_in_orbit == BC_PER_ORBIT - 1) ? 0 : bc_in_orbit + 1;
  endtask

  task automatic drain();
    while (tis_valid) begin
      tis_t e;
      @(negedge clk);
      e = expq.pop_front();
      check(tis == e, "TIS contents");
      if (tis != e) $display("  got %h exp %h", tis, e);
      n_tis++;
      tis_pop = 1;
      @(negedge clk);
      tis_pop = 0;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // random stream, drained often
    for (int i = 0; i < 9000; i++) begin
      bc($urandom % 23 == 0, (i % 4000) == 3999);
      if (i % 50 == 0) drain();
    end
    drain();
    check(expq.size() == 0, "every L1A produced a TIS");
    check(n_trig == n_tis, "one SCA trigger per L1A");
    check(!almost_full && !overflow, "no back-pressure while drained");
    // back-pressure: 12 undrained L1As raise almost-full, 17 overflow
    for (int k = 0; k < 11; k++) bc(1, 0);
    @(negedge clk);
    check(!almost_full, "below almost-full level");
    bc(1, 0);
    @(negedge clk);
    check(almost_full, "almost-full at 12 entries");
    for (int k = 0; k < 5; k++) bc(1, 0);
    @(negedge clk);
    check(overflow, "overflow when a TIS is lost");
    check(tis_count == 16, "FIFO holds 16");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
