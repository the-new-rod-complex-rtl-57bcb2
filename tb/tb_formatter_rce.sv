// tb_formatter_rce -- self-checking test of a Formatter RCE: its trigger
// receiver and its two S-Link senders. L1As on the trigger stream must each
// give one TIS with consecutive L1IDs and the trigger type. Software posts
// random-length fragments on both links while the ROS side applies random
// flow control (XOFF); every word leaving each link is compared, in order,
// with the expected stream of begin-of-fragment word, posted data and
// end-of-fragment word, and nothing may leave while XOFF is high.
module tb_formatter_rce;
  import nrc_pkg::*;
  localparam int NR = 2;
  logic clk = 0, rst = 1, bc_tick = 0;
  ttc_t ttc = '0;
  logic tis_pop = 0, tis_valid, tis_almost_full;
  tis_t tis;
  logic [NR-1:0] post_valid = 0, post_last = 0, post_ready, link_valid, link_ctrl;
  logic [NR-1:0] link_full = 0, link_down = 0;
  logic [NR-1:0][31:0] post_data = 0, link_data, frags_sent;
  int checks = 0, failures = 0, tick_div = 0;
  logic [32:0] expq [NR][$];
  int n_frag [NR];
  logic [NR-1:0] full_q;

  formatter_rce dut (.*);

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
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // link monitors; XOFF seen at a tick holds that tick's word
  always @(posedge clk) begin
    for (int r = 0; r < NR; r++) if (link_valid[r] && !rst) begin
      logic [32:0] e;
      checks++;
      if (expq[r].size() == 0) begin failures++; $display("FAIL: unexpected word on link %0d", r); end
      else begin
        e = expq[r].pop_front();
        if ({link_ctrl[r], link_data[r]} !== e) begin
          failures++; $display("FAIL: link %0d word %h expected %h", r, {link_ctrl[r], link_data[r]}, e);
        end
      end
      if (full_q[r]) begin failures++; $display("FAIL: link %0d sent during XOFF", r); end
    end
    full_q <= link_full | link_down;
  end

  // ROS flow control
  always @(negedge clk) if (bc_tick) begin
    for (int r = 0; r < NR; r++) link_full[r] = ($urandom_range(5) == 0);
  end

  // software posting on each link
  for (genvar r = 0; r < NR; r++) begin : g_post
    initial begin
      @(negedge rst);
      repeat (10) @(negedge clk);
      for (int f = 0; f < 25; f++) begin
        int len;
        len = 1 + $urandom_range(60);
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
        n_frag[r]++;
        repeat ($urandom_range(30)) @(negedge clk);
      end
    end
  end

  initial begin
    full_q = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int t = 0; t < 10; t++) begin
      @(posedge clk iff bc_tick);
      @(negedge clk); ttc.l1a = 1; ttc.ttype = 8'(t + 3);
      @(posedge clk iff bc_tick);
      @(negedge clk); ttc.l1a = 0;
      repeat (20) @(posedge clk);
    end
    for (int t = 0; t < 10; t++) begin
      check(tis_valid && tis.l1id == 24'(t) && tis.ttype == 8'(t + 3), "TIS per trigger");
      @(negedge clk) tis_pop = 1;
      @(negedge clk) tis_pop = 0;
    end
    check(!tis_valid, "no extra TIS");
    wait (n_frag[0] == 25 && n_frag[1] == 25);
    repeat (4 * 2000) @(posedge clk);
    for (int r = 0; r < NR; r++) begin
      check(expq[r].size() == 0, "all words sent");
      check(frags_sent[r] == 25, "fragment counter");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
