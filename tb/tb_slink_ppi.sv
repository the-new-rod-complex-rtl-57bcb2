// tb_slink_ppi -- self-checking test of the S-Link transmitter plug-in.
// Random-length fragments are posted; the link stream must show, per fragment,
// the begin control word, the data in order and the end control word. With
// the link free the plug-in must send one word on every link tick (the 160 MB/s
// rate); while the ROS holds flow control (link_full) it must send nothing.
module tb_slink_ppi;
  logic clk = 0, rst = 1, link_tick = 0;
  logic post_valid = 0, post_last = 0;
  logic [31:0] post_data = 0;
  logic post_ready;
  logic [9:0] post_space;
  logic link_valid, link_ctrl;
  logic [31:0] link_data;
  logic link_full = 0, link_down = 0;
  logic [31:0] words_sent, frags_sent, xoff_ticks;
  int checks = 0, failures = 0;
  logic [32:0] expq[$];    // {ctrl, word}
  int n_frag = 0, sent_during_xoff = 0, xoff_seen = 0;
  logic full_at_tick;

  slink_ppi #(.FIFO_DEPTH(512)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) link_tick <= rst ? 1'b0 : !link_tick;

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

  // link receiver
  always @(posedge clk) begin
    if (!rst && link_tick) full_at_tick <= link_full;
    if (link_valid) begin
      logic [32:0] e;
      e = expq.pop_front();
      checks++;
      if ({link_ctrl, link_data} !== e) begin
        failures++; $display("FAIL: link word %h exp %h", {link_ctrl, link_data}, e);
      end
      if (full_at_tick) sent_during_xoff++;
    end
  end

  task automatic post_frag(input int len);
    expq.push_back({1'b1, 32'hB0F0_0000});
    for (int w = 0; w < len; w++) begin
      logic [31:0] d;
      d = $urandom;
      @(negedge clk);
      while (!post_ready) @(negedge clk);
      post_valid = 1; post_data = d; post_last = (w == len - 1);
      expq.push_back({1'b0, d});
      @(negedge clk);
      post_valid = 0; post_last = 0;
    end
    expq.push_back({1'b1, 32'hE0F0_0000});
    n_frag++;
  endtask

  initial begin
    int t0, t1, nw;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // rate: hold the link, post 100 words, release, count ticks
    link_full = 1;
    post_frag(100);
    repeat (4) @(negedge clk);
    link_full = 0;
    nw = 0; t0 = -1; t1 = 0;
    for (int c = 0; c < 400; c++) begin
      @(posedge clk);
      if (link_valid) begin if (t0 < 0) t0 = c; t1 = c; nw++; end
    end
    check(nw == 102, "fragment framed by two control words");
    check(t1 - t0 == 2 * (nw - 1), "one word per link tick (160 MB/s)");
    // random fragments with random flow control
    fork
      begin
        for (int f = 0; f < 40; f++) post_frag(1 + $urandom % 40);
      end
      begin
        for (int c = 0; c < 8000; c++) begin
          @(negedge clk);
          if ($urandom % 16 == 0) link_full = !link_full;
          if (link_full) xoff_seen++;
        end
        link_full = 0;
      end
    join
    repeat (1000) @(posedge clk);
    check(expq.size() == 0, "all words delivered");
    check(frags_sent == 32'(n_frag), "fragment counter");
    check(sent_during_xoff == 0, "nothing sent while flow control held");
    check(xoff_seen > 0 && xoff_ticks > 0, "flow control exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
