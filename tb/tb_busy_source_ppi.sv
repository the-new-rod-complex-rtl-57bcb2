// tb_busy_source_ppi -- self-checking test of the busy source plug-in.
// Checks that busy comes out of reset asserted, is released by software, follows
// the almost-full inputs one clock later, and that the statistics count.
module tb_busy_source_ppi;
  localparam int N = 2;
  logic clk = 0, rst = 1;
  logic [N-1:0] almost_full = '0;
  logic sw_set = 0, sw_clr = 0;
  logic busy, sw_busy;
  logic [N-1:0][31:0] src_busy_cycles;
  logic [31:0] busy_cycles, busy_count;
  int checks = 0, failures = 0;
  int exp_src [N];
  int exp_rises;
  logic exp_busy, prev_exp;

  busy_source_ppi #(.N_SRC(N)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s at %0t", msg, $time); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    check(busy && sw_busy, "busy after reset");
    repeat (5) @(posedge clk);
    check(busy, "busy held until software clears it");
    sw_clr <= 1;
    @(posedge clk); sw_clr <= 0;
    @(posedge clk); @(posedge clk);
    check(!busy && !sw_busy, "released by software");
    exp_src = '{0, 0};
    exp_rises = busy_count;
    prev_exp = 1'b0;
    for (int i = 0; i < 400; i++) begin
      logic model_sw;
      @(negedge clk);
      almost_full = N'($urandom);
      sw_set = (i == 200);
      sw_clr = (i == 250);
      model_sw = (i > 200 && i <= 250);  // software bit acts one clock after its strobe
      @(posedge clk);
      for (int s = 0; s < N; s++) if (almost_full[s]) exp_src[s]++;
      #1;
      check(busy == ((|almost_full) | model_sw), "busy follows sources one clock later");
    end
    @(negedge clk);
    sw_set = 0; sw_clr = 0;
    almost_full = '0;
    @(posedge clk); @(posedge clk); #1;
    for (int s = 0; s < N; s++) check(src_busy_cycles[s] == 32'(exp_src[s]), "per-source statistics");
    check(busy_count > 32'(exp_rises), "busy rises counted");
    check(busy_cycles > 0, "busy cycles counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
