// tb_busy_dest_ppi -- self-checking test of the busy destination plug-in.
// Random COB busy, backplane busy lines and routing enables; the FTM and
// backplane outputs must equal the enabled OR one clock later.
module tb_busy_dest_ppi;
  localparam int N = 5;
  logic clk = 0, rst = 1;
  logic busy_cob = 0;
  logic [N-1:0] busy_bp_in = '0, bp_enable = '0;
  logic to_ftm_en = 0, to_bp_en = 0;
  logic busy_ftm, busy_bp_out;
  logic [31:0] ftm_busy_cycles;
  int checks = 0, failures = 0, exp_cycles = 0;

  busy_dest_ppi #(.N_BP(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < 500; i++) begin
      logic sum;
      @(negedge clk);
      busy_cob   = ($urandom % 4 == 0);
      busy_bp_in = N'($urandom);
      bp_enable  = N'($urandom);
      to_ftm_en  = ($urandom % 4 != 0);
      to_bp_en   = ($urandom % 2 == 0);
      sum = busy_cob | (|(busy_bp_in & bp_enable));
      @(posedge clk); #1;
      checks += 2;
      if (busy_ftm !== (sum & to_ftm_en)) begin failures++; $display("FAIL: ftm at %0d", i); end
      if (busy_bp_out !== (sum & to_bp_en)) begin failures++; $display("FAIL: bp at %0d", i); end
      if (busy_ftm) exp_cycles++;
    end
    @(negedge clk);
    busy_cob = 0; bp_enable = '0;
    @(posedge clk); @(posedge clk); #1;
    checks++;
    if (ftm_busy_cycles != 32'(exp_cycles)) begin failures++; $display("FAIL: busy time %0d vs %0d", ftm_busy_cycles, exp_cycles); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
