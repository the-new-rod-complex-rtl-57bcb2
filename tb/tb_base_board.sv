// tb_base_board -- self-checking test of the base board trigger mux and busy fan-in.
// Random source selects, trigger streams, busy lines and masks are applied and
// the outputs compared with a reference computed in the testbench.
module tb_base_board;
  import nrc_pkg::*;
  localparam int N = 9;
  ttc_src_e         src_sel;
  ttc_t             ttc_ftm, ttc_bp, ttc_local, ttc_sel, exp_ttc;
  ttc_t [N-1:0]     ttc_out;
  logic [N-1:0]     busy_in, busy_mask;
  logic             busy_sum, exp_busy;
  int checks = 0, failures = 0;

  base_board #(.N_RCE(N)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 600; i++) begin
      src_sel   = ttc_src_e'(i % 3);
      ttc_ftm   = ttc_t'($urandom);
      ttc_bp    = ttc_t'($urandom);
      ttc_local = ttc_t'($urandom);
      busy_in   = N'($urandom);
      busy_mask = (i % 4 == 0) ? '0 : N'($urandom);
      #1;
      exp_ttc  = (i % 3 == 0) ? ttc_ftm : (i % 3 == 1) ? ttc_bp : ttc_local;
      exp_busy = 1'b0;
      for (int b = 0; b < N; b++) if (busy_in[b] && !busy_mask[b]) exp_busy = 1'b1;
      checks++;
      if (ttc_sel !== exp_ttc) begin failures++; $display("mux mismatch at %0d", i); end
      for (int b = 0; b < N; b++) begin
        checks++;
        if (ttc_out[b] !== exp_ttc) begin failures++; $display("fan-out %0d mismatch", b); end
      end
      checks++;
      if (busy_sum !== exp_busy) begin failures++; $display("busy mismatch at %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
