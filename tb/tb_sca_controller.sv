// tb_sca_controller -- self-checking test of the SCA controller.
// The testbench mirrors the analog memory's write pointer from the write
// strobes of the control words, predicts for every trigger the cells that must
// be read (cfg_latency writes back, cfg_nslices consecutive good cells, bad
// cells skipped) and checks the read words, their tags, their spacing of 12
// ADC periods, the write/ADC clock patterns, and the overrun detection when
// triggers come faster than the memory can be read out.
module tb_sca_controller;
  import nrc_pkg::*;
  logic clk = 0, rst = 1, bc_tick = 0;
  logic cfg_wclk40 = 0;
  logic [3:0] cfg_adc_div = 6, cfg_nslices = 4;
  logic [7:0] cfg_latency = 20;
  logic [N_CELL-1:0] cfg_bad_cell = '0;
  logic trig = 0;
  logic [23:0] trig_l1id = 0;
  ctrl_word_t ctrl_word;
  logic ctrl_valid, rd_issue, overrun, trig_overflow;
  logic [23:0] rd_l1id;
  logic [3:0] rd_slice;
  logic [7:0] rd_cell;
  logic [15:0] lost_reads;
  logic [5:0] pending;
  int checks = 0, failures = 0;
  int n_writes = 0, model_wptr = 0, tick_no = 0, last_read_tick = -1000;
  int exp_cells[$], exp_tags[$];
  int n_reads = 0, spacing_bad = 0, wclk_bad = 0, adc_rises = 0, last_adc_rise = -1, adc_bad = 0;
  logic prev_adc = 0, prev_wclk = 0;
  logic check_spacing = 1;

  sca_controller dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) bc_tick <= rst ? 1'b0 : !bc_tick;

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s at %0t", msg, $time); end
  endtask

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // front-end view of the control stream
  always @(posedge clk) if (ctrl_valid) begin
    tick_no++;
    if (ctrl_word.kind == CW_WRITE) begin
      checks++;
      if (int'(ctrl_word.addr) != model_wptr) begin failures++; $display("FAIL: write cell %0d exp %0d", ctrl_word.addr, model_wptr); end
    end else begin
      int e;
      n_reads++;
      e = exp_cells.pop_front();
      checks++;
      if (int'(ctrl_word.addr) != e) begin failures++; $display("FAIL: read cell %0d exp %0d", ctrl_word.addr, e); end
      checks++;
      if (int'(ctrl_word.tag) != (exp_tags.pop_front() & 63)) begin failures++; $display("FAIL: read tag"); end
      if (check_spacing && tick_no - last_read_tick < 12 * int'(cfg_adc_div)) spacing_bad++;
      last_read_tick = tick_no;
    end
    if (cfg_wclk40 ? !ctrl_word.wclk : (ctrl_word.wclk == prev_wclk)) wclk_bad++;
    prev_wclk = ctrl_word.wclk;
    if (ctrl_word.adcclk && !prev_adc) begin
      if (last_adc_rise >= 0 && tick_no - last_adc_rise != int'(cfg_adc_div)) adc_bad++;
      last_adc_rise = tick_no; adc_rises++;
    end
    prev_adc = ctrl_word.adcclk;
    if (ctrl_word.wclk) begin
      n_writes++;
      model_wptr = (model_wptr == N_CELL - 1) ? 0 : model_wptr + 1;
    end
  end

  // issue a trigger and predict its reads
  task automatic fire(input int l1id);
    int c;
    @(negedge clk);
    trig = 1; trig_l1id = 24'(l1id);
    // a word shown now is counted by the monitor on the next edge
    c = (n_writes + ((ctrl_valid && ctrl_word.wclk) ? 1 : 0) - int'(cfg_latency)) % N_CELL;
    if (c < 0) c += N_CELL;
    for (int s = 0; s < int'(cfg_nslices); s++) begin
      while (cfg_bad_cell[c]) c = (c + 1) % N_CELL;
      exp_cells.push_back(c);
      exp_tags.push_back(l1id);
      c = (c + 1) % N_CELL;
    end
    @(negedge clk);
    trig = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // 20 MHz write clock, 6.67 MHz ADC clock, three bad cells
    cfg_bad_cell[50] = 1; cfg_bad_cell[51] = 1; cfg_bad_cell[100] = 1;
    repeat (400) @(posedge clk);
    for (int t = 0; t < 12; t++) begin
      fire(t + 100);
      repeat (2 * (300 + 37 * t)) @(posedge clk);
    end
    repeat (2000) @(posedge clk);
    check(n_reads == 48, "four reads per trigger");
    check(exp_cells.size() == 0, "all predicted reads seen");
    check(spacing_bad == 0, "12 ADC periods between reads");
    check(wclk_bad == 0, "20 MHz write clock pattern");
    check(adc_rises > 100 && adc_bad == 0, "ADC clock period 6 ticks");
    check(!overrun && lost_reads == 0, "no overrun at low rate");
    // a trigger landing on the bad cells: reads must skip them
    // (covered above when the window crosses 50/51/100; make sure one did)
    // 40 MHz write clock, 5 MHz ADC: back-to-back triggers overrun the memory
    @(negedge clk);
    cfg_wclk40 = 1; cfg_adc_div = 8; cfg_latency = 10;
    check_spacing = 1;
    repeat (200) @(posedge clk);
    wclk_bad = 0; adc_bad = 0; last_adc_rise = -1;
    for (int t = 0; t < 4; t++) fire(t + 200);
    repeat (2 * 4 * 4 * 96 + 400) @(posedge clk);
    check(exp_cells.size() == 0, "burst reads all issued");
    check(overrun && lost_reads > 0, "overrun detected when write pointer passes");
    check(wclk_bad == 0, "40 MHz write strobe on every tick");
    check(adc_bad == 0, "ADC clock period 8 ticks");
    $display("reads=%0d lost=%0d", n_reads, lost_reads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
