// busy_source_ppi -- an RCE's contribution to the back-pressure (BUSY) of the complex.
//
// BUSY is the OR of the almost-full flags of the RCE's FIFOs (the Input and TTC
// receiver plug-ins) and of a software-controlled busy bit. As described for the
// plug-ins, the software bit comes out of reset set, so the RCE holds the system
// busy until its software, as its last step before waiting for events, clears it
// with sw_clr. The output is registered (one clock after the cause).
// The plug-in also keeps statistics for finding busy hot spots: per source the
// number of clocks it was asserted, the number of clocks BUSY was asserted and
// the number of times BUSY rose. Counter widths and the registered output are
// this design's choices; counters saturate instead of wrapping.
module busy_source_ppi #(
  parameter int unsigned N_SRC = 2,         // Input plug-in and TTC receiver FIFOs
  parameter int unsigned CNT_W = 32
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic [N_SRC-1:0]            almost_full,
  input  logic                        sw_set,       // software asserts busy
  input  logic                        sw_clr,       // software releases busy
  output logic                        busy,
  output logic                        sw_busy,
  output logic [N_SRC-1:0][CNT_W-1:0] src_busy_cycles,
  output logic [CNT_W-1:0]            busy_cycles,
  output logic [CNT_W-1:0]            busy_count    // rising edges of busy
);
  logic busy_next;
  assign busy_next = (|almost_full) | sw_busy;

  always_ff @(posedge clk) begin
    if (rst) begin
      sw_busy         <= 1'b1;
      busy            <= 1'b1;
      src_busy_cycles <= '0;
      busy_cycles     <= '0;
      busy_count      <= '0;
    end else begin
      if (sw_set)      sw_busy <= 1'b1;
      else if (sw_clr) sw_busy <= 1'b0;
      busy <= busy_next;
      if (busy_next && !busy && busy_count != '1) busy_count <= busy_count + 1'b1;
      if (busy && busy_cycles != '1)              busy_cycles <= busy_cycles + 1'b1;
      for (int i = 0; i < N_SRC; i++)
        if (almost_full[i] && src_busy_cycles[i] != '1)
          src_busy_cycles[i] <= src_busy_cycles[i] + 1'b1;
    end
  end
endmodule
