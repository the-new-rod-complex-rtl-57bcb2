// ttc_rx_ppi -- TTC receiver plug-in: builds the Trigger Information Structure.
//
// The plug-in samples the COB's trigger stream on every bunch-crossing tick and
// keeps the bunch crossing number (cleared by BCR, wrapping after 3564), the
// orbit number (counted by BCR), the L1A number (cleared by ECR) and the number
// of ECRs. On each L1A it writes a TIS {ECR count, L1ID, BCID, orbit, trigger
// type} into a FIFO that software drains, and in the same clock sends a trigger
// pulse with the L1ID to the SCA controller. When the FIFO is not drained fast
// enough it reaches its almost-full level and asserts back-pressure, as the
// Input plug-in does. The TIS contents and the back-pressure follow the
// description; the field widths, the FIFO depth and almost-full level and the
// exact counter conventions (BCID of the L1A tick, L1ID starting at 0 after
// ECR) are this design's choices.
module ttc_rx_ppi
  import nrc_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 16,
  parameter int unsigned AF_LEVEL   = 12
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        bc_tick,
  input  ttc_t                        ttc,
  output logic                        trig,          // to the SCA controller
  output logic [23:0]                 trig_l1id,
  input  logic                        tis_pop,       // software read
  output tis_t                        tis,
  output logic                        tis_valid,
  output logic                        almost_full,   // back-pressure
  output logic                        overflow,      // a TIS was lost
  output logic [$clog2(FIFO_DEPTH):0] tis_count
);
  logic [11:0] bcid;
  logic [31:0] orbit;
  logic [23:0] l1id;
  logic [7:0]  ecr_cnt;
  logic        fifo_empty, fifo_full;
  tis_t        new_tis;
  logic        push;

  assign push    = bc_tick && ttc.l1a;
  assign new_tis = '{ecr_cnt: ecr_cnt, l1id: l1id, bcid: ttc.bcr ? 12'd0 : bcid,
                     orbit: orbit, ttype: ttc.ttype};

  always_ff @(posedge clk) begin
    if (rst) begin
      bcid      <= '0;
      orbit     <= '0;
      l1id      <= '0;
      ecr_cnt   <= '0;
      trig      <= 1'b0;
      trig_l1id <= '0;
    end else begin
      trig <= push;
      if (push) trig_l1id <= l1id;
      if (bc_tick) begin
        if (ttc.bcr) begin
          bcid  <= 12'd1;
          orbit <= orbit + 1'b1;
        end else begin
          bcid <= (bcid == 12'(BC_PER_ORBIT - 1)) ? '0 : bcid + 1'b1;
        end
        if (ttc.ecr) begin
          ecr_cnt <= ecr_cnt + 1'b1;
          l1id    <= '0;
        end else if (ttc.l1a) begin
          l1id <= l1id + 1'b1;
        end
      end
    end
  end

  sync_fifo #(.WIDTH(TIS_W), .DEPTH(FIFO_DEPTH), .AF_LEVEL(AF_LEVEL)) u_fifo (
    .clk, .rst,
    .push(push), .din(new_tis),
    .pop(tis_pop), .dout(tis),
    .empty(fifo_empty), .full(fifo_full),
    .almost_full(almost_full), .overflow(overflow), .count(tis_count)
  );
  assign tis_valid = !fifo_empty;
endmodule
