// glink_deconv -- unpacks the 12-bit samples of one ASM-II lane.
//
// A lane is the pair of G-Link fibres of one ASM-II; each valid lane word is 32
// bits ({second fibre, first fibre}). The samples are packed back to back
// without framing, least significant bit first, so 8 samples fill 3 lane words
// and one time slice of 192 channels fills 72 words. Words enter a 64-bit bit
// accumulator; one sample leaves per clock whenever 12 bits are present, so the
// fabric clock must run at least three times faster than lane words arrive
// (the FPGA fabric runs at about eleven times the 40 MHz link rate). A word that
// would not fit sets the sticky overflow flag and is dropped. clear empties the
// accumulator (used when the link is re-enabled). The packing order and the
// one-sample-per-clock structure are this design's choices.
module glink_deconv
  import nrc_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  logic                clear,
  input  logic                in_valid,
  input  logic [LANE_W-1:0]   in_word,
  output logic                out_valid,
  output logic [SAMPLE_W-1:0] out_sample,
  output logic                overflow
);
  logic [63:0] acc;
  logic [6:0]  nbits;
  logic [6:0]  after_out;
  logic        take;

  assign out_valid  = (nbits >= 7'(SAMPLE_W));
  assign out_sample = acc[SAMPLE_W-1:0];
  assign after_out  = out_valid ? nbits - 7'(SAMPLE_W) : nbits;
  assign take       = in_valid && (after_out + 7'(LANE_W) <= 7'd64);

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      acc      <= '0;
      nbits    <= '0;
      overflow <= rst ? 1'b0 : overflow;
    end else begin
      logic [63:0] shifted;
      shifted = out_valid ? (acc >> SAMPLE_W) : acc;
      if (take) shifted = shifted | (64'(in_word) << after_out);
      acc   <= shifted;
      nbits <= after_out + (take ? 7'(LANE_W) : 7'd0);
      if (in_valid && !take) overflow <= 1'b1;
    end
  end
endmodule
