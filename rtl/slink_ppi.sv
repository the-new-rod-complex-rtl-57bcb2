// slink_ppi -- S-Link transmitter plug-in for one Read-Out Link (ROL).
//
// Software posts event fragments as 32-bit words, the last word of each
// fragment flagged, into a FIFO. The transmitter frames each fragment with a
// begin-of-fragment and an end-of-fragment control word (link_ctrl high) and
// sends one word per link tick, which at 40 MHz gives the 160 MB/s of the
// link. The ROS returns flow control on the other fibre of the duplex pair:
// while link_full (XOFF) or link_down is high nothing is sent. The fill state
// of the FIFO (post_space, post_ready) is made visible so that software can
// tell whether more data can be posted, and the plug-in counts sent words,
// sent fragments and ticks held off by flow control.
// From the description: a generic duplex S-Link sender with flow control
// visible to software, 160 MB/s. The control-word values (parameters BOF_WORD,
// EOF_WORD), the FIFO depth and the counters are this design's choices; the
// fragment contents are up to software.
module slink_ppi #(
  parameter int unsigned FIFO_DEPTH = 512,
  parameter logic [31:0] BOF_WORD   = 32'hB0F0_0000,
  parameter logic [31:0] EOF_WORD   = 32'hE0F0_0000
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        link_tick,   // link word clock enable (40 MHz)
  // software side
  input  logic                        post_valid,
  input  logic [31:0]                 post_data,
  input  logic                        post_last,
  output logic                        post_ready,
  output logic [$clog2(FIFO_DEPTH):0] post_space,
  // link side
  output logic                        link_valid,  // a word is on link_data this tick
  output logic [31:0]                 link_data,
  output logic                        link_ctrl,   // the word is a control word
  input  logic                        link_full,   // flow control from the ROS (XOFF)
  input  logic                        link_down,
  // statistics
  output logic [31:0]                 words_sent,
  output logic [31:0]                 frags_sent,
  output logic [31:0]                 xoff_ticks
);
  typedef enum logic [1:0] {T_IDLE, T_DATA, T_EOF} tx_state_e;

  tx_state_e         state;
  logic [32:0]       f_dout;
  logic              f_empty, f_full, f_af, f_ovf, f_pop;
  logic [$clog2(FIFO_DEPTH):0] f_count;
  logic              can_send;

  assign post_ready = !f_full;
  assign post_space = ($clog2(FIFO_DEPTH)+1)'(FIFO_DEPTH) - f_count;
  assign can_send   = link_tick && !link_full && !link_down;
  assign f_pop      = can_send && (state == T_DATA) && !f_empty;

  sync_fifo #(.WIDTH(33), .DEPTH(FIFO_DEPTH), .AF_LEVEL(FIFO_DEPTH - 1)) u_fifo (
    .clk, .rst,
    .push(post_valid && post_ready), .din({post_last, post_data}),
    .pop(f_pop), .dout(f_dout),
    .empty(f_empty), .full(f_full), .almost_full(f_af),
    .overflow(f_ovf), .count(f_count)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= T_IDLE;
      link_valid <= 1'b0;
      link_data  <= '0;
      link_ctrl  <= 1'b0;
      words_sent <= '0;
      frags_sent <= '0;
      xoff_ticks <= '0;
    end else begin
      link_valid <= 1'b0;
      if (link_tick && (link_full || link_down)) xoff_ticks <= xoff_ticks + 1'b1;
      if (can_send) begin
        unique case (state)
          T_IDLE: if (!f_empty) begin
            link_valid <= 1'b1;
            link_data  <= BOF_WORD;
            link_ctrl  <= 1'b1;
            state      <= T_DATA;
          end
          T_DATA: if (!f_empty) begin
            link_valid <= 1'b1;
            link_data  <= f_dout[31:0];
            link_ctrl  <= 1'b0;
            words_sent <= words_sent + 1'b1;
            if (f_dout[32]) state <= T_EOF;
          end
          T_EOF: begin
            link_valid <= 1'b1;
            link_data  <= EOF_WORD;
            link_ctrl  <= 1'b1;
            frags_sent <= frags_sent + 1'b1;
            state      <= T_IDLE;
          end
          default: state <= T_IDLE;
        endcase
      end
    end
  end
endmodule
