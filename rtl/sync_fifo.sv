// sync_fifo -- single-clock first-in first-out buffer used by the plug-ins.
//
// A circular buffer of DEPTH entries with registered read data: dout always
// shows the oldest entry (first-word-fall-through), pop removes it. count is the
// number of stored entries; almost_full rises when count reaches AF_LEVEL, which
// is how the plug-ins raise back-pressure before the buffer is truly full.
// A push while full is dropped and sets the sticky overflow flag, a pop while
// empty is ignored. DEPTH must be a power of two. Simultaneous push and pop are
// allowed in any state except a push into a full FIFO without a pop.
module sync_fifo #(
  parameter int unsigned WIDTH    = 32,
  parameter int unsigned DEPTH    = 16,
  parameter int unsigned AF_LEVEL = DEPTH - 2
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       push,
  input  logic [WIDTH-1:0]           din,
  input  logic                       pop,
  output logic [WIDTH-1:0]           dout,
  output logic                       empty,
  output logic                       full,
  output logic                       almost_full,
  output logic                       overflow,
  output logic [$clog2(DEPTH):0]     count
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;
  logic             do_push, do_pop;

  assign empty       = (count == 0);
  assign full        = (count == (AW+1)'(DEPTH));
  assign almost_full = (count >= (AW+1)'(AF_LEVEL));
  assign do_pop      = pop && !empty;
  assign do_push     = push && (!full || do_pop);
  assign dout        = mem[rp];

  always_ff @(posedge clk) begin
    if (do_push) mem[wp] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp       <= '0;
      rp       <= '0;
      count    <= '0;
      overflow <= 1'b0;
    end else begin
      if (do_push) wp <= wp + 1'b1;
      if (do_pop)  rp <= rp + 1'b1;
      count <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
      if (push && !do_push) overflow <= 1'b1;
    end
  end

  initial begin
    assert (DEPTH == (1 << AW)) else $error("sync_fifo: DEPTH must be a power of two");
  end
endmodule
