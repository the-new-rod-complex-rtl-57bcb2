// sca_controller -- builds the control word stream that operates the ASM-II boards.
//
// One 17-bit control word (ctrl_word_t) is sent per bunch-crossing tick over
// the control fibre and fanned out to the five ASM-IIs of the chamber. Each word
// carries the level of the SCA write clock (a write strobe: every tick in 40 MHz
// mode, every other tick in 20 MHz mode), the ADC conversion / read clock
// (cfg_adc_div ticks per period: 8 gives 5 MHz, 6 gives 6.67 MHz), and one
// address: the cell being written (kind CW_WRITE) or a cell to be read out
// (kind CW_READ, with the low bits of the L1ID as tag).
//
// The controller mirrors the write pointer of the 144-cell analog memory and
// counts writes (a serial number). On a trigger it queues the cell written
// cfg_latency writes ago; the read sequencer later reads cfg_nslices
// consecutive cells from there, oldest first, skipping any cell marked in
// cfg_bad_cell. After a read it leaves 12 ADC periods free (one SCA holds 12
// channels, each converted in one ADC period) before the next, so a time slice
// takes 72 ticks = 1.8 us at 6.67 MHz. A read of a cell that has already been
// written over (144 or more writes ago) is still sent, so that the front-end
// data keep their framing, but is counted in lost_reads and sets overrun. A
// read of a cell not yet written waits until it is.
//
// From the description: the 17-bit words at 40 MHz, write clock at 20 or 40 MHz,
// ADC clock at 5 or 6.67 MHz, the 144 cells, a configurable latency and number
// of time slices, bad-cell avoidance and tracking which read belongs to which
// trigger. The field layout of the word, the mirrored write pointer, the gap of
// 12 ADC periods between reads and the queue depth are this design's choices.
module sca_controller
  import nrc_pkg::*;
#(
  parameter int unsigned TRIG_DEPTH = 32    // triggers waiting to be read out
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                bc_tick,
  // configuration
  input  logic                cfg_wclk40,    // 1: write every tick, 0: every other tick
  input  logic [3:0]          cfg_adc_div,   // ticks per ADC clock period (>= 2)
  input  logic [7:0]          cfg_latency,   // writes between sample and trigger (< 144)
  input  logic [3:0]          cfg_nslices,   // time slices per trigger (>= 1)
  input  logic [N_CELL-1:0]   cfg_bad_cell,  // 1 = never read this cell
  // trigger from the TTC receiver
  input  logic                trig,
  input  logic [23:0]         trig_l1id,
  // control fibre
  output ctrl_word_t          ctrl_word,
  output logic                ctrl_valid,    // pulses once per tick with a new word
  // read bookkeeping for the rest of the RCE
  output logic                rd_issue,
  output logic [23:0]         rd_l1id,
  output logic [3:0]          rd_slice,
  output logic [7:0]          rd_cell,
  output logic                overrun,       // sticky
  output logic                trig_overflow, // sticky: trigger queue full
  output logic [15:0]         lost_reads,
  output logic [$clog2(TRIG_DEPTH):0] pending
);
  typedef struct packed {
    logic [23:0] l1id;
    logic [7:0]  addr;
    logic [15:0] serial;
  } trig_entry_t;

  typedef enum logic [1:0] {S_IDLE, S_SEEK, S_WAIT} seq_state_e;

  logic [7:0]  wptr;          // next cell to be written
  logic [15:0] wserial;       // writes done
  logic        wphase;        // 20 MHz mode: write on phase 0
  logic [3:0]  adc_cnt;
  logic [7:0]  space_cnt;     // ticks until the next read may go
  logic        write_now;
  logic        adc_level;

  trig_entry_t q_in, q_out;
  logic        q_empty, q_full, q_af, q_pop;

  seq_state_e  state;
  logic [23:0] cur_l1id;
  logic [7:0]  cur_cell;
  logic [15:0] cur_serial;
  logic [3:0]  cur_slice;
  logic [15:0] age;
  logic        can_issue;

  function automatic logic [7:0] cell_inc(input logic [7:0] c);
    return (c == 8'(N_CELL - 1)) ? 8'd0 : c + 8'd1;
  endfunction

  assign write_now = bc_tick && (cfg_wclk40 || !wphase);
  assign adc_level = (adc_cnt < (cfg_adc_div >> 1));
  assign age       = wserial - cur_serial;
  assign can_issue = (state == S_WAIT) && bc_tick && (space_cnt == '0)
                     && (age != '0) && !age[15];

  // Trigger queue: base cell and serial are those of the cell written
  // cfg_latency writes before the trigger.
  assign q_in.l1id   = trig_l1id;
  assign q_in.addr   = (wptr >= cfg_latency) ? wptr - cfg_latency
                                             : wptr + 8'(N_CELL) - cfg_latency;
  assign q_in.serial = wserial - 16'(cfg_latency);
  assign q_pop       = (state == S_IDLE) && !q_empty;

  sync_fifo #(.WIDTH($bits(trig_entry_t)), .DEPTH(TRIG_DEPTH), .AF_LEVEL(TRIG_DEPTH - 1)) u_trigq (
    .clk, .rst,
    .push(trig), .din(q_in),
    .pop(q_pop), .dout(q_out),
    .empty(q_empty), .full(q_full), .almost_full(q_af),
    .overflow(trig_overflow), .count(pending)
  );

  // write pointer, clocks and control words
  always_ff @(posedge clk) begin
    if (rst) begin
      wptr       <= '0;
      wserial    <= '0;
      wphase     <= 1'b0;
      adc_cnt    <= '0;
      space_cnt  <= '0;
      ctrl_word  <= '0;
      ctrl_valid <= 1'b0;
    end else begin
      ctrl_valid <= bc_tick;
      if (bc_tick) begin
        wphase  <= !wphase;
        adc_cnt <= (adc_cnt + 1'b1 >= cfg_adc_div) ? '0 : adc_cnt + 1'b1;
        if (write_now) begin
          wptr    <= cell_inc(wptr);
          wserial <= wserial + 1'b1;
        end
        ctrl_word.wclk   <= write_now;
        ctrl_word.adcclk <= adc_level;
        if (can_issue) begin
          ctrl_word.kind <= CW_READ;
          ctrl_word.tag  <= cur_l1id[5:0];
          ctrl_word.addr <= cur_cell;
          space_cnt      <= 8'(12 * cfg_adc_div - 1);
        end else begin
          ctrl_word.kind <= CW_WRITE;
          ctrl_word.tag  <= '0;
          ctrl_word.addr <= wptr;
          if (space_cnt != '0) space_cnt <= space_cnt - 1'b1;
        end
      end
    end
  end

  // read sequencer
  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_IDLE;
      cur_l1id   <= '0;
      cur_cell   <= '0;
      cur_serial <= '0;
      cur_slice  <= '0;
      rd_issue   <= 1'b0;
      rd_l1id    <= '0;
      rd_slice   <= '0;
      rd_cell    <= '0;
      overrun    <= 1'b0;
      lost_reads <= '0;
    end else begin
      rd_issue <= 1'b0;
      unique case (state)
        S_IDLE: if (!q_empty) begin
          cur_l1id   <= q_out.l1id;
          cur_cell   <= q_out.addr;
          cur_serial <= q_out.serial;
          cur_slice  <= '0;
          state      <= S_SEEK;
        end
        S_SEEK: begin
          if (cfg_bad_cell[cur_cell]) begin
            cur_cell   <= cell_inc(cur_cell);
            cur_serial <= cur_serial + 1'b1;
          end else begin
            state <= S_WAIT;
          end
        end
        S_WAIT: if (can_issue) begin
          rd_issue <= 1'b1;
          rd_l1id  <= cur_l1id;
          rd_slice <= cur_slice;
          rd_cell  <= cur_cell;
          if (age >= 16'(N_CELL)) begin
            overrun <= 1'b1;
            if (lost_reads != '1) lost_reads <= lost_reads + 1'b1;
          end
          cur_cell   <= cell_inc(cur_cell);
          cur_serial <= cur_serial + 1'b1;
          cur_slice  <= cur_slice + 1'b1;
          state      <= (cur_slice + 1'b1 >= cfg_nslices) ? S_IDLE : S_SEEK;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
