// nrc_pkg -- types and constants shared by the New ROD Complex firmware.
//
// The chamber geometry (5 ASM-II boards per chamber, 192 channels per board,
// 12-bit samples, 4 time slices per trigger in nominal running), the 144-cell
// analog memory, the 16-bit G-Link word and the 17-bit control word come from
// the design description. The bit layout of the trigger stream (ttc_t), the
// Trigger Information Structure (tis_t) and the field widths of its counters
// are this design's own choice; the 3564 bunch crossings per orbit is the LHC
// value.
package nrc_pkg;

  localparam int unsigned N_LAYERS      = 5;    // ASM-II boards (layers) per chamber
  localparam int unsigned N_CH          = 192;  // channels per ASM-II
  localparam int unsigned SAMPLE_W      = 12;   // ADC bits per sample
  localparam int unsigned WORD_W        = 16;   // zero-extended sample word in memory
  localparam int unsigned MAX_SLICES    = 4;    // time slices held per event
  localparam int unsigned GLINK_W       = 16;   // one G-Link word
  localparam int unsigned LANE_W        = 2 * GLINK_W; // two fibres form one lane
  localparam int unsigned N_CELL        = 144;  // SCA analog memory depth
  localparam int unsigned CTRL_W        = 17;   // SCA control word
  localparam int unsigned BC_PER_ORBIT  = 3564; // LHC bunch crossings per orbit

  // One 40 MHz bunch-crossing tick of decoded trigger and timing information.
  typedef struct packed {
    logic       l1a;        // level-1 accept
    logic       bcr;        // bunch counter reset (start of orbit)
    logic       ecr;        // event counter reset
    logic [7:0] ttype;      // trigger type, valid together with l1a
  } ttc_t;

  localparam int unsigned TTC_W = $bits(ttc_t);

  // Trigger Information Structure, one per L1A.
  typedef struct packed {
    logic [7:0]  ecr_cnt;   // number of event counter resets seen
    logic [23:0] l1id;      // level-1 accept number since the last ECR
    logic [11:0] bcid;      // beam crossing number
    logic [31:0] orbit;     // orbit number
    logic [7:0]  ttype;     // trigger type
  } tis_t;

  localparam int unsigned TIS_W = $bits(tis_t);

  // Kind of an SCA control word (bit 14 of the word).
  typedef enum logic {
    CW_WRITE = 1'b0,        // carries the cell being written
    CW_READ  = 1'b1         // carries a cell to be read out and digitised
  } ctrl_kind_e;

  // Source of the trigger stream fanned out on a COB.
  typedef enum logic [1:0] {
    SRC_FTM       = 2'd0,   // front transition module (LTP fibre)
    SRC_BACKPLANE = 2'd1,   // ATCA base interface, driven by the master COB
    SRC_LOCAL     = 2'd2    // local generator in the DTM RCE
  } ttc_src_e;

  // 17-bit SCA control word.
  typedef struct packed {
    logic       wclk;       // SCA write clock level
    logic       adcclk;     // ADC conversion / read clock level
    ctrl_kind_e kind;       // write or read address
    logic [5:0] tag;        // read: low bits of the L1ID being read; write: 0
    logic [7:0] addr;       // SCA cell address 0..143
  } ctrl_word_t;

  // Configuration of a FEX RCE (set by its software).
  typedef struct packed {
    logic              wclk40;       // SCA write clock 40 MHz (1) or 20 MHz (0)
    logic [3:0]        adc_div;      // ticks per ADC clock: 8 = 5 MHz, 6 = 6.67 MHz
    logic [7:0]        latency;      // SCA writes between sample and trigger
    logic [2:0]        nslices;      // time slices per trigger, 1..4
    logic              pass_through; // pedestal runs: select everything
    logic [N_CELL-1:0] bad_cell;     // SCA cells never read
  } fex_cfg_t;

  // Configuration of a DTM RCE (trigger source, busy routing, generator).
  typedef struct packed {
    logic        master;             // drives the backplane trigger
    ttc_src_e    src;                // trigger source of this COB
    logic [8:0]  busy_mask;          // base board fan-in mask, 1 = ignore
    logic [4:0]  bp_enable;          // backplane busy lines to include
    logic        to_ftm_en;          // send busy to the FTM
    logic        to_bp_en;           // send busy to the backplane
    logic        gen_enable;         // periodic local triggers
    logic [15:0] gen_period;
    logic [31:0] gen_count;
  } dtm_cfg_t;

endpackage
