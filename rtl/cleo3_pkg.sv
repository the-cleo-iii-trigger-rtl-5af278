// cleo3_pkg -- constants shared by the CLEO-III Level 1 decision and
// flow control/gating RTL.
//
// The numbers that come from the trigger's description are: 179 backplane
// input bits, 48 programmable trigger lines of which 24 are routed on, 24-bit
// prescalers, 40-bit scalers, the 31-bit and 15-bit (plus sticky overflow)
// Busy/Error counters, the 32-bit event and time counters, the 8-deep event
// time buffer, the 256-event Synch period and the ranges of the self-Busy,
// L1Accept delay and L1Accept width settings.  The split of the 179 bits
// among the source boards is this design's own choice.
package cleo3_pkg;

  // P5P6 backplane: 179 bits seen by every L1TR board.
  localparam int unsigned BP_W    = 179;
  // Split of the backplane among its sources (own choice; sums to BP_W).
  localparam int unsigned CCGL_W  = 96;   // calorimetry projections and tile counts
  localparam int unsigned AXPR_W  = 16;   // preliminary axial track count
  localparam int unsigned TRCR_W  = 59;   // refined track counts and topology
  localparam int unsigned EXT_W   = 8;    // external trigger / inhibit inputs via LUMI

  // Trigger Logic Unit.
  localparam int unsigned N_LINES = 48;   // programmable trigger lines
  localparam int unsigned N_OUT   = 24;   // lines routed to the prescalers
  localparam int unsigned SEL_W   = $clog2(N_LINES);

  localparam int unsigned PS_W    = 24;   // prescale factor N in 1..2**24
  localparam int unsigned SC_W    = 40;   // trigger scaler range

  // Accelerator phase carried from the flow control system to the L1TRs
  // (width is this design's own choice).
  localparam int unsigned PHASE_W = 4;

  // DFC / GCAL bookkeeping widths.
  localparam int unsigned TOT_W   = 31;   // TOTAL_BUSY / TOTAL_ERROR (+ sticky overflow)
  localparam int unsigned CUR_W   = 15;   // CURRENT_* and MAX_* (+ sticky overflow)
  localparam int unsigned CNT32_W = 32;   // CESR_TIME, TOTAL_L1, EVENT_NUM
  localparam int unsigned EVT_AW  = 3;    // event time buffer: 8 entries, READ_PTR is 3 bits
  localparam int unsigned SYNCH_PERIOD_LOG2 = 8;  // Synch once per 256 L1Accepts

  // Self-Busy length register: busy lasts SELF_BUSY+1 ticks, 84 ns .. 2.75 ms.
  localparam int unsigned SBUSY_W = 16;
  // GCAL L1Accept/CAL delay (1..32768 ticks = 42 ns..1.38 ms) and width
  // (1..256 ticks = 42 ns..10.75 us), both stored as value-1.
  localparam int unsigned DLY_W   = 15;
  localparam int unsigned WID_W   = 8;

  // Bookkeeping snapshot of one Busy or Error signal.
  typedef struct packed {
    logic              total_ovf;
    logic [TOT_W-1:0]  total;
    logic              cur_ovf;
    logic [CUR_W-1:0]  current;
    logic [CUR_W-1:0]  max_bar;
  } mon_t;

endpackage
