// dfc -- Data Flow Control: turns L1Pass into L1Accept.
//
// An L1Pass arriving from the LUMI becomes an L1Accept only when the data
// acquisition system can take the event: no subsystem asserts Busy or
// Error, the DFC's own self-Busy has expired, and the 8-entry event time
// buffer has room.  The self-Busy starts after every L1Accept and lasts
// self_busy_len+1 ticks (register values 1..65535 give 84 ns..2.75 ms), which
// caps the trigger rate.  On every L1Accept the current CESR_TIME is stored
// in event-time register EVENT_NUM[2:0] and EVENT_NUM counts up.  The
// control processor reads the time and advances READ_PTR (written through
// rp_we/rp_wdata); when 7 entries are unread the buffer counts as full and is
// treated as a processor Busy.  Synch goes out with every 256th L1Accept,
// the ones whose event number is a multiple of 256, starting with event 0.
//
// Bookkeeping: CESR_TIME (32 bits, ticks since `clr`), TOTAL_L1 (32 bits,
// L1Pass count), EVENT_NUM (32 bits, L1Accept count) and, through two
// busy_monitor instances, TOTAL/CURRENT/MAX of the Busy and of the Error
// seen by the DFC.  The Busy monitored is the combination that blocks
// L1Accept (subsystem Busy, self-Busy, full buffer).  `irq_accept` pulses
// with each L1Accept; `irq_error` sets when Error is seen and stays set until
// `err_ack`.  CAL requests from the control side are sent on as one-tick CAL
// pulses.  The accelerator phase from the CESR timing system is registered
// and sent to the LUMI, which hands it on to the L1TR boards.
//
// Everything above follows the description except: the self-Busy encoding,
// the full rule (7 of 8 entries), Synch on event numbers that are multiples
// of 256, which Busy is monitored, the interrupt handshake and the CAL
// source, which are this design's own choices.
//
// Timing: l1accept, synch and cal are registered: an L1Pass present before
// clock edge k gives l1accept high for the tick after edge k.
module dfc
  import cleo3_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clr,              // initialise counters
  input  logic               l1pass,
  input  logic               busy_in,          // OR of subsystem Busy
  input  logic               error_in,         // OR of subsystem Error
  input  logic [SBUSY_W-1:0] self_busy_len,
  input  logic               rp_we,
  input  logic [EVT_AW-1:0]  rp_wdata,
  input  logic               max_clr,
  input  logic               err_ack,
  input  logic               cal_req,
  input  logic [PHASE_W-1:0] cesr_phase,       // accelerator phase from CESR timing
  output logic [PHASE_W-1:0] phase_out,        // to the LUMI, for the L1TR boards
  output logic               l1accept,
  output logic               synch,
  output logic               cal,
  output logic               irq_accept,
  output logic               irq_error,
  output logic               busy,             // combined Busy (blocks L1Accept)
  output logic [CNT32_W-1:0] cesr_time,
  output logic [CNT32_W-1:0] total_l1,
  output logic [CNT32_W-1:0] event_num,
  output logic [EVT_AW-1:0]  read_ptr,
  output logic [CNT32_W-1:0] evt_time [2**EVT_AW],
  output mon_t               busy_mon,
  output mon_t               error_mon
);

  logic [SBUSY_W:0]  sb_cnt;        // remaining self-Busy ticks
  logic              self_busy, buf_full, accept;

  assign self_busy = (sb_cnt != '0);
  assign buf_full  = (event_num[EVT_AW-1:0] + 1'b1) == read_ptr;
  assign busy      = busy_in || self_busy || buf_full;
  assign accept    = l1pass && !busy && !error_in;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      cesr_time <= '0;
      total_l1  <= '0;
      event_num <= '0;
      read_ptr  <= '0;
      sb_cnt    <= '0;
      l1accept  <= 1'b0;
      synch     <= 1'b0;
      cal       <= 1'b0;
      irq_error <= 1'b0;
      phase_out <= '0;
      for (int i = 0; i < 2**EVT_AW; i++) evt_time[i] <= '0;
    end else if (clr) begin
      cesr_time <= '0;
      total_l1  <= '0;
      event_num <= '0;
      read_ptr  <= '0;
      sb_cnt    <= '0;
      l1accept  <= 1'b0;
      synch     <= 1'b0;
      cal       <= 1'b0;
      irq_error <= 1'b0;
    end else begin
      cesr_time <= cesr_time + 1'b1;
      if (l1pass) total_l1 <= total_l1 + 1'b1;
      l1accept <= accept;
      synch    <= accept && (event_num[SYNCH_PERIOD_LOG2-1:0] == '0);
      cal      <= cal_req;
      phase_out <= cesr_phase;
      if (accept) begin
        event_num <= event_num + 1'b1;
        evt_time[event_num[EVT_AW-1:0]] <= cesr_time;
        sb_cnt <= {1'b0, self_busy_len} + 1'b1;
      end else if (self_busy) begin
        sb_cnt <= sb_cnt - 1'b1;
      end
      if (rp_we) read_ptr <= rp_wdata;
      if (error_in)     irq_error <= 1'b1;
      else if (err_ack) irq_error <= 1'b0;
    end

  assign irq_accept = l1accept;

  busy_monitor u_busy (
    .clk, .rst_n, .sig(busy), .l1accept, .max_clr, .clr, .mon(busy_mon)
  );

  busy_monitor u_err (
    .clk, .rst_n, .sig(error_in), .l1accept, .max_clr, .clr, .mon(error_mon)
  );

  // A new L1Accept never follows another before the self-Busy has run out.
  property p_self_busy_spacing;
    @(posedge clk) disable iff (!rst_n || clr) accept |=> !accept;
  endproperty
  a_self_busy_spacing: assert property (p_self_busy_spacing);

endmodule
