// trigger_ctrl: synchronisation and trigger control unit.
//
// Generates the free-running L1 write pointer shared by all packet
// controllers and turns primary trigger accepts into transfer requests.
// Each trigger is stamped with a running trigger ID, the time index k, the
// primary decision word and the L1 write pointer of that clock, and queued in
// the trigger FIFO (the waiting system). Triggers leave the queue no closer
// than DISPATCH_GAP clocks apart (the detector pulse width, enough for one
// L1->L2 transfer) and only while the L2 memories have room for another
// event. When the queue is full, trig_discard is high and further triggers are
// dropped, each drop flagged on trig_overflow. A queued trigger older than
// MAX_AGE clocks when it reaches the head of the queue (possible only while
// the L2 memories stay full, i.e. the output link is stalled) is discarded
// and flagged on trig_expired, because the L1 memories keep only L1_DEPTH
// clocks of history; MAX_AGE = L1_DEPTH/2 leaves room for channel delays
// down to about -(L1_DEPTH/2 - WIN - 8) clocks.
//
// Timing for a trigger at clock k on an idle unit: time_index_out shows its
// time index from k+2, read_addr carries its L1 reference address from k+3,
// and store_data pulses at k+4, as in the document's trigger waveform. The
// stamped record is also pushed into an event FIFO read by the packer.
// has_data stays high while at least one event has been completely written
// to L2 (l2_event_stored) and not yet packed (read_done). The per-event
// count that gates dispatch, the level-type has_data and the age limit are
// this design's choices.
module trigger_ctrl
  import dsp_pkg::*;
#(
  parameter int unsigned L1_DEPTH        = 256,
  parameter int unsigned TRIG_FIFO_DEPTH = 8,
  parameter int unsigned L2_EVENTS       = 8,
  parameter int unsigned DISPATCH_GAP    = 7,
  parameter int unsigned MAX_AGE         = L1_DEPTH / 2,
  localparam int unsigned AW             = $clog2(L1_DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  // primary system
  input  logic          trigger,
  input  logic [31:0]   trigger_decision,
  input  logic [31:0]   time_index,
  // packet controllers
  output logic [AW-1:0] l1_wr_addr,
  output logic          store_data,
  output logic [AW-1:0] read_addr,
  output logic [31:0]   time_index_out,
  input  logic          l2_event_stored,
  // packer
  output logic          has_data,
  output trig_info_t    event_info,
  input  logic          read_done,
  // status
  output logic          trig_discard,
  output logic          trig_overflow,
  output logic          trig_expired,
  output logic          trig_received,
  output logic [31:0]   last_trig_id,
  output logic          busy
);

  localparam int unsigned GW = $clog2(DISPATCH_GAP + 1);
  localparam int unsigned EW = $clog2(L2_EVENTS + 1);

  typedef struct packed {
    logic [31:0] stamp;      // clock count at the trigger
    trig_info_t  info;
  } q_entry_t;

  logic [31:0] trig_cnt, cycle;
  q_entry_t    q_in, q_out;
  trig_info_t  q_head;
  logic        q_empty, q_full, pop, dispatch, stale;
  logic [$clog2(TRIG_FIFO_DEPTH):0] q_count;
  logic [GW-1:0] gap;
  logic [EW-1:0] outstanding, ready_cnt;

  // free-running clock count (its low bits are the L1 write pointer) and
  // trigger ID
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cycle        <= '0;
      trig_cnt     <= '0;
      last_trig_id <= '0;
    end else begin
      cycle <= cycle + 1'b1;
      if (trigger) begin
        trig_cnt     <= trig_cnt + 1'b1;
        last_trig_id <= trig_cnt;
      end
    end
  end

  assign l1_wr_addr    = cycle[AW-1:0];
  assign trig_received = trigger;
  assign q_in = '{stamp: cycle,
                  info: '{trig_id: trig_cnt, time_index: time_index,
                          decision: trigger_decision, l1_addr: l1_wr_addr}};
  assign q_head = q_out.info;

  sync_fifo #(.WIDTH($bits(q_entry_t)), .DEPTH(TRIG_FIFO_DEPTH)) u_trig_q (
    .clk      (clk),
    .rst_n    (rst_n),
    .wr_en    (trigger),
    .wr_data  (q_in),
    .rd_en    (pop),
    .rd_data  (q_out),
    .empty    (q_empty),
    .full     (q_full),
    .count    (q_count),
    .overflow (trig_overflow)
  );

  assign trig_discard = q_full;
  // A trigger that waited so long that its samples may have left the L1
  // memories is discarded instead of dispatched.
  assign stale    = !q_empty && ((cycle - q_out.stamp) > 32'(MAX_AGE));
  assign dispatch = !q_empty && !stale && (gap == '0) && (outstanding < EW'(L2_EVENTS));
  assign pop      = dispatch || stale;
  assign trig_expired = stale;

  // dispatch pipeline: pop -> time index out -> read address -> store_data
  logic       s1_v, s2_v;
  trig_info_t s1_info;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gap            <= '0;
      s1_v           <= 1'b0;
      s2_v           <= 1'b0;
      s1_info        <= '0;
      time_index_out <= '0;
      read_addr      <= '0;
      store_data     <= 1'b0;
    end else begin
      if (dispatch)         gap <= GW'(DISPATCH_GAP - 1);
      else if (gap != '0)   gap <= gap - 1'b1;
      s1_v <= dispatch;
      if (dispatch) begin
        s1_info        <= q_head;
        time_index_out <= q_head.time_index;
      end
      s2_v <= s1_v;
      if (s1_v) read_addr <= s1_info.l1_addr;
      store_data <= s2_v;
    end
  end

  // events reserved in L2 (dispatched, not yet packed) and events ready
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      outstanding <= '0;
      ready_cnt   <= '0;
    end else begin
      outstanding <= outstanding + EW'(dispatch) - EW'(read_done);
      ready_cnt   <= ready_cnt + EW'(l2_event_stored) - EW'(read_done);
    end
  end

  assign has_data = (ready_cnt != '0);
  assign busy     = !q_empty || (outstanding != '0);

  // records of dispatched events, in packing order
  logic ev_empty, ev_full, ev_ovf;
  logic [$clog2(L2_EVENTS):0] ev_count;

  sync_fifo #(.WIDTH($bits(trig_info_t)), .DEPTH(L2_EVENTS)) u_event_q (
    .clk      (clk),
    .rst_n    (rst_n),
    .wr_en    (dispatch),
    .wr_data  (q_head),
    .rd_en    (read_done),
    .rd_data  (event_info),
    .empty    (ev_empty),
    .full     (ev_full),
    .count    (ev_count),
    .overflow (ev_ovf)
  );

  // Rules of the handshake with the packet controllers and the packer.
  a_no_early_done: assert property (@(posedge clk) disable iff (!rst_n)
                                    read_done |-> has_data);
  a_ev_no_ovf: assert property (@(posedge clk) disable iff (!rst_n) !ev_ovf);

endmodule
