// debug_counters: event counters of the debug structure.
//
// Five 32-bit registers readable through the configuration bus:
//   cnt[0] number of fragments (packages) sent     (pulse pkt_sent)
//   cnt[1] number of matched-filter trigger occurrences: events in which at
//          least one channel's filter output exceeded the threshold
//          (mf_event_valid && mf_event_accept)
//   cnt[2] triggers lost by the waiting system: queue overflows (pulse
//          trig_overflow) plus triggers expired in the queue (trig_expired)
//   cnt[3] number of primary triggers received     (pulse trig_received)
//   cnt[4] identification of the last primary trigger (last_trig_id)
// Counters wrap at 2^32 and are cleared by reset. The list of quantities is
// the document's; the widths and the per-event meaning of cnt[1] are this
// design's choices.
module debug_counters (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        pkt_sent,
  input  logic        mf_event_valid,
  input  logic        mf_event_accept,
  input  logic        trig_overflow,
  input  logic        trig_expired,
  input  logic        trig_received,
  input  logic [31:0] last_trig_id,
  output logic [31:0] cnt [5]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 5; i++) cnt[i] <= '0;
    end else begin
      if (pkt_sent)                         cnt[0] <= cnt[0] + 1'b1;
      if (mf_event_valid && mf_event_accept) cnt[1] <= cnt[1] + 1'b1;
      cnt[2] <= cnt[2] + 32'(trig_overflow) + 32'(trig_expired);
      if (trig_received)                    cnt[3] <= cnt[3] + 1'b1;
      cnt[4] <= last_trig_id;
    end
  end

endmodule
