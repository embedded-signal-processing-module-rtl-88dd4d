// fragment_builder: data fragment builder.
//
// Wires the four kinds of block of the builder together:
//   * trigger_ctrl  - synchronisation and trigger control unit: L1 write
//                     pointer, trigger queue, spaced store_data/read_addr;
//   * packet_ctrl   - one 32-bit generic packet controller (sub-fragment 0,
//                     fed by ext_data, one word per event, no delay) and
//                     N_ADC 8-bit ADC packet controllers (sub-fragments
//                     1..N_ADC, WIN samples per event, per-channel delay);
//   * matched_filter- one per ADC channel, fed by the L1->L2 transfer stream;
//                     its result word {accept, output[30:0]} is queued in a
//                     small FIFO next to the channel's L2 memory;
//   * packer        - serialises header, sub-fragments and trailer.
// Each ADC sub-fragment carries ceil(WIN/4) packed sample words followed by
// the filter result word. A channel's read port steps through its L2 words
// and then its filter result, so the packer sees one read_data/request_data
// pair per sub-fragment.
//
// has_data is driven by the transfer of ADC channel 0: all controllers start
// on the same store_data and the ADC windows are the longest, so when channel
// 0 has stored its event every L2 memory holds it. Timing of a single
// trigger on an idle builder: store_data at k+4, the event is in L2 at
// k+4+WIN+1, the packer starts one clock later. Placing the filters on the
// transfer stream and carrying their result in the ADC sub-fragments is this
// design's choice; the document asks for the filter output and decision to
// be part of the fragment.
module fragment_builder
  import dsp_pkg::*;
#(
  parameter int unsigned N_ADC           = 32,
  parameter int unsigned WIN             = 7,
  parameter int unsigned PRE             = 3,
  parameter int unsigned L1_DEPTH        = 256,
  parameter int unsigned L2_EVENTS       = 8,
  parameter int unsigned TRIG_FIFO_DEPTH = 8,
  parameter int unsigned COEF_W          = 16,
  parameter int unsigned DELAY_W         = 8,
  localparam int unsigned AW             = $clog2(L1_DEPTH)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // secondary system and external data
  input  logic [7:0]                adc_data [N_ADC],
  input  logic [31:0]               ext_data,
  // primary system
  input  logic [31:0]               time_index,
  input  logic                      trigger,
  input  logic [31:0]               trigger_decision,
  // configuration
  input  logic [31:0]               run_number,
  input  logic [31:0]               source_id,
  input  logic signed [31:0]        threshold,
  input  logic signed [COEF_W-1:0]  coef  [WIN],
  input  logic signed [DELAY_W-1:0] delay [N_ADC],
  // fragment output
  output logic [31:0]               out_data,
  output logic                      out_valid,
  input  logic                      out_ready,
  // status
  output logic                      trig_discard,
  output logic                      trig_overflow,
  output logic                      trig_expired,
  output logic                      trig_received,
  output logic [31:0]               last_trig_id,
  output logic                      pkt_sent,
  output logic                      mf_event_valid,
  output logic                      mf_event_accept,
  output logic                      busy
);

  localparam int unsigned WPE_ADC = words_per_event(8, WIN);
  localparam int unsigned N_SUB   = N_ADC + 1;
  localparam int unsigned RW      = $clog2(WPE_ADC + 1);

  logic [AW-1:0]    l1_wr_addr, read_addr;
  logic             store_data, has_data, read_done, tc_busy;
  logic [31:0]      time_index_out;
  trig_info_t       event_info;
  logic [31:0]      read_data [N_SUB];
  logic [N_SUB-1:0] request_data;
  logic [N_ADC-1:0] ev_stored, mf_valid, mf_accept, ch_busy;
  pk_state_t        pk_state;

  trigger_ctrl #(
    .L1_DEPTH(L1_DEPTH), .TRIG_FIFO_DEPTH(TRIG_FIFO_DEPTH),
    .L2_EVENTS(L2_EVENTS), .DISPATCH_GAP(WIN)
  ) u_tc (
    .clk, .rst_n, .trigger, .trigger_decision, .time_index,
    .l1_wr_addr, .store_data, .read_addr, .time_index_out,
    .l2_event_stored (ev_stored[0]),
    .has_data, .event_info, .read_done,
    .trig_discard, .trig_overflow, .trig_expired, .trig_received, .last_trig_id,
    .busy (tc_busy)
  );

  // ---------------- generic packet controller (sub-fragment 0) ----------
  logic [31:0] gen_win_sample;
  logic        gen_win_valid, gen_win_first, gen_win_last, gen_busy;
  logic        gen_avail, gen_stored, gen_ovf;

  packet_ctrl #(
    .SAMPLE_W(32), .WIN(1), .PRE(0), .L1_DEPTH(L1_DEPTH),
    .L2_EVENTS(L2_EVENTS), .DELAY_W(DELAY_W)
  ) u_gen (
    .clk, .rst_n,
    .sample_in    (ext_data),
    .l1_wr_addr   (l1_wr_addr),
    .store_data   (store_data),
    .read_addr    (read_addr),
    .delay        ('0),
    .request_data (request_data[0]),
    .read_data    (read_data[0]),
    .data_avail   (gen_avail),
    .win_sample   (gen_win_sample),
    .win_valid    (gen_win_valid),
    .win_first    (gen_win_first),
    .win_last     (gen_win_last),
    .busy         (gen_busy),
    .event_stored (gen_stored),
    .l2_overflow  (gen_ovf)
  );

  // ---------------- ADC channels ----------------
  for (genvar c = 0; c < N_ADC; c++) begin : g_adc
    logic [7:0]        win_sample;
    logic              win_valid, win_first, win_last;
    logic [31:0]       l2_data, mf_word;
    logic              l2_avail, l2_ovf, l2_pop;
    logic signed [31:0] mf_out;
    logic              mf_empty, mf_full, mf_ovf, mf_pop;
    logic [$clog2(L2_EVENTS):0] mf_count;
    logic [RW-1:0]     rd_cnt;

    packet_ctrl #(
      .SAMPLE_W(8), .WIN(WIN), .PRE(PRE), .L1_DEPTH(L1_DEPTH),
      .L2_EVENTS(L2_EVENTS), .DELAY_W(DELAY_W)
    ) u_pc (
      .clk, .rst_n,
      .sample_in    (adc_data[c]),
      .l1_wr_addr   (l1_wr_addr),
      .store_data   (store_data),
      .read_addr    (read_addr),
      .delay        (delay[c]),
      .request_data (l2_pop),
      .read_data    (l2_data),
      .data_avail   (l2_avail),
      .win_sample   (win_sample),
      .win_valid    (win_valid),
      .win_first    (win_first),
      .win_last     (win_last),
      .busy         (ch_busy[c]),
      .event_stored (ev_stored[c]),
      .l2_overflow  (l2_ovf)
    );

    matched_filter #(.SAMPLE_W(8), .COEF_W(COEF_W), .WIN(WIN), .OUT_W(32)) u_mf (
      .clk, .rst_n,
      .sample    (win_sample),
      .valid     (win_valid),
      .first     (win_first),
      .last      (win_last),
      .coef      (coef),
      .threshold (threshold),
      .mf_valid  (mf_valid[c]),
      .mf_out    (mf_out),
      .mf_accept (mf_accept[c])
    );

    sync_fifo #(.WIDTH(32), .DEPTH(L2_EVENTS)) u_mf_q (
      .clk, .rst_n,
      .wr_en    (mf_valid[c]),
      .wr_data  ({mf_accept[c], mf_out[30:0]}),
      .rd_en    (mf_pop),
      .rd_data  (mf_word),
      .empty    (mf_empty),
      .full     (mf_full),
      .count    (mf_count),
      .overflow (mf_ovf)
    );

    // read port: WPE_ADC sample words, then the filter result word
    assign l2_pop = request_data[c+1] && (rd_cnt != RW'(WPE_ADC));
    assign mf_pop = request_data[c+1] && (rd_cnt == RW'(WPE_ADC));
    assign read_data[c+1] = (rd_cnt == RW'(WPE_ADC)) ? mf_word : l2_data;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)                 rd_cnt <= '0;
      else if (request_data[c+1]) rd_cnt <= (rd_cnt == RW'(WPE_ADC)) ? '0 : rd_cnt + 1'b1;
    end

    a_l2_read_ok: assert property (@(posedge clk) disable iff (!rst_n)
                                   l2_pop |-> l2_avail);
    a_mf_read_ok: assert property (@(posedge clk) disable iff (!rst_n)
                                   mf_pop |-> !mf_empty);
  end

  packer #(.N_ADC(N_ADC), .SUB_WORDS_GEN(1), .SUB_WORDS_ADC(WPE_ADC + 1)) u_packer (
    .clk, .rst_n, .has_data, .event_info, .run_number, .source_id,
    .read_data, .request_data, .read_done,
    .out_data, .out_valid, .out_ready,
    .state (pk_state)
  );

  assign pkt_sent        = read_done;
  assign mf_event_valid  = mf_valid[0];
  assign mf_event_accept = |(mf_accept & mf_valid);
  assign busy            = tc_busy || (pk_state != PK_IDLE);

endmodule
