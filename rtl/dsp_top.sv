// dsp_top: embedded signal processing module for online event filtering.
//
// A primary trigger accept, stamped with the clock index k, selects a window
// of WIN samples around the matching instant in each of N_ADC secondary
// readout channels (after a per-channel delay correction). Each window is
// passed through a matched filter and, together with one external data word,
// the primary decision word and the filter results, packed into a data
// fragment that is queued in the output link buffer.
//
// Contents: fragment_builder (trigger control, packet controllers, matched
// filters, packer), cfg_regs (configuration and debug bus), debug_counters,
// and a sync_fifo of OUTBUF_DEPTH words as the output link buffer. The
// optical link itself is outside this module: the fragment leaves as a
// valid/ready stream of 32-bit words (out_valid, out_data, out_ready).
//
// Defaults follow the document's case study: 32 channels of 8-bit samples,
// 7-sample windows, L1 memories of 256 positions, L2 memories of 8 events,
// 16-bit filter coefficients. The trigger queue depth (8) and output buffer
// depth (512 words, two full fragments) are this design's choices. The
// configuration bus reads back registered data one clock after cfg_addr.
module dsp_top #(
  parameter int unsigned N_ADC           = 32,
  parameter int unsigned WIN             = 7,
  parameter int unsigned PRE             = 3,
  parameter int unsigned L1_DEPTH        = 256,
  parameter int unsigned L2_EVENTS       = 8,
  parameter int unsigned TRIG_FIFO_DEPTH = 8,
  parameter int unsigned COEF_W          = 16,
  parameter int unsigned DELAY_W         = 8,
  parameter int unsigned OUTBUF_DEPTH    = 512
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  adc_data [N_ADC],
  input  logic [31:0] ext_data,
  input  logic [31:0] time_index,
  input  logic        trigger,
  input  logic [31:0] trigger_decision,
  input  logic        cfg_we,
  input  logic [7:0]  cfg_addr,
  input  logic [31:0] cfg_wdata,
  output logic [31:0] cfg_rdata,
  output logic [31:0] out_data,
  output logic        out_valid,
  input  logic        out_ready,
  output logic        trig_discard,
  output logic        busy
);

  logic [31:0]               run_number, source_id;
  logic signed [31:0]        threshold;
  logic signed [COEF_W-1:0]  coef  [WIN];
  logic signed [DELAY_W-1:0] delay [N_ADC];
  logic [31:0]               dbg [5];
  logic [31:0]               fb_data, last_trig_id;
  logic                      fb_valid, fb_ready;
  logic                      trig_overflow, trig_expired, trig_received, pkt_sent;
  logic                      mf_event_valid, mf_event_accept;

  cfg_regs #(.N_ADC(N_ADC), .WIN(WIN), .COEF_W(COEF_W), .DELAY_W(DELAY_W), .N_DBG(5)) u_cfg (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .cfg_rdata, .dbg,
    .run_number, .source_id, .threshold, .coef, .delay
  );

  fragment_builder #(
    .N_ADC(N_ADC), .WIN(WIN), .PRE(PRE), .L1_DEPTH(L1_DEPTH), .L2_EVENTS(L2_EVENTS),
    .TRIG_FIFO_DEPTH(TRIG_FIFO_DEPTH), .COEF_W(COEF_W), .DELAY_W(DELAY_W)
  ) u_fb (
    .clk, .rst_n, .adc_data, .ext_data, .time_index, .trigger, .trigger_decision,
    .run_number, .source_id, .threshold, .coef, .delay,
    .out_data (fb_data), .out_valid (fb_valid), .out_ready (fb_ready),
    .trig_discard, .trig_overflow, .trig_expired, .trig_received, .last_trig_id, .pkt_sent,
    .mf_event_valid, .mf_event_accept, .busy
  );

  debug_counters u_dbg (
    .clk, .rst_n, .pkt_sent, .mf_event_valid, .mf_event_accept,
    .trig_overflow, .trig_expired, .trig_received, .last_trig_id, .cnt (dbg)
  );

  // output link buffer
  logic ob_empty, ob_full, ob_ovf;
  logic [$clog2(OUTBUF_DEPTH):0] ob_count;

  sync_fifo #(.WIDTH(32), .DEPTH(OUTBUF_DEPTH)) u_outbuf (
    .clk, .rst_n,
    .wr_en    (fb_valid && fb_ready),
    .wr_data  (fb_data),
    .rd_en    (out_ready),
    .rd_data  (out_data),
    .empty    (ob_empty),
    .full     (ob_full),
    .count    (ob_count),
    .overflow (ob_ovf)
  );

  assign fb_ready  = !ob_full;
  assign out_valid = !ob_empty;

endmodule
