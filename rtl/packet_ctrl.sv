// packet_ctrl: packet controller (ADC packet controller / generic packet
// controller).
//
// Two memory levels and a small control block, as in the packet control
// diagram. The level-1 memory (l1_mem) records one sample per clock at the
// write pointer broadcast by the trigger control unit. When store_data is
// pulsed, read_addr carries the L1 address that was being written when the
// primary trigger arrived. The controller adds the configured channel delay
// (signed, so -3 selects the sample written three clocks earlier) to get the
// main sample, then reads the WIN samples main+PRE, main+PRE-1, ...,
// main+PRE-(WIN-1) one per clock: the offset runs from -PRE upward and the
// L1 address is main - offset, the order shown in the document's transfer
// waveform. The samples are packed, first sample in the low bits, into
// 32-bit words (four 8-bit ADC samples per word, one 32-bit generic word per
// word) and pushed into the level-2 FIFO, which holds up to L2_EVENTS events.
//
// Timing: the first L1 read is issued in the store_data cycle; samples appear
// on win_* one clock later, one per clock for WIN clocks; event_stored pulses
// once the last word of the event is in L2, WIN+1 clocks after store_data.
// A new store_data is accepted every WIN clocks (it is ignored while a
// window is still being read). The packer reads L2 through request_data/
// read_data (first-word fall-through).
//
// The 32-bit generic controller is this module with SAMPLE_W=32, WIN=1,
// PRE=0 and delay tied to zero: the document says it works like the ADC
// controller but needs no delay compensation. Word packing and the window
// order within the word are this design's choices.
module packet_ctrl
  import dsp_pkg::*;
#(
  parameter int unsigned SAMPLE_W  = 8,
  parameter int unsigned WIN       = 7,
  parameter int unsigned PRE       = 3,
  parameter int unsigned L1_DEPTH  = 256,
  parameter int unsigned L2_EVENTS = 8,
  parameter int unsigned DELAY_W   = 8,
  localparam int unsigned AW       = $clog2(L1_DEPTH),
  localparam int unsigned SPW      = WORD_W / SAMPLE_W,
  localparam int unsigned WPE      = words_per_event(SAMPLE_W, WIN),
  localparam int unsigned L2_DEPTH = 1 << $clog2(L2_EVENTS * WPE)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // sample input and L1 write pointer
  input  logic [SAMPLE_W-1:0]       sample_in,
  input  logic [AW-1:0]             l1_wr_addr,
  // transfer request from the trigger control unit
  input  logic                      store_data,
  input  logic [AW-1:0]             read_addr,
  input  logic signed [DELAY_W-1:0] delay,
  // L2 read side (packer)
  input  logic                      request_data,
  output logic [WORD_W-1:0]         read_data,
  output logic                      data_avail,
  // selected window, towards the matched filter
  output logic [SAMPLE_W-1:0]       win_sample,
  output logic                      win_valid,
  output logic                      win_first,
  output logic                      win_last,
  // status
  output logic                      busy,
  output logic                      event_stored,
  output logic                      l2_overflow
);

  localparam int unsigned IW = (WIN > 1) ? $clog2(WIN) : 1;
  localparam int unsigned LW = (SPW > 1) ? $clog2(SPW) : 1;

  // ---------------- window address generation ----------------
  logic [AW-1:0] main_addr, main_now, l1_rd_addr;
  logic [IW-1:0] idx;
  logic          start;

  assign start    = store_data && !busy;
  assign main_now = read_addr + AW'(delay);
  // address = main - offset, offset = idx - PRE
  assign l1_rd_addr = busy ? (main_addr + AW'(PRE) - AW'(idx))
                           : (main_now  + AW'(PRE));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      idx       <= '0;
      main_addr <= '0;
    end else if (start) begin
      main_addr <= main_now;
      idx       <= IW'(1);
      busy      <= (WIN > 1);
    end else if (busy) begin
      idx  <= idx + 1'b1;
      busy <= (idx != IW'(WIN-1));
    end
  end

  // ---------------- L1 memory ----------------
  logic [SAMPLE_W-1:0] l1_rd_data;

  l1_mem #(.WIDTH(SAMPLE_W), .DEPTH(L1_DEPTH)) u_l1 (
    .clk     (clk),
    .wr_addr (l1_wr_addr),
    .wr_data (sample_in),
    .rd_addr (l1_rd_addr),
    .rd_data (l1_rd_data)
  );

  // read pipeline flags, aligned with l1_rd_data
  logic rd_v, rd_first, rd_last;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_v     <= 1'b0;
      rd_first <= 1'b0;
      rd_last  <= 1'b0;
    end else begin
      rd_v     <= start || busy;
      rd_first <= start;
      rd_last  <= (start && WIN == 1) || (busy && idx == IW'(WIN-1));
    end
  end

  assign win_sample = l1_rd_data;
  assign win_valid  = rd_v;
  assign win_first  = rd_first;
  assign win_last   = rd_last;

  // ---------------- packing into 32-bit words ----------------
  logic [WORD_W-1:0] pack_reg, pack_next;
  logic [LW-1:0]     lane_reg, lane;
  logic              push;

  always_comb begin
    lane      = rd_first ? '0 : lane_reg;
    pack_next = (rd_first ? '0 : pack_reg)
              | (WORD_W'(l1_rd_data) << (int'(lane) * SAMPLE_W));
    push      = rd_v && ((lane == LW'(SPW-1)) || rd_last);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pack_reg     <= '0;
      lane_reg     <= '0;
      event_stored <= 1'b0;
    end else begin
      event_stored <= rd_v && rd_last;
      if (rd_v) begin
        pack_reg <= push ? '0 : pack_next;
        lane_reg <= push ? '0 : lane + 1'b1;
      end
    end
  end

  // ---------------- L2 memory ----------------
  logic l2_empty, l2_full;
  logic [$clog2(L2_DEPTH):0] l2_count;

  sync_fifo #(.WIDTH(WORD_W), .DEPTH(L2_DEPTH)) u_l2 (
    .clk      (clk),
    .rst_n    (rst_n),
    .wr_en    (push),
    .wr_data  (pack_next),
    .rd_en    (request_data),
    .rd_data  (read_data),
    .empty    (l2_empty),
    .full     (l2_full),
    .count    (l2_count),
    .overflow (l2_overflow)
  );

  assign data_avail = !l2_empty;

endmodule
