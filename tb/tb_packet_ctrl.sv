// tb_packet_ctrl: self-checking testbench of the 8-bit ADC packet controller.
// The sample written at clock t is a fixed hash of t, so the expected window
// is computed from the trigger time and the channel delay alone. The test
// first replays the document's transfer example (reference address 31,
// delay -3, main sample at address 28), then issues back-to-back transfers
// with random delays until the L2 memory holds 8 events, and finally reads
// all of them back. It checks the window stream order and its first/last
// flags, the packed L2 words, and the cycle counts: window samples start one
// clock after store_data and event_stored pulses WIN+1 clocks after it.
module tb_packet_ctrl;
  import dsp_pkg::*;
  localparam int unsigned WIN = 7, PRE = 3, L2_EVENTS = 8;
  localparam int unsigned WPE = words_per_event(8, WIN);

  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] sample_in, l1_wr_addr = '0, read_addr = '0;
  logic store_data = 1'b0, request_data = 1'b0;
  logic signed [7:0] delay = '0;
  logic [31:0] read_data;
  logic data_avail, win_valid, win_first, win_last, busy, event_stored, l2_overflow;
  logic [7:0] win_sample;
  int checks = 0, failures = 0;
  int t = 0;                       // clock count; sample of clock t = f(t)
  logic [7:0] exp_stream [$];      // expected window samples
  logic [31:0] exp_words [$];      // expected L2 words
  int store_t [$];                 // clocks of store_data
  int n_stored = 0;

  packet_ctrl #(.SAMPLE_W(8), .WIN(WIN), .PRE(PRE), .L1_DEPTH(256),
                .L2_EVENTS(L2_EVENTS), .DELAY_W(8)) dut (.*);

  function automatic logic [7:0] f(int tt);
    return 8'((tt * 37 + (tt >> 3) * 11 + 5) ^ (tt >> 5));
  endfunction

  always #5 clk = ~clk;
  assign sample_in = f(t);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at t=%0d", what, t); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // clock counter and L1 write pointer (t modulo 256)
  always @(posedge clk) if (rst_n) begin t <= t + 1; l1_wr_addr <= l1_wr_addr + 1'b1; end

  // stream and event_stored monitor
  always @(posedge clk) if (rst_n) begin
    if (win_valid) begin
      check(exp_stream.size() > 0, "unexpected window sample");
      if (exp_stream.size() > 0) check(win_sample == exp_stream.pop_front(), "window sample");
    end
    if (event_stored) begin
      n_stored++;
      check(store_t.size() > 0 && t - store_t.pop_front() == WIN + 1, "event_stored latency");
    end
    check(!l2_overflow, "no L2 overflow");
  end

  // issue one transfer: reference = address written at clock tref
  task automatic transfer(input int tref, input int d);
    int main_t;
    logic [7:0] s [WIN];
    main_t = tref + d;
    for (int j = 0; j < WIN; j++) begin
      s[j] = f(main_t + PRE - j);
      exp_stream.push_back(s[j]);
    end
    for (int w = 0; w < WPE; w++) begin
      logic [31:0] word;
      word = '0;
      for (int l = 0; l < 4; l++)
        if (w * 4 + l < WIN) word[l*8 +: 8] = s[w*4+l];
      exp_words.push_back(word);
    end
    read_addr  <= 8'(tref);
    delay      <= 8'(d);
    store_data <= 1'b1;
    store_t.push_back(t);
    @(posedge clk);
    store_data <= 1'b0;
    // first sample must appear exactly one clock after store_data
    #1 check(win_valid && win_first, "window start latency");
    repeat (WIN - 1) begin @(posedge clk); #1; end
    check(win_valid && win_last, "window last flag");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    // wait until clock 40 so that address 31 is written, as in the example
    while (t < 38) @(posedge clk);
    #1;
    transfer(31, -3);
    check(exp_words.size() == WPE, "example words");
    // back-to-back transfers, random delays, until 8 events are held
    for (int e = 1; e < L2_EVENTS; e++) begin
      int d;
      d = -4 - $urandom_range(40);
      @(posedge clk);
      #1;
      transfer(t - $urandom_range(3), d);
    end
    repeat (4) @(posedge clk);
    check(n_stored == L2_EVENTS, "all events stored");
    // read back all words
    while (exp_words.size() > 0) begin
      #1;
      check(data_avail, "data available");
      check(read_data == exp_words.pop_front(), "L2 word");
      request_data <= 1'b1;
      @(posedge clk);
      request_data <= 1'b0;
    end
    #1 check(!data_avail, "L2 empty after reading");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
