// tb_generic_packet_ctrl: self-checking testbench of the 32-bit generic
// packet controller (packet_ctrl with SAMPLE_W=32, WIN=1, PRE=0, no delay).
// The external word written at clock t is a hash of t. Transfers are issued
// with reference addresses up to 200 clocks old, some back to back, with a
// reader that pops the L2 memory at random; every word read must be the word
// written at the reference clock, in order. Also checks that event_stored
// follows store_data by WIN+1 = 2 clocks.
module tb_generic_packet_ctrl;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [31:0] sample_in, read_data, win_sample;
  logic [7:0] l1_wr_addr = '0, read_addr = '0;
  logic store_data = 1'b0, request_data = 1'b0;
  logic signed [7:0] delay;
  logic data_avail, win_valid, win_first, win_last, busy, event_stored, l2_overflow;
  int checks = 0, failures = 0, t = 0, n_stored = 0, n_read = 0;
  logic [31:0] exp_words [$];
  int store_t [$];

  packet_ctrl #(.SAMPLE_W(32), .WIN(1), .PRE(0), .L1_DEPTH(256),
                .L2_EVENTS(8), .DELAY_W(8)) dut (.*);

  function automatic logic [31:0] g(int tt);
    return 32'(tt) * 32'h9E37_79B9 ^ 32'h5A5A_0000;
  endfunction

  always #5 clk = ~clk;
  assign sample_in = g(t);
  assign delay = '0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at t=%0d", what, t); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    t <= t + 1;
    l1_wr_addr <= l1_wr_addr + 1'b1;
    if (event_stored) begin
      n_stored++;
      check(store_t.size() > 0 && t - store_t.pop_front() == 2, "event_stored latency");
    end
    check(!l2_overflow, "no overflow");
  end

  // random reader
  always @(posedge clk) if (rst_n) begin
    if (request_data) begin
      check(exp_words.size() > 0, "read with data expected");
      if (exp_words.size() > 0) check(read_data == exp_words.pop_front(), "L2 word");
      n_read++;
    end
  end
  always @(negedge clk) request_data <= data_avail && ($urandom_range(3) == 0);

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (260) @(posedge clk);
    for (int e = 0; e < 60; e++) begin
      int age;
      #1;
      age = $urandom_range(200, 1);
      // keep at most 8 events in L2
      while (exp_words.size() >= 7) begin @(posedge clk); #1; end
      exp_words.push_back(g(t - age));
      store_t.push_back(t);
      read_addr  <= 8'(t - age);
      store_data <= 1'b1;
      @(posedge clk);
      store_data <= 1'b0;
      repeat ($urandom_range(3)) @(posedge clk);
    end
    while (exp_words.size() > 0) @(posedge clk);
    repeat (3) @(posedge clk);
    check(n_stored == 60 && n_read == 60, "all events stored and read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
