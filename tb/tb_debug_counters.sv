// tb_debug_counters: self-checking testbench of the debug counters.
// Drives random pulses on every event input for 2000 clocks, counts them in
// the testbench and compares all five registers every clock.
module tb_debug_counters;
  logic clk = 1'b0, rst_n = 1'b0;
  logic pkt_sent = 0, mf_event_valid = 0, mf_event_accept = 0;
  logic trig_overflow = 0, trig_expired = 0, trig_received = 0;
  logic [31:0] last_trig_id = '0;
  logic [31:0] cnt [5];
  int checks = 0, failures = 0;
  int unsigned m [5];

  debug_counters dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5; i++) m[i] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int c = 0; c < 2000; c++) begin
      pkt_sent        = $urandom_range(3) == 0;
      mf_event_valid  = $urandom_range(2) == 0;
      mf_event_accept = $urandom_range(1) == 0;
      trig_overflow   = $urandom_range(5) == 0;
      trig_received   = $urandom_range(1) == 0;
      trig_expired    = $urandom_range(4) == 0;
      last_trig_id    = $urandom;
      @(posedge clk);
      if (pkt_sent) m[0]++;
      if (mf_event_valid && mf_event_accept) m[1]++;
      m[2] += int'(trig_overflow) + int'(trig_expired);
      if (trig_received) m[3]++;
      m[4] = last_trig_id;
      #1;
      for (int i = 0; i < 5; i++) begin
        checks++;
        if (cnt[i] != m[i]) begin
          failures++;
          $display("FAIL counter %0d: %0d vs %0d", i, cnt[i], m[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
