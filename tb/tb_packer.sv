// tb_packer: self-checking testbench of the packer state machine.
// Three ADC sub-fragments of 3 words and one generic sub-fragment of 1 word.
// The L2 memories are modelled as queues filled with random words; has_data
// is high while the testbench holds complete events. The output stream is
// compared word by word with the fragment built by the testbench from the
// format (header, sub-fragment headers and data, trailer). Phase 1 keeps
// out_ready high and checks the timing: first word one clock after has_data,
// one word per clock. Phase 2 throttles out_ready at random (stalls).
// read_done must pulse exactly once per fragment, with its last word; all
// five states must be visited.
module tb_packer;
  import dsp_pkg::*;
  localparam int N_ADC = 3, SG = 1, SA = 3, N_SUB = N_ADC + 1;
  localparam int FRAG_WORDS = HEADER_WORDS + N_SUB * SUBHDR_WORDS + SG + N_ADC * SA + TRAILER_WORDS;
  logic clk = 1'b0, rst_n = 1'b0;
  logic has_data = 1'b0, out_ready = 1'b1, read_done, out_valid;
  trig_info_t event_info;
  logic [31:0] run_number = 32'd77, source_id = 32'hABCD, out_data;
  logic [31:0] read_data [N_SUB];
  logic [N_SUB-1:0] request_data;
  pk_state_t state;
  logic [31:0] src_q [N_SUB][$];
  logic [31:0] exp_q [$];
  trig_info_t info_q [$];
  int checks = 0, failures = 0, n_frag = 0, n_done = 0, n_stall = 0, t = 0;
  int seen [5];

  packer #(.N_ADC(N_ADC), .SUB_WORDS_GEN(SG), .SUB_WORDS_ADC(SA)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at t=%0d", what, t); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar s = 0; s < N_SUB; s++) begin : g_src
    assign read_data[s] = (src_q[s].size() > 0) ? src_q[s][0] : 32'hDEAD_BEEF;
  end
  assign event_info = (info_q.size() > 0) ? info_q[0] : '0;

  // build one event: source words and the expected fragment
  task automatic add_event(input int id);
    trig_info_t r;
    r = '{trig_id: 32'(id), time_index: $urandom, decision: $urandom, l1_addr: 8'($urandom)};
    info_q.push_back(r);
    exp_q.push_back(32'hEE12_34EE); exp_q.push_back(32'd8); exp_q.push_back(32'h0001_0000);
    exp_q.push_back(source_id); exp_q.push_back(run_number);
    exp_q.push_back(r.trig_id); exp_q.push_back(r.time_index); exp_q.push_back(r.decision);
    for (int s = 0; s < N_SUB; s++) begin
      int n;
      n = (s == 0) ? SG : SA;
      exp_q.push_back(32'hDD12_34DD);
      exp_q.push_back(32'(n));
      exp_q.push_back({(s == 0) ? 8'h01 : 8'h02, 8'h00, 16'(s)});
      for (int w = 0; w < n; w++) begin
        logic [31:0] d;
        d = $urandom;
        src_q[s].push_back(d);
        exp_q.push_back(d);
      end
    end
    exp_q.push_back(32'd0); exp_q.push_back(32'(SG + N_ADC * SA)); exp_q.push_back(32'hE0DA_0E0D);
  endtask

  int first_word_t = -1, has_data_t = -1, done_t = -1;
  always @(posedge clk) if (rst_n) begin
    t <= t + 1;
    seen[state]++;
    if (out_valid && !out_ready) n_stall++;
    if (out_valid && out_ready) begin
      check(exp_q.size() > 0, "word expected");
      if (exp_q.size() > 0) check(out_data == exp_q.pop_front(), $sformatf("output word %0d", n_frag));
      if (first_word_t < 0) first_word_t = t;
    end
    for (int s = 0; s < N_SUB; s++)
      if (request_data[s]) begin
        check(src_q[s].size() > 0, "pop of a non-empty source");
        if (src_q[s].size() > 0) void'(src_q[s].pop_front());
      end
    if (read_done) begin
      n_done++;
      if (done_t < 0) done_t = t;
      void'(info_q.pop_front());
      check(exp_q.size() % FRAG_WORDS == 0, "read_done with the last word");
    end
  end

  initial begin
    for (int i = 0; i < 5; i++) seen[i] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (3) @(posedge clk);
    #1;
    // phase 1: one event, no backpressure, timing
    add_event(0);
    has_data = 1'b1;
    has_data_t = t;
    @(posedge clk); #1;
    has_data = 1'b0;
    while (n_done < 1) @(posedge clk);
    #1;
    check(first_word_t == has_data_t + 1, "first word one clock after has_data");
    check(done_t - first_word_t == FRAG_WORDS - 1, "one word per clock");
    // phase 2: several queued events, random backpressure
    for (int e = 1; e <= 6; e++) add_event(e);
    fork
      forever begin @(posedge clk); #1 out_ready = ($urandom_range(3) != 0); end
      begin
        while (n_done < 7) begin
          has_data = (info_q.size() > 0) && (n_done < 7);
          @(posedge clk); #1;
        end
        has_data = 1'b0;
      end
    join_any
    disable fork;
    out_ready = 1'b1;
    repeat (5) @(posedge clk);
    #1;
    check(n_done == 7 && exp_q.size() == 0, "all fragments sent");
    check(n_stall > 0, "backpressure stalls occurred");
    for (int i = 0; i < 5; i++) check(seen[i] > 0, "state visited");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
