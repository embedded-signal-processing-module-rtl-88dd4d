// tb_trigger_ctrl: self-checking testbench of the synchronisation and trigger
// control unit. The L2 memories are modelled by delaying store_data by WIN+1
// clocks into l2_event_stored; the packer is modelled by a reader that waits
// for has_data, checks the head event record and pulses read_done after a
// service time. Phases: an isolated trigger (latency check against the
// document's waveform: time index out at k+2, reference address at k+3,
// store_data at k+4); bursts of 1 to 8 back-to-back triggers; random
// triggers; and a long burst with a slow reader that fills the queue and the
// L2 memories so that triggers are discarded. Every accepted trigger must
// come out once, in order, with its ID, time index, decision and L1 address;
// a trigger is dropped exactly when trig_discard was high as it arrived, and
// a queued trigger is expired only when it is more than 128 clocks old.
module tb_trigger_ctrl;
  import dsp_pkg::*;
  localparam int WIN = 7;
  logic clk = 1'b0, rst_n = 1'b0;
  logic trigger = 1'b0, read_done = 1'b0, l2_event_stored;
  logic [31:0] trigger_decision = '0, time_index, time_index_out, last_trig_id;
  logic [7:0] l1_wr_addr, read_addr;
  logic store_data, has_data, trig_discard, trig_overflow, trig_expired, trig_received, busy;
  trig_info_t event_info;
  int checks = 0, failures = 0, t = 0;
  int n_trig = 0, n_drop = 0, n_exp = 0, n_done = 0, n_wait = 0, n_gap_min = 0, n_l2_full = 0;
  int last_store = -100, outstanding = 0, service = 20;
  logic [WIN+1:0] stored_pipe = '0;
  logic [2:0] exp_pipe = '0;
  trig_info_t exp_q [$];        // accepted triggers in order (for the packer)
  trig_info_t disp_q [$];       // accepted triggers not yet dispatched
  int trig_t [$];
  logic pend_drop_chk = 1'b0, pend_discard = 1'b0;

  trigger_ctrl #(.L1_DEPTH(256), .TRIG_FIFO_DEPTH(8), .L2_EVENTS(8), .DISPATCH_GAP(WIN)) dut (.*);

  always #5 clk = ~clk;
  assign time_index = 32'(t + 1000);
  assign l2_event_stored = stored_pipe[WIN];

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at t=%0d", what, t); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitor, evaluated just before each clock edge
  always @(posedge clk) if (rst_n) begin
    t <= t + 1;
    stored_pipe <= {stored_pipe[WIN:0], store_data};
    check(l1_wr_addr == 8'(t), "L1 write pointer");
    // drop bookkeeping for the trigger of the previous clock
    if (pend_drop_chk) begin
      check(trig_overflow == pend_discard, "drop exactly when queue full");
      if (trig_overflow) begin
        n_drop++;
        void'(exp_q.pop_back());
        void'(disp_q.pop_back());
        void'(trig_t.pop_back());
      end
    end
    pend_drop_chk <= trigger;
    pend_discard  <= trig_discard;
    if (trigger) begin
      trig_info_t r;
      r = '{trig_id: 32'(n_trig), time_index: time_index, decision: trigger_decision, l1_addr: l1_wr_addr};
      exp_q.push_back(r);
      disp_q.push_back(r);
      trig_t.push_back(t);
      n_trig++;
    end
    // An expiry at clock p is booked at p+3, once store_data has been seen for
    // every trigger dispatched before p.
    exp_pipe <= {exp_pipe[1:0], trig_expired};
    if (exp_pipe[2]) begin
      // the oldest queued trigger was discarded because it was too old
      check(disp_q.size() > 0 && (t - 3) - trig_t[0] > 128, "expiry only after 128 clocks");
      if (disp_q.size() > 0) begin
        trig_info_t r;
        r = disp_q.pop_front();
        void'(trig_t.pop_front());
        foreach (exp_q[i]) if (exp_q[i].trig_id == r.trig_id) begin exp_q.delete(i); break; end
        n_exp++;
      end
    end
    if (store_data) begin
      check(disp_q.size() > 0, "store_data for a queued trigger");
      if (disp_q.size() > 0) begin
        trig_info_t r;
        int tt;
        r = disp_q.pop_front();
        tt = trig_t.pop_front();
        check(read_addr == r.l1_addr, "reference address");
        check(t - tt >= 4, "store_data not before k+4");
        check(t - tt <= 128 + 4 + 1, "no stale trigger dispatched");
        if (t - tt > 4) n_wait++;
      end
      check(t - last_store >= WIN, "dispatch spacing");
      if (t - last_store == WIN) n_gap_min++;
      last_store = t;
      outstanding++;
      check(outstanding <= 8, "at most 8 events in L2");
      if (outstanding == 8) n_l2_full++;
    end
    if (read_done) begin
      outstanding--;
      n_done++;
    end
  end

  // packer model
  initial begin
    forever begin
      @(posedge clk);
      #1;
      if (has_data) begin
        repeat (service) @(posedge clk);
        #1;
        check(exp_q.size() > 0, "event expected");
        if (exp_q.size() > 0) check(event_info == exp_q.pop_front(), "event record");
        read_done = 1'b1;
        @(posedge clk);
        #1 read_done = 1'b0;
      end
    end
  end

  task automatic fire(input int n);
    repeat (n) begin
      trigger = 1'b1; trigger_decision = $urandom;
      @(posedge clk); #1;
    end
    trigger = 1'b0;
  endtask

  initial begin
    int k;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (20) @(posedge clk);
    #1;
    // isolated trigger: latency as in the document's waveform
    k = t;
    fire(1);                               // trigger high during clock k
    #0 check(!store_data, "no store at k+1");
    @(posedge clk); #1;                    // clock k+2
    check(time_index_out == 32'(k + 1000), "time index out at k+2");
    @(posedge clk); #1;                    // clock k+3
    check(read_addr == 8'(k) && !store_data, "reference address at k+3");
    @(posedge clk); #1;                    // clock k+4
    check(store_data, "store_data at k+4");
    repeat (60) @(posedge clk);
    #1;
    // bursts of 1..8 back-to-back triggers, none may be lost
    for (int b = 1; b <= 8; b++) begin
      fire(b);
      repeat (300) @(posedge clk);
      #1;
    end
    check(n_drop == 0, "no drop in bursts up to 8");
    // random triggers
    for (int i = 0; i < 3000; i++) begin
      trigger = ($urandom_range(19) == 0); trigger_decision = $urandom;
      @(posedge clk); #1;
    end
    trigger = 1'b0;
    repeat (500) @(posedge clk);
    #1;
    // overload: slow packer, long burst
    service = 150;
    fire(40);
    while (busy) @(posedge clk);
    repeat (50) @(posedge clk);
    #1;
    check(n_drop > 0, "triggers were discarded");
    check(n_done + n_drop + n_exp == n_trig, "every trigger packed, dropped or expired");
    check(n_exp > 0, "stale triggers were discarded");
    check(exp_q.size() == 0 && disp_q.size() == 0, "queues drained");
    check(n_wait > 0 && n_gap_min > 0 && n_l2_full > 0, "wait, spacing and L2-full occurred");
    check(last_trig_id == 32'(n_trig - 1), "last trigger id");
    $display("triggers=%0d dropped=%0d expired=%0d waited=%0d l2_full=%0d", n_trig, n_drop, n_exp, n_wait, n_l2_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
