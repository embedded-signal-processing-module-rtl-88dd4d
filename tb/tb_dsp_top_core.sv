// tb_dsp_top_core: end-to-end test of dsp_top, shared by tb_dsp_top (small
// channel count) and tb_dsp_top_full (all defaults, FULL=1: the top is
// instantiated without a parameter list).
//
// The testbench configures the module through the register bus (run number,
// source identifier, a pulse-shaped filter template and threshold, and a
// different delay per channel, -3 for channel 0 as in the document's
// example), drives every ADC channel and the external word with functions of
// the clock count (tb_model_pkg), and checks every fragment that leaves the
// output buffer word by word against the reference model. Phases:
//   1. isolated triggers: first fragment word exactly 15 clocks after the
//      trigger (store_data at k+4, WIN+1 clocks of transfer, has_data, packer
//      start, output buffer);
//   2. bursts of 1 to 8 back-to-back triggers (no trigger may be lost);
//   3. random triggers with random output backpressure;
//   4. continuous triggers, one every clock, with the output link flowing;
//   5. overload: a long burst while the output link is stalled, so the
//      trigger queue fills and triggers are discarded, and queued triggers
//      grow too old and expire.
// At the end the debug counters are read through the bus and compared with
// the testbench's own counts. Each mechanism (queue wait, discard, output
// stall, expiry, filter accept, filter reject, several events held in L2) is counted
// and must occur at least once.
module tb_dsp_top_core #(
  parameter int  N_ADC      = 32,
  parameter bit  FULL       = 1'b1,
  parameter int  N_RANDOM   = 30,
  parameter int  N_OVERLOAD = 40
) ();
  import dsp_pkg::*;
  import tb_model_pkg::*;
  localparam int WIN = 7, PRE = 3, WPE = 2;
  localparam int FRAG = HEADER_WORDS + (N_ADC + 1) * SUBHDR_WORDS + 1 + N_ADC * (WPE + 1) + TRAILER_WORDS;
  localparam int MIN_LAT = 15;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0]  adc_data [N_ADC];
  logic [31:0] ext_data, time_index, trigger_decision = '0;
  logic        trigger = 1'b0;
  logic        cfg_we = 1'b0;
  logic [7:0]  cfg_addr = '0;
  logic [31:0] cfg_wdata = '0, cfg_rdata, out_data;
  logic        out_valid, out_ready = 1'b1, trig_discard, busy;

  if (FULL) begin : g_full
    dsp_top dut (.*);
  end else begin : g_small
    dsp_top #(.N_ADC(N_ADC)) dut (.*);
  end

  int checks = 0, failures = 0, t = 0;
  cfg_t cfg;
  int          trig_k   [int];
  logic [31:0] trig_ti  [int];
  logic [31:0] trig_dec [int];
  bit          isolated [int];
  int n_lost = 0, n_trig = 0, n_frag = 0, n_disc = 0, n_wait = 0, n_stall = 0;
  int n_mf_evt = 0, n_ch_acc = 0, n_ch_rej = 0, n_multi = 0, last_id = -1, frag_t0 = 0;
  int pending = 0;   // triggers not yet seen as fragments (incl. discarded)
  logic [31:0] cur [$];

  always #5 clk = ~clk;

  for (genvar c = 0; c < N_ADC; c++) begin : g_adc
    assign adc_data[c] = adc_sample(c, t);
  end
  assign ext_data   = ext_word(t);
  assign time_index = 32'(t + 5000);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at t=%0d", what, t); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- monitor ----------------
  task automatic check_fragment();
    logic [31:0] exp [$];
    int id, n_acc, bad;
    id = int'(cur[5]);
    check(trig_k.exists(id), "fragment of a known trigger");
    if (!trig_k.exists(id)) return;
    check(id > last_id, "fragments in trigger order");
    last_id = id;
    build_fragment(cfg, id, trig_k[id], trig_ti[id], trig_dec[id], exp, n_acc);
    bad = 0;
    for (int i = 0; i < FRAG; i++)
      if (cur[i] !== exp[i]) begin
        if (bad == 0) $display("fragment %0d word %0d: got %h exp %h", id, i, cur[i], exp[i]);
        bad++;
      end
    check(bad == 0, "fragment content");
    if (n_acc > 0) n_mf_evt++;
    n_ch_acc += n_acc;
    n_ch_rej += N_ADC - n_acc;
    if (isolated[id]) check(frag_t0 - trig_k[id] == MIN_LAT, "isolated trigger latency");
    if (frag_t0 - trig_k[id] > MIN_LAT) n_wait++;
    n_frag++;
  endtask

  always @(posedge clk) if (rst_n) begin
    t <= t + 1;
    if (trigger) begin
      trig_k[n_trig]   = t;
      trig_ti[n_trig]  = time_index;
      trig_dec[n_trig] = trigger_decision;
      if (trig_discard) n_disc++;
      n_trig++;
    end
    if (out_valid && !out_ready) n_stall++;
    if (out_valid && out_ready) begin
      if (cur.size() == 0) frag_t0 = t;
      cur.push_back(out_data);
      if (cur.size() == FRAG) begin
        check_fragment();
        cur.delete();
      end
    end
  end

  // several complete events waiting in L2 while a fragment is being sent
  int ev_in_l2 = 0;
  always @(posedge clk) if (rst_n) begin
    if (n_trig - n_disc - n_frag >= 3 && busy) n_multi++;
  end

  // ---------------- bus and stimulus helpers ----------------
  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    cfg_we = 1'b1; cfg_addr = a; cfg_wdata = d;
    @(posedge clk);
    #1 cfg_we = 1'b0;
  endtask

  task automatic rd(input logic [7:0] a, output logic [31:0] d);
    cfg_addr = a;
    @(posedge clk);
    #1 d = cfg_rdata;
  endtask

  task automatic fire(input int n, input bit iso);
    repeat (n) begin
      if (iso) isolated[n_trig] = 1'b1;
      trigger = 1'b1; trigger_decision = $urandom;
      @(posedge clk); #1;
    end
    trigger = 1'b0;
  endtask

  task automatic drain();
    while (busy || out_valid) begin @(posedge clk); #1; end
    repeat (5) @(posedge clk);
    #1;
  endtask

  initial begin
    int tmpl [WIN];
    logic [31:0] d;
    tmpl = '{30, 110, 250, 400, 250, 110, 30};
    cfg.n_adc = N_ADC; cfg.win = WIN; cfg.pre = PRE;
    cfg.run_number = 32'd1234; cfg.source_id = 32'h0051_0001;
    cfg.threshold = 150000;
    cfg.coef = new[WIN];
    cfg.delay = new[N_ADC];
    for (int i = 0; i < WIN; i++) cfg.coef[i] = tmpl[i];
    for (int c = 0; c < N_ADC; c++) cfg.delay[c] = -3 - (c % 9);

    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wr(8'h00, cfg.run_number);
    wr(8'h01, cfg.source_id);
    wr(8'h02, 32'(cfg.threshold));
    for (int i = 0; i < WIN; i++) wr(8'(8'h10 + i), 32'(cfg.coef[i]));
    for (int c = 0; c < N_ADC; c++) wr(8'(8'h40 + c), 32'(cfg.delay[c]));
    rd(8'h40, d);
    check(d == 32'hFFFF_FFFD, "delay of channel 0 reads back as -3");
    // let every L1 memory fill once
    repeat (300) @(posedge clk);
    #1;

    // 1. isolated triggers
    for (int i = 0; i < 3; i++) begin
      fire(1, 1'b1);
      drain();
    end
    // 2. bursts of 1..8 triggers
    for (int b = 1; b <= 8; b++) begin
      fire(b, 1'b0);
      drain();
    end
    check(n_disc == 0, "no discards in bursts up to 8");
    // 3. random triggers, random backpressure
    fork
      begin
        int n;
        n = 0;
        while (n < N_RANDOM) begin
          if ($urandom_range(FRAG) == 0) begin fire(1, 1'b0); n++; end
          else begin @(posedge clk); #1; end
        end
      end
      begin
        repeat (N_RANDOM * FRAG) begin
          out_ready = ($urandom_range(3) != 0);
          @(posedge clk); #1;
        end
        out_ready = 1'b1;
      end
    join
    out_ready = 1'b1;
    drain();
    // 4. continuous triggers, one per clock, with the output link flowing
    fire(N_OVERLOAD, 1'b0);
    drain();
    // 5. overload with the output link stalled
    out_ready = 1'b0;
    fire(N_OVERLOAD, 1'b0);
    repeat ((4 * FRAG > 800) ? 4 * FRAG : 800) @(posedge clk);
    #1 out_ready = 1'b1;
    drain();

    // debug counters
    rd(8'h80, d); check(d == 32'(n_frag), "debug: packages sent");
    rd(8'h81, d); check(d == 32'(n_mf_evt), "debug: matched filter trigger occurrences");
    rd(8'h82, d); n_lost = int'(d);
    check(n_lost >= n_disc, "debug: triggers lost include every queue-full discard");
    rd(8'h83, d); check(d == 32'(n_trig), "debug: primary triggers received");
    rd(8'h84, d); check(d == 32'(n_trig - 1), "debug: last trigger id");
    check(n_frag + n_lost == n_trig, "every trigger packed or lost");
    check(cur.size() == 0, "no partial fragment left");

    $display("lost=%0d expired=%0d", n_lost, n_lost - n_disc);
    $display("triggers=%0d fragments=%0d discarded=%0d waited=%0d stalls=%0d mf_events=%0d ch_accept=%0d ch_reject=%0d multi=%0d",
             n_trig, n_frag, n_disc, n_wait, n_stall, n_mf_evt, n_ch_acc, n_ch_rej, n_multi);
    check(n_wait > 0, "mechanism: trigger waited in the queue");
    check(n_disc > 0, "mechanism: trigger discarded (queue full)");
    check(n_lost > n_disc, "mechanism: stale trigger expired in the queue");
    check(n_stall > 0, "mechanism: output link stall");
    check(n_ch_acc > 0, "mechanism: matched filter accept");
    check(n_ch_rej > 0, "mechanism: matched filter reject");
    check(n_multi > 0, "mechanism: several events queued");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
