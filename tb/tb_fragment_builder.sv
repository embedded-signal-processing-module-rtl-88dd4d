// tb_fragment_builder: self-checking testbench of the data fragment builder
// without the register bank and output buffer. Three ADC channels with
// different delays, configuration driven straight onto the ports. Isolated
// triggers check the latency to the first fragment word (14 clocks: store_data
// at k+4, WIN+1 clocks of transfer, has_data, packer start); bursts of 1 to 8
// triggers and random triggers with random backpressure check every fragment
// word by word against the reference model (tb_model_pkg).
module tb_fragment_builder;
  import dsp_pkg::*;
  import tb_model_pkg::*;
  localparam int N_ADC = 3, WIN = 7, PRE = 3, WPE = 2;
  localparam int FRAG = HEADER_WORDS + (N_ADC + 1) * SUBHDR_WORDS + 1 + N_ADC * (WPE + 1) + TRAILER_WORDS;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0]  adc_data [N_ADC];
  logic [31:0] ext_data, time_index, trigger_decision = '0, out_data, last_trig_id;
  logic        trigger = 1'b0, out_ready = 1'b1, out_valid;
  logic [31:0] run_number = 32'd42, source_id = 32'h0000_0A0B;
  logic signed [31:0] threshold = 32'sd60000;
  logic signed [15:0] coef [WIN];
  logic signed [7:0]  delay [N_ADC];
  logic trig_discard, trig_overflow, trig_expired, trig_received, pkt_sent;
  logic mf_event_valid, mf_event_accept, busy;

  fragment_builder #(.N_ADC(N_ADC)) dut (.*);

  int checks = 0, failures = 0, t = 0, n_trig = 0, n_frag = 0, n_mf = 0, n_stall = 0, frag_t0 = 0;
  int trig_k [int];
  logic [31:0] trig_ti [int], trig_dec [int];
  bit isolated [int];
  logic [31:0] cur [$];
  cfg_t cfg;

  always #5 clk = ~clk;
  for (genvar c = 0; c < N_ADC; c++) begin : g_adc
    assign adc_data[c] = adc_sample(c, t);
  end
  assign ext_data   = ext_word(t);
  assign time_index = 32'(t + 100);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at t=%0d", what, t); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    t <= t + 1;
    if (trigger) begin
      trig_k[n_trig] = t; trig_ti[n_trig] = time_index; trig_dec[n_trig] = trigger_decision;
      n_trig++;
    end
    if (mf_event_valid && mf_event_accept) n_mf++;
    if (out_valid && !out_ready) n_stall++;
    if (out_valid && out_ready) begin
      if (cur.size() == 0) frag_t0 = t;
      cur.push_back(out_data);
      if (cur.size() == FRAG) begin
        logic [31:0] exp [$];
        int id, n_acc, bad;
        id = int'(cur[5]);
        check(id == n_frag, "fragments in order, none lost");
        build_fragment(cfg, id, trig_k[id], trig_ti[id], trig_dec[id], exp, n_acc);
        bad = 0;
        for (int i = 0; i < FRAG; i++) if (cur[i] !== exp[i]) bad++;
        check(bad == 0, "fragment content");
        if (isolated[id]) check(frag_t0 - trig_k[id] == 14, "isolated trigger latency");
        n_frag++;
        cur.delete();
      end
    end
  end

  task automatic fire(input int n, input bit iso);
    repeat (n) begin
      if (iso) isolated[n_trig] = 1'b1;
      trigger = 1'b1; trigger_decision = $urandom;
      @(posedge clk); #1;
    end
    trigger = 1'b0;
  endtask

  initial begin
    int tmpl [WIN];
    tmpl = '{10, 40, 90, 160, 90, 40, 10};
    cfg.n_adc = N_ADC; cfg.win = WIN; cfg.pre = PRE;
    cfg.run_number = run_number; cfg.source_id = source_id; cfg.threshold = threshold;
    cfg.coef = new[WIN]; cfg.delay = new[N_ADC];
    for (int i = 0; i < WIN; i++) begin coef[i] = 16'(tmpl[i]); cfg.coef[i] = tmpl[i]; end
    for (int c = 0; c < N_ADC; c++) begin delay[c] = 8'(-3 - 5 * c); cfg.delay[c] = -3 - 5 * c; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (300) @(posedge clk);
    #1;
    for (int i = 0; i < 2; i++) begin fire(1, 1'b1); repeat (100) @(posedge clk); #1; end
    for (int b = 1; b <= 8; b++) begin fire(b, 1'b0); repeat (400) @(posedge clk); #1; end
    for (int i = 0; i < 3000; i++) begin
      trigger = ($urandom_range(60) == 0); trigger_decision = $urandom;
      out_ready = ($urandom_range(3) != 0);
      @(posedge clk); #1;
    end
    trigger = 1'b0; out_ready = 1'b1;
    while (busy) @(posedge clk);
    repeat (5) @(posedge clk);
    #1;
    check(n_frag == n_trig && n_frag > 40, "every trigger produced a fragment");
    check(n_stall > 0, "backpressure stalls occurred");
    check(n_mf > 0, "matched filter accepted some events");
    $display("triggers=%0d fragments=%0d stalls=%0d mf=%0d", n_trig, n_frag, n_stall, n_mf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
