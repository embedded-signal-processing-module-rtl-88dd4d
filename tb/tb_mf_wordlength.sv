// tb_mf_wordlength: finite word-length study of the matched filter.
//
// The same stream of 7-sample windows is fed to eight matched_filter
// instances whose coefficient width COEF_W is 8, 10, 12, 14, 16, 18, 24 and
// 31 bits (accumulator COEF_W+12 bits, so no overflow). Each instance holds
// the same pulse template f[i] (peak 1.0), quantised as
// round(f[i] * (2^(COEF_W-1)-1)), and the threshold gamma quantised the same
// way. The reference is the double-precision filter sum_i y[i]*f[i] > gamma.
//
// Windows are a pedestal of 20 counts plus, in half of them, the pulse
// scaled by a random amplitude of 1..200 counts, plus noise (sum of four
// uniform values in -2..2), clipped to 8 bits.
//
// Checks, per width and window:
// - the filter output equals sum_i y[i]*q[i], worked out here in 64 bits;
// - the decision equals output > quantised threshold;
// - the output arrives one clock after the last sample.
// Over the whole run it reports, per width:
// - the relative mean error RME = 100 * sum|L_ref - L_x| / sum|L_ref|;
// - the detection disagreement, in % of windows, against the reference.
// It checks that RME is below 0.01 % and disagreement below 0.1 % from 16 bits
// on, and that the error at 8 bits exceeds the error at 31 bits.
//
// The width range and the two figures of merit follow the published study.
// The template, the signal model and the exact RME normalisation are this
// testbench's own, because the study's data are not available.
module tb_mf_wordlength;
  localparam int WIN    = 7;
  localparam int NW     = 8;
  localparam int NWINS  = 2000;
  localparam int WL [NW] = '{8, 10, 12, 14, 16, 18, 24, 31};
  localparam real GAMMA = 120.0;
  localparam real F [WIN] = '{0.0172, 0.4524, 1.0, 0.5633, 0.1493, 0.0424, 0.0041};

  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] sample = '0;
  logic valid = 1'b0, first = 1'b0, last = 1'b0;

  // Windows already sent, read by the per-width monitors.
  logic [7:0] ywin [NWINS][WIN];

  int  nchk [NW];
  int  nfail[NW];
  int  ndis [NW];
  int  nres [NW];
  real err_sum[NW];
  real ref_sum[NW];
  int  checks = 0, failures = 0, n_ref_acc = 0, n_ref_rej = 0;

  always #5 clk = ~clk;

  function automatic real ref_lambda(input int n);
    real s;
    s = 0.0;
    for (int i = 0; i < WIN; i++) s += real'(ywin[n][i]) * F[i];
    return s;
  endfunction

  for (genvar j = 0; j < NW; j++) begin : g_w
    localparam int W  = WL[j];
    localparam int OW = W + 12;
    localparam real SCALE = 2.0 ** (W - 1) - 1.0;
    logic signed [W-1:0]  coef [WIN];
    logic signed [OW-1:0] thr, mf_out;
    logic mf_valid, mf_accept;
    logic pend = 1'b0;
    int   k = 0;

    matched_filter #(.SAMPLE_W(8), .COEF_W(W), .WIN(WIN), .OUT_W(OW)) u_mf (
      .clk, .rst_n, .sample, .valid, .first, .last, .coef, .threshold(thr),
      .mf_valid, .mf_out, .mf_accept);

    initial begin
      for (int i = 0; i < WIN; i++) coef[i] = W'(longint'(F[i] * SCALE));
      thr = OW'(longint'(GAMMA * SCALE));
    end

    // pend: a window's last sample was taken at this edge, so its result
    // must be visible at the next one.
    always @(posedge clk) begin
      pend <= valid && last;
      if (rst_n && pend != mf_valid) begin
        nchk[j]++; nfail[j]++;
        $display("FAIL width %0d: result valid %0b, expected %0b at %0t", W, mf_valid, pend, $time);
      end
      if (rst_n && mf_valid && k < NWINS) begin
        longint exp_out;
        real lref, lx;
        exp_out = 0;
        for (int i = 0; i < WIN; i++) exp_out += longint'(ywin[k][i]) * longint'(coef[i]);
        nchk[j] += 2;
        if (longint'(mf_out) != exp_out) begin
          nfail[j]++;
          $display("FAIL width %0d window %0d: out %0d expected %0d", W, k, mf_out, exp_out);
        end
        if (mf_accept != (exp_out > longint'(thr))) begin
          nfail[j]++;
          $display("FAIL width %0d window %0d: decision %0b", W, k, mf_accept);
        end
        lref = ref_lambda(k);
        lx   = real'(mf_out) / SCALE;
        err_sum[j] += (lref > lx) ? lref - lx : lx - lref;
        ref_sum[j] += (lref > 0.0) ? lref : -lref;
        if (mf_accept != (lref > GAMMA)) ndis[j]++;
        nres[j]++;
        k++;
      end
    end
  end

  initial begin
    repeat (NWINS * WIN + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < NW; j++) begin
      nchk[j] = 0; nfail[j] = 0; ndis[j] = 0; nres[j] = 0;
      err_sum[j] = 0.0; ref_sum[j] = 0.0;
    end
    for (int n = 0; n < NWINS; n++)
      for (int i = 0; i < WIN; i++) ywin[n][i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    #1;
    for (int n = 0; n < NWINS; n++) begin
      int amp;
      amp = ($urandom_range(1) == 1) ? int'($urandom_range(200, 1)) : 0;
      for (int i = 0; i < WIN; i++) begin
        int noise, y;
        noise = 0;
        for (int r = 0; r < 4; r++) noise += int'($urandom_range(4)) - 2;
        y = 20 + $rtoi(real'(amp) * F[i] + 0.5) + noise;
        if (y < 0) y = 0;
        if (y > 255) y = 255;
        ywin[n][i] = 8'(y);
      end
      if (ref_lambda(n) > GAMMA) n_ref_acc++; else n_ref_rej++;
      // Every tenth window is preceded by idle clocks.
      if (n % 10 == 0) begin
        valid = 1'b0;
        repeat ($urandom_range(3, 1)) begin @(posedge clk); #1; end
      end
      for (int i = 0; i < WIN; i++) begin
        sample = ywin[n][i];
        valid  = 1'b1;
        first  = (i == 0);
        last   = (i == WIN - 1);
        @(posedge clk);
        #1;
      end
    end
    valid = 1'b0; first = 1'b0; last = 1'b0;
    repeat (5) @(posedge clk);

    $display(" bits   RME(%%)       disagreement(%%)");
    for (int j = 0; j < NW; j++) begin
      real rme, dis;
      rme = 100.0 * err_sum[j] / ref_sum[j];
      dis = 100.0 * real'(ndis[j]) / real'(NWINS);
      $display(" %4d   %10.6f   %8.3f", WL[j], rme, dis);
      checks += nchk[j] + 1;
      failures += nfail[j];
      if (nres[j] != NWINS) begin
        failures++;
        $display("FAIL width %0d: %0d results for %0d windows", WL[j], nres[j], NWINS);
      end
      if (WL[j] >= 16) begin
        checks += 2;
        if (rme >= 0.01) begin failures++; $display("FAIL width %0d: RME %f %%", WL[j], rme); end
        if (dis >= 0.1)  begin failures++; $display("FAIL width %0d: disagreement %f %%", WL[j], dis); end
      end
    end
    checks++;
    if (err_sum[0] <= err_sum[NW-1]) begin
      failures++;
      $display("FAIL error at %0d bits not above error at %0d bits", WL[0], WL[NW-1]);
    end
    checks++;
    if (n_ref_acc == 0 || n_ref_rej == 0) begin
      failures++;
      $display("FAIL reference decisions: %0d accepted, %0d rejected", n_ref_acc, n_ref_rej);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
