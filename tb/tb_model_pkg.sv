// tb_model_pkg: reference model shared by the end-to-end testbenches.
// The stimulus is a pure function of the clock count t: adc_sample(c, t) is
// the sample of ADC channel c during clock t and ext_word(t) the external
// word, so the expected fragment of a trigger received during clock k can be
// built from k, the trigger record and the configuration alone:
//   window sample j (j = 0..WIN-1) of channel c = adc_sample(c, k + delay_c + PRE - j)
//   filter output = sum_j sample_j * coef_j, accepted when > threshold
//   ADC data words: samples 4w..4w+3 in bytes 0..3 of word w, then
//   {accept, output[30:0]}; generic data word: ext_word(k).
package tb_model_pkg;
  import dsp_pkg::*;

  function automatic logic [7:0] adc_sample(int c, int t);
    int h;
    h = (t * 29 + c * 101) ^ (t >> 2) ^ (c * 7 * (t >> 4));
    return 8'(h + (((t >> 3) % 5 == 0) ? 120 : 0));
  endfunction

  function automatic logic [31:0] ext_word(int t);
    return 32'(t) * 32'h0101_0F0F + 32'h1357_0000;
  endfunction

  typedef struct {
    int          n_adc, win, pre;
    logic [31:0] run_number, source_id;
    int          threshold;
    int          coef [];
    int          delay [];
  } cfg_t;

  // expected fragment of a trigger during clock k; returns the number of
  // channels whose filter accepted through n_acc
  function automatic void build_fragment(input cfg_t cfg, input int id, input int k,
                                         input logic [31:0] time_index,
                                         input logic [31:0] decision,
                                         ref logic [31:0] q [$], output int n_acc);
    int wpe;
    wpe = (cfg.win + 3) / 4;
    n_acc = 0;
    q.delete();
    q.push_back(HEADER_MARKER); q.push_back(32'(HEADER_WORDS)); q.push_back(FORMAT_VERSION);
    q.push_back(cfg.source_id); q.push_back(cfg.run_number);
    q.push_back(32'(id)); q.push_back(time_index); q.push_back(decision);
    q.push_back(SUBFRAG_MARKER); q.push_back(32'd1); q.push_back({TYPE_GENERIC, 8'h00, 16'd0});
    q.push_back(ext_word(k));
    for (int c = 0; c < cfg.n_adc; c++) begin
      logic [7:0]  s [];
      longint      acc;
      logic [31:0] w;
      s = new[cfg.win];
      acc = 0;
      for (int j = 0; j < cfg.win; j++) begin
        s[j] = adc_sample(c, k + cfg.delay[c] + cfg.pre - j);
        acc += longint'(s[j]) * longint'(cfg.coef[j]);
      end
      q.push_back(SUBFRAG_MARKER); q.push_back(32'(wpe + 1)); q.push_back({TYPE_ADC, 8'h00, 16'(c + 1)});
      for (int x = 0; x < wpe; x++) begin
        w = '0;
        for (int l = 0; l < 4; l++)
          if (4 * x + l < cfg.win) w[8*l +: 8] = s[4*x+l];
        q.push_back(w);
      end
      if (acc > longint'(cfg.threshold)) n_acc++;
      q.push_back({acc > longint'(cfg.threshold), 31'(acc)});
    end
    q.push_back(32'd0); q.push_back(32'(1 + cfg.n_adc * (wpe + 1))); q.push_back(END_MARKER);
  endfunction
endpackage
