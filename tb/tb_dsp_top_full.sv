// tb_dsp_top_full: end-to-end testbench of dsp_top with every parameter at
// its default (32 ADC channels, 7-sample windows, 256-position L1 memories,
// 8-event L2 memories). See tb_dsp_top_core for the checks.
module tb_dsp_top_full;
  tb_dsp_top_core #(.N_ADC(32), .FULL(1'b1), .N_RANDOM(30), .N_OVERLOAD(40)) u_core ();
endmodule
