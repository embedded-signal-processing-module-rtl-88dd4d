// tb_dsp_top: end-to-end testbench of dsp_top with 2 ADC channels (all other
// parameters at their defaults). See tb_dsp_top_core for the checks.
module tb_dsp_top;
  tb_dsp_top_core #(.N_ADC(2), .FULL(1'b0), .N_RANDOM(40), .N_OVERLOAD(40)) u_core ();
endmodule
