// phasemeter_full_tb: the four-channel phasemeter with every parameter at
// its default (decimation 2^21, 23.8 Hz records at 50 MHz). Same stimulus
// and checks as phasemeter_top_tb: four channels lock (two on test NCOs, two
// on ADC sines), records are read over EPP and compared with the inputs.
// Runs about 6.3 million clocks.
module phasemeter_full_tb;
  import pm_pkg::*;
  phasemeter_top_run #(.FULL(1)) run ();
  phasemeter_top dut (
    .clk(run.clk), .rst(run.rst), .adc(run.adc), .ch_cfg(run.ch_cfg), .tst_cfg(run.tst_cfg),
    .rec_valid(run.rec_valid), .rec_seq(run.rec_seq),
    .epp_n_write(run.epp_n_write), .epp_n_dstrb(run.epp_n_dstrb), .epp_n_astrb(run.epp_n_astrb),
    .epp_d_in(run.epp_d_in), .epp_d_out(run.epp_d_out), .epp_d_oe(run.epp_d_oe), .epp_n_wait(run.epp_n_wait),
    .diob_ch_sel(run.diob_ch_sel), .diob_sig_sel(run.diob_sig_sel), .diob_en(run.diob_en),
    .diob_word(run.diob_word), .diob_strobe(run.diob_strobe),
    .dac0_ch_sel(run.dac0_ch_sel), .dac0_shift(run.dac0_shift), .dac1_ch_sel(run.dac1_ch_sel),
    .dac1_shift(run.dac1_shift), .dac0_prn(run.dac0_prn), .dac1_prn(run.dac1_prn), .dac0_code(run.dac0_code), .dac1_code(run.dac1_code),
    .prn_data_in(run.prn_data_in), .prn_chip(run.prn_chip), .prn_ch_sel(run.prn_ch_sel),
    .prn_dll_shift(run.prn_dll_shift), .prn_acq_thresh(run.prn_acq_thresh), .prn_delay(run.prn_delay),
    .prn_data_bit(run.prn_data_bit), .prn_prompt(run.prn_prompt), .prn_tracking(run.prn_tracking),
    .prn_valid(run.prn_valid));
endmodule
