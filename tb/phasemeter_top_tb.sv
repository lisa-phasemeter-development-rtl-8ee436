// phasemeter_top_tb: end-to-end run of the four-channel phasemeter.
//
// Channels 0 and 2 take their input from the internal test NCOs (5 MHz and
// 2 MHz), channels 1 and 3 from ADC samples made here with sin() (3 MHz and
// 17 MHz). Every loop starts about 12 kHz off its input. After lock the host
// model reads two complete records over the EPP port and checks the
// sequence numbers, each channel's PIR (frequency) against its input, the
// I amplitude, the Q phase error, the filtered PA against bounds from the
// channel's frequency and run time, and the phase advance between the two
// records against frequency * elapsed time. The DIOB stream is compared
// with the ADC input of channel 1 and with the DAC code of the same
// channel's PI output, and the recorded quadrant alignment signals with the
// recorded phases. Last, channel 3's input is phase-modulated by +/-0.03
// cycle with the PRN chip, delayed by 100 and then 300 clocks; the DLL on
// that channel's Q must search, track, and measure a delay change of 200
// clocks within one clock (a 31-chip code with 32 clocks per chip keeps the
// search short); meanwhile DAC1 carries the chip and must show it exactly. The mechanisms exercised are counted and each must occur:
// test-NCO input, ADC input, loop lock, alignment, records, EPP address and
// data cycles, DIOB words, DAC saturation, PRN search and PRN track, DAC on the chip. Runs
// with decimation 2^8 and a PA filter with K = 4 so that records come every
// 256 clocks.
module phasemeter_top_tb;
  import pm_pkg::*;
  phasemeter_top_run #(.FULL(0)) run ();
  phasemeter_top #(.DECIM_LOG2(8), .K_IQ(3), .K_PA(4), .PRN_N(5), .PRN_TAPS(5'b10100),
                  .PRN_CHIP_LOG2(5)) dut (
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
