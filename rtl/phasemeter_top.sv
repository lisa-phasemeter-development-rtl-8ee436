// phasemeter_top: four-channel DPLL phasemeter.
//
// Each of the NCH channels takes its input from its ADC or, for testing,
// from an internal test NCO (tst_cfg[c].use_nco), registers it and tracks it
// with a digital phase-locked loop (dpll_channel), whose phase accumulator
// and phase increment register are the channel's phase and frequency
// readings. The downsampler picks one record of all channels every
// 2^DECIM_LOG2 clocks; a host PC reads it over the EPP port byte by byte
// (record layout in epp_readout and README). With the four channels on the
// quadrants of one photodiode, quadrant_alignment forms horizontal and
// vertical differential phases from the filtered phases; they are recorded
// with the channel results. The DIOB port streams one intermediate signal
// at full rate. Each of the two DACs carries the PI output of a selected
// channel (laser frequency control) or the PRN chip (drive for an
// electro-optic phase modulator). The PRN ranging link sends a
// pseudo-random code with one data bit per code period (prn_chip), and a
// delay-locked loop recovers the code from the phase-error signal (Q) of a
// selected channel, giving the code delay in clocks and the received data
// bit.
//
// Timing: one clock from the ADC pins to the channel input; record bytes are
// valid from the clock after rec_valid. The channel structure, the four
// channels, the EPP/DIOB readout, the two DACs (also for a laser
// modulation unit) and a PRN delay-locked loop follow the design
// description; configuration through top-level inputs, the sharing of the
// DACs by channel select, all filter and decimation settings and the whole
// PRN code and DLL design (the description only reports that PRN ranging
// and data transfer were added) are this design's choices.
module phasemeter_top
  import pm_pkg::*;
#(
  parameter int DECIM_LOG2 = 21,
  parameter int K_IQ       = 3,
  parameter int K_PA       = 21,
  parameter int PRN_N      = 10,                    // LFSR length, code of 2^N - 1 chips
  parameter logic [PRN_N-1:0] PRN_TAPS = PRN_N'(10'h204),
  parameter int PRN_CHIP_LOG2 = 6,                  // clocks per chip = 2^PRN_CHIP_LOG2
  localparam int PRN_DW    = PRN_N + PRN_CHIP_LOG2 + 8
) (
  input  logic                    clk,
  input  logic                    rst,
  // ADC samples and per-channel settings
  input  logic signed [ADC_W-1:0] adc [NCH],
  input  ch_cfg_t                 ch_cfg [NCH],
  input  tst_cfg_t                tst_cfg [NCH],
  // downsampled record status
  output logic                    rec_valid,
  output logic [7:0]              rec_seq,
  // EPP host port (bidirectional data split into in / out / output enable)
  input  logic                    epp_n_write,
  input  logic                    epp_n_dstrb,
  input  logic                    epp_n_astrb,
  input  logic [7:0]              epp_d_in,
  output logic [7:0]              epp_d_out,
  output logic                    epp_d_oe,
  output logic                    epp_n_wait,
  // DIOB stream
  input  logic [$clog2(NCH)-1:0]  diob_ch_sel,
  input  diob_sel_e               diob_sig_sel,
  input  logic                    diob_en,
  output logic [DIOB_W-1:0]       diob_word,
  output logic                    diob_strobe,
  // DAC outputs
  input  logic [$clog2(NCH)-1:0]  dac0_ch_sel,
  input  logic [5:0]              dac0_shift,
  input  logic [$clog2(NCH)-1:0]  dac1_ch_sel,
  input  logic [5:0]              dac1_shift,
  input  logic                    dac0_prn,         // 1: DAC0 carries the PRN chip
  input  logic                    dac1_prn,         // 1: DAC1 carries the PRN chip
  output logic [DAC_W-1:0]        dac0_code,
  output logic [DAC_W-1:0]        dac1_code,
  // PRN ranging and data link
  input  logic                    prn_data_in,
  output logic                    prn_chip,
  input  logic [$clog2(NCH)-1:0]  prn_ch_sel,
  input  logic [5:0]              prn_dll_shift,
  input  logic [55:0]             prn_acq_thresh,
  output logic [PRN_DW-1:0]       prn_delay,        // clocks, 8 fraction bits
  output logic                    prn_data_bit,
  output logic signed [55:0]      prn_prompt,       // correlation of the last period
  output logic                    prn_tracking,
  output logic                    prn_valid
);
  logic signed [ADC_W-1:0] nco_s [NCH];
  logic signed [ADC_W-1:0] sample [NCH];
  ch_result_t              res [NCH];
  ch_result_t              rec [NCH];
  ch_debug_t               dbg [NCH];
  logic [REC_BYTES*8-1:0]  rec_bytes;
  logic [PA_W-1:0]         pa_lpf [NCH];
  logic signed [63:0]      align_h, align_v;
  logic [127:0]            align_rec;

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    test_nco u_tst (
      .clk, .rst, .pir(tst_cfg[c].pir), .amp_shift(tst_cfg[c].amp_shift), .sample(nco_s[c]));

    always_ff @(posedge clk) begin
      if (rst) sample[c] <= '0;
      else     sample[c] <= tst_cfg[c].use_nco ? nco_s[c] : adc[c];
    end

    dpll_channel #(.K_IQ(K_IQ), .K_PA(K_PA)) u_dpll (
      .clk, .rst, .sample(sample[c]), .cfg(ch_cfg[c]), .res(res[c]), .dbg(dbg[c]));
  end

  for (genvar c = 0; c < NCH; c++) begin : g_pa
    assign pa_lpf[c] = res[c].pa;
  end

  quadrant_alignment #(.PA_W(PA_W), .PIR_W(PIR_W)) u_align (
    .clk, .rst, .in_valid(1'b1), .pa(pa_lpf), .horiz(align_h), .vert(align_v),
    .valid());

  downsampler #(.DECIM_LOG2(DECIM_LOG2), .AUX_W(128)) u_ds (
    .clk, .rst, .res, .aux({align_v, align_h}), .rec, .aux_rec(align_rec),
    .seq(rec_seq), .rec_valid);

  // record: byte 0 sequence number, then per channel I, Q, PA, PIR (LSB first)
  always_comb begin
    rec_bytes      = '0;
    rec_bytes[7:0] = rec_seq;
    for (int c = 0; c < NCH; c++)
      rec_bytes[8 + c*CH_BYTES*8 +: CH_BYTES*8] = {64'(rec[c].pir), rec[c].pa, rec[c].q, rec[c].i};
    rec_bytes[8 + NCH*CH_BYTES*8 +: 128] = align_rec;   // horizontal, then vertical
  end

  epp_readout #(.REC_BYTES(REC_BYTES)) u_epp (
    .clk, .rst, .rec(rec_bytes), .n_write(epp_n_write), .n_dstrb(epp_n_dstrb),
    .n_astrb(epp_n_astrb), .d_in(epp_d_in), .d_out(epp_d_out), .d_oe(epp_d_oe),
    .n_wait(epp_n_wait));

  diob_port #(.DW(DIOB_W)) u_diob (
    .clk, .rst, .dbg, .ch_sel(diob_ch_sel), .sig_sel(diob_sig_sel), .en(diob_en),
    .word(diob_word), .strobe(diob_strobe));

  // DAC sources: the PI output of a channel (laser frequency control), or
  // the PRN chip as +/-2^58 (phase-modulator drive; amplitude set by shift)
  localparam logic signed [PIR_W-1:0] CHIP_LVL = PIR_W'(1) <<< 58;
  logic signed [PIR_W-1:0] chip_val, dac0_val, dac1_val;
  assign chip_val = prn_chip ? -CHIP_LVL : CHIP_LVL;
  assign dac0_val = dac0_prn ? chip_val : dbg[dac0_ch_sel].pic;
  assign dac1_val = dac1_prn ? chip_val : dbg[dac1_ch_sel].pic;

  dac_if #(.IW(PIR_W), .DAC_W(DAC_W)) u_dac0 (
    .clk, .rst, .val(dac0_val), .shift(dac0_shift), .code(dac0_code));
  dac_if #(.IW(PIR_W), .DAC_W(DAC_W)) u_dac1 (
    .clk, .rst, .val(dac1_val), .shift(dac1_shift), .code(dac1_code));

  logic [PRN_N+PRN_CHIP_LOG2-1:0] prn_tx_phase;
  logic signed [MIX_W-1:0]        prn_x;

  prn_code_gen #(.CODE_N(PRN_N), .TAPS(PRN_TAPS), .CHIP_LOG2(PRN_CHIP_LOG2)) u_prn_tx (
    .clk, .rst, .data_in(prn_data_in), .chip(prn_chip), .epoch(), .tx_phase(prn_tx_phase));

  always_ff @(posedge clk) begin
    if (rst) prn_x <= '0;
    else     prn_x <= dbg[prn_ch_sel].lpf_q;
  end

  prn_dll #(.CODE_N(PRN_N), .TAPS(PRN_TAPS), .CHIP_LOG2(PRN_CHIP_LOG2), .XW(MIX_W), .FR(8),
            .AW(56)) u_prn_rx (
    .clk, .rst, .x(prn_x), .tx_phase(prn_tx_phase), .dll_shift(prn_dll_shift),
    .acq_thresh(prn_acq_thresh), .delay(prn_delay), .data_bit(prn_data_bit),
    .prompt(prn_prompt), .tracking(prn_tracking), .valid(prn_valid));
endmodule
