// phase_noise_tb: phase readout noise with a 5 MHz input, in the two set-ups
// of the phasemeter's noise measurements: channel 0 takes the sine of the
// internal test NCO, channel 1 a 16-bit ADC-format sine made here (an ideal
// generator locked to the sampling clock). Channels 2 and 3 run on test
// NCOs at 2 and 17 MHz.
//
// The top runs with decimation 2^12 (12.2 kHz records) and a PA filter with
// K = 10. After lock, 150 consecutive records are read over EPP. For each
// channel the recorded phase minus the ideal phase of the input at the
// record's time (record index * 4096 * input frequency word) gives a
// residual; its standard deviation sigma over the records, read as white
// noise up to the record Nyquist frequency f_N, gives the amplitude spectral
// density sigma/sqrt(f_N). It must be below the 2*pi*1e-6 rad/sqrt(Hz)
// requirement. The bench also checks that the residual has no trend above
// 1e-5 rad per record (the readout tracks the input frequency).
module phase_noise_tb;
  import pm_pkg::*;
  localparam real TWO_PI = 6.283185307179586;
  localparam int  DLOG = 12;
  localparam int  NREC = 150;

  logic clk = 0, rst;
  logic signed [ADC_W-1:0] adc [NCH];
  ch_cfg_t  ch_cfg  [NCH];
  tst_cfg_t tst_cfg [NCH];
  logic rec_valid;
  logic [7:0] rec_seq;
  logic epp_n_write, epp_n_dstrb, epp_n_astrb, epp_d_oe, epp_n_wait;
  logic [7:0] epp_d_in, epp_d_out;
  logic [1:0] diob_ch_sel = 0, dac0_ch_sel = 0, dac1_ch_sel = 0;
  diob_sel_e diob_sig_sel = DIOB_SAMPLE;
  logic diob_en = 0, diob_strobe;
  logic [DIOB_W-1:0] diob_word;
  logic [5:0] dac0_shift = 0, dac1_shift = 0;
  logic [DAC_W-1:0] dac0_code, dac1_code;
  logic dac0_prn = 0, dac1_prn = 0;
  logic prn_data_in = 0, prn_chip, prn_data_bit, prn_tracking, prn_valid;
  logic [1:0] prn_ch_sel = 0;
  logic [5:0] prn_dll_shift = 6'd24;
  logic [55:0] prn_acq_thresh = '1;
  logic [23:0] prn_delay;
  logic signed [55:0] prn_prompt;

  phasemeter_top #(.DECIM_LOG2(DLOG), .K_IQ(3), .K_PA(10)) dut (.*);

  int checks = 0, failures = 0;
  function automatic real fabs(input real v); return (v < 0.0) ? -v : v; endfunction

  real f_in [NCH] = '{5.0e6, 5.0e6, 2.0e6, 17.0e6};
  logic [59:0] pir_in [NCH];
  logic [59:0] ph_adc;

  always #10 clk = ~clk;
  initial begin #40_000_000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  always_ff @(posedge clk) begin
    ph_adc <= rst ? 60'd0 : ph_adc + pir_in[1];
    for (int c = 0; c < NCH; c++)
      adc[c] <= 16'($rtoi($floor(16384.0 * $sin(TWO_PI * real'(ph_adc) / 2.0**60) + 0.5)));
  end

  task automatic epp(input bit addr, input bit write, input logic [7:0] wdata, output logic [7:0] rdata);
    epp_n_write = !write; epp_d_in = wdata;
    #7;
    if (addr) epp_n_astrb = 0; else epp_n_dstrb = 0;
    wait (epp_n_wait == 1'b1);
    #5;
    rdata = epp_d_out;
    epp_n_astrb = 1; epp_n_dstrb = 1;
    wait (epp_n_wait == 1'b0);
    epp_n_write = 1;
    #5;
  endtask

  logic [7:0] rb [REC_BYTES];
  logic [7:0] dummy, prev_seq;
  logic [CH_BYTES*8-1:0] chb;
  logic [PA_W-1:0] pa, pa_ref [NCH], ideal;
  real res_v [NCH][NREC];
  longint idx;

  initial begin
    real mean, var_, sigma, asd, fn, slope, req;
    rst = 1; epp_n_write = 1; epp_n_dstrb = 1; epp_n_astrb = 1; epp_d_in = 0;
    for (int c = 0; c < NCH; c++) begin
      pir_in[c] = 60'($rtoi(f_in[c] / 50.0e6 * 2.0**30)) << 30;
      tst_cfg[c].use_nco = (c != 1); tst_cfg[c].pir = pir_in[c]; tst_cfg[c].amp_shift = 4'd1;
      ch_cfg[c].pir_init = pir_in[c] + (60'd1 << 46);
      ch_cfg[c].kp_shift = 6'd24; ch_cfg[c].ki_shift = 6'd17; ch_cfg[c].loop_en = 1'b1;
    end
    repeat (4) @(posedge clk); #1; rst = 0;
    repeat (30000) @(posedge clk);
    idx = 0;
    for (int n = 0; n < NREC; n++) begin
      @(posedge clk iff rec_valid); #1;
      epp(1, 1, 8'd0, dummy);
      for (int b = 0; b < REC_BYTES; b++) epp(0, 0, 8'd0, rb[b]);
      if (n > 0) idx += longint'(8'(rb[0] - prev_seq));
      prev_seq = rb[0];
      for (int c = 0; c < NCH; c++) begin
        for (int k = 0; k < CH_BYTES; k++) chb[8*k +: 8] = rb[1 + c*CH_BYTES + k];
        pa = chb[64 +: PA_W];
        if (n == 0) pa_ref[c] = pa;
        ideal = PA_W'(pir_in[c]) * PA_W'(idx) * PA_W'(1 << DLOG);
        // residual in radians
        res_v[c][n] = TWO_PI * real'($signed(64'(pa - pa_ref[c] - ideal)) >>> 4) / 2.0**56;
      end
    end
    fn  = 50.0e6 / 2.0**DLOG / 2.0;
    req = TWO_PI * 1.0e-6;
    for (int c = 0; c < NCH; c++) begin
      mean = 0; var_ = 0; slope = 0;
      for (int n = 0; n < NREC; n++) mean += res_v[c][n] / NREC;
      for (int n = 0; n < NREC; n++) var_ += (res_v[c][n] - mean) ** 2 / NREC;
      sigma = $sqrt(var_);
      asd = sigma / $sqrt(fn);
      // least-squares slope of the residual, rad per record
      begin
        real sxy, sxx, xm;
        sxy = 0; sxx = 0; xm = real'(NREC - 1) / 2.0;
        for (int n = 0; n < NREC; n++) begin
          sxy += (real'(n) - xm) * (res_v[c][n] - mean);
          sxx += (real'(n) - xm) ** 2;
        end
        slope = sxy / sxx;
      end
      $display("channel %0d (%s, %0.1f MHz): sigma = %e rad, density = %e rad/sqrt(Hz), requirement %e",
               c, tst_cfg[c].use_nco ? "test NCO" : "ADC", f_in[c] / 1.0e6, sigma, asd, req);
      checks++; if (!(asd < req)) begin failures++; $display("channel %0d above requirement", c); end
      checks++; if (fabs(slope) > 1.0e-5) begin failures++; $display("channel %0d phase trend %e rad/record", c, slope); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
