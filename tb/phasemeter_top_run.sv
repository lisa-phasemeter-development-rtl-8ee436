// phasemeter_top_run: stimulus, host model and checks shared by the
// end-to-end phasemeter benches. It declares every signal of the top; the
// bench that instantiates it also instantiates phasemeter_top and connects
// it to these signals. FULL = 0 expects decimation 2^8 and a PA filter with
// K = 4; FULL = 1 expects the top's defaults (2^21, K = 21), runs through
// three records and skips the phase-advance check, as the slow PA filter has
// not settled by then; with the default 1023-chip PRN code it only checks
// that the DLL runs. See phasemeter_top_tb for what is checked.
module phasemeter_top_run #(parameter bit FULL = 0);
  import pm_pkg::*;
  localparam real TWO_PI = 6.283185307179586;
  localparam int  DLOG   = FULL ? 21 : 8;
  localparam int  KPA    = FULL ? 21 : 4;
  localparam real FS     = 50.0e6;
  localparam int  PN     = FULL ? 10 : 5;   // PRN code: LFSR length
  localparam int  PCL    = FULL ? 6 : 5;    // PRN code: log2 clocks per chip
  localparam real PM_CYC = 0.03;            // PRN phase modulation, cycles

  logic clk = 0, rst;
  logic signed [ADC_W-1:0] adc [NCH];
  ch_cfg_t  ch_cfg  [NCH];
  tst_cfg_t tst_cfg [NCH];
  logic rec_valid;
  logic [7:0] rec_seq;
  logic epp_n_write, epp_n_dstrb, epp_n_astrb, epp_d_oe, epp_n_wait;
  logic [7:0] epp_d_in, epp_d_out;
  logic [1:0] diob_ch_sel, dac0_ch_sel, dac1_ch_sel;
  diob_sel_e diob_sig_sel;
  logic diob_en, diob_strobe;
  logic [DIOB_W-1:0] diob_word;
  logic [5:0] dac0_shift, dac1_shift;
  logic [DAC_W-1:0] dac0_code, dac1_code;
  logic dac0_prn, dac1_prn, prn_chip_d1, dac1_prn_d1;
  logic prn_data_in, prn_chip, prn_data_bit, prn_tracking, prn_valid;
  logic [1:0] prn_ch_sel;
  logic [5:0] prn_dll_shift;
  logic [55:0] prn_acq_thresh;
  logic [PN+PCL+8-1:0] prn_delay;
  logic signed [55:0] prn_prompt;

  int checks = 0, failures = 0;
  int n_tst_in = 0, n_adc_in = 0, n_locked = 0, n_rec = 0, n_epp_addr = 0, n_epp_data = 0,
      n_diob = 0, n_dac_sat = 0, n_align = 0, n_prn_valid = 0, n_prn_search = 0, n_prn_track = 0, n_dac_prn = 0, n_dac_prn_bad = 0;
  function automatic real fabs(input real v); return (v < 0.0) ? -v : v; endfunction

  // input frequencies, Hz
  real f_in [NCH] = '{5.0e6, 3.0e6, 2.0e6, 17.0e6};
  bit  use_nco [NCH] = '{1'b1, 1'b0, 1'b1, 1'b0};
  logic [59:0] pir_in [NCH];
  logic [59:0] ph_adc [NCH];
  longint cyc = 0;

  always #10 clk = ~clk;

  initial begin
    #(FULL ? 64'd200_000_000 : 64'd20_000_000);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ADC model: half-scale sines with an exact 60-bit phase; channel 3 can
  // carry the PRN chip, delayed by prn_d clocks, as +/-PM_CYC phase steps
  logic signed [15:0] adc1_d1, adc1_d2;
  logic chip_line [4096];
  int  prn_d = 100;
  bit  prn_mod = 0;
  logic [59:0] pm [NCH];
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    prn_data_in <= 1'($urandom);
    chip_line[cyc % 4096] = prn_chip;
    for (int c = 0; c < NCH; c++) pm[c] = 60'd0;
    if (prn_mod) pm[3] = chip_line[(cyc - prn_d + 4096) % 4096] ? 60'($rtoi(PM_CYC * 2.0**28)) << 32
                                                                 : -(60'($rtoi(PM_CYC * 2.0**28)) << 32);
    adc1_d1 <= adc[1];
    adc1_d2 <= adc1_d1;
    for (int c = 0; c < NCH; c++) begin
      ph_adc[c] <= rst ? 60'd0 : ph_adc[c] + pir_in[c];
      adc[c]    <= 16'($rtoi($floor(16384.0 * $sin(TWO_PI * real'(ph_adc[c] + pm[c]) / 2.0**60) + 0.5)));
    end
  end

  always @(posedge clk) begin
    if (!rst) begin
      if (rec_valid) n_rec++;
      for (int c = 0; c < NCH; c++) begin
        if (tst_cfg[c].use_nco) n_tst_in++; else n_adc_in++;
      end
      if (diob_strobe) n_diob++;
      if (dac0_code == '1 || dac0_code == '0) n_dac_sat++;
      // DAC1 on the PRN chip (shift 46: +/-2^12 around mid-scale), one clock late
      prn_chip_d1 <= prn_chip;
      dac1_prn_d1 <= dac1_prn;
      if (dac1_prn && dac1_prn_d1) begin
        n_dac_prn++;
        if (dac1_code != (prn_chip_d1 ? 14'd4096 : 14'd12288)) n_dac_prn_bad++;
      end
      if (prn_valid) begin
        n_prn_valid++;
        if (prn_tracking) n_prn_track++; else n_prn_search++;
      end
    end
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
    if (addr) n_epp_addr++; else n_epp_data++;
    #5;
  endtask

  logic [7:0] rb [REC_BYTES];
  logic [7:0] seq_a, seq_b;
  logic [127:0] al;
  function automatic real wrap(input real v); return v - $floor(v + 0.5); endfunction
  function automatic real frac(input logic [PA_W-1:0] pa); return real'(pa[PIR_W-1:0]) / 2.0**60; endfunction
  ch_result_t rec_a [NCH], rec_b [NCH];
  longint rec_time [256];

  always @(posedge clk) if (rec_valid) rec_time[rec_seq] <= cyc + 1;

  function automatic real pa_cycles(input logic [PA_W-1:0] pa);
    return real'(pa[PA_W-1:PIR_W]) + real'(pa[PIR_W-1:PIR_W-40]) / 2.0**40;
  endfunction

  // address write (pointer 0, freezes the record), then REC_BYTES data reads
  task automatic read_record(output logic [7:0] seq, output ch_result_t rr [NCH]);
    logic [7:0] s_before;
    s_before = rec_seq;
    epp(1, 1, 8'd0, dummy);
    for (int b = 0; b < REC_BYTES; b++) epp(0, 0, 8'd0, rb[b]);
    seq = rb[0];
    checks++;
    if (seq != s_before && seq != s_before + 8'd1) begin failures++; $display("seq %0d, before %0d", seq, s_before); end
    for (int k = 0; k < 16; k++) al[8*k +: 8] = rb[1 + NCH*CH_BYTES + k];
    for (int c = 0; c < NCH; c++) begin
      for (int k = 0; k < CH_BYTES; k++) chb[8*k +: 8] = rb[1 + c*CH_BYTES + k];
      rr[c].i = chb[0 +: 32]; rr[c].q = chb[32 +: 32]; rr[c].pa = chb[64 +: PA_W]; rr[c].pir = chb[64+PA_W +: PIR_W];
    end
  endtask
  // wait for 30 tracked code periods in a row (giving up after 400
  // periods) and return the mean delay of the last 20, in clocks
  task automatic prn_measure(output real dm);
    int run_len, n;
    run_len = 0; n = 0; dm = 0.0;
    while (run_len < 30 && n < 400) begin
      @(posedge clk iff prn_valid); #1;
      n++;
      if (prn_tracking) run_len++; else run_len = 0;
      if (run_len > 10) dm += real'(prn_delay) / 256.0;
      else dm = 0.0;
    end
    dm = dm / 20.0;
    checks++; if (run_len < 30) begin failures++; $display("PRN DLL did not track"); end
  endtask
  logic [7:0] dummy;
  logic [CH_BYTES*8-1:0] chb;
  ch_result_t r;
  longint rec_cyc;

  initial begin
    rst = 1;
    epp_n_write = 1; epp_n_dstrb = 1; epp_n_astrb = 1; epp_d_in = 0;
    diob_en = 0; diob_ch_sel = 0; diob_sig_sel = DIOB_SAMPLE;
    dac0_ch_sel = 0; dac0_shift = 6'd0; dac1_ch_sel = 1; dac1_shift = 6'd40;
    dac0_prn = 0; dac1_prn = 0;
    prn_ch_sel = 2'd3; prn_dll_shift = 6'd24; prn_acq_thresh = 56'd15_000_000_000;
    for (int c = 0; c < NCH; c++) begin
      pir_in[c] = 60'($rtoi(f_in[c] / FS * 2.0**30)) << 30;
      tst_cfg[c].use_nco   = use_nco[c];
      tst_cfg[c].pir       = pir_in[c];
      tst_cfg[c].amp_shift = 4'd1;                     // half scale like the ADC model
      ch_cfg[c].pir_init   = pir_in[c] + (60'd1 << 48); // about 12 kHz off
      ch_cfg[c].kp_shift   = 6'd24;
      ch_cfg[c].ki_shift   = 6'd17;
      ch_cfg[c].loop_en    = 1'b1;
    end
    repeat (4) @(posedge clk); #1; rst = 0;
    diob_en = 1; diob_ch_sel = 2'd1; diob_sig_sel = DIOB_SAMPLE;
    // wait for a record that was taken well after lock (>= 6000 clocks)
    rec_cyc = 0;
    while (rec_cyc < 6000) begin
      @(posedge clk); #1;
      if (rec_valid) rec_cyc = cyc;
    end
    // DIOB: word follows the registered channel-1 ADC input by one clock
    @(posedge clk); #1;
    checks++;
    if (diob_word != DIOB_W'(adc1_d2)) begin failures++; $display("diob %h exp %h", diob_word, adc1_d2); end
    // DIOB on the channel-1 PI output (bits 59:28); DAC1 (shift 40) is the
    // same value shifted by 12 more, saturated, offset binary
    diob_sig_sel = DIOB_PIC;
    repeat (3) @(posedge clk);
    #1;
    begin
      longint v;
      v = longint'($signed(diob_word)) >>> 12;
      if (v > 8191) v = 8191;
      if (v < -8192) v = -8192;
      checks++;
      if (longint'(dac1_code) != v + 8192) begin failures++; $display("dac1 %0d exp %0d", dac1_code, v + 8192); end
    end
    // read two records over EPP
    read_record(seq_a, rec_a);
    repeat (2 * (1 << DLOG)) @(posedge clk);
    read_record(seq_b, rec_b);
    checks++; if (seq_b == seq_a) begin failures++; $display("no new record"); end
    for (int c = 0; c < NCH; c++) begin
      real fe, amp, q, pa_cyc, exp_max, exp_min, dcyc, dexp;
      r = rec_b[c];
      // frequency word: the instantaneous PIR carries the ripple of the
      // twice-frequency mixing product (tens of kHz at 2-3 MHz inputs)
      fe  = real'($signed(r.pir - pir_in[c])) / 2.0**60 * FS;
      amp = real'(r.i) / (16384.0 * 32767.0 / 2.0);
      q   = real'(r.q) / (16384.0 * 32767.0 / 2.0);
      checks++;
      if (fabs(fe) < 150.0e3 && amp > 0.6 && amp < 1.4 && fabs(q) < 0.3) n_locked++;
      else begin failures++; $display("ch %0d not locked: df=%f Hz amp=%f q=%f", c, fe, amp, q); end
      // filtered PA in whole cycles: below f*t, above f*(t - 2^KPA/fs) minus slack
      pa_cyc  = pa_cycles(r.pa);
      exp_max = f_in[c] * real'(rec_time[seq_b]) / FS;
      exp_min = f_in[c] * (real'(rec_time[seq_b]) - 2.0**KPA) / FS - 10.0;
      checks++;
      if (pa_cyc > exp_max || pa_cyc < exp_min) begin failures++; $display("ch %0d pa %f cycles, exp %f..%f", c, pa_cyc, exp_min, exp_max); end
      // phase advance between the two records equals f * elapsed time
      if (!FULL) begin
        dcyc = pa_cycles(rec_b[c].pa - rec_a[c].pa);
        dexp = f_in[c] * real'(rec_time[seq_b] - rec_time[seq_a]) / FS;
        checks++;
        if (fabs(dcyc - dexp) > 1.0e-3) begin failures++; $display("ch %0d phase advance %f cycles exp %f", c, dcyc, dexp); end
      end
    end
    // quadrant alignment of the record: from the quadrant phases one clock
    // earlier, i.e. the recorded filtered phases less about one increment
    begin
      real q [NCH], eh, ev, gh, gv;
      for (int c = 0; c < NCH; c++) q[c] = frac(rec_b[c].pa) - real'(rec_b[c].pir) / 2.0**60;
      eh = wrap(q[0] - q[1]) + wrap(q[2] - q[3]);
      ev = wrap(q[0] - q[2]) + wrap(q[1] - q[3]);
      gh = real'($signed(al[63:0])) / 2.0**60;
      gv = real'($signed(al[127:64])) / 2.0**60;
      checks++;
      if (fabs(wrap(gh - eh)) > (FULL ? 0.5 : 0.01) || fabs(wrap(gv - ev)) > (FULL ? 0.5 : 0.01)) begin
        failures++; $display("alignment h %f exp %f, v %f exp %f", gh, eh, gv, ev);
      end
      if (al != 0) n_align++;
    end
    // PRN link on channel 3: the measured delay includes the fixed latency
    // of the analog model, the channel and the DLL input, so two delays are
    // measured and their difference is checked
    if (!FULL) begin
      real d1, d2;
      prn_mod = 1; prn_d = 100;
      dac1_shift = 6'd46; @(posedge clk); #1; dac1_prn = 1;
      prn_measure(d1);
      prn_d = 300;
      @(posedge clk iff (prn_valid && !prn_tracking));
      prn_measure(d2);
      dac1_prn = 0;
      checks++;
      if (fabs(d2 - d1 - 200.0) > 1.0) begin failures++; $display("PRN delay %f then %f, difference exp 200", d1, d2); end
      else $display("PRN delays %f and %f clocks, difference %f", d1, d2, d2 - d1);
    end
    // every mechanism must have happened
    checks++; if (n_align == 0)    begin failures++; $display("alignment never recorded"); end
    checks++; if (n_tst_in == 0)   begin failures++; $display("test NCO input never used"); end
    checks++; if (n_adc_in == 0)   begin failures++; $display("ADC input never used"); end
    checks++; if (n_locked != NCH) begin failures++; $display("locked %0d", n_locked); end
    checks++; if (n_rec == 0)      begin failures++; $display("no record"); end
    checks++; if (n_epp_addr == 0 || n_epp_data < REC_BYTES) begin failures++; $display("epp cycles"); end
    checks++; if (n_diob == 0)     begin failures++; $display("no DIOB word"); end
    checks++; if (n_dac_sat == 0)  begin failures++; $display("DAC never saturated"); end
    checks++; if (!FULL && (n_dac_prn == 0 || n_dac_prn_bad != 0)) begin
      failures++; $display("DAC1 on the PRN chip: %0d clocks, %0d wrong", n_dac_prn, n_dac_prn_bad);
    end
    checks++; if (n_prn_valid == 0 || (!FULL && (n_prn_search == 0 || n_prn_track == 0))) begin
      failures++; $display("PRN DLL periods %0d search %0d track %0d", n_prn_valid, n_prn_search, n_prn_track, n_dac_prn);
    end
    $display("mechanisms: align=%0d tst_in=%0d adc_in=%0d locked=%0d records=%0d epp_addr=%0d epp_data=%0d diob=%0d dac_sat=%0d prn_periods=%0d prn_search=%0d prn_track=%0d dac_prn=%0d",
             n_align, n_tst_in, n_adc_in, n_locked, n_rec, n_epp_addr, n_epp_data, n_diob, n_dac_sat, n_prn_valid, n_prn_search, n_prn_track, n_dac_prn);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
