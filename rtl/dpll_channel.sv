// dpll_channel: one phasemeter channel, a digital phase-locked loop.
//
// The NCO is a phase accumulator (PA, 104 bits) driven by a phase increment
// register (PIR, 60 bits); the top LUT_AW bits of the PA's fraction address
// two look-up tables, the I-LUT (sine) and the Q-LUT (cosine). The input
// sample is multiplied with both. Each product is low-pass filtered; the Q
// branch, (A/2)*sin(input phase - NCO phase), is the phase error that the PI
// controller turns into the PIR feedback, so the NCO tracks the input in
// frequency and phase. The I branch, (A/2)*cos(phase difference), is the
// amplitude. A third low-pass filter band-limits the PA before decimation.
//
// Outputs: res carries the filtered I, Q and PA and the PIR (frequency);
// dbg carries the intermediate signals. All stages are registered; the loop
// delay from PA to PIR update is six clocks (LUT, mixer, LPF, PIC, PIR, PA).
// The loop structure follows the design description; the filter type, PI
// gains, sine/cosine assignment and all widths except the PA and PIR are
// this design's choices.
module dpll_channel
  import pm_pkg::*;
#(
  parameter int K_IQ = 3,    // I/Q loop filter: corner ~ fs/(2*pi*2^K_IQ)
  parameter int K_PA = 21    // PA-branch filter ahead of decimation
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic signed [ADC_W-1:0] sample,
  input  ch_cfg_t                 cfg,
  output ch_result_t              res,
  output ch_debug_t               dbg
);
  logic [PA_W-1:0]          pa, pa_lpf;
  logic [PIR_W-1:0]         pir;
  logic [LUT_AW-1:0]        lut_phase;
  logic signed [LUT_DW-1:0] sin_i, cos_q;
  logic signed [MIX_W-1:0]  mix_i, mix_q, lpf_i, lpf_q;
  logic signed [PIR_W-1:0]  corr;

  assign lut_phase = pa[PIR_W-1 -: LUT_AW];

  sine_lut #(.AW(LUT_AW), .DW(LUT_DW), .PHASE_OFFSET(0)) u_i_lut (
    .clk, .phase(lut_phase), .y(sin_i));
  sine_lut #(.AW(LUT_AW), .DW(LUT_DW), .PHASE_OFFSET(2**(LUT_AW-2))) u_q_lut (
    .clk, .phase(lut_phase), .y(cos_q));

  mixer #(.AW(ADC_W), .BW(LUT_DW)) u_mix_i (.clk, .rst, .a(sample), .b(sin_i), .p(mix_i));
  mixer #(.AW(ADC_W), .BW(LUT_DW)) u_mix_q (.clk, .rst, .a(sample), .b(cos_q), .p(mix_q));

  iir_lpf #(.W(MIX_W), .K(K_IQ)) u_lpf_i (.clk, .rst, .x(mix_i), .y(lpf_i));
  iir_lpf #(.W(MIX_W), .K(K_IQ)) u_lpf_q (.clk, .rst, .x(mix_q), .y(lpf_q));

  pi_controller #(.EW(MIX_W), .OW(PIR_W)) u_pic (
    .clk, .rst, .en(cfg.loop_en), .err(lpf_q),
    .kp_shift(cfg.kp_shift), .ki_shift(cfg.ki_shift), .corr);

  phase_increment_register #(.PIR_W(PIR_W)) u_pir (
    .clk, .rst, .pir_init(cfg.pir_init), .corr, .pir);

  phase_accumulator #(.PA_W(PA_W), .PIR_W(PIR_W)) u_pa (.clk, .rst, .pir, .pa);

  iir_lpf #(.W(PA_W), .K(K_PA)) u_lpf_pa (.clk, .rst, .x(pa), .y(pa_lpf));

  always_comb begin
    res.i   = lpf_i;
    res.q   = lpf_q;
    res.pa  = pa_lpf;
    res.pir = pir;

    dbg.sample = sample;
    dbg.mix_i  = mix_i;
    dbg.mix_q  = mix_q;
    dbg.lpf_i  = lpf_i;
    dbg.lpf_q  = lpf_q;
    dbg.pic    = corr;
    dbg.pir    = pir;
    dbg.pa     = pa;
  end
endmodule
