// test_nco: internal test-signal generator in ADC sample format.
//
// An NCO built like the DPLL's own: a phase accumulator advanced by the
// frequency word pir every clock (f = pir*fs/2^PIR_W) and a sine table
// addressed by the top LUT_AW bits of its phase. The sine is attenuated by
// 2^amp_shift and replaces the ADC sample when a channel is switched to the
// test input, so the DPLL can be exercised without the analog front end.
// The description reports such a generator inside the FPGA; its widths and
// amplitude control are this design's choices. sample lags the phase by one
// clock (registered table output).
module test_nco
  import pm_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst,
  input  logic [PIR_W-1:0]        pir,
  input  logic [3:0]              amp_shift,
  output logic signed [ADC_W-1:0] sample
);
  logic [PIR_W-1:0]         phase;
  logic signed [LUT_DW-1:0] s;

  phase_accumulator #(.PA_W(PIR_W), .PIR_W(PIR_W)) u_pa (.clk, .rst, .pir, .pa(phase));
  sine_lut #(.AW(LUT_AW), .DW(LUT_DW)) u_lut (.clk, .phase(LUT_AW'(phase >> (PIR_W - LUT_AW))), .y(s));

  assign sample = ADC_W'(s >>> amp_shift);
endmodule
