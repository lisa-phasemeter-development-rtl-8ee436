// dac_if: output formatter of one DAC channel.
//
// The signed control value is shifted right by 'shift' (arithmetic),
// saturated to DAC_W bits and converted to offset binary (code 2^(DAC_W-1)
// means zero), the straight binary input coding of a 14-bit AD9744-class
// converter. The code is registered (one clock). In the phasemeter the value
// is the PI-controller output of a selected channel, a frequency feedback
// for laser stabilisation; the description names the DACs and their purpose
// but not the control law, so the source, scaling and saturation are this
// design's choices.
module dac_if #(
  parameter int IW    = 60,
  parameter int DAC_W = 14
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic signed [IW-1:0] val,
  input  logic [5:0]           shift,
  output logic [DAC_W-1:0]     code
);
  localparam logic signed [IW-1:0] MAXV = IW'((2**(DAC_W-1)) - 1);
  localparam logic signed [IW-1:0] MINV = -IW'(2**(DAC_W-1));

  logic signed [IW-1:0]    s;
  logic signed [DAC_W-1:0] sat;

  always_comb begin
    s = val >>> shift;
    if (s > MAXV)      sat = DAC_W'(MAXV);
    else if (s < MINV) sat = DAC_W'(MINV);
    else               sat = DAC_W'(s);
  end

  always_ff @(posedge clk) begin
    if (rst) code <= {1'b1, {(DAC_W-1){1'b0}}};
    else     code <= {~sat[DAC_W-1], sat[DAC_W-2:0]};
  end
endmodule
