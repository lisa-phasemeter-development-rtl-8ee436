// iir_lpf: first-order low-pass filter y <- y + (x - y)/2^K.
//
// The state keeps K fraction bits below the W-bit output, so the filter has
// unity DC gain without truncation bias; its -3 dB corner is close to
// fs/(2*pi*2^K) and its step response settles with time constant 2^K clocks.
// The difference x - y is formed modulo 2^W and read as signed, so the same
// filter serves signed mixer products and the unwrapped phase accumulator
// (a phase ramp comes out delayed by 2^K clocks). y is registered.
// The description names low-pass filters in the I, Q and phase branches but
// not their structure: this first-order filter is this design's choice.
module iir_lpf #(
  parameter int W = 32,
  parameter int K = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] x,
  output logic [W-1:0] y
);
  logic [W+K-1:0]        acc;   // y with K extra fraction bits
  logic signed [W-1:0]   diff;

  assign y    = acc[W+K-1:K];
  assign diff = x - y;

  always_ff @(posedge clk) begin
    if (rst) acc <= '0;
    else     acc <= acc + (W+K)'(diff);
  end
endmodule
