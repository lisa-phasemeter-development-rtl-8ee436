// mixer: phase-detector multiplier of one DPLL branch.
//
// Multiplies the signed input sample by the signed NCO sample at full
// precision (AW+BW bits) and registers the product: p follows a and b by one
// clock. With a = A*sin(x) and b = cos(y) the low-frequency part of p is
// (A/2)*sin(x-y), the phase error. Widths and latency are this design's
// choice; synchronous reset to zero.
module mixer #(
  parameter int AW = 16,
  parameter int BW = 16
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic signed [AW-1:0]    a,
  input  logic signed [BW-1:0]    b,
  output logic signed [AW+BW-1:0] p
);
  always_ff @(posedge clk) begin
    if (rst) p <= '0;
    else     p <= (AW+BW)'(a) * (AW+BW)'(b);
  end
endmodule
