// quadrant_alignment: alignment signals from the phases of the four
// quadrants of a quadrant photodiode, one quadrant per channel.
//
// With channel 0..3 on quadrants A (top left), B (top right), C (bottom
// left) and D (bottom right), the differential phases are
//   horizontal = (phi_A + phi_C) - (phi_B + phi_D)
//   vertical   = (phi_A + phi_B) - (phi_C + phi_D)
// Each quadrant's phase is the fractional part of its phase accumulator
// (1 LSB = 2^-60 cycle). The differences A-B, C-D, A-C and B-D are first
// wrapped into [-1/2, 1/2) cycle, so the sums do not depend on the whole
// cycle counts; the outputs are signed, 1 LSB = 2^-60 cycle. They are
// registered together with 'valid' one clock after 'in_valid'.
// The description says that the four channels can measure the quadrant
// phases and deliver alignment signals; the quadrant order and these sum and
// difference formulas (differential wavefront sensing) are this design's
// choices.
module quadrant_alignment #(
  parameter int PA_W  = 104,
  parameter int PIR_W = 60
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   in_valid,
  input  logic [PA_W-1:0]        pa [4],
  output logic signed [63:0]     horiz,
  output logic signed [63:0]     vert,
  output logic                   valid
);
  logic signed [PIR_W-1:0] d_ab, d_cd, d_ac, d_bd;

  always_comb begin
    d_ab = PIR_W'(pa[0][PIR_W-1:0] - pa[1][PIR_W-1:0]);
    d_cd = PIR_W'(pa[2][PIR_W-1:0] - pa[3][PIR_W-1:0]);
    d_ac = PIR_W'(pa[0][PIR_W-1:0] - pa[2][PIR_W-1:0]);
    d_bd = PIR_W'(pa[1][PIR_W-1:0] - pa[3][PIR_W-1:0]);
  end

  // (A + C) - (B + D) = (A - B) + (C - D);  (A + B) - (C + D) = (A - C) + (B - D)
  always_ff @(posedge clk) begin
    if (rst) begin
      horiz <= '0;
      vert  <= '0;
      valid <= 1'b0;
    end else begin
      valid <= in_valid;
      if (in_valid) begin
        horiz <= 64'(d_ab) + 64'(d_cd);
        vert  <= 64'(d_ac) + 64'(d_bd);
      end
    end
  end
endmodule
