// pi_controller: proportional-integral controller of the DPLL.
//
// Turns the low-passed phase error into the feedback for the phase increment
// register: integ <- integ + err*2^ki_shift and corr <- integ + err*2^kp_shift,
// in OW-bit two's complement that wraps like the PIR itself. The gains are
// powers of two chosen at run time; the description gives a PI controller
// but not its gains or format, so these are this design's choices, as is the
// enable input (en = 0 opens the loop and clears integrator and output).
// corr follows err by one clock.
module pi_controller #(
  parameter int EW = 32,
  parameter int OW = 60
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 en,
  input  logic signed [EW-1:0] err,
  input  logic [5:0]           kp_shift,
  input  logic [5:0]           ki_shift,
  output logic signed [OW-1:0] corr
);
  logic signed [OW-1:0] err_x, p_term, i_step, integ, integ_nx;

  always_comb begin
    err_x    = OW'(err);                 // sign-extend
    p_term   = err_x <<< kp_shift;
    i_step   = err_x <<< ki_shift;
    integ_nx = integ + i_step;
  end

  always_ff @(posedge clk) begin
    if (rst || !en) begin
      integ <= '0;
      corr  <= '0;
    end else begin
      integ <= integ_nx;
      corr  <= integ_nx + p_term;
    end
  end
endmodule
