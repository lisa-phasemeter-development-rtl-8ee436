// phase_increment_register: the PIR of the NCO, i.e. its frequency word.
//
// The register loads the host's nominal frequency word plus the signed
// feedback of the PI controller every clock, modulo 2^PIR_W; the NCO then
// runs at f = pir * fs / 2^PIR_W. The 60-bit width follows the design
// description; adding the feedback to a nominal word and the synchronous
// reset to zero are this design's choices. One clock latency.
module phase_increment_register #(
  parameter int PIR_W = 60
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic [PIR_W-1:0]        pir_init,
  input  logic signed [PIR_W-1:0] corr,
  output logic [PIR_W-1:0]        pir
);
  always_ff @(posedge clk) begin
    if (rst) pir <= '0;
    else     pir <= pir_init + PIR_W'(corr);
  end
endmodule
