// phase_accumulator: the PA register of the NCO.
//
// Every clock the phase increment (PIR, unsigned, one LSB = 1/2^PIR_W of a
// cycle) is added to the accumulator. With PA_W = 104 and PIR_W = 60 the low
// 60 bits are the fraction of a cycle (part B) and the upper 44 bits count
// whole cycles (part A), so the phase is 2*pi*(A + B/2^60) and never wraps in
// practice. Widths follow the design description; synchronous reset to zero
// is this design's choice. pa is the registered sum (one clock after pir).
module phase_accumulator #(
  parameter int PA_W  = 104,
  parameter int PIR_W = 60
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [PIR_W-1:0] pir,
  output logic [PA_W-1:0]  pa
);
  always_ff @(posedge clk) begin
    if (rst) pa <= '0;
    else     pa <= pa + PA_W'(pir);
  end
endmodule
