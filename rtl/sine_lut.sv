// sine_lut: the sine look-up table of a numerically controlled oscillator.
//
// The phase input is the top AW bits of the NCO phase (one LSB is 2*pi/2^AW).
// The table holds one full cycle, entry i = round((2^(DW-1)-1) *
// sin(2*pi*(i + PHASE_OFFSET)/2^AW)), and is filled once at start-up (a ROM
// initialised at configuration on an FPGA). PHASE_OFFSET = 0 gives the sine
// of the I branch; PHASE_OFFSET = 2^(AW-2) gives the cosine of the Q branch.
// The output is registered: y follows phase by one clock.
// The table size and width are this design's choice; the description only
// names a sine look-up table as part of the NCO.
module sine_lut #(
  parameter int AW           = 12,
  parameter int DW           = 16,
  parameter int PHASE_OFFSET = 0
) (
  input  logic                 clk,
  input  logic [AW-1:0]        phase,
  output logic signed [DW-1:0] y
);
  localparam int    N      = 2**AW;
  localparam real   TWO_PI = 6.283185307179586;

  logic signed [DW-1:0] tab [N];

  initial begin
    for (int i = 0; i < N; i++)
      tab[i] = DW'($rtoi($floor((2.0**(DW-1) - 1.0) *
                 $sin(TWO_PI * real'((i + PHASE_OFFSET) % N) / real'(N)) + 0.5)));
  end

  always_ff @(posedge clk) y <= tab[phase];
endmodule
