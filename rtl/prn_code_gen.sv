// prn_code_gen: pseudo-random-noise code transmitter for ranging and data.
//
// A Fibonacci LFSR of CODE_N bits with feedback taps TAPS (an m-sequence of
// L = 2^CODE_N - 1 chips; the default x^10 + x^3 + 1 gives 1023 chips)
// advances one chip every 2^CHIP_LOG2 clocks (781.25 kchip/s at 50 MHz by
// default). The LFSR starts from all ones, so it returns to that state, and
// chip_idx to 0, at every code epoch. One data bit, latched at each epoch,
// is added modulo 2 to the whole code period (one bit per period). Outputs:
// the chip (chip = 1 means -1 on the line), the epoch pulse in the first
// clock of a period, and the transmit code phase in clocks,
// {chip_idx, clock-in-chip}. The chip is meant to drive an electro-optic
// phase modulator through a DAC; the receiver is prn_dll.
// The description reports PRN codes modulated on the laser phase for
// ranging and data transfer; code family, length and chip rate here are
// this design's choices.
module prn_code_gen #(
  parameter int              CODE_N    = 10,
  parameter logic [CODE_N-1:0] TAPS    = CODE_N'(10'h204),
  parameter int              CHIP_LOG2 = 6
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          data_in,
  output logic                          chip,
  output logic                          epoch,
  output logic [CODE_N+CHIP_LOG2-1:0]   tx_phase
);
  localparam logic [CODE_N-1:0] LAST = CODE_N'((2**CODE_N) - 2);  // index L-1

  logic [CODE_N-1:0]    lfsr, chip_idx;
  logic [CHIP_LOG2-1:0] sub;
  logic                 data_bit;

  assign chip     = lfsr[CODE_N-1] ^ data_bit;
  assign epoch    = (chip_idx == '0) && (sub == '0);
  assign tx_phase = {chip_idx, sub};

  always_ff @(posedge clk) begin
    if (rst) begin
      lfsr     <= '1;
      chip_idx <= '0;
      sub      <= '0;
      data_bit <= 1'b0;
    end else begin
      sub <= sub + 1'b1;
      if (sub == '1) begin
        lfsr     <= {lfsr[CODE_N-2:0], ^(lfsr & TAPS)};
        chip_idx <= (chip_idx == LAST) ? '0 : chip_idx + 1'b1;
        if (chip_idx == LAST) data_bit <= data_in;
      end
    end
  end
endmodule
