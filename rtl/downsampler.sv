// downsampler: decimates the results of all channels to the readout rate.
//
// A free-running counter of DECIM_LOG2 bits selects one clock in every
// 2^DECIM_LOG2; in that clock the filtered I, Q, PA and the PIR of every
// channel are copied into the record registers together, the 8-bit sequence
// number is incremented and rec_valid pulses for one clock. The record then
// holds until the next one. An AUX_W-bit side input (the quadrant alignment
// signals) is recorded in the same clock. Band limiting is the job of the low-pass filters
// ahead of this block. The decimation factor (2^21, 23.8 Hz output at
// 50 MHz) and the record format are this design's choices.
module downsampler
  import pm_pkg::*;
#(
  parameter int DECIM_LOG2 = 21,
  parameter int AUX_W      = 128
) (
  input  logic       clk,
  input  logic       rst,
  input  ch_result_t res [NCH],
  input  logic [AUX_W-1:0] aux,
  output ch_result_t rec [NCH],
  output logic [AUX_W-1:0] aux_rec,
  output logic [7:0] seq,
  output logic       rec_valid
);
  logic [DECIM_LOG2-1:0] cnt;
  logic                  tick;

  assign tick = (cnt == '1);

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt       <= '0;
      seq       <= '0;
      rec_valid <= 1'b0;
      aux_rec   <= '0;
      for (int c = 0; c < NCH; c++) rec[c] <= '0;
    end else begin
      cnt       <= cnt + 1'b1;
      rec_valid <= tick;
      if (tick) begin
        seq     <= seq + 8'd1;
        aux_rec <= aux;
        for (int c = 0; c < NCH; c++) rec[c] <= res[c];
      end
    end
  end
endmodule
