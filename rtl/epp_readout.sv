// epp_readout: enhanced parallel port (IEEE 1284 EPP) peripheral through
// which a host PC reads the downsampled record.
//
// Handshake (per IEEE 1284 EPP): n_wait is low when the peripheral is ready.
// The host starts a cycle by pulling n_astrb (address) or n_dstrb (data) low,
// with n_write low for a host write. After the strobe has passed a two-flop
// synchroniser the peripheral does the transfer and raises n_wait; when the
// host releases the strobe the peripheral lowers n_wait and the cycle ends.
// Read data is driven (d_oe = 1) from the clock n_wait rises until the strobe
// is released.
//
// Register map (this design's own): an address write sets the byte pointer
// and freezes a copy of the current record, so that a record read byte by
// byte is consistent; an address read returns the pointer; each data read
// returns the frozen byte at the pointer and increments the pointer (bytes
// past the record read 0); data writes are acknowledged and ignored.
// Byte b of the record is rec[8*b +: 8].
module epp_readout #(
  parameter int REC_BYTES = 133
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic [REC_BYTES*8-1:0] rec,
  input  logic                   n_write,
  input  logic                   n_dstrb,
  input  logic                   n_astrb,
  input  logic [7:0]             d_in,
  output logic [7:0]             d_out,
  output logic                   d_oe,
  output logic                   n_wait
);
  typedef enum logic { S_IDLE, S_ACK } state_e;

  state_e                 state;
  logic [1:0]             ds_sync, as_sync, wr_sync;
  logic                   ds, as, wr;             // synchronised, active high
  logic [7:0]             ptr;
  logic [REC_BYTES*8-1:0] snap;
  logic                   data_read;              // current cycle is a data read

  assign ds = ~ds_sync[1];
  assign as = ~as_sync[1];
  assign wr = ~wr_sync[1];

  function automatic logic [7:0] snap_byte(input logic [REC_BYTES*8-1:0] s, input logic [7:0] p);
    return (int'(p) < REC_BYTES) ? s[8*p +: 8] : 8'h00;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      ds_sync   <= 2'b11;
      as_sync   <= 2'b11;
      wr_sync   <= 2'b11;
      state     <= S_IDLE;
      n_wait    <= 1'b0;
      d_oe      <= 1'b0;
      d_out     <= '0;
      ptr       <= '0;
      snap      <= '0;
      data_read <= 1'b0;
    end else begin
      ds_sync <= {ds_sync[0], n_dstrb};
      as_sync <= {as_sync[0], n_astrb};
      wr_sync <= {wr_sync[0], n_write};
      unique case (state)
        S_IDLE: begin
          if (as || ds) begin
            state     <= S_ACK;
            n_wait    <= 1'b1;
            data_read <= ds && !wr;
            if (as && wr) begin
              ptr  <= d_in;
              snap <= rec;
            end else if (!wr) begin
              d_oe  <= 1'b1;
              d_out <= as ? ptr : snap_byte(snap, ptr);
            end
          end
        end
        S_ACK: begin
          if (!as && !ds) begin
            state  <= S_IDLE;
            n_wait <= 1'b0;
            d_oe   <= 1'b0;
            if (data_read) ptr <= ptr + 8'd1;
            data_read <= 1'b0;
          end
        end
      endcase
    end
  end

`ifndef SYNTHESIS
  // n_wait may only be high while a cycle is in progress
  a_wait_in_cycle: assert property (@(posedge clk) disable iff (rst)
    n_wait |-> state == S_ACK);
`endif
endmodule
