// diob_port: stream of internal signals to the high-speed digital I/O board.
//
// Every clock, while en is high, the signal chosen by sig_sel from channel
// ch_sel is registered onto the DW-bit word and strobe is raised; the
// external board stores the words by DMA. Signals narrower than DW are
// sign-extended; wider ones (PIC output, PIR, PA fraction) give their top
// DW bits of the 60-bit fraction. One clock latency. The description names
// the port and its purpose (looking at intermediate results); the word width,
// the selector and its codes (pm_pkg::diob_sel_e) are this design's choices.
module diob_port
  import pm_pkg::*;
#(
  parameter int DW = 32
) (
  input  logic                   clk,
  input  logic                   rst,
  input  ch_debug_t              dbg [NCH],
  input  logic [$clog2(NCH)-1:0] ch_sel,
  input  diob_sel_e              sig_sel,
  input  logic                   en,
  output logic [DW-1:0]          word,
  output logic                   strobe
);
  ch_debug_t      d;
  logic [DW-1:0]  w;

  always_comb begin
    d = dbg[ch_sel];
    unique case (sig_sel)
      DIOB_SAMPLE: w = DW'(d.sample);
      DIOB_MIX_I:  w = DW'(d.mix_i);
      DIOB_MIX_Q:  w = DW'(d.mix_q);
      DIOB_LPF_I:  w = DW'(d.lpf_i);
      DIOB_LPF_Q:  w = DW'(d.lpf_q);
      DIOB_PIC:    w = d.pic[PIR_W-1 -: DW];
      DIOB_PIR:    w = d.pir[PIR_W-1 -: DW];
      DIOB_PA:     w = d.pa[PIR_W-1 -: DW];
      default:     w = '0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      word   <= '0;
      strobe <= 1'b0;
    end else begin
      strobe <= en;
      word   <= en ? w : '0;
    end
  end
endmodule
