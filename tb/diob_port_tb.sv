// diob_port_tb: random intermediate signals on all four channels; for each
// channel and signal code the word one clock later must be the selected
// signal (sign-extended or its top 32 fraction bits) with the strobe high;
// with en low the strobe must be low.
module diob_port_tb;
  import pm_pkg::*;
  logic clk = 0, rst, en, strobe;
  ch_debug_t dbg [NCH];
  logic [1:0] ch;
  diob_sel_e sel;
  logic [31:0] word, e;
  int checks = 0, failures = 0;

  diob_port #(.DW(32)) dut (.clk, .rst, .dbg, .ch_sel(ch), .sig_sel(sel), .en, .word, .strobe);

  always #5 clk = ~clk;
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic logic [31:0] expect_word(input ch_debug_t d, input int s);
    case (s)
      0: return {{16{d.sample[15]}}, d.sample};
      1: return d.mix_i;
      2: return d.mix_q;
      3: return d.lpf_i;
      4: return d.lpf_q;
      5: return d.pic[59:28];
      6: return d.pir[59:28];
      default: return d.pa[59:28];
    endcase
  endfunction

  initial begin
    rst = 1; en = 0; ch = 0; sel = DIOB_SAMPLE;
    for (int c = 0; c < NCH; c++) dbg[c] = '0;
    @(posedge clk); #1; rst = 0;
    for (int i = 0; i < 400; i++) begin
      for (int c = 0; c < NCH; c++)
        dbg[c] = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      ch = 2'(i % 4); sel = diob_sel_e'(3'((i / 4) % 8)); en = 1;
      e = expect_word(dbg[ch], int'(sel));
      @(posedge clk); #1;
      checks++;
      if (!strobe || word != e) begin failures++; $display("ch %0d sel %0d word %h exp %h", ch, sel, word, e); end
    end
    en = 0; @(posedge clk); #1;
    checks++; if (strobe) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
