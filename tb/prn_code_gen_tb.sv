// prn_code_gen_tb: a 5-bit code (31 chips, 4 clocks per chip). Checks
// against an LFSR model written here: every chip of several periods, the
// epoch pulse once per 124 clocks, tx_phase counting clocks, and a data bit
// that inverts exactly one whole code period. Also checks the m-sequence
// balance (16 ones in 31 chips) of the default 10-bit code (512 in 1023).
module prn_code_gen_tb;
  logic clk = 0, rst, data_in, chip, epoch, chip10, epoch10;
  logic [6:0] tx_phase;
  logic [15:0] tx10;
  int checks = 0, failures = 0, ones, nep;
  logic [4:0] m;
  logic dbit;

  prn_code_gen #(.CODE_N(5), .TAPS(5'b10100), .CHIP_LOG2(2)) dut (.clk, .rst, .data_in, .chip, .epoch, .tx_phase);
  prn_code_gen dut10 (.clk, .rst, .data_in(1'b0), .chip(chip10), .epoch(epoch10), .tx_phase(tx10));

  always #5 clk = ~clk;
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    rst = 1; data_in = 0;
    @(posedge clk); #1; rst = 0;
    m = '1; nep = 0;
    for (int per = 0; per < 4; per++) begin
      dbit = (per == 2);
      data_in = (per == 1);           // latched at the end of period 1 -> inverts period 2
      ones = 0;
      for (int c = 0; c < 31; c++) begin
        for (int k = 0; k < 4; k++) begin
          checks++;
          if (chip != (m[4] ^ dbit) || tx_phase != 7'(c * 4 + k) || epoch != (c == 0 && k == 0)) begin
            failures++; $display("per %0d chip %0d sub %0d: chip %b exp %b phase %0d", per, c, k, chip, m[4] ^ dbit, tx_phase);
          end
          if (epoch) nep++;
          @(posedge clk); #1;
        end
        ones += m[4];
        m = {m[3:0], m[4] ^ m[2]};
      end
      checks++; if (ones != 16) begin failures++; $display("ones %0d", ones); end
    end
    checks++; if (nep != 4) begin failures++; $display("epochs %0d", nep); end
    // default code: count ones over one period of 1023 chips
    rst = 1; @(posedge clk); #1; rst = 0;
    ones = 0;
    for (int c = 0; c < 1023; c++) begin
      ones += chip10;
      repeat (64) @(posedge clk);
      #1;
    end
    checks++; if (ones != 512 || !epoch10) begin failures++; $display("10-bit ones %0d epoch %b", ones, epoch10); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
