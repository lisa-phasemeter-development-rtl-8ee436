// dac_if_tb: random signed values and shifts; the code one clock later must
// be the shifted value saturated to 14 bits plus 8192 (offset binary);
// checks zero, both full-scale ends and the reset code.
module dac_if_tb;
  logic clk = 0, rst;
  logic signed [59:0] val;
  logic [5:0] shift;
  logic [13:0] code;
  longint s, e;
  int checks = 0, failures = 0;

  dac_if #(.IW(60), .DAC_W(14)) dut (.clk, .rst, .val, .shift, .code);

  always #5 clk = ~clk;
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(input longint v, input int sh);
    val = 60'(v); shift = 6'(sh);
    @(posedge clk); #1;
    s = v >>> sh;
    if (s > 8191) s = 8191;
    if (s < -8192) s = -8192;
    e = s + 8192;
    checks++;
    if (longint'(code) != e) begin failures++; $display("val %0d sh %0d code %0d exp %0d", v, sh, code, e); end
  endtask

  initial begin
    rst = 1; val = 0; shift = 0;
    @(posedge clk); #1;
    checks++; if (code != 14'd8192) failures++;
    rst = 0;
    chk(0, 0); chk(8191, 0); chk(8192, 0); chk(-8192, 0); chk(-8193, 0); chk(-1, 0);
    chk(64'sd1 <<< 58, 45); chk(-(64'sd1 <<< 58), 45);
    for (int i = 0; i < 2000; i++) chk(longint'($signed({$urandom, $urandom})) >>> $urandom_range(4, 40), $urandom_range(0, 40));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
