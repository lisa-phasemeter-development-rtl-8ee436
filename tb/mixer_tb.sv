// mixer_tb: random and extreme signed operands; the product must appear one
// clock after the operands.
module mixer_tb;
  logic clk = 0, rst;
  logic signed [15:0] a, b;
  logic signed [31:0] p;
  longint e;
  int checks = 0, failures = 0;

  mixer #(.AW(16), .BW(16)) dut (.clk, .rst, .a, .b, .p);

  always #5 clk = ~clk;
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(input logic signed [15:0] x, input logic signed [15:0] y);
    a = x; b = y;
    @(posedge clk); #1;
    e = longint'(x) * longint'(y);
    checks++;
    if (longint'(p) != e) begin failures++; $display("%0d*%0d=%0d exp %0d", x, y, p, e); end
  endtask

  initial begin
    rst = 1; a = 0; b = 0;
    @(posedge clk); #1; rst = 0;
    chk(-32768, -32768); chk(32767, -32768); chk(-1, 1); chk(0, 12345);
    for (int i = 0; i < 2000; i++) chk(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
