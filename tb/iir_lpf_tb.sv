// iir_lpf_tb: compares the filter with a real-valued model
// y <- y + (x - y)/2^K on random signed input (within 2 LSB), checks the
// step response after 2^K clocks (1 - 1/e of the step) and that a wide
// unsigned ramp, like the phase accumulator, comes out 2^K clocks late.
module iir_lpf_tb;
  localparam int K = 4;
  logic clk = 0, rst;
  logic [31:0] x, y;
  logic [103:0] xw, yw;
  real m;
  function automatic real fabs(input real v); return (v < 0.0) ? -v : v; endfunction
  int checks = 0, failures = 0;

  iir_lpf #(.W(32), .K(K))  dut  (.clk, .rst, .x, .y);
  iir_lpf #(.W(104), .K(K)) dutw (.clk, .rst, .x(xw), .y(yw));

  always #5 clk = ~clk;
  initial begin #400000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    rst = 1; x = 0; xw = 0;
    @(posedge clk); #1; rst = 0;
    // step response
    x = 32'd1_000_000;
    repeat (16) @(posedge clk);
    #1;
    m = 1.0e6 * (1.0 - $pow(15.0/16.0, 16.0));
    checks++; if (fabs(real'($signed(y)) - m) > 2.0) begin failures++; $display("step %0d exp %f", $signed(y), m); end
    // random input against the real model
    m = real'($signed(y));
    for (int i = 0; i < 3000; i++) begin
      x = 32'($signed(16'($urandom)) * 2000);
      @(posedge clk); #1;
      m = m + (real'($signed(x)) - m) / 16.0;
      checks++;
      if (fabs(real'($signed(y)) - m) > 2.0) begin failures++; $display("y %0d exp %f", $signed(y), m); end
    end
    // ramp of slope s on 104 bits, crossing 2^64: steady-state lag is 2^K * s
    xw = 104'h0_0000_0000_FFFF_FFFF_0000_0000;
    for (int i = 0; i < 600; i++) begin
      @(posedge clk); #1;
      xw = xw + 104'd1_000_000_007;
    end
    checks++;
    if (xw - yw < 104'd16 * 104'd1_000_000_007 - 104'd100 || xw - yw > 104'd17 * 104'd1_000_000_007) begin
      failures++; $display("ramp lag %0d", xw - yw);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
