// test_nco_tb: after reset the generator's n-th output must be
// round(32767*sin(2*pi*k/4096)) >> amp_shift (within one LSB), where k is
// the top 12 bits of (n-1)*pir, computed here; also counts positive zero
// crossings of a 5 MHz output over 1000 samples (100 expected).
module test_nco_tb;
  localparam real TWO_PI = 6.283185307179586;
  logic clk = 0, rst;
  logic [59:0] pir, ph;
  logic [3:0] amp;
  logic signed [15:0] s, prev;
  function automatic real fabs(input real v); return (v < 0.0) ? -v : v; endfunction
  int checks = 0, failures = 0, zc;
  real e;

  test_nco dut (.clk, .rst, .pir, .amp_shift(amp), .sample(s));

  always #10 clk = ~clk;
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    for (int run = 0; run < 4; run++) begin
      rst = 1; pir = {$urandom, $urandom}; amp = 4'(run * 2);
      @(posedge clk); @(posedge clk); #1; rst = 0;
      ph = 0;
      for (int n = 0; n < 500; n++) begin
        @(posedge clk); #1;
        e = $floor(32767.0 * $sin(TWO_PI * real'(ph[59:48]) / 4096.0) + 0.5);
        e = $floor(e / (2.0 ** amp));
        checks++;
        if (fabs(real'(s) - e) > 1.0) begin failures++; $display("n=%0d s=%0d exp %f", n, s, e); end
        ph = ph + pir;
      end
    end
    rst = 1; pir = 60'd115292150460684698; amp = 0;
    @(posedge clk); #1; rst = 0;
    zc = 0; prev = 0;
    repeat (1000) begin
      @(posedge clk); #1;
      if (prev < 0 && s >= 0) zc++;
      prev = s;
    end
    checks++; if (zc < 99 || zc > 101) begin failures++; $display("zero crossings %0d", zc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
