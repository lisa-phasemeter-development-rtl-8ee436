// sine_lut_tb: checks the sine and cosine tables against sin() computed here,
// within one LSB, at random phases and at the four quadrant points, and the
// one-clock read latency.
module sine_lut_tb;
  localparam int AW = 12, DW = 16;
  localparam real TWO_PI = 6.283185307179586;
  logic clk = 0;
  logic [AW-1:0] phase;
  logic signed [DW-1:0] ys, yc;
  function automatic real fabs(input real v); return (v < 0.0) ? -v : v; endfunction
  int checks = 0, failures = 0;

  sine_lut #(.AW(AW), .DW(DW)) dut_s (.clk, .phase, .y(ys));
  sine_lut #(.AW(AW), .DW(DW), .PHASE_OFFSET(2**(AW-2))) dut_c (.clk, .phase, .y(yc));

  always #5 clk = ~clk;
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic check_ph(input logic [AW-1:0] p);
    real es, ec;
    phase = p;
    @(posedge clk); #1;
    es = 32767.0 * $sin(TWO_PI * real'(p) / 4096.0);
    ec = 32767.0 * $cos(TWO_PI * real'(p) / 4096.0);
    checks += 2;
    if (fabs(real'(ys) - es) > 1.0) begin failures++; $display("sin(%0d)=%0d exp %f", p, ys, es); end
    if (fabs(real'(yc) - ec) > 1.0) begin failures++; $display("cos(%0d)=%0d exp %f", p, yc, ec); end
  endtask

  initial begin
    phase = 0;
    @(posedge clk);
    check_ph(0);
    checks++; if (ys != 0 || yc != 32767) failures++;
    check_ph(1024); check_ph(2048); check_ph(3072);
    for (int i = 0; i < 2000; i++) check_ph(AW'($urandom));
    // latency: output must still show the old phase right before the edge
    phase = 12'd1024; @(posedge clk); #1; phase = 12'd3072; #3;
    checks++; if (ys != 32767) begin failures++; $display("latency: output changed early"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
