// pi_controller_tb: random errors and gains against a model that multiplies
// by the gains; checks the one-clock latency and that opening the loop
// clears the integrator.
module pi_controller_tb;
  logic clk = 0, rst, en;
  logic signed [31:0] err;
  logic [5:0] kp, ki;
  logic signed [59:0] corr, integ, expv;
  int checks = 0, failures = 0;

  pi_controller #(.EW(32), .OW(60)) dut (.clk, .rst, .en, .err, .kp_shift(kp), .ki_shift(ki), .corr);

  always #5 clk = ~clk;
  initial begin #300000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    rst = 1; en = 0; err = 0; kp = 0; ki = 0; integ = 0;
    @(posedge clk); #1; rst = 0; en = 1;
    for (int blk = 0; blk < 20; blk++) begin
      kp = 6'($urandom_range(0, 27));
      ki = 6'($urandom_range(0, 20));
      for (int i = 0; i < 100; i++) begin
        err = $signed($urandom) >>> $urandom_range(0, 20);
        @(posedge clk); #1;
        integ = integ + 60'(err) * (60'sd1 <<< ki);
        expv  = integ + 60'(err) * (60'sd1 <<< kp);
        checks++;
        if (corr != expv) begin failures++; $display("corr %0d exp %0d", corr, expv); end
      end
    end
    en = 0; @(posedge clk); #1;
    checks++; if (corr != 0) failures++;
    en = 1; err = 32'sd5; kp = 0; ki = 0;
    @(posedge clk); #1;
    checks++; if (corr != 60'sd10) begin failures++; $display("after clear %0d", corr); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
