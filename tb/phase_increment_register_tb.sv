// phase_increment_register_tb: random nominal words and signed feedback;
// the register must load nominal + feedback modulo 2^60 one clock later.
module phase_increment_register_tb;
  logic clk = 0, rst;
  logic [59:0] pir_init, pir, exp_v;
  logic signed [59:0] corr;
  int checks = 0, failures = 0;

  phase_increment_register #(.PIR_W(60)) dut (.clk, .rst, .pir_init, .corr, .pir);

  always #5 clk = ~clk;
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    rst = 1; pir_init = '0; corr = '0;
    @(posedge clk); #1; checks++; if (pir != 0) failures++;
    rst = 0;
    for (int i = 0; i < 2000; i++) begin
      pir_init = {$urandom, $urandom};
      corr     = (i % 2) ? -60'($urandom) : 60'($urandom);
      @(posedge clk); #1;
      exp_v = 60'(pir_init + {{4{corr[59]}}, corr});
      checks++;
      if (pir != exp_v) begin failures++; $display("pir %h exp %h", pir, exp_v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
