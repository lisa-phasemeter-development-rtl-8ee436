// phase_accumulator_tb: compares the 104-bit accumulator with a model over
// random 60-bit increments, checks that the whole-cycle part (bits above 59)
// counts fraction overflows, and checks reset.
module phase_accumulator_tb;
  logic clk = 0, rst;
  logic [59:0]  pir;
  logic [103:0] pa, model;
  int checks = 0, failures = 0;
  longint unsigned wraps;

  phase_accumulator #(.PA_W(104), .PIR_W(60)) dut (.clk, .rst, .pir, .pa);

  always #5 clk = ~clk;
  initial begin #400000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    rst = 1; pir = '0; model = '0;
    @(posedge clk); #1; rst = 0;
    checks++; if (pa != 0) failures++;
    for (int i = 0; i < 3000; i++) begin
      pir = {$urandom, $urandom} & 60'hFFF_FFFF_FFFF_FFFF;
      @(posedge clk); #1;
      model = model + {44'd0, pir};
      checks++;
      if (pa != model) begin failures++; $display("pa %h exp %h", pa, model); end
    end
    // 5 MHz at 50 MHz: 2^60/10 per sample -> exactly one whole cycle every 10 samples
    rst = 1; @(posedge clk); #1; rst = 0;
    pir = 60'd115292150460684698;
    wraps = 0;
    repeat (1000) @(posedge clk);
    #1;
    checks++; if (pa[103:60] != 44'd100) begin failures++; $display("A=%0d exp 100", pa[103:60]); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
