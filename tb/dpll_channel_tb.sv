// dpll_channel_tb: drives one DPLL channel with a 5 MHz sine sampled at
// 50 MHz (half of full scale), generated here with sin() from an exact 60-bit
// phase. The loop starts 5 kHz off. Checks: the PIR locks to the input
// frequency word, the Q branch (phase error) settles near zero and the I
// branch to amplitude*32767/2, the NCO phase tracks the input phase
// without drift, and after a 0.5 rad input phase step the phase accumulator
// follows by 0.5 rad. Also checks that the open loop keeps the nominal word.
module dpll_channel_tb;
  import pm_pkg::*;
  localparam real TWO_PI = 6.283185307179586;
  localparam real AMP    = 16384.0;
  localparam logic [59:0] PIR_IN = 60'd115292150460684698;    // 5 MHz
  logic clk = 0, rst;
  logic signed [15:0] sample;
  ch_cfg_t cfg;
  ch_result_t res;
  ch_debug_t dbg;
  logic [59:0] ph_in;          // input phase, 1 LSB = 2^-60 cycle
  logic [59:0] ph_step;
  function automatic real fabs(input real v); return (v < 0.0) ? -v : v; endfunction
  int checks = 0, failures = 0;
  longint lock_cycles;

  dpll_channel #(.K_IQ(3), .K_PA(4)) dut (.clk, .rst, .sample, .cfg, .res, .dbg);

  always #10 clk = ~clk;
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // input generator
  always_ff @(posedge clk) begin
    if (rst) ph_in <= 60'd0;
    else     ph_in <= ph_in + PIR_IN;
    sample <= 16'($rtoi($floor(AMP * $sin(TWO_PI * real'(ph_in + ph_step) / (2.0**60)) + 0.5)));
  end

  function automatic real frac_diff(input logic [59:0] a, input logic [59:0] b);
    logic signed [59:0] d;
    d = a - b;
    return real'(d) / (2.0**60) * TWO_PI;   // radians, in [-pi, pi)
  endfunction

  real d0, d1, q_abs, i_val, pir_err;
  // averages over 20 samples (four periods of the 10 MHz mixing product)
  task automatic average(output real pe, output real iv, output real qv, output real ph);
    pe = 0; iv = 0; qv = 0; ph = 0;
    for (int k = 0; k < 20; k++) begin
      @(posedge clk); #1;
      pe += real'($signed(res.pir - PIR_IN)) / 20.0;
      iv += real'(res.i) / 20.0;
      qv += real'(res.q) / 20.0;
      ph += frac_diff(dbg.pa[59:0], ph_in) / 20.0;
    end
  endtask
  logic [103:0] pa0;
  logic [59:0] in0;

  initial begin
    rst = 1; ph_step = 0;
    cfg.pir_init = PIR_IN + 60'd115292150460685;   // +5 kHz
    cfg.kp_shift = 6'd24; cfg.ki_shift = 6'd17; cfg.loop_en = 1'b0;
    repeat (3) @(posedge clk); #1; rst = 0;
    // open loop: PIR stays at the nominal word
    repeat (50) @(posedge clk); #1;
    checks++; if (res.pir != cfg.pir_init) begin failures++; $display("open loop pir %h", res.pir); end
    cfg.loop_en = 1'b1;
    lock_cycles = 0;
    repeat (3000) @(posedge clk);
    #1;
    // frequency lock: within 1e-6 of fs (50 Hz)
    average(pir_err, i_val, q_abs, d0);
    q_abs = fabs(q_abs);
    checks++;
    if (fabs(pir_err) > 1.0e-6 * 2.0**60) begin
      failures++; $display("pir off by %e", pir_err / 2.0**60);
    end
    checks++; if (fabs(i_val - AMP*32767.0/2.0) > 0.05*AMP*32767.0/2.0) begin failures++; $display("I=%f", i_val); end
    checks++; if (q_abs > 0.02*AMP*32767.0/2.0) begin failures++; $display("Q=%f", q_abs); end
    // phase tracking: NCO phase minus input phase constant over 2000 samples
    pa0 = dbg.pa; in0 = ph_in;
    repeat (2000) @(posedge clk); #1;
    average(pir_err, i_val, q_abs, d1);
    checks++; if (fabs(d1 - d0) > 0.01) begin failures++; $display("phase drift %f rad", d1 - d0); end
    // whole-cycle count advanced by 200 cycles (5 MHz for 2000 samples)
    checks++; if (dbg.pa[103:60] - pa0[103:60] < 44'd200 || dbg.pa[103:60] - pa0[103:60] > 44'd204) begin
      failures++; $display("cycles %0d", dbg.pa[103:60] - pa0[103:60]); end
    // phase step of 0.5 rad at the input
    ph_step = 60'($rtoi(0.5 / TWO_PI * 2.0**28)) << 32;
    repeat (3000) @(posedge clk); #1;
    average(pir_err, i_val, q_abs, d1);
    checks++; if (fabs((d1 - d0) - 0.5) > 0.01) begin failures++; $display("step followed by %f rad", d1 - d0); end
    // filtered PA tracks the PA (lag of 2^K_PA samples of 5 MHz = 1.6 cycles)
    checks++; if (dbg.pa - res.pa > 104'd2 << 60) begin failures++; $display("pa lpf lag too big"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
