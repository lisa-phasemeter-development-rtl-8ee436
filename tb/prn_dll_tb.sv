// prn_dll_tb: a 31-chip code at 16 clocks per chip (496-clock period) is
// sent through a delay line of D clocks, scaled to +/-A with uniform noise
// of +/-A added, and fed to the DLL. The data bit changes each period at
// random. Checks: the DLL first searches (tracking low), then tracks; the
// measured delay, averaged over the last periods, is within 0.6 clock of D
// (the local code is sampled at whole clocks, which leaves an offset of up
// to half a clock); the decoded data bits equal the sent ones. Done for two
// delays.
module prn_dll_tb;
  localparam int N = 5, CL = 4, FR = 8;
  localparam int PER = 31 * 16;
  localparam int A = 1 << 20;
  logic clk = 0, rst, data_in, chip, epoch, data_bit, tracking, valid;
  logic [N+CL-1:0] tx_phase;
  logic [N+CL+FR-1:0] delay;
  logic signed [31:0] x;
  logic signed [55:0] prompt;
  logic dline [2048];
  logic sent [$];
  int checks = 0, failures = 0, D, n_search, n_track, n_data_ok, n_data, n_avg;
  real dm;

  prn_code_gen #(.CODE_N(N), .TAPS(5'b10100), .CHIP_LOG2(CL)) tx (.clk, .rst, .data_in, .chip, .epoch, .tx_phase);
  prn_dll #(.CODE_N(N), .TAPS(5'b10100), .CHIP_LOG2(CL), .XW(32), .FR(FR)) dut (
    .clk, .rst, .x, .tx_phase, .dll_shift(6'd19), .acq_thresh(56'(A) * 56'(PER) / 2),
    .delay, .data_bit, .prompt, .tracking, .valid);

  always #5 clk = ~clk;
  initial begin #4000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // delay line and channel
  int wp = 0;
  always @(posedge clk) begin
    dline[wp % 2048] = chip;
    x <= (dline[(wp - D + 2048) % 2048] ? -A : A) + $signed(32'($urandom_range(0, 2 * A))) - A;
    wp++;
    if (epoch) begin
      data_in <= 1'($urandom);
    end
  end

  task automatic run_delay(input int d);
    D = d;
    rst = 1; repeat (3) @(posedge clk); #1; rst = 0;
    n_search = 0; n_track = 0; dm = 0; n_avg = 0;
    repeat (120) begin
      @(posedge clk iff valid); #1;
      if (tracking) n_track++; else n_search++;
      if (n_track > 40) begin dm += real'(delay) / 2.0**FR; n_avg++; end
    end
    dm = dm / n_avg;
    checks++; if (n_search == 0 || n_track < 20) begin failures++; $display("search %0d track %0d", n_search, n_track); end
    checks++;
    if ((dm - real'(d)) > 0.6 || (real'(d) - dm) > 0.6) begin failures++; $display("delay %f exp %0d", dm, d); end
    else $display("delay %0d measured %f clocks", d, dm);
  endtask

  // data: the bit sent in a period arrives D clocks later; compare the
  // decoded bit with the transmitter's data bit of the period that ended
  logic tx_bit_prev;
  always @(posedge clk) begin
    if (valid && tracking) begin
      n_data++;
      if (data_bit == tx_bit_prev) n_data_ok++;
    end
  end
  // transmitter data bit that was active D clocks ago, at the DLL's dump
  logic bit_line [2048];
  always @(posedge clk) begin
    bit_line[wp % 2048] = tx.data_bit;
    tx_bit_prev <= bit_line[(wp - D - 2 + 2048) % 2048];
  end

  initial begin
    data_in = 0; D = 0; n_data = 0; n_data_ok = 0;
    run_delay(157);
    run_delay(400);
    checks++;
    if (n_data == 0 || n_data_ok < n_data - 2) begin failures++; $display("data %0d of %0d", n_data_ok, n_data); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
