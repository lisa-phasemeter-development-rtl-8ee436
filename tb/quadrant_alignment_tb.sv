// quadrant_alignment_tb: random quadrant phases given in radians-like real
// fractions of a cycle (plus random whole cycles) are turned into PA words;
// the horizontal and vertical outputs must match the sums and differences
// computed here with each pairwise difference wrapped to half a cycle.
// Also checks that the outputs hold while in_valid is low.
module quadrant_alignment_tb;
  logic clk = 0, rst, in_valid, valid;
  logic [103:0] pa [4];
  logic signed [63:0] horiz, vert;
  real ph [4];
  int checks = 0, failures = 0;
  function automatic real fabs(input real v); return (v < 0.0) ? -v : v; endfunction
  function automatic real wrap(input real v);
    real w; w = v - $floor(v + 0.5); return w;   // into [-0.5, 0.5)
  endfunction

  quadrant_alignment dut (.clk, .rst, .in_valid, .pa, .horiz, .vert, .valid);

  always #5 clk = ~clk;
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    real eh, ev, gh, gv;
    logic signed [63:0] h0;
    rst = 1; in_valid = 0;
    for (int k = 0; k < 4; k++) pa[k] = '0;
    @(posedge clk); #1; rst = 0;
    for (int i = 0; i < 1000; i++) begin
      for (int k = 0; k < 4; k++) begin
        ph[k] = real'($urandom) / 4294967296.0;
        pa[k] = {44'($urandom), 60'($rtoi(ph[k] * 2.0**30)) << 30};
        ph[k] = real'(pa[k][59:0]) / 2.0**60;
      end
      in_valid = 1;
      @(posedge clk); #1;
      eh = wrap(ph[0] - ph[1]) + wrap(ph[2] - ph[3]);
      ev = wrap(ph[0] - ph[2]) + wrap(ph[1] - ph[3]);
      gh = real'(horiz) / 2.0**60;
      gv = real'(vert) / 2.0**60;
      checks += 2;
      if (!valid || fabs(gh - eh) > 1.0e-9) begin failures++; $display("h %f exp %f", gh, eh); end
      if (fabs(gv - ev) > 1.0e-9) begin failures++; $display("v %f exp %f", gv, ev); end
    end
    h0 = horiz;
    in_valid = 0; pa[0] = pa[0] + 104'd12345678901234;
    @(posedge clk); #1;
    checks++; if (valid || horiz != h0) begin failures++; $display("output changed without in_valid"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
