// downsampler_tb: with decimation 2^4 the record must be taken every 16
// clocks, equal the inputs of that clock for all four channels and the
// side input, and the
// sequence number must count records.
module downsampler_tb;
  import pm_pkg::*;
  localparam int D = 4;
  logic clk = 0, rst;
  ch_result_t res [NCH], rec [NCH], snap [NCH];
  logic [7:0] seq;
  logic [127:0] aux, aux_rec, aux_snap;
  logic rec_valid;
  int checks = 0, failures = 0, nrec = 0, last = -1, cyc = 0;

  downsampler #(.DECIM_LOG2(D)) dut (.clk, .rst, .res, .aux, .rec, .aux_rec, .seq, .rec_valid);

  always #5 clk = ~clk;
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // random inputs each clock; remember what was presented in each clock
  always @(posedge clk) begin
    snap <= res;
    aux_snap <= aux;
    aux <= {$urandom, $urandom, $urandom, $urandom};
    cyc  <= cyc + 1;
    for (int c = 0; c < NCH; c++) begin
      res[c].i   <= $urandom; res[c].q <= $urandom;
      res[c].pa  <= {$urandom, $urandom, $urandom, $urandom};
      res[c].pir <= {$urandom, $urandom};
    end
  end

  initial begin
    rst = 1;
    repeat (2) @(posedge clk); #1; rst = 0;
    repeat (40 * 16) begin
      @(posedge clk); #1;
      if (rec_valid) begin
        nrec++;
        checks++;
        for (int c = 0; c < NCH; c++) if (rec[c] != snap[c]) begin failures++; $display("record %0d ch %0d differs", nrec, c); end
        checks++; if (aux_rec != aux_snap) begin failures++; $display("aux differs"); end
        checks++; if (seq != 8'(nrec)) begin failures++; $display("seq %0d exp %0d", seq, nrec); end
        if (last >= 0) begin checks++; if (cyc - last != 16) begin failures++; $display("spacing %0d", cyc - last); end end
        last = cyc;
      end
    end
    checks++; if (nrec < 39 || nrec > 40) begin failures++; $display("records %0d", nrec); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
