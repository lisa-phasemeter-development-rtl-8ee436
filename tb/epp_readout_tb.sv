// epp_readout_tb: a host model runs IEEE 1284 EPP cycles (strobe low, wait
// for nWait high, sample data, strobe high, wait for nWait low). It writes
// the address, reads the whole 133-byte record and compares every byte,
// checks that a record change after the address write does not reach the
// bytes read (snapshot), reads the pointer back with an address read, checks
// bytes past the record read zero, and that data writes are acknowledged.
// It also checks the host-side transfer rate against the 1 MB/s EPP figure.
module epp_readout_tb;
  localparam int RB = 133;
  logic clk = 0, rst;
  logic [RB*8-1:0] rec, rec0;
  logic n_write, n_dstrb, n_astrb, d_oe, n_wait;
  logic [7:0] d_in, d_out, b;
  int checks = 0, failures = 0;
  longint t0, t1;

  epp_readout #(.REC_BYTES(RB)) dut (.clk, .rst, .rec, .n_write, .n_dstrb, .n_astrb, .d_in, .d_out, .d_oe, .n_wait);

  always #10 clk = ~clk;     // 50 MHz
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic host_cycle(input bit addr, input bit write, input logic [7:0] wdata, output logic [7:0] rdata);
    n_write = !write;
    d_in    = wdata;
    #7;
    if (addr) n_astrb = 0; else n_dstrb = 0;
    wait (n_wait == 1'b1);
    #5;
    checks++;
    if (!write && !d_oe) begin failures++; $display("data not driven during read"); end
    rdata = d_out;
    n_astrb = 1; n_dstrb = 1;
    wait (n_wait == 1'b0);
    n_write = 1;
    #5;
  endtask

  initial begin
    rst = 1; n_write = 1; n_dstrb = 1; n_astrb = 1; d_in = 0;
    for (int i = 0; i < RB; i++) rec[8*i +: 8] = 8'($urandom);
    repeat (3) @(posedge clk); #1; rst = 0;
    checks++; if (n_wait != 0) failures++;
    host_cycle(1, 1, 8'd0, b);            // address write -> pointer 0, snapshot
    rec0 = rec;
    for (int i = 0; i < RB; i++) rec[8*i +: 8] = ~rec[8*i +: 8];   // record changes
    t0 = longint'($time);
    for (int i = 0; i < RB; i++) begin
      host_cycle(0, 0, 8'd0, b);
      checks++;
      if (b !== rec0[8*i +: 8]) begin failures++; $display("byte %0d = %h exp %h", i, b, rec0[8*i +: 8]); end
    end
    t1 = longint'($time);
    // one byte takes well under 1 us: at least the 1 MB/s of the EPP port
    $display("%0d ns per byte", (t1 - t0) / RB);
    checks++; if ((t1 - t0) / RB > 1000) begin failures++; $display("%0d ns per byte", (t1 - t0) / RB); end
    host_cycle(1, 0, 8'd0, b);            // address read -> pointer
    checks++; if (b != 8'(RB)) begin failures++; $display("pointer %0d", b); end
    host_cycle(0, 0, 8'd0, b);            // past the record
    checks++; if (b != 0) begin failures++; $display("past end %h", b); end
    // new snapshot at pointer 5
    host_cycle(1, 1, 8'd5, b);
    host_cycle(0, 0, 8'd0, b);
    checks++; if (b != rec[8*5 +: 8]) begin failures++; $display("new byte5 %h exp %h", b, rec[8*5 +: 8]); end
    host_cycle(0, 1, 8'hAA, b);           // data write is acknowledged
    host_cycle(0, 0, 8'd0, b);            // pointer not moved by the write
    checks++; if (b != rec[8*6 +: 8]) begin failures++; $display("byte6 %h exp %h", b, rec[8*6 +: 8]); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
