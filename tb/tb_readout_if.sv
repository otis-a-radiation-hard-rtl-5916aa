// tb_readout_if: loads 36-byte sequences, some as soon as `ready` allows
// (during the last byte of the previous one), and checks the bytes leave in
// order, byte 0 first with `sop`, with `dvalid` high for exactly 36
// consecutive cycles (900 ns) per sequence, and no gap between sequences
// loaded back to back.
`timescale 1ns / 1ps
module tb_readout_if;
  logic clk = 0, rst_n = 0, load = 0, ready, dvalid, sop;
  logic [287:0] seq;
  logic [7:0] dout;
  int checks = 0, failures = 0;
  logic [7:0] byteq [$];
  int run = 0, nseq = 0, gapless = 0;
  logic prev_dv = 0;
  readout_if dut (.clk, .rst_n, .load, .seq, .ready, .dout, .dvalid, .sop);
  always #12.5 clk = ~clk;
  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  // output monitor
  always @(posedge clk) if (rst_n) begin
    if (dvalid) begin
      logic [7:0] e;
      e = byteq.pop_front();
      checks++;
      if (dout != e || sop != (run == 0)) begin
        failures++;
        $display("byte %0d: %h expected %h sop %0b", run, dout, e, sop);
      end
      if (sop && prev_dv) gapless++;
      run = (run == 35) ? 0 : run + 1;
      if (sop) nseq++;
    end else begin
      checks++;
      if (run != 0) begin
        failures++;
        $display("sequence cut after %0d bytes", run);
      end
    end
    prev_dv = dvalid;
  end
  initial begin
    seq = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 60; n++) begin
      @(negedge clk);
      while (!ready) @(negedge clk);
      if (n % 3 == 2) repeat ($urandom_range(10)) @(negedge clk);
      for (int b = 0; b < 36; b++) begin
        seq[8*b +: 8] = 8'($urandom);
        byteq.push_back(seq[8*b +: 8]);
      end
      load = 1;
      @(negedge clk);
      load = 0;
    end
    repeat (80) @(negedge clk);
    checks++; if (nseq != 60 || gapless < 20 || byteq.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
