// tb_readout_ctrl: feeds random events (three data sets with random hit
// flags, drift times, bunch crossing numbers and status) through a model of
// the derandomizer read port, with random `out_ready`, and checks each
// loaded sequence: header bytes (chip ID, status flags, OR of the data set
// status, bunch crossing number of the first data set) and, per channel,
// the first hit of the three data sets coded as 00/01/10 + drift time, or
// 1100_0000 without hit. Also checks a lost trigger is flagged in the next
// sequence only, and the derandomizer read strobes.
`timescale 1ns / 1ps
module tb_readout_ctrl;
  import otis_pkg::*;
  logic clk = 0, rst_n = 0;
  logic der_empty, der_re, der_re_last, trig_lost = 0, der_full = 0;
  logic dll_lock_lost = 0, out_ready = 0, load;
  row_t der_rdata;
  logic [287:0] seq;
  int checks = 0, failures = 0, nload = 0, nlost_seen = 0, rd_in_evt = 0;
  row_t rowq [$];
  logic [287:0] expq [$];
  readout_ctrl dut (.clk, .rst_n, .der_empty, .der_rdata, .der_re,
                    .der_re_last, .chip_id(8'h5A), .trig_lost, .der_full,
                    .dll_lock_lost, .out_ready, .load, .seq);
  always #12.5 clk = ~clk;
  assign der_empty = (rowq.size() == 0);
  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  function automatic logic [287:0] expected(row_t r0, row_t r1, row_t r2);
    logic [287:0] s;
    row_t rs [3];
    rs = '{r0, r1, r2};
    s[7:0]   = 8'h5A;
    s[15:8]  = 8'h00;      // flags filled by the checker
    s[23:16] = r0[239:232] | r1[239:232] | r2[239:232];
    s[31:24] = r0[231:224];
    for (int c = 0; c < 32; c++) begin
      int pos = -1;
      for (int k = 0; k < 3 && pos < 0; k++) if (rs[k][192 + c]) pos = k;
      s[32 + 8*c +: 8] = (pos < 0) ? 8'b1100_0000 : {2'(pos), rs[pos][6*c +: 6]};
    end
    return s;
  endfunction
  // derandomizer read port model
  always @(posedge clk) if (rst_n && der_re) begin
    der_rdata <= rowq.pop_front();
    rd_in_evt = rd_in_evt + 1;
    checks++;
    if (der_re_last != (rd_in_evt == 3)) begin
      failures++;
      $display("re_last wrong");
    end
    if (rd_in_evt == 3) rd_in_evt = 0;
  end
  // sequence checker; `pend` models when a lost trigger must be reported
  logic pend = 0;
  always @(posedge clk) if (rst_n) begin
    logic p;
    p = pend;
    pend = load ? trig_lost : (pend | trig_lost);
    if (load) check_seq(p);
  end
  task automatic check_seq(input logic lost);
    logic [287:0] e;
    e = expq.pop_front();
    nload++;
    checks++;
    if (seq[7:0] != e[7:0] || seq[287:16] != e[287:16] || seq[15:9] != 0 ||
        seq[8] != lost) begin
      failures++;
      $display("sequence %0d mismatch\n got %h\n exp %h", nload, seq, e);
    end
    if (seq[8]) nlost_seen++;
  endtask
  initial begin
    der_rdata = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      row_t r [3];
      for (int k = 0; k < 3; k++) begin
        for (int w = 0; w < 8; w++) r[k][30*w +: 30] = 30'($urandom);
        if (n % 4 == 0) r[k][223:192] = '0;               // some empty events
        r[k][239:232] = {6'b0, 2'($urandom_range(3) == 0 ? $urandom : 0)};
      end
      @(negedge clk);
      expq.push_back(expected(r[0], r[1], r[2]));
      for (int k = 0; k < 3; k++) rowq.push_back(r[k]);
      if (n % 10 == 4) begin
        // a trigger lost while this event waits: reported in the next one
        @(negedge clk); trig_lost = 1; @(negedge clk); trig_lost = 0;
      end
      while (rowq.size() > 6) begin
        out_ready = ($urandom_range(3) != 0);
        @(negedge clk);
      end
      out_ready = ($urandom_range(3) != 0);
    end
    while (expq.size() != 0) begin
      out_ready = 1;
      @(negedge clk);
    end
    checks++; if (nload != 200 || nlost_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
