// tb_fine_time_sweep: fine time against hit position over one bunch
// crossing, through the whole chip at default sizes. The leading edge of a
// 3 ns pulse is swept from 0 to 25 ns after the clock edge in 0.1 ns steps
// (each of the 32 channels at its own offset in the sweep), one trigger per
// sweep point. The expected code is the first DLL phase at or after the
// edge, ceil(delay / 390.625 ps); an edge after phase 63 is caught by
// phase 0 of the next period and reads as bin 0 of the 2nd bunch crossing.
// Points within 5 ps of a phase are skipped (the sampling there is a race).
// Checks each code against that expectation and that all 64 codes occur.
`timescale 1ns / 1ps
module tb_fine_time_sweep;
  import otis_pkg::*;
  localparam real T = 25.0;
  localparam int  NPT = 250, SPACING = 40;
  logic clk = 0, rst_n = 0, trigger = 0;
  logic [31:0] hit_in = '0;
  logic sda_oe, dvalid, sop, ptr_zero, der_full, der_empty, dll_lock_lost;
  logic [7:0] dout;
  real vth [4];
  int checks = 0, failures = 0, skipped = 0;
  logic [63:0] seen = '0;

  otis_top dut (.clk, .rst_n, .trigger, .hit_in, .chip_id(4'h3), .scl(1'b1),
                .sda_in(1'b1), .sda_oe, .dout, .dvalid, .sop, .ptr_zero,
                .der_full, .der_empty, .dll_lock_lost, .vth);
  always #(T / 2) clk = ~clk;

  initial begin
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int edge_cnt = 0;
  always @(posedge clk) if (rst_n) edge_cnt <= edge_cnt + 1;

  function automatic int delay_ps(input int p, input int c);
    return ((p + 8 * c) % NPT) * 100 + 30;
  endfunction

  // expected byte, or -1 if the point is too close to a phase
  function automatic int expect_byte(input int dps);
    for (int i = 0; i <= 64; i++) begin
      int tp;
      tp = int'(390.625 * i);
      if (dps > tp - 5 && dps < tp + 5) return -1;
      if (tp >= dps) return (i == 64) ? 8'b0100_0000 : i;
    end
    return -1;
  endfunction

  int expq [$];   // point numbers of sent triggers

  // readout monitor
  logic [8*NBYTES-1:0] cur;
  int nb = -1, nseq = 0;
  always @(posedge clk) if (rst_n && dvalid) begin
    if (sop) nb = 0;
    cur[8*nb +: 8] = dout;
    nb++;
    if (nb == NBYTES) begin
      int p;
      nb = -1;
      nseq++;
      p = expq.pop_front();
      for (int c = 0; c < 32; c++) begin
        int e;
        e = expect_byte(delay_ps(p, c));
        if (e < 0) skipped++;
        else begin
          logic [7:0] b;
          b = cur[8*(NHDR + c) +: 8];
          checks++;
          if (b != 8'(e)) begin
            failures++;
            $display("delay %0d ps: code %b expected %b", delay_ps(p, c), b, 8'(e));
          end
          if (b[7] == 1'b0) seen[b[5:0]] = 1'b1;
        end
      end
    end
  end

  initial begin
    int base;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (50) @(negedge clk);
    base = edge_cnt + 1;
    while (edge_cnt < base + NPT * SPACING + 200) begin
      int e, k;
      e = edge_cnt;                        // index of the next rising edge
      k = e - base;
      if (k >= 0 && k % SPACING == 0 && k / SPACING < NPT)
        for (int c = 0; c < 32; c++) begin
          automatic int cc = c;
          automatic real d = delay_ps(k / SPACING, c) / 1000.0;
          fork
            begin
              #(T / 2 + d);
              hit_in[cc] = 1'b1;
              #3.0;
              hit_in[cc] = 1'b0;
            end
          join_none
        end
      k = e - base - 163;
      trigger = (k >= 0 && k % SPACING == 0 && k / SPACING < NPT);
      if (trigger) expq.push_back(k / SPACING);
      @(negedge clk);
    end
    trigger = 0;
    repeat (100) @(negedge clk);
    checks++;
    if (nseq != NPT || expq.size() != 0) begin
      failures++;
      $display("%0d sequences for %0d triggers", nseq, NPT);
    end
    checks++;
    if (seen != '1) begin
      failures++;
      $display("codes seen: %h", seen);
    end
    $display("sweep: %0d points checked, %0d skipped at phase boundaries", checks - 2, skipped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
