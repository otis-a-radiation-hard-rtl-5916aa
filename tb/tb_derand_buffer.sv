// tb_derand_buffer: random allocation, row writes and row reads against a
// queue model. Checks read data order and content, the full flag (16
// reserved events) and the empty flag (no complete event), and that full
// and empty were each seen.
`timescale 1ns / 1ps
module tb_derand_buffer;
  localparam int W = 240;
  logic clk = 0, rst_n = 0;
  logic alloc, we, we_last, re, re_last, full, empty;
  logic [W-1:0] wdata, rdata;
  int checks = 0, failures = 0, n_full = 0, n_empty = 0;
  derand_buffer dut (.clk, .rst_n, .alloc, .we, .we_last, .wdata, .re,
                     .re_last, .rdata, .full, .empty);
  always #12.5 clk = ~clk;
  logic [W-1:0] rowq [$];
  int used = 0, complete = 0, unwritten_rows = 0, wrow = 0, rrow = 0;
  logic         rd_pend = 0;
  logic [W-1:0] rd_exp;
  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    alloc = 0; we = 0; we_last = 0; re = 0; re_last = 0; wdata = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      int pa, pr;
      @(negedge clk);
      // flags against model
      checks++;
      if (full != (used == 16) || empty != (complete == 0)) begin
        failures++;
        $display("flags full=%0b empty=%0b used=%0d complete=%0d", full, empty, used, complete);
      end
      if (full) n_full++;
      if (empty) n_empty++;
      if (rd_pend) begin
        checks++;
        if (rdata != rd_exp) begin
          failures++;
          $display("read data mismatch at cycle %0d", n);
        end
      end
      // phases: fill-biased then drain-biased
      pa = ((n / 500) % 2 == 0) ? 2 : 8;
      pr = ((n / 500) % 2 == 0) ? 8 : 2;
      alloc = ($urandom_range(pa - 1) == 0) && (used < 16);
      we    = unwritten_rows > 0 && $urandom_range(1) == 0;
      we_last = we && (wrow == 2);
      wdata = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      re    = (complete > 0) && ($urandom_range(pr - 1) == 0 || rrow != 0);
      re_last = re && (rrow == 2);
      rd_pend = re;
      if (re) begin
        rd_exp = rowq.pop_front();
        rrow = (rrow + 1) % 3;
      end
      if (we) begin
        rowq.push_back(wdata);
        wrow = (wrow + 1) % 3;
        unwritten_rows--;
      end
      @(posedge clk);
      if (alloc) begin
        used++;
        unwritten_rows += 3;
      end
      if (we_last) complete++;
      if (re_last) begin
        complete--;
        used--;
      end
    end
    checks++; if (n_full == 0 || n_empty == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
