// tb_addr_counter: checks the pipeline address counter counts 0..163 and
// wraps, and that the zero crossing flag is high exactly at address 0
// (once every 164 cycles).
`timescale 1ns / 1ps
module tb_addr_counter;
  logic clk = 0, rst_n = 0;
  logic [7:0] wptr;
  logic zero_x;
  int checks = 0, failures = 0, zeros = 0;
  addr_counter dut (.clk, .rst_n, .wptr, .zero_x);
  always #12.5 clk = ~clk;
  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int exp;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    exp = 0;
    for (int i = 0; i < 3 * 164; i++) begin
      checks++;
      if (wptr != 8'(exp) || zero_x != (exp == 0)) begin
        failures++;
        $display("wptr %0d zero %0b expected %0d", wptr, zero_x, exp);
      end
      if (zero_x) zeros++;
      @(posedge clk); #1;
      exp = (exp + 1) % 164;
    end
    checks++; if (zeros != 3) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
