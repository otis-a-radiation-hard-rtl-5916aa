// tb_bcc: checks that the bunch crossing counter starts at 0 after reset,
// advances by one per clock and wraps from 255 to 0.
`timescale 1ns / 1ps
module tb_bcc;
  logic clk = 0, rst_n = 0;
  logic [7:0] bcn;
  int checks = 0, failures = 0;
  bcc dut (.clk, .rst_n, .bcn);
  always #12.5 clk = ~clk;
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int exp;
    repeat (2) @(posedge clk);
    checks++; if (bcn != 0) failures++;
    #1 rst_n = 1;
    exp = 0;
    for (int i = 0; i < 600; i++) begin
      @(posedge clk); #1;
      exp = (exp + 1) % 256;
      checks++;
      if (bcn != 8'(exp)) begin
        failures++;
        $display("bcn %0d expected %0d", bcn, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
