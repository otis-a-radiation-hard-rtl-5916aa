// tb_dll: checks the DLL model. After reset the lock flag must rise only
// after 40 clock cycles (1 us); once locked, tap i must rise i/64 of the
// 25 ns period (390.625 ps steps) after the clock edge.
`timescale 1ns / 1ps
module tb_dll;
  logic clk = 0, rst_n = 0;
  logic [63:0] tap;
  logic locked, lock_lost;
  realtime t_rise [64];
  int checks = 0, failures = 0;
  dll dut (.clk, .rst_n, .tap, .locked, .lock_lost);
  always #12.5 clk = ~clk;
  for (genvar i = 0; i < 64; i++) begin : g_t
    always @(posedge tap[i]) t_rise[i] = $realtime;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int n;
    repeat (4) @(posedge clk);
    #1 rst_n = 1;
    n = 0;
    while (!locked && n < 200) begin
      @(posedge clk); #1;
      n++;
    end
    checks++;
    if (n < 39 || n > 41 || lock_lost) begin
      failures++;
      $display("locked after %0d cycles", n);
    end
    repeat (5) @(posedge clk);
    #24.9;
    for (int i = 0; i < 64; i++) begin
      realtime d;
      d = t_rise[i] - t_rise[0];
      checks++;
      if (d < i * 25.0 / 64 - 0.002 || d > i * 25.0 / 64 + 0.002) begin
        failures++;
        $display("tap %0d delay %f", i, d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
