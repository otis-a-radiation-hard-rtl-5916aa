// tb_hit_register: the testbench makes its own 64 clock phases (phase i
// rises i/64 of the 25 ns period after the clock) and drives pulses whose
// edges fall in the middle of chosen bins. After the clock edge ending the
// period, pic[i] must be 1 exactly for the bins during which the pulse was
// high. With the channel mask bit cleared the picture must stay empty.
`timescale 1ns / 1ps
module tb_hit_register;
  localparam real T = 25.0;
  logic clk = 0, rst_n = 0, in = 0, en = 1;
  logic [63:0] tap, pic;
  int checks = 0, failures = 0;
  hit_register dut (.clk, .rst_n, .tap, .in, .en, .pic);
  always #(T / 2) clk = ~clk;
  assign tap[0] = clk;
  for (genvar i = 1; i < 64; i++) begin : g_tap
    logic t = 0;
    always @(posedge clk)
      fork
        begin
          #(T * i / 64) t = 1;
          #(T / 2) t = 0;
        end
      join_none
    assign tap[i] = t;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      int j, m;
      logic [63:0] exp;
      j  = $urandom_range(63);
      m  = $urandom_range(64, j + 1);
      en = (n % 10 != 9);
      @(negedge clk);
      if (j == 0) in = 1;          // already high at bin 0
      @(posedge clk);              // start of the measured period
      if (j != 0) begin
        #(T * (j - 0.5) / 64);
        in = 1;
      end
      #(T * (m - 0.5) / 64 - (j == 0 ? 0.0 : T * (j - 0.5) / 64));
      in = 0;
      exp = '0;
      for (int i = 0; i < 64; i++) if (i >= j && i < m && en) exp[i] = 1'b1;
      @(posedge clk); #1;
      checks++;
      if (pic != exp) begin
        failures++;
        $display("j=%0d m=%0d pic=%h exp=%h", j, m, pic, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
