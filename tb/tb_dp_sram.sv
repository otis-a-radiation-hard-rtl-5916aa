// tb_dp_sram: random writes and reads of the 164 x 240 memory against a
// model array; checks the one-cycle read latency and read-old-data on a
// same-address write.
`timescale 1ns / 1ps
module tb_dp_sram;
  localparam int D = 164, W = 240;
  logic clk = 0, we;
  logic [7:0] waddr, raddr;
  logic [W-1:0] wdata, rdata;
  logic [W-1:0] model [D];
  int checks = 0, failures = 0;
  dp_sram dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);
  always #12.5 clk = ~clk;
  function automatic logic [W-1:0] rnd();
    logic [W-1:0] v;
    for (int k = 0; k < W / 30 + 1; k++) v = {v[W-31:0], 30'($urandom)};
    return v;
  endfunction
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic [W-1:0] exp;
    we = 0; waddr = 0; raddr = 0; wdata = 0;
    // fill
    for (int a = 0; a < D; a++) begin
      @(negedge clk);
      we = 1; waddr = 8'(a); wdata = rnd(); model[a] = wdata;
    end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      we    = 1'($urandom);
      waddr = 8'($urandom_range(D - 1));
      raddr = ($urandom_range(3) == 0) ? waddr : 8'($urandom_range(D - 1));
      wdata = rnd();
      exp   = model[raddr];
      @(posedge clk);
      if (we) model[waddr] = wdata;
      #1;
      checks++;
      if (rdata != exp) begin
        failures++;
        $display("read %0d mismatch", raddr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
