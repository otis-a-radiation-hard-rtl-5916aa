// tb_config_regs: checks the reset values (latency 160, all channels
// enabled, DAC codes 0x80, play back off), writes and read-back of every
// register, the channel mask byte order, the play back data word and its
// one-cycle `pb_shift` pulse, and the read-only status register.
`timescale 1ns / 1ps
module tb_config_regs;
  import otis_pkg::*;
  logic clk = 0, rst_n = 0, we = 0, pb_mode, pb_shift;
  logic [7:0] addr = 0, wdata = 0, rdata, latency, status = 8'h3C;
  logic [31:0] chan_en;
  chan_t pb_data;
  logic [7:0] dac_code [4];
  int checks = 0, failures = 0;
  config_regs dut (.clk, .rst_n, .addr, .wdata, .we, .rdata, .status, .pb_mode,
                   .latency, .chan_en, .pb_data, .pb_shift, .dac_code);
  always #12.5 clk = ~clk;
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic wr(input logic [7:0] a, input logic [7:0] d);
    @(negedge clk); addr = a; wdata = d; we = 1;
    @(negedge clk); we = 0;
  endtask
  // read-back check through the combinational read port
  task automatic rchk(input logic [7:0] a, input logic [7:0] e, input string what);
    addr = a;
    #1 chk(rdata == e, what);
  endtask
  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(negedge clk);
    chk(latency == 160 && chan_en == '1 && !pb_mode && pb_shift == 0, "reset values");
    for (int d = 0; d < 4; d++) chk(dac_code[d] == 8'h80, "dac reset");
    wr(8'h00, 8'h01); chk(pb_mode, "control"); rchk(8'h00, 8'h01, "control rd");
    wr(8'h01, 8'd150); chk(latency == 150, "latency"); rchk(8'h01, 8'd150, "latency rd");
    wr(8'h02, 8'hFE); wr(8'h05, 8'h7F);
    chk(chan_en == 32'h7FFF_FFFE, "mask"); rchk(8'h02, 8'hFE, "mask rd 2"); rchk(8'h05, 8'h7F, "mask rd 5"); rchk(8'h03, 8'hFF, "mask rd 3");
    for (int d = 0; d < 4; d++) wr(8'(8 + d), 8'(17 * d + 1));
    for (int d = 0; d < 4; d++) begin
      chk(dac_code[d] == 8'(17 * d + 1), "dac");
      rchk(8'(8 + d), 8'(17 * d + 1), "dac rd");
    end
    // play back word: shift pulse lasts one cycle
    @(negedge clk); addr = 8'h06; wdata = 8'h95; we = 1;
    @(negedge clk); we = 0;
    chk(pb_shift && pb_data.hit && pb_data.t == 6'h15, "play back data");
    @(negedge clk);
    chk(!pb_shift, "play back pulse ends");
    rchk(8'h0C, 8'h3C, "status");
    rchk(8'h0D, 8'h00, "unmapped 0D"); rchk(8'h40, 8'h00, "unmapped 40");
    wr(8'h40, 8'hFF);
    chk(latency == 150 && chan_en == 32'h7FFF_FFFE && pb_mode, "unmapped write ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
