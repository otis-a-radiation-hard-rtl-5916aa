// tb_i2c_slave: an I2C master (100 kHz-like timing, 1 us per bit) talks to
// the slave with device address {101, 0110}. Checks address acknowledge,
// register writes with auto-increment (register file modelled in the
// testbench), reads with a repeated start and auto-increment, NACK of a
// foreign address and that a foreign address causes no write.
`timescale 1ns / 1ps
module tb_i2c_slave;
  logic clk = 0, rst_n = 0;
  logic scl = 1, m_sda = 1, sda_oe, sda, reg_we;
  logic [7:0] reg_addr, reg_wdata, reg_rdata;
  logic [7:0] regs [256];
  int checks = 0, failures = 0, nwrites = 0;
  localparam real Q = 250.0;   // quarter bit time
  assign sda = m_sda & !sda_oe;
  i2c_slave dut (.clk, .rst_n, .addr_lo(4'b0110), .scl, .sda_in(sda), .sda_oe,
                 .reg_addr, .reg_wdata, .reg_we, .reg_rdata);
  always #12.5 clk = ~clk;
  assign reg_rdata = regs[reg_addr];
  always @(posedge clk) if (reg_we) begin
    regs[reg_addr] <= reg_wdata;
    nwrites++;
  end
  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic start_c();
    m_sda = 1; #Q; scl = 1; #Q; m_sda = 0; #Q; scl = 0; #Q;
  endtask
  task automatic stop_c();
    m_sda = 0; #Q; scl = 1; #Q; m_sda = 1; #(2 * Q);
  endtask
  task automatic wbyte(input logic [7:0] b, output logic ack);
    for (int i = 7; i >= 0; i--) begin
      m_sda = b[i]; #Q; scl = 1; #(2 * Q); scl = 0; #Q;
    end
    m_sda = 1; #Q; scl = 1; #Q; ack = !sda; #Q; scl = 0; #Q;
  endtask
  task automatic rbyte(input logic nack, output logic [7:0] b);
    m_sda = 1;
    for (int i = 7; i >= 0; i--) begin
      #Q; scl = 1; #Q; b[i] = sda; #Q; scl = 0; #Q;
    end
    m_sda = nack; #Q; scl = 1; #(2 * Q); scl = 0; #Q; m_sda = 1;
  endtask
  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask
  initial begin
    logic ack;
    logic [7:0] b;
    for (int i = 0; i < 256; i++) regs[i] = 8'(i * 7 + 3);
    #100 rst_n = 1;
    #1000;
    // write 3 bytes from register 0x10
    start_c();
    wbyte({3'b101, 4'b0110, 1'b0}, ack); chk(ack, "address ack (write)");
    wbyte(8'h10, ack); chk(ack, "pointer ack");
    wbyte(8'hA1, ack); chk(ack, "data ack 0");
    wbyte(8'hB2, ack); chk(ack, "data ack 1");
    wbyte(8'hC3, ack); chk(ack, "data ack 2");
    stop_c();
    chk(regs[16] == 8'hA1 && regs[17] == 8'hB2 && regs[18] == 8'hC3 && nwrites == 3, "written values");
    chk(regs[19] == 8'(19 * 7 + 3), "neighbour untouched");
    // read back with repeated start
    start_c();
    wbyte({3'b101, 4'b0110, 1'b0}, ack); chk(ack, "address ack 2");
    wbyte(8'h0F, ack); chk(ack, "pointer ack 2");
    start_c();
    wbyte({3'b101, 4'b0110, 1'b1}, ack); chk(ack, "address ack (read)");
    rbyte(0, b); chk(b == 8'(15 * 7 + 3), "read 0x0F");
    rbyte(0, b); chk(b == 8'hA1, "read 0x10");
    rbyte(0, b); chk(b == 8'hB2, "read 0x11");
    rbyte(1, b); chk(b == 8'hC3, "read 0x12");
    stop_c();
    // foreign address
    start_c();
    wbyte({3'b101, 4'b0111, 1'b0}, ack); chk(!ack, "foreign address nack");
    wbyte(8'h20, ack); chk(!ack, "no ack after foreign address");
    wbyte(8'h55, ack);
    stop_c();
    chk(nwrites == 3 && regs[32] == 8'(32 * 7 + 3), "no write for foreign address");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
