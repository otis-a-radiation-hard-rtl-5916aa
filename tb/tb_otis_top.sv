// tb_otis_top: end-to-end test of the OTIS chip at its default sizes
// (32 channels, 64 DLL phases, 164-deep pipeline, 16-event derandomizer).
// The testbench is an I2C master, a hit source and a readout monitor:
//  * waits for DLL lock, configures over I2C (channel 7 masked, DAC 0 code)
//    and reads the latency register back;
//  * drives detector pulses whose leading edges lie in the middle of chosen
//    fine-time bins and records them per clock period;
//  * sends triggers: isolated, bursts of three consecutive ones (the third
//    is lost) and a dense train that fills the derandomizer;
//  * switches to play back mode with a pattern written over I2C;
//  * decodes the 8-bit output stream and compares every 36-byte sequence
//    with one computed from its own record: a trigger at clock edge t covers
//    the periods starting at edges t-163, t-162 and t-161 (latency 160 plus
//    the three cycles from hit to pipeline write), the first hit of each
//    channel wins, and the bunch crossing number is (t-160) mod 256.
// Each mechanism (hits in the 1st/2nd/3rd bunch crossing, no hit, several
// hits in one window, channel mask, trigger loss, derandomizer full, pointer
// zero crossing, play back, back-to-back sequences, I2C read) is counted and
// must happen at least once.
`timescale 1ns / 1ps
module tb_otis_top;
  import otis_pkg::*;
  localparam real T = 25.0;
  localparam real Q = 50.0;        // I2C quarter bit
  logic clk = 0, rst_n = 0, trigger = 0;
  logic [31:0] hit_in = '0;
  logic scl = 1, m_sda = 1, sda, sda_oe;
  logic [7:0] dout;
  logic dvalid, sop, ptr_zero, der_full, der_empty, dll_lock_lost;
  real vth [4];
  int checks = 0, failures = 0;

  otis_top dut (.clk, .rst_n, .trigger, .hit_in, .chip_id(4'h9), .scl,
                .sda_in(sda), .sda_oe, .dout, .dvalid, .sop, .ptr_zero,
                .der_full, .der_empty, .dll_lock_lost, .vth);

  assign sda = m_sda & !sda_oe;
  always #(T / 2) clk = ~clk;

  // mechanism counters
  int n_bx [3] = '{0, 0, 0};
  int n_nohit = 0, n_multi = 0, n_masked = 0, n_lost = 0, n_full = 0;
  int n_zero = 0, n_pb = 0, n_gapless = 0, n_i2c_rd = 0, n_seq = 0;

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- clock edge count ----------------
  int edge_cnt = 0;
  always @(posedge clk) if (rst_n) edge_cnt <= edge_cnt + 1;
  always @(posedge clk) if (rst_n) begin
    if (ptr_zero) n_zero++;
    if (der_full) n_full++;
  end

  // ---------------- I2C master ----------------
  task automatic i_start();
    m_sda = 1; #Q; scl = 1; #Q; m_sda = 0; #Q; scl = 0; #Q;
  endtask
  task automatic i_stop();
    m_sda = 0; #Q; scl = 1; #Q; m_sda = 1; #(2 * Q);
  endtask
  task automatic i_wbyte(input logic [7:0] b);
    logic ack;
    for (int i = 7; i >= 0; i--) begin
      m_sda = b[i]; #Q; scl = 1; #(2 * Q); scl = 0; #Q;
    end
    m_sda = 1; #Q; scl = 1; #Q; ack = !sda; #Q; scl = 0; #Q;
    chk(ack, "I2C acknowledge");
  endtask
  task automatic i_rbyte(output logic [7:0] b);
    m_sda = 1;
    for (int i = 7; i >= 0; i--) begin
      #Q; scl = 1; #Q; b[i] = sda; #Q; scl = 0; #Q;
    end
    m_sda = 1; #Q; scl = 1; #(2 * Q); scl = 0; #Q;   // NACK
  endtask
  localparam logic [6:0] DEV = {3'b101, 4'h9};
  task automatic reg_wr(input logic [7:0] a, input logic [7:0] d);
    i_start(); i_wbyte({DEV, 1'b0}); i_wbyte(a); i_wbyte(d); i_stop();
  endtask
  task automatic reg_rd(input logic [7:0] a, output logic [7:0] d);
    i_start(); i_wbyte({DEV, 1'b0}); i_wbyte(a);
    i_start(); i_wbyte({DEV, 1'b1}); i_rbyte(d); i_stop();
  endtask

  // ---------------- hits ----------------
  int  hb [int];            // key period*32+channel -> fine time bin
  logic [31:0] en_mask = '1;
  logic        pb_active = 0;
  chan_t       pb_pat [32];

  // schedule a pulse on channel c with its edge in bin j of the period that
  // starts at the next rising clock edge (called at a falling edge)
  task automatic pulse(input int c, input int j, input int period);
    fork
      begin
        #(T / 2 + T * (j - 0.5) / 64);
        hit_in[c] = 1'b1;
        #(T * 8 / 64);
        hit_in[c] = 1'b0;
      end
    join_none
    if (en_mask[c]) begin
      if (!hb.exists(period * 32 + c)) hb[period * 32 + c] = j;
    end else n_masked++;
  endtask

  // ---------------- expected sequences ----------------
  logic [8*NBYTES-1:0] expq [$];

  function automatic logic [8*NBYTES-1:0] expect_seq(input int t);
    logic [8*NBYTES-1:0] s;
    s = '0;
    s[7:0]   = 8'h09;
    s[23:16] = pb_active ? 8'h02 : 8'h00;
    s[31:24] = 8'(t - 160);
    for (int c = 0; c < 32; c++) begin
      logic [7:0] b;
      int nh;
      b = NO_HIT;
      nh = 0;
      if (pb_active) begin
        if (pb_pat[c].hit) b = {2'b00, pb_pat[c].t};
      end else begin
        for (int r = 2; r >= 0; r--)
          if (hb.exists((t - 163 + r) * 32 + c)) begin
            b = {2'(r), 6'(hb[(t - 163 + r) * 32 + c])};
            nh++;
          end
        if (nh > 1) n_multi++;
      end
      if (b == NO_HIT) n_nohit++;
      else n_bx[b[7:6]]++;
      s[8*(NHDR + c) +: 8] = b;
    end
    return s;
  endfunction

  // send a trigger at the next rising edge (called at a falling edge) and
  // record the expected sequence if the chip accepts it
  task automatic trig();
    int t;
    t = edge_cnt;
    trigger = 1'b1;
    #(T / 2 - 0.5);
    if (dut.u_trig.der_alloc) expq.push_back(expect_seq(t));
    else begin
      n_lost++;
      chk(der_full || dut.u_trig.q_cnt == 2'd2, "trigger lost only when queue or derandomizer full");
    end
    @(negedge clk);
    trigger = 1'b0;
  endtask

  // ---------------- output monitor ----------------
  logic [8*NBYTES-1:0] cur;
  int nb = -1;
  logic prev_dv = 0;
  always @(posedge clk) if (rst_n) begin
    if (dvalid) begin
      if (sop) begin
        chk(nb == -1, "sequence complete before next start");
        if (prev_dv) n_gapless++;
        nb = 0;
      end
      if (nb >= 0) begin
        cur[8*nb +: 8] = dout;
        nb++;
        if (nb == NBYTES) begin
          logic [8*NBYTES-1:0] e;
          n_seq++;
          chk(expq.size() != 0, "expected sequence available");
          e = expq.pop_front();
          // byte 1 holds run-time flags; only the DLL flag is fixed here
          checks++;
          if (cur[7:0] != e[7:0] || cur[10] != 1'b0 || cur[8*NBYTES-1:16] != e[8*NBYTES-1:16]) begin
            failures++;
            $display("sequence %0d mismatch\n got %h\n exp %h", n_seq, cur, e);
          end
          nb = -1;
        end
      end
    end else begin
      chk(nb == -1, "dvalid stays high for 36 cycles");
    end
    prev_dv = dvalid;
  end

  // ---------------- stimulus ----------------
  initial begin
    logic [7:0] d;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // DLL lock within 1 us
    repeat (45) @(negedge clk);
    chk(!dll_lock_lost, "DLL locked 1 us after reset");
    // configuration
    reg_rd(8'h01, d); n_i2c_rd++;
    chk(d == 8'd160, "latency register reads 160");
    reg_wr(8'h02, 8'h7F); en_mask[7] = 1'b0;        // mask channel 7
    reg_wr(8'h08, 8'd64);
    #200;
    chk(vth[0] > 0.624 && vth[0] < 0.626, "DAC 0 at 64/256 of 2.5 V");
    reg_rd(8'h02, d); n_i2c_rd++;
    chk(d == 8'h7F, "mask register reads back");
    // random hits and triggers
    @(negedge clk);
    for (int n = 0; n < 3000; n++) begin
      int p;
      p = edge_cnt;
      for (int c = 0; c < 32; c++)
        if ($urandom_range(99) < 6) pulse(c, $urandom_range(1, 55), p);
      if (p > 400 && n < 2800) begin
        if (n % 500 == 100) begin                    // burst of three
          trig(); trig(); trig();
          continue;
        end
        if (n >= 1500 && n < 1600 && n % 4 == 0) begin  // dense train
          trig();
          continue;
        end
        if ($urandom_range(59) == 0) begin
          trig();
          continue;
        end
      end
      @(negedge clk);
    end
    repeat (1000) @(negedge clk);
    chk(expq.size() == 0, "all accepted triggers read out");
    // play back mode: 32 words shift through the chain, the first ends at
    // channel 31
    for (int k = 0; k < 32; k++) begin
      chan_t w;
      w = '{hit: ($urandom_range(3) != 0), t: 6'($urandom)};
      pb_pat[31 - k] = w;
      reg_wr(8'h06, {w.hit, 1'b0, w.t});
    end
    reg_wr(8'h00, 8'h01);
    repeat (200) @(negedge clk);
    pb_active = 1;
    for (int k = 0; k < 3; k++) begin
      trig();
      n_pb++;
      repeat (50) @(negedge clk);
    end
    repeat (200) @(negedge clk);
    chk(expq.size() == 0, "play back sequences read out");
    // every mechanism must have happened
    chk(n_bx[0] > 0 && n_bx[1] > 0 && n_bx[2] > 0, "hits in 1st, 2nd and 3rd bunch crossing");
    chk(n_nohit > 0, "channels without hit");
    chk(n_multi > 0, "several hits in one search window");
    chk(n_masked > 0, "masked channel");
    chk(n_lost > 0, "trigger lost");
    chk(n_full > 0, "derandomizer full");
    chk(n_zero > 0, "pipeline pointer zero crossing");
    chk(n_pb > 0, "play back");
    chk(n_gapless > 0, "back-to-back readout sequences");
    chk(n_i2c_rd > 0, "I2C read");
    chk(n_seq > 0, "sequences");
    $display("hits bx1/2/3 %0d/%0d/%0d nohit %0d multi %0d masked %0d lost %0d full %0d zero %0d pb %0d gapless %0d seq %0d",
             n_bx[0], n_bx[1], n_bx[2], n_nohit, n_multi, n_masked, n_lost, n_full, n_zero, n_pb, n_gapless, n_seq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
