// dll: behavioural model of the OTIS delay locked loop (not synthesizable
// logic: the real block is an analog chain of voltage controlled delay
// elements, a phase detector and a charge pump).
//
// The real DLL passes the 40 MHz clock through 64 delay elements and a charge
// pump adjusts their delay until the delayed clock is in phase with the input
// clock; the 64 element outputs then split the 25 ns period into 390 ps bins.
// While reset is held the charge pump is precharged; after reset the control
// voltage settles in under 1 us. This model measures the clock period, drives
// tap[i] as the clock delayed by i/64 of that period, and raises `locked`
// LOCK_CYCLES clock cycles after reset is released (40 cycles = 1 us is this
// design's choice, taken from the settling time quoted for the chip). A
// change of the measured period by more than one bin drops `locked`;
// lock_lost = !locked is what the pipeline stores as DLLlockLost.
// Ports: clk, rst_n (active low), tap[63:0], locked, lock_lost.
`timescale 1ns / 1ps
module dll #(
  parameter int unsigned NTAP        = 64,
  parameter int unsigned LOCK_CYCLES = 40
) (
  input  logic            clk,
  input  logic            rst_n,
  output logic [NTAP-1:0] tap,
  output logic            locked,
  output logic            lock_lost
);
  realtime last_edge;
  realtime period;
  initial begin
    last_edge = 0.0;
    period    = 25.0;
  end
  int unsigned settle;

  // period measurement and lock indication
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      settle <= 0;
      locked <= 1'b0;
    end else begin
      realtime now, p;
      now = $realtime;
      p   = now - last_edge;
      if (last_edge > 0.0 && (p - period > period / NTAP || period - p > period / NTAP)) begin
        settle <= 0;          // frequency jump: the loop has to settle again
        locked <= 1'b0;
      end else if (settle >= LOCK_CYCLES - 1) begin
        locked <= 1'b1;
      end else begin
        settle <= settle + 1;
      end
      if (last_edge > 0.0) period <= p;
      last_edge <= now;
    end
  end

  assign lock_lost = ~locked;

  // delay chain: tap i is the clock delayed by i/NTAP of a period, with a
  // 50% duty cycle
  for (genvar i = 0; i < NTAP; i++) begin : g_tap
    if (i == 0) begin : g_first
      assign tap[0] = clk;
    end else begin : g_del
      logic t;
      initial t = 1'b0;
      always @(posedge clk)
        fork
          begin
            #(period * i / NTAP) t = 1'b1;
            #(period / 2)        t = 1'b0;
          end
        join_none
      assign tap[i] = t;
    end
  end
endmodule
