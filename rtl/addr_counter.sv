// addr_counter: pipeline address counter (AC). The pipeline is a ring of
// DEPTH data sets; every clock cycle a new data set is written at `wptr`,
// which then advances modulo DEPTH. `zero_x` is high for the cycle in which
// the pointer wraps from DEPTH-1 to 0 (the "zero crossing of the memory
// pointer" debug signal). Reset to address 0 is this design's choice.
`timescale 1ns / 1ps
module addr_counter #(
  parameter int unsigned DEPTH = 164,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic [AW-1:0] wptr,
  output logic          zero_x
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) wptr <= '0;
    else        wptr <= (wptr == AW'(DEPTH - 1)) ? '0 : wptr + 1'b1;

  assign zero_x = (wptr == '0);
endmodule
