// dp_sram: dual ported memory array (one write port, one read port, common
// clock), as used for the pipeline (164 x 240 bit) and the derandomizing
// buffer (48 x 240 bit). A write happens at the rising edge when `we` is
// high; the read port is synchronous: `rdata` shows the word at `raddr` one
// cycle after the address is given. Reading the address that is written in
// the same cycle returns the old word. The synchronous read port is this
// design's choice; the chip uses full-custom dual ported SRAM cells.
`timescale 1ns / 1ps
module dp_sram #(
  parameter int unsigned DEPTH = 164,
  parameter int unsigned W     = 240,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
