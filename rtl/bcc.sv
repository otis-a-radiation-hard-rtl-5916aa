// bcc: bunch crossing counter. Counts the 40 MHz LHC clock cycles; its 8-bit
// value is stored with every data set in the pipeline and sent as the bunch
// crossing number in the event header. It is cleared by reset; wrapping
// modulo 2**W and the clear-on-reset are this design's choices.
`timescale 1ns / 1ps
module bcc #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic [W-1:0] bcn
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) bcn <= '0;
    else        bcn <= bcn + 1'b1;
endmodule
