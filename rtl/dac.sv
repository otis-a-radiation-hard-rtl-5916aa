// dac: behavioural model of one ASD threshold DAC (the real part is an
// analog digital-to-analog converter, not synthesizable logic).
// The output voltage is linear in the code: vout = VREF * code / 2**BITS.
// Resolution and full scale are this design's choices; the chip is only
// known to carry several DACs that set the discriminator thresholds. The
// output follows the code after a settling delay of TSETTLE ns.
`timescale 1ns / 1ps
module dac #(
  parameter int unsigned BITS    = 8,
  parameter real         VREF    = 2.5,
  parameter real         TSETTLE = 100.0
) (
  input  logic [BITS-1:0] code,
  output real             vout
);
  initial vout = 0.0;
  always @(code) vout <= #(TSETTLE) VREF * real'(code) / real'(2.0 ** BITS);
endmodule
