// hit_register: the hit register (HR) of one OTIS channel.
// NTAP flip-flops share the channel's discriminator signal as data; flip-flop
// i is clocked by DLL phase tap[i], so within one clock period the register
// takes a picture of the detector signal in NTAP time bins. At every rising
// edge of clk the picture of the period that just ended is copied into `pic`
// (clk domain); pic[i] is the signal level at time i/NTAP of that period. The
// channel mask bit `en` gates the signal in front of the register, as in the
// chip's block diagram where the channel mask register sits between the
// input buffers and the hit registers. The copy into the clk domain and the
// asynchronous reset are this design's choices.
// Timing: a hit in period k appears in `pic` after the clk edge closing it.
`timescale 1ns / 1ps
module hit_register #(
  parameter int unsigned NTAP = 64
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [NTAP-1:0] tap,
  input  logic            in,
  input  logic            en,
  output logic [NTAP-1:0] pic
);
  logic            d;
  logic [NTAP-1:0] hr;

  assign d = in & en;

  for (genvar i = 0; i < NTAP; i++) begin : g_ff
    logic q;
    always_ff @(posedge tap[i] or negedge rst_n)
      if (!rst_n) q <= 1'b0;
      else        q <= d;
    assign hr[i] = q;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) pic <= '0;
    else        pic <= hr;
endmodule
