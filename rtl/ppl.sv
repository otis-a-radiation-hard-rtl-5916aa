// ppl: per-channel decoding and play back stage (PPL in the block diagram).
// Normal mode: the 64-bin picture from the hit register is searched for the
// first rising edge of the detector signal. Bin i holds an edge when pic[i]
// is 1 and the bin before it (pic[i-1], or bin 63 of the previous picture for
// i = 0) is 0; the lowest such i is the 6-bit drift time and `q.hit` is set.
// A signal that is already high at the start of a period with no edge is no
// new hit. Play back mode: the decoder is bypassed and the value held in this
// stage's play back register is sent instead, so arbitrary drift times can be
// put into the pipeline. The play back registers of all channels form a
// chain (PBdata enters channel 0); on `pb_shift` each stage takes the value
// of the stage before it. Edge rule, chain order and encoding of the play
// back word as {hit, time} are this design's choices.
// Timing: `q` is registered, one clk cycle after `pic`.
`timescale 1ns / 1ps
module ppl #(
  parameter int unsigned NTAP = 64
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [NTAP-1:0] pic,
  input  logic            pb_mode,
  input  logic            pb_shift,
  input  otis_pkg::chan_t           pb_in,
  output otis_pkg::chan_t           pb_out,
  output otis_pkg::chan_t           q
);
  logic  last;     // bin NTAP-1 of the previous picture
  otis_pkg::chan_t dec;

  always_comb begin
    dec = '0;
    for (int i = NTAP - 1; i >= 0; i--) begin
      if (pic[i] && !(i == 0 ? last : pic[i-1])) begin
        dec.hit = 1'b1;
        dec.t   = otis_pkg::DT_W'(i);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      last   <= 1'b0;
      q      <= '0;
      pb_out <= '0;
    end else begin
      last <= pic[NTAP-1];
      q    <= pb_mode ? pb_out : dec;
      if (pb_shift) pb_out <= pb_in;
    end
endmodule
