// readout_if: readout buffer and 8-bit read-out interface.
// `load` copies a complete NBYTES-byte sequence into the readout buffer; the
// bytes then leave on `dout`, byte 0 first, one per clock cycle, with
// `dvalid` high and `sop` marking byte 0. A 36-byte sequence thus takes 36
// cycles, 900 ns at 40 MHz. `ready` is high when a new sequence may be
// loaded: when the interface is idle or sends its last byte, so that
// sequences can follow each other without a gap. The handshake is this
// design's choice.
`timescale 1ns / 1ps
module readout_if #(
  parameter int unsigned NBYTES = 36,
  localparam int unsigned CW    = $clog2(NBYTES)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  load,
  input  logic [8*NBYTES-1:0]   seq,
  output logic                  ready,
  output logic [7:0]            dout,
  output logic                  dvalid,
  output logic                  sop
);
  logic [8*NBYTES-1:0] buf_q;
  logic [CW-1:0]       cnt;

  assign ready  = !dvalid || (cnt == CW'(NBYTES - 1));
  assign dout   = buf_q[7:0];
  assign sop    = dvalid && (cnt == '0);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      buf_q  <= '0;
      cnt    <= '0;
      dvalid <= 1'b0;
    end else if (load && ready) begin
      buf_q  <= seq;
      cnt    <= '0;
      dvalid <= 1'b1;
    end else if (dvalid) begin
      buf_q  <= buf_q >> 8;
      cnt    <= cnt + 1'b1;
      if (cnt == CW'(NBYTES - 1)) dvalid <= 1'b0;
    end

  a_load_when_ready : assert property (@(posedge clk) disable iff (!rst_n) load |-> ready);
endmodule
