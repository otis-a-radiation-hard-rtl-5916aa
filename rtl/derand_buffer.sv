// derand_buffer: derandomizing buffer. A DEPTH x W dual ported memory used as
// a ring of NEVT events of NSEARCH data sets each (16 x 3 = 48 rows of 240
// bits), so that triggers arriving in bursts can wait for the 900 ns readout.
// Write side: `alloc` reserves space for one event when a trigger is
// accepted; rows are written in order with `we`, and `we_last` on the third
// row makes the event visible to the reader. Read side: `re` reads the row
// at the read pointer (data on `rdata` one cycle later) and advances the
// pointer; `re_last` on the third row frees the event. `full` is high when
// NEVT events are reserved, `empty` when no complete event is stored; both
// are also brought out as debug signals. Counting whole events and reserving
// at trigger time are this design's choices.
`timescale 1ns / 1ps
module derand_buffer #(
  parameter int unsigned NEVT    = 16,
  parameter int unsigned NSEARCH = 3,
  parameter int unsigned W       = 240,
  localparam int unsigned DEPTH  = NEVT * NSEARCH,
  localparam int unsigned AW     = $clog2(DEPTH),
  localparam int unsigned CW     = $clog2(NEVT + 1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         alloc,
  input  logic         we,
  input  logic         we_last,
  input  logic [W-1:0] wdata,
  input  logic         re,
  input  logic         re_last,
  output logic [W-1:0] rdata,
  output logic         full,
  output logic         empty
);
  logic [AW-1:0] wptr, rptr;
  logic [CW-1:0] used;    // events reserved (being written or stored)
  logic [CW-1:0] avail;   // complete events stored

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] a);
    return (a == AW'(DEPTH - 1)) ? '0 : a + 1'b1;
  endfunction

  dp_sram #(.DEPTH(DEPTH), .W(W)) u_mem (
    .clk, .we, .waddr(wptr), .wdata, .raddr(rptr), .rdata
  );

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      used  <= '0;
      avail <= '0;
    end else begin
      if (we) wptr <= inc(wptr);
      if (re) rptr <= inc(rptr);
      used  <= used  + CW'(alloc && !full)     - CW'(re && re_last);
      avail <= avail + CW'(we && we_last)      - CW'(re && re_last);
    end

  assign full  = (used == CW'(NEVT));
  assign empty = (avail == '0);

  // an event is freed only after it was complete
  a_no_underflow : assert property (@(posedge clk) disable iff (!rst_n)
                                    (re && re_last) |-> !empty);
endmodule
