// trigger_ctrl: trigger and memory management between the pipeline and the
// derandomizing buffer. The pipeline is written every clock cycle at `wptr`.
// A trigger names the data set written `latency` cycles before it; because
// drift times reach 50 ns, that data set and the NSEARCH-1 following ones are
// copied to the derandomizer. The copy reads one pipeline row per cycle:
// `pipe_raddr` is driven in the cycle after the trigger and the two after
// it; each row arrives one cycle later and is written into the derandomizer
// with `der_we` (`der_we_last` on the third row). Triggers are queued in a
// two-entry queue (the one being copied and one waiting). A trigger is lost,
// with a `trig_lost` pulse, when the queue is full or the derandomizer has no
// free event. The queue, the loss rule and the clamp of the latency to
// DEPTH-4, which keeps queued rows from being overwritten before they are
// copied, are this design's choices.
`timescale 1ns / 1ps
module trigger_ctrl #(
  parameter int unsigned DEPTH   = 164,
  parameter int unsigned NSEARCH = 3,
  localparam int unsigned AW     = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          trigger,
  input  logic [AW-1:0] wptr,
  input  logic [7:0]    latency,
  input  logic          der_full,
  output logic [AW-1:0] pipe_raddr,
  output logic          der_alloc,
  output logic          der_we,
  output logic          der_we_last,
  output logic          trig_lost,
  output logic          busy
);
  localparam int unsigned MAXLAT = DEPTH - 4;
  localparam int unsigned SW     = $clog2(NSEARCH);

  logic [AW-1:0] q_base [2];
  logic [1:0]    q_cnt;
  logic [SW-1:0] idx;
  logic [AW:0]   lat, base_w;
  logic [AW-1:0] base;
  logic          accept, pop, rd_v, rd_last;

  assign lat    = (32'(latency) > MAXLAT) ? (AW+1)'(MAXLAT) : (AW+1)'(latency);
  assign base_w = ({1'b0, wptr} >= lat) ? {1'b0, wptr} - lat
                                        : {1'b0, wptr} + (AW+1)'(DEPTH) - lat;
  assign base   = base_w[AW-1:0];

  assign accept    = trigger && (q_cnt < 2'd2) && !der_full;
  assign trig_lost = trigger && !accept;
  assign der_alloc = accept;
  assign busy      = (q_cnt != 2'd0);
  assign pop       = busy && (idx == SW'(NSEARCH - 1));

  // row being read in this cycle
  always_comb begin
    logic [AW:0] a;
    a = {1'b0, q_base[0]} + (AW+1)'(idx);
    pipe_raddr = (a >= (AW+1)'(DEPTH)) ? AW'(a - (AW+1)'(DEPTH)) : a[AW-1:0];
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      q_base[0] <= '0;
      q_base[1] <= '0;
      q_cnt     <= '0;
      idx       <= '0;
      rd_v      <= 1'b0;
      rd_last   <= 1'b0;
    end else begin
      rd_v    <= busy;
      rd_last <= pop;
      if (busy) idx <= pop ? '0 : idx + 1'b1;
      // queue update
      case ({accept, pop})
        2'b10: begin
          q_base[q_cnt[0]] <= base;
          q_cnt            <= q_cnt + 1'b1;
        end
        2'b01: begin
          q_base[0] <= q_base[1];
          q_cnt     <= q_cnt - 1'b1;
        end
        2'b11: begin
          if (q_cnt == 2'd1) q_base[0] <= base;
          else begin
            q_base[0] <= q_base[1];
            q_base[1] <= base;
          end
        end
        default: ;
      endcase
    end

  assign der_we      = rd_v;
  assign der_we_last = rd_last;
endmodule
