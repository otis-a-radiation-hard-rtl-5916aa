// readout_ctrl: builds one readout sequence per trigger.
// When the derandomizer holds a complete event and the staging register is
// free, the three data sets of the event (the triggered bunch crossing and
// the two after it) are read, one per cycle. For each channel only the first
// hit found in the three data sets is kept, which makes the chip a single-hit
// TDC. The 8-bit extended drift time is {position, drift time}: 00, 01 or 10
// for a hit in the 1st, 2nd or 3rd bunch crossing, and 1100_0000 when no data
// set holds a hit. The sequence is 4 header bytes followed by the 32 drift
// time bytes of channels 0..31; byte k occupies bits [8k+7:8k] of `seq`, so
// bits 0..31 are the header as in the data output table.
// Header (field order and the status flags are this design's choice; the
// header is known to carry chip ID, status and bunch crossing number):
//   byte 0  chip ID
//   byte 1  chip status: bit 0 a trigger was lost since the previous
//           sequence, bit 1 derandomizer full, bit 2 DLL not locked now
//   byte 2  OR of the status bytes of the three data sets
//           (bit 0 DLL lock lost, bit 1 play back data)
//   byte 3  bunch crossing number of the triggered data set
// Timing: reads in cycles 1-3 after start, data captured in cycles 2-4,
// `load` with the sequence once `out_ready` is high (earliest cycle 5).
`timescale 1ns / 1ps
module readout_ctrl
  import otis_pkg::*;
#(
  parameter int unsigned N_CH = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 der_empty,
  input  row_t                 der_rdata,
  output logic                 der_re,
  output logic                 der_re_last,
  input  logic [7:0]           chip_id,
  input  logic                 trig_lost,
  input  logic                 der_full,
  input  logic                 dll_lock_lost,
  input  logic                 out_ready,
  output logic                 load,
  output logic [8*(NHDR+N_CH)-1:0] seq
);
  typedef enum logic [1:0] {IDLE, READ, WAIT, HOLD} state_t;
  state_t     state;
  logic [1:0] rcnt;           // rows requested
  logic [1:0] dcnt;           // rows captured
  logic       cap_v;          // row arrives this cycle
  row_t       rows [NSEARCH];
  logic       lost_sticky;

  assign der_re      = (state == READ);
  assign der_re_last = der_re && (rcnt == 2'(NSEARCH - 1));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state       <= IDLE;
      rcnt        <= '0;
      dcnt        <= '0;
      cap_v       <= 1'b0;
      lost_sticky <= 1'b0;
      for (int i = 0; i < NSEARCH; i++) rows[i] <= '0;
    end else begin
      cap_v <= der_re;
      if (cap_v) begin
        rows[dcnt] <= der_rdata;
        dcnt       <= (dcnt == 2'(NSEARCH - 1)) ? '0 : dcnt + 1'b1;
      end
      case (state)
        IDLE: if (!der_empty) begin
          state <= READ;
          rcnt  <= '0;
        end
        READ: begin
          rcnt <= rcnt + 1'b1;
          if (der_re_last) state <= WAIT;
        end
        WAIT: if (cap_v && dcnt == 2'(NSEARCH - 1)) state <= HOLD;
        HOLD: if (out_ready) state <= IDLE;
        default: state <= IDLE;
      endcase
      // a loss is reported in the next sequence handed over
      if (load) lost_sticky <= trig_lost;
      else if (trig_lost) lost_sticky <= 1'b1;
    end

  assign load = (state == HOLD) && out_ready;

  // sequence assembly from the three captured data sets
  always_comb begin
    logic [7:0] st;
    st = '0;
    for (int r = 0; r < NSEARCH; r++) st |= rows[r][STAT_LSB +: 8];
    seq = '0;
    seq[7:0]   = chip_id;
    seq[15:8]  = {5'b0, dll_lock_lost, der_full, lost_sticky};
    seq[23:16] = st;
    seq[31:24] = rows[0][BCN_LSB +: BCN_W];
    for (int c = 0; c < N_CH; c++) begin
      logic [7:0] b;
      b = NO_HIT;
      for (int r = NSEARCH - 1; r >= 0; r--)
        if (rows[r][HIT_LSB + c]) b = {2'(r), rows[r][c*DT_W +: DT_W]};
      seq[8*(NHDR+c) +: 8] = b;
    end
  end
endmodule
