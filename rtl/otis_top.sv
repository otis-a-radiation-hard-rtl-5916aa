// otis_top: the OTIS 32-channel time to digital converter.
// Clock driven architecture: every cycle of the 40 MHz LHC clock the chip
// stores one data set, so its behaviour does not depend on occupancy.
//   TDC core  - the DLL splits the clock period into 64 phases; each
//               channel's hit register latches the discriminator signal on
//               these phases; the PPL stage decodes the first rising edge
//               into a 6-bit drift time (or, in play back mode, inserts
//               data set by slow control instead).
//   pipeline  - 164 x 240-bit dual ported memory written every cycle at the
//               address counter; it holds the data sets (32 x 6-bit drift
//               times, 32 hit flags, bunch crossing number, status) for the
//               4 us trigger latency.
//   trigger   - a trigger copies the 3 data sets of the search window to the
//               48 x 240-bit derandomizing buffer (16 events).
//   readout   - per event, 4 header bytes and 32 extended drift times
//               (first hit per channel, with its bunch crossing position)
//               leave on the 8-bit output in 36 cycles (900 ns).
//   slow ctrl - I2C slave and register file: channel mask, latency, play
//               back, DAC codes; DACs give the ASD thresholds.
// Latency from a hit to its data set: the hit register picture is ready at
// the clk edge ending the period, the PPL output one cycle later, and the
// data set is written at the following edge. `latency` counts cycles
// between the data set write and the trigger.
// Ports: clk (LHC clock), rst_n (notReset), trigger (L0 accept), hit_in
// (discriminator outputs), chip_id (address pins), scl/sda_in/sda_oe (I2C,
// open drain), dout/dvalid/sop (readout), debug flags, DAC voltages.
`timescale 1ns / 1ps
module otis_top
  import otis_pkg::*;
#(
  parameter int unsigned PDEPTH = PIPE_DEPTH,
  parameter int unsigned NDAC   = 4
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           trigger,
  input  logic [NCH-1:0] hit_in,
  input  logic [3:0]     chip_id,
  input  logic           scl,
  input  logic           sda_in,
  output logic           sda_oe,
  output logic [7:0]     dout,
  output logic           dvalid,
  output logic           sop,
  output logic           ptr_zero,
  output logic           der_full,
  output logic           der_empty,
  output logic           dll_lock_lost,
  output real            vth [NDAC]
);
  localparam int unsigned AW = $clog2(PDEPTH);

  // ---------------- slow control ----------------
  logic [7:0]     reg_addr, reg_wdata, reg_rdata, latency, status;
  logic           reg_we, pb_mode, pb_shift;
  logic [NCH-1:0] chan_en;
  chan_t          pb_data;
  logic [7:0]     dac_code [NDAC];
  logic           trig_lost, trig_lost_sticky;

  i2c_slave u_i2c (
    .clk, .rst_n, .addr_lo(chip_id), .scl, .sda_in, .sda_oe,
    .reg_addr, .reg_wdata, .reg_we, .reg_rdata
  );

  config_regs #(.NDAC(NDAC)) u_regs (
    .clk, .rst_n, .addr(reg_addr), .wdata(reg_wdata), .we(reg_we),
    .rdata(reg_rdata), .status, .pb_mode, .latency, .chan_en, .pb_data,
    .pb_shift, .dac_code
  );

  for (genvar d = 0; d < NDAC; d++) begin : g_dac
    dac u_dac (.code(dac_code[d]), .vout(vth[d]));
  end

  // ---------------- TDC core ----------------
  logic [NTAP-1:0] tap;

  dll #(.NTAP(NTAP)) u_dll (
    .clk, .rst_n, .tap, .locked(), .lock_lost(dll_lock_lost)
  );

  chan_t ch_q  [NCH];
  chan_t pb_ch [NCH + 1];
  assign pb_ch[0] = pb_data;

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    logic [NTAP-1:0] pic;
    hit_register #(.NTAP(NTAP)) u_hr (
      .clk, .rst_n, .tap, .in(hit_in[c]), .en(chan_en[c]), .pic
    );
    ppl #(.NTAP(NTAP)) u_ppl (
      .clk, .rst_n, .pic, .pb_mode, .pb_shift, .pb_in(pb_ch[c]),
      .pb_out(pb_ch[c+1]), .q(ch_q[c])
    );
  end

  // ---------------- pipeline ----------------
  logic [BCN_W-1:0] bcn;
  logic [AW-1:0]    wptr, pipe_raddr;
  row_t             wrow, prow;

  bcc #(.W(BCN_W)) u_bcc (.clk, .rst_n, .bcn);
  addr_counter #(.DEPTH(PDEPTH)) u_ac (.clk, .rst_n, .wptr, .zero_x(ptr_zero));

  always_comb begin
    wrow = '0;
    for (int c = 0; c < NCH; c++) begin
      wrow[c*DT_W +: DT_W] = ch_q[c].t;
      wrow[HIT_LSB + c]    = ch_q[c].hit;
    end
    wrow[BCN_LSB +: BCN_W] = bcn;
    wrow[STAT_LSB +: 8]    = {6'b0, pb_mode, dll_lock_lost};
  end

  dp_sram #(.DEPTH(PDEPTH), .W(ROW_W)) u_pipe (
    .clk, .we(1'b1), .waddr(wptr), .wdata(wrow), .raddr(pipe_raddr), .rdata(prow)
  );

  // ---------------- trigger and derandomizer ----------------
  logic der_alloc, der_we, der_we_last, der_re, der_re_last, trig_busy;
  row_t der_rdata;

  trigger_ctrl #(.DEPTH(PDEPTH), .NSEARCH(NSEARCH)) u_trig (
    .clk, .rst_n, .trigger, .wptr, .latency, .der_full, .pipe_raddr,
    .der_alloc, .der_we, .der_we_last, .trig_lost, .busy(trig_busy)
  );

  derand_buffer #(.NEVT(NEVT), .NSEARCH(NSEARCH), .W(ROW_W)) u_der (
    .clk, .rst_n, .alloc(der_alloc), .we(der_we), .we_last(der_we_last),
    .wdata(prow), .re(der_re), .re_last(der_re_last), .rdata(der_rdata),
    .full(der_full), .empty(der_empty)
  );

  // ---------------- readout ----------------
  logic                   out_ready, load;
  logic [8*NBYTES-1:0]    seq;

  readout_ctrl #(.N_CH(NCH)) u_roc (
    .clk, .rst_n, .der_empty, .der_rdata, .der_re, .der_re_last,
    .chip_id({4'b0, chip_id}), .trig_lost, .der_full, .dll_lock_lost,
    .out_ready, .load, .seq
  );

  readout_if #(.NBYTES(NBYTES)) u_rif (
    .clk, .rst_n, .load, .seq, .ready(out_ready), .dout, .dvalid, .sop
  );

  // status register for slow control: sticky trigger loss, live flags
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) trig_lost_sticky <= 1'b0;
    else if (trig_lost) trig_lost_sticky <= 1'b1;

  assign status = {3'b0, trig_busy, trig_lost_sticky, der_empty, der_full, dll_lock_lost};
endmodule
