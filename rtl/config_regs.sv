// config_regs: slow control register file written and read over I2C.
// It holds the settings of the chip: play back mode, trigger latency,
// channel mask, play back data and the ASD threshold DAC codes, and shows
// the chip status. The register map and reset values are this design's
// choices:
//   0x00 control       bit 0: play back mode (1 = TDC bypassed)
//   0x01 latency       trigger latency in clock cycles, reset 160 (4 us)
//   0x02-0x05 mask     channel enable, channels 8k..8k+7 in register 2+k,
//                      reset all enabled
//   0x06 play back     write {hit, 1'b0, time[5:0]}: shifts the value into
//                      the play back chain at channel 0 (`pb_shift` pulse)
//   0x08+d DAC d       threshold code of DAC d (NDAC DACs), reset 0x80
//   0x0C status        read only: `status` input
// Unlisted addresses read 0. Writes act one cycle after `we`.
`timescale 1ns / 1ps
module config_regs
  import otis_pkg::*;
#(
  parameter int unsigned NDAC = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  addr,
  input  logic [7:0]  wdata,
  input  logic        we,
  output logic [7:0]  rdata,
  input  logic [7:0]  status,
  output logic        pb_mode,
  output logic [7:0]  latency,
  output logic [NCH-1:0] chan_en,
  output chan_t       pb_data,
  output logic        pb_shift,
  output logic [7:0]  dac_code [NDAC]
);
  localparam int unsigned DW = (NDAC > 1) ? $clog2(NDAC) : 1;
  logic [7:0] pb_raw;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      pb_mode  <= 1'b0;
      latency  <= 8'(DEF_LATENCY);
      chan_en  <= '1;
      pb_raw   <= '0;
      pb_shift <= 1'b0;
      for (int d = 0; d < NDAC; d++) dac_code[d] <= 8'h80;
    end else begin
      pb_shift <= 1'b0;
      if (we) begin
        case (addr) inside
          8'h00: pb_mode <= wdata[0];
          8'h01: latency <= wdata;
          [8'h02:8'h05]: chan_en[8*(addr-8'h02) +: 8] <= wdata;
          8'h06: begin
            pb_raw   <= wdata;
            pb_shift <= 1'b1;
          end
          default: if (addr >= 8'h08 && addr < 8'(8 + NDAC)) dac_code[DW'(addr - 8'h08)] <= wdata;
        endcase
      end
    end

  assign pb_data = '{hit: pb_raw[7], t: pb_raw[DT_W-1:0]};

  always_comb begin
    rdata = '0;
    case (addr) inside
      8'h00: rdata = {7'b0, pb_mode};
      8'h01: rdata = latency;
      [8'h02:8'h05]: rdata = chan_en[8*(addr-8'h02) +: 8];
      8'h06: rdata = pb_raw;
      8'h0C: rdata = status;
      default: if (addr >= 8'h08 && addr < 8'(8 + NDAC)) rdata = dac_code[DW'(addr - 8'h08)];
    endcase
  end
endmodule
