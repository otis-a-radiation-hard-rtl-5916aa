// otis_pkg: shared constants and types of the OTIS TDC.
// The sizes follow the chip description: 32 channels, a 64-tap DLL giving a
// 6-bit fine time, 240-bit data sets, a 164-deep pipeline, a 48-deep
// derandomizing buffer (16 triggers of 3 data sets) and a readout sequence of
// 4 header bytes plus 32 drift time bytes. The split of the 240-bit data set
// into fields beyond the 32 x 6-bit drift times is this design's own choice:
//   [191:0]   drift time of channel c at [6c+5:6c]
//   [223:192] hit flag of channel c at bit 192+c
//   [231:224] bunch crossing number
//   [239:232] data set status (bit 0 DLL lock lost, bit 1 play back mode)
`timescale 1ns / 1ps
package otis_pkg;
  localparam int unsigned NCH        = 32;   // channels
  localparam int unsigned NTAP       = 64;   // DLL delay elements
  localparam int unsigned DT_W       = 6;    // drift (fine) time bits
  localparam int unsigned BCN_W      = 8;    // bunch crossing number bits
  localparam int unsigned ROW_W      = 240;  // data set width
  localparam int unsigned PIPE_DEPTH = 164;  // pipeline data sets
  localparam int unsigned NSEARCH    = 3;    // data sets searched per trigger
  localparam int unsigned NEVT       = 16;   // triggers held by derandomizer
  localparam int unsigned DER_DEPTH  = NEVT * NSEARCH;  // 48
  localparam int unsigned NHDR       = 4;    // header bytes
  localparam int unsigned NBYTES     = NHDR + NCH;      // 36 bytes per event
  localparam int unsigned DEF_LATENCY = 160; // 4 us at 40 MHz

  // positions inside a data set
  localparam int unsigned HIT_LSB  = NCH * DT_W;        // 192
  localparam int unsigned BCN_LSB  = HIT_LSB + NCH;     // 224
  localparam int unsigned STAT_LSB = BCN_LSB + BCN_W;   // 232

  typedef logic [ROW_W-1:0] row_t;
  typedef logic [7:0]       byte_t;

  // extended drift time for a channel without hit
  localparam byte_t NO_HIT = 8'b1100_0000;

  // per-channel decoded TDC result
  typedef struct packed {
    logic            hit;
    logic [DT_W-1:0] t;
  } chan_t;
endpackage
