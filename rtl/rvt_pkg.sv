// Constants and types of the Retinal Vascular Tracing (RVT) filter hardware.
//
// The 16 directional matched filters are 11x11 templates whose weights are
// +1, +2, -1 and -2; directions 8..15 are the negations of directions 0..7,
// so only eight responses are computed. Each of the eight base filters has
// exactly seven taps of each weight. RVT_TAPS lists them: RVT_TAPS[d][g][t]
// is {row, column} (one hex digit each, 0 = top/left of the 11x11 window) of
// tap t of weight group g of direction d, with the groups ordered +1, +2,
// -1, -2. The target pixel is at row 5, column 5. The template shapes are
// those of the document's filter drawing; the tap order within a group is
// arbitrary.
//
// Widths: a sum of seven 12-bit pixels needs 15 bits; a response
// (S+1 - S-1) + 2(S+2 - S-2) lies in +-85995 and needs 18 signed bits, its
// magnitude 17 bits. A label is {complement, direction[2:0]}, i.e. the
// direction number 0..15 of the winning template.
package rvt_pkg;
  import smart_camera_pkg::*;

  parameter int WIN      = 11;                 // window rows and columns
  parameter int WIN_COLS = 3 * PIX_PER_WORD;   // 15 buffered columns
  parameter int NDIR     = 8;                  // computed responses
  parameter int NGRP     = 4;                  // weight groups +1 +2 -1 -2
  parameter int NTAP     = 7;                  // taps per weight group
  parameter int CENTER   = 5;

  parameter int SUM_W  = PIX_W + 3;            // sum of seven pixels
  parameter int RESP_W = PIX_W + 6;            // signed response
  parameter int MAG_W  = RESP_W - 1;           // |response|

  // Pipeline depths (a register after every add, subtract and compare).
  parameter int RESP_LAT = 6;   // 3 adder-tree levels, subtract, shift-add, absolute value
  parameter int CMP_LAT  = 3;   // three comparator levels
  parameter int FU_LAT   = 1 + RESP_LAT + CMP_LAT;   // with the interconnect register

  typedef logic [MAG_W-1:0] mag_t;

  typedef struct packed {
    logic [3:0] label;
    mag_t       mag;
  } resp_t;

  // One result word as stored in the output memory.
  typedef struct packed {
    logic [WORD_W-PIX_W-4-MAG_W-1:0] rsvd;
    pixel_t     pix;     // unaltered target pixel
    logic [3:0] label;   // winning direction 0..15
    mag_t       mag;     // its response
  } result_word_t;

  localparam logic [7:0] RVT_TAPS [NDIR][NGRP][NTAP] = '{
    '{'{8'h32, 8'h33, 8'h34, 8'h35, 8'h36, 8'h37, 8'h38},
      '{8'h42, 8'h43, 8'h44, 8'h45, 8'h46, 8'h47, 8'h48},
      '{8'h72, 8'h73, 8'h74, 8'h75, 8'h76, 8'h77, 8'h78},
      '{8'h62, 8'h63, 8'h64, 8'h65, 8'h66, 8'h67, 8'h68}},
    '{'{8'h22, 8'h23, 8'h34, 8'h35, 8'h36, 8'h47, 8'h48},
      '{8'h32, 8'h33, 8'h44, 8'h45, 8'h46, 8'h57, 8'h58},
      '{8'h62, 8'h63, 8'h74, 8'h75, 8'h76, 8'h87, 8'h88},
      '{8'h52, 8'h53, 8'h64, 8'h65, 8'h66, 8'h77, 8'h78}},
    '{'{8'h02, 8'h13, 8'h24, 8'h35, 8'h46, 8'h57, 8'h68},
      '{8'h12, 8'h23, 8'h34, 8'h45, 8'h56, 8'h67, 8'h78},
      '{8'h42, 8'h53, 8'h64, 8'h75, 8'h86, 8'h97, 8'hA8},
      '{8'h32, 8'h43, 8'h54, 8'h65, 8'h76, 8'h87, 8'h98}},
    '{'{8'h26, 8'h36, 8'h47, 8'h57, 8'h67, 8'h78, 8'h88},
      '{8'h25, 8'h35, 8'h46, 8'h56, 8'h66, 8'h77, 8'h87},
      '{8'h22, 8'h32, 8'h43, 8'h53, 8'h63, 8'h74, 8'h84},
      '{8'h23, 8'h33, 8'h44, 8'h54, 8'h64, 8'h75, 8'h85}},
    '{'{8'h27, 8'h37, 8'h47, 8'h57, 8'h67, 8'h77, 8'h87},
      '{8'h26, 8'h36, 8'h46, 8'h56, 8'h66, 8'h76, 8'h86},
      '{8'h23, 8'h33, 8'h43, 8'h53, 8'h63, 8'h73, 8'h83},
      '{8'h24, 8'h34, 8'h44, 8'h54, 8'h64, 8'h74, 8'h84}},
    '{'{8'h28, 8'h38, 8'h47, 8'h57, 8'h67, 8'h76, 8'h86},
      '{8'h27, 8'h37, 8'h46, 8'h56, 8'h66, 8'h75, 8'h85},
      '{8'h24, 8'h34, 8'h43, 8'h53, 8'h63, 8'h72, 8'h82},
      '{8'h25, 8'h35, 8'h44, 8'h54, 8'h64, 8'h73, 8'h83}},
    '{'{8'h2A, 8'h39, 8'h48, 8'h57, 8'h66, 8'h75, 8'h84},
      '{8'h29, 8'h38, 8'h47, 8'h56, 8'h65, 8'h74, 8'h83},
      '{8'h26, 8'h35, 8'h44, 8'h53, 8'h62, 8'h71, 8'h80},
      '{8'h27, 8'h36, 8'h45, 8'h54, 8'h63, 8'h72, 8'h81}},
    '{'{8'h67, 8'h68, 8'h74, 8'h75, 8'h76, 8'h82, 8'h83},
      '{8'h57, 8'h58, 8'h64, 8'h65, 8'h66, 8'h72, 8'h73},
      '{8'h27, 8'h28, 8'h34, 8'h35, 8'h36, 8'h42, 8'h43},
      '{8'h37, 8'h38, 8'h44, 8'h45, 8'h46, 8'h52, 8'h53}}
  };

endpackage
