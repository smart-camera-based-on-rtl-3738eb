// Constants and types of the Particle Image Velocimetry (PIV) processing unit.
//
// Area A (from the first image) is up to M_MAX x M_MAX pixels, Area B (from
// the second image) up to N_MAX x N_MAX; the document's configuration is
// 40 and 32. The correlation plane has S = m-n+1 shifts per axis, at most
// S_MAX = 9. The correlator has X = 32 multipliers, one row of Area B per
// clock. A correlation value is a sum of n*n products of 12-bit pixels:
// 24 + 10 = 34 bits. Displacements are signed fixed point with FRAC_W
// fraction bits. The sizes 40 and 32 are the document's; X, FRAC_W and the
// register map are this design's choices.
package piv_pkg;
  import smart_camera_pkg::*;

  parameter int M_MAX  = 40;
  parameter int N_MAX  = 32;
  parameter int X      = 32;
  parameter int LOG2X  = $clog2(X);
  parameter int S_MAX  = M_MAX - N_MAX + 1;
  parameter int CORR_W = 2 * PIX_W + $clog2(N_MAX * N_MAX);
  parameter int FRAC_W = 8;
  parameter int DISP_W = 8 + FRAC_W;          // signed, 7 integer bits
  parameter int SIZE_W = 6;                   // area sizes up to 63
  parameter int COORD_W = 11;                 // image coordinates up to 2047
  parameter int SH_W   = $clog2(S_MAX);       // shift index 0..S_MAX-1
  parameter int CORR_LAT = LOG2X + 2;         // multiply, adder tree, accumulate

  typedef logic [CORR_W-1:0] corr_t;
  typedef logic signed [DISP_W-1:0] disp_t;

  // host-visible registers
  typedef enum logic [2:0] {
    REG_CX       = 3'd0,   // centre column of the interrogation areas
    REG_CY       = 3'd1,   // centre row
    REG_SIZE_A   = 3'd2,   // m, side of Area A
    REG_SIZE_B   = 3'd3,   // n, side of Area B
    REG_RES_ADDR = 3'd4    // output memory word for the result
  } piv_reg_e;

  // one result word as written to the output memory
  typedef struct packed {
    logic [WORD_W-2*DISP_W-2*COORD_W-1:0] rsvd;
    logic [COORD_W-1:0] cy;
    logic [COORD_W-1:0] cx;
    disp_t py;
    disp_t px;
  } piv_result_t;

endpackage
