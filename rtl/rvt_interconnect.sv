// RVT interconnection network: routes window pixels to the response modules.
//
// From the 11x15 window and the offset p (0..4) it takes the 11x11
// neighbourhood whose left edge is column p and, for each of the eight base
// filters, picks the seven pixels under each weight (+1, +2, -1, -2) as
// listed in rvt_pkg::RVT_TAPS. It also passes on the target (centre) pixel
// and a tag. The outputs are registered: one clock of latency, one window per
// clock.
// That an interconnect feeds four coefficient inputs of each of eight
// response modules follows the document; selecting the neighbourhood by p
// (one filter unit shared by the five windows of a column) is this design's
// choice.
module rvt_interconnect
  import smart_camera_pkg::*;
  import rvt_pkg::*;
#(
  parameter int unsigned TAG_W = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  pixel_t           win [WIN][WIN_COLS],
  input  logic [2:0]       in_p,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output pixel_t           grp [NDIR][NGRP][NTAP],
  output pixel_t           out_center,
  output logic [TAG_W-1:0] out_tag
);

  always_ff @(posedge clk) begin
    for (int d = 0; d < NDIR; d++)
      for (int g = 0; g < NGRP; g++)
        for (int t = 0; t < NTAP; t++)
          grp[d][g][t] <= win[RVT_TAPS[d][g][t][7:4]][int'(RVT_TAPS[d][g][t][3:0]) + int'(in_p)];
    out_center <= win[CENTER][CENTER + int'(in_p)];
    out_tag    <= in_tag;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

endmodule
