// RVT filter response unit: the strongest of 16 directional matched filters
// for one 11x11 neighbourhood per clock.
//
// The interconnect routes the window pixels to eight identical response
// modules, one per base direction 0..7. Each returns |r| and a complement
// bit; the label of response d is {complement, d}, which is the direction
// number 0..15 of the stronger of the filter and its negation. A three-level
// tree of template comparators (4, 2, 1) then selects the greatest response
// and its label.
//
// Timing: fully pipelined, FU_LAT = 10 clocks (1 interconnect, 6 response,
// 3 comparator levels); the centre pixel and the tag travel alongside.
// Structure (eight responses, comparator tree in three steps, 4-bit labels)
// follows the document.
module rvt_filter_unit
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
  output resp_t            out_best,
  output pixel_t           out_center,
  output logic [TAG_W-1:0] out_tag
);

  logic             ic_valid;
  pixel_t           grp [NDIR][NGRP][NTAP];
  pixel_t           ic_center;
  logic [TAG_W-1:0] ic_tag;

  rvt_interconnect #(.TAG_W(TAG_W)) u_ic (
    .clk, .rst_n, .in_valid, .win, .in_p, .in_tag,
    .out_valid(ic_valid), .grp, .out_center(ic_center), .out_tag(ic_tag)
  );

  logic  r_valid [NDIR];
  mag_t  r_mag   [NDIR];
  logic  r_neg   [NDIR];
  resp_t lvl0    [NDIR];

  for (genvar d = 0; d < NDIR; d++) begin : g_resp
    rvt_response u_resp (
      .clk, .rst_n, .in_valid(ic_valid), .grp(grp[d]),
      .out_valid(r_valid[d]), .out_mag(r_mag[d]), .out_neg(r_neg[d])
    );
    assign lvl0[d] = '{label: {r_neg[d], 3'(d)}, mag: r_mag[d]};
  end

  resp_t lvl1 [4];
  resp_t lvl2 [2];
  logic  v1 [4];
  logic  v2 [2];

  for (genvar i = 0; i < 4; i++) begin : g_cmp1
    rvt_template_comparator u_cmp (
      .clk, .rst_n, .in_valid(r_valid[2*i]), .a(lvl0[2*i]), .b(lvl0[2*i+1]),
      .out_valid(v1[i]), .y(lvl1[i])
    );
  end
  for (genvar i = 0; i < 2; i++) begin : g_cmp2
    rvt_template_comparator u_cmp (
      .clk, .rst_n, .in_valid(v1[2*i]), .a(lvl1[2*i]), .b(lvl1[2*i+1]),
      .out_valid(v2[i]), .y(lvl2[i])
    );
  end
  rvt_template_comparator u_cmp3 (
    .clk, .rst_n, .in_valid(v2[0]), .a(lvl2[0]), .b(lvl2[1]),
    .out_valid(out_valid), .y(out_best)
  );

  // centre pixel and tag follow the response and comparator stages
  localparam int DLY = RESP_LAT + CMP_LAT;
  pixel_t           cdly [DLY];
  logic [TAG_W-1:0] tdly [DLY];

  always_ff @(posedge clk) begin
    cdly[0] <= ic_center;
    tdly[0] <= ic_tag;
    for (int s = 1; s < DLY; s++) begin
      cdly[s] <= cdly[s-1];
      tdly[s] <= tdly[s-1];
    end
  end
  assign out_center = cdly[DLY-1];
  assign out_tag    = tdly[DLY-1];

endmodule
