// RVT response module: one directional matched-filter response.
//
// Inputs are the seven pixels under each weight of the filter: group 0 (+1),
// 1 (+2), 2 (-1) and 3 (-2). Each group is summed by a three-level adder
// tree, then d1 = S(+1) - S(-1) and d2 = S(+2) - S(-2), then
// r = d1 + 2*d2 (the x2 is a one-bit shift), then the magnitude |r| and
// the sign. The complement filter (the same template negated) has response
// -r, so the greater of the pair is |r|, and out_neg = 1 says it belongs to
// the complement.
//
// Timing: a register after every addition and subtraction, RESP_LAT = 6
// clocks from input to output, one filter per clock.
// Shift-and-add arithmetic, the register after every add and the |r| plus
// complement bit output follow the document; the order of the additions is
// this design's choice.
module rvt_response
  import smart_camera_pkg::*;
  import rvt_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  pixel_t grp [NGRP][NTAP],
  output logic   out_valid,
  output mag_t   out_mag,
  output logic   out_neg
);

  typedef logic [SUM_W-1:0] sum_t;
  typedef logic signed [RESP_W-1:0] sresp_t;

  sum_t   s1 [NGRP][4];
  sum_t   s2 [NGRP][2];
  sum_t   s3 [NGRP];
  sresp_t d1, d2, r;
  logic [RESP_LAT-1:0] vld;

  always_ff @(posedge clk) begin
    for (int g = 0; g < NGRP; g++) begin
      s1[g][0] <= SUM_W'(grp[g][0]) + SUM_W'(grp[g][1]);
      s1[g][1] <= SUM_W'(grp[g][2]) + SUM_W'(grp[g][3]);
      s1[g][2] <= SUM_W'(grp[g][4]) + SUM_W'(grp[g][5]);
      s1[g][3] <= SUM_W'(grp[g][6]);
      s2[g][0] <= s1[g][0] + s1[g][1];
      s2[g][1] <= s1[g][2] + s1[g][3];
      s3[g]    <= s2[g][0] + s2[g][1];
    end
    d1      <= sresp_t'(s3[0]) - sresp_t'(s3[2]);
    d2      <= sresp_t'(s3[1]) - sresp_t'(s3[3]);
    r       <= d1 + (d2 <<< 1);
    out_mag <= r[RESP_W-1] ? MAG_W'(-r) : MAG_W'(r);
    out_neg <= r[RESP_W-1];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[RESP_LAT-2:0], in_valid};
  end
  assign out_valid = vld[RESP_LAT-1];

endmodule
