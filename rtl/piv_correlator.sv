// PIV cross-correlation datapath: X multipliers, a log2(X)-stage adder tree
// and an accumulator.
//
// Each clock with in_valid, X pixels of Area A and the X pixels of Area B
// they overlap are multiplied pairwise; the products are summed by a
// pipelined binary adder tree (a register after every level) and the row sum
// is accumulated. in_first starts a new sum, in_last ends it: CORR_LAT clocks
// after the in_last row, out_valid pulses with the complete correlation value
// (the sum over all rows fed of the X products a[j] * b[j]).
// Unused lanes (Area B narrower than X) must be fed zeros.
// The X parallel multipliers and log2(X) adder stages follow the document's
// block diagram; X = 32 (one row of a 32x32 Area B per clock) is this design's
// choice.
module piv_correlator
  import smart_camera_pkg::*;
  import piv_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  logic   in_first,
  input  logic   in_last,
  input  pixel_t a [X],
  input  pixel_t b [X],
  output logic   out_valid,
  output corr_t  out_value
);

  // tree[l] holds X >> l partial sums after level l (level 0 = products)
  corr_t tree [LOG2X+1][X];
  logic [LOG2X:0] vld, fst, lst;
  corr_t acc;

  always_ff @(posedge clk) begin
    for (int j = 0; j < X; j++)
      tree[0][j] <= CORR_W'(a[j]) * CORR_W'(b[j]);
    for (int l = 1; l <= LOG2X; l++)
      for (int j = 0; j < (X >> l); j++)
        tree[l][j] <= tree[l-1][2*j] + tree[l-1][2*j+1];
    if (vld[LOG2X])
      acc <= fst[LOG2X] ? tree[LOG2X][0] : acc + tree[LOG2X][0];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      vld <= '0;
      fst <= '0;
      lst <= '0;
      out_valid <= 1'b0;
    end else begin
      vld <= {vld[LOG2X-1:0], in_valid};
      fst <= {fst[LOG2X-1:0], in_first};
      lst <= {lst[LOG2X-1:0], in_last};
      out_valid <= vld[LOG2X] && lst[LOG2X];
    end
  end

  assign out_value = acc;

endmodule
