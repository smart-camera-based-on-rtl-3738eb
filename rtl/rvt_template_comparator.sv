// RVT template comparator: keeps the greater of two filter responses.
//
// Each input is a response magnitude with its 4-bit label (direction 0..15).
// The output, registered, is the input with the greater magnitude together
// with its label; on a tie input a wins (in the tree, the lower-numbered
// filter). One clock of latency, one comparison per clock.
// The response-plus-label interface and the register after the comparison
// follow the document; the tie rule is this design's choice.
module rvt_template_comparator
  import rvt_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  resp_t a,
  input  resp_t b,
  output logic  out_valid,
  output resp_t y
);

  always_ff @(posedge clk) begin
    y <= (b.mag > a.mag) ? b : a;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

endmodule
