// PIV peak detector: records the greatest correlation value of a plane and
// its shift position.
//
// clear starts a new plane. Each clock with in_valid the value and its
// shift (in_x, in_y) are compared with the stored peak; a strictly greater
// value replaces it, so among equal values the first in raster order wins.
// The first value after clear is always taken. Outputs are registered.
// Recording the peak value and position follows the document; the tie rule
// is this design's choice.
module piv_peak_detector
  import piv_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clear,
  input  logic            in_valid,
  input  corr_t           in_value,
  input  logic [SH_W-1:0] in_x,
  input  logic [SH_W-1:0] in_y,
  output corr_t           peak,
  output logic [SH_W-1:0] peak_x,
  output logic [SH_W-1:0] peak_y,
  output logic            peak_seen
);

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      peak      <= '0;
      peak_x    <= '0;
      peak_y    <= '0;
      peak_seen <= 1'b0;
    end else if (in_valid && (!peak_seen || in_value > peak)) begin
      peak      <= in_value;
      peak_x    <= in_x;
      peak_y    <= in_y;
      peak_seen <= 1'b1;
    end
  end

endmodule
