// PIV correlation-plane RAM (Block RAM C, temporary results).
//
// DEPTH words of CORR_W bits, one write and one read port. The word of shift
// (x, y) is at address y*S + x. Read data appears one clock after raddr.
// An on-chip RAM for the correlation values follows the document; its
// organisation is this design's choice.
module piv_plane_ram
  import piv_pkg::*;
#(
  parameter int unsigned DEPTH = S_MAX * S_MAX,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  corr_t         wdata,
  input  logic [AW-1:0] raddr,
  output corr_t         rdata
);

  corr_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
