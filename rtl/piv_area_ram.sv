// PIV interrogation-area RAM (Block RAM A or B).
//
// Holds ROWS rows of COLS pixels. The write port stores up to five pixels
// of one row per clock, the pixels of one unpacked memory word: pixel k goes
// to column wbase + k when wmask[k] is set (wbase may be negative for a word
// that starts left of the area; such pixels must be masked). The read port
// returns a whole row one clock after rrow is given, which is what the
// correlator consumes each clock.
// On-chip RAMs for Area A and Area B follow the document; the row-wide
// organisation and the five-pixel write port are this design's choices.
module piv_area_ram
  import smart_camera_pkg::*;
#(
  parameter int unsigned ROWS = 40,
  parameter int unsigned COLS = 40,
  parameter int unsigned RW   = $clog2(ROWS),
  parameter int unsigned CW   = $clog2(COLS) + 1
) (
  input  logic                  clk,
  input  logic                  we,
  input  logic [RW-1:0]         wrow,
  input  logic signed [CW-1:0]  wbase,
  input  logic [PIX_PER_WORD-1:0] wmask,
  input  pixel_t                wpix [PIX_PER_WORD],
  input  logic [RW-1:0]         rrow,
  output pixel_t                rdata [COLS]
);

  pixel_t mem [ROWS][COLS];

  always_ff @(posedge clk) begin
    if (we) begin
      for (int k = 0; k < PIX_PER_WORD; k++)
        if (wmask[k]) mem[wrow][int'(wbase) + k] <= wpix[k];
    end
    rdata <= mem[rrow];
  end

endmodule
