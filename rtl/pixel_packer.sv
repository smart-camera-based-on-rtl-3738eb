// Data packing: five 12-bit camera pixels into one 64-bit memory word.
//
// Pixels arrive one per pix_valid strobe in raster order; pix_sof marks the
// first pixel of a frame. Pixel k of a word (k = 0..4, in arrival order) is
// placed at bits [12k+11:12k]; bits [63:60] are zero. When a row of IMG_W
// pixels ends in the middle of a word, the rest of that word is filled with
// zero pixels, so every row occupies WPR = ceil(IMG_W/5) whole words. For the
// 512-pixel rows of the document this appends three zero columns and gives
// the 515-pixel padded row that lets the RVT window step by five pixels
// across the whole frame.
//
// Timing: word_valid pulses for one clock, one clock after the pixel that
// completes the word. word_sof is set with the first word of a frame.
// Packing five pixels per word and the zero padding follow the document; the
// bit order and the strobe interface are this design's choice.
module pixel_packer
  import smart_camera_pkg::*;
#(
  parameter int unsigned IMG_W = 512
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   pix_valid,
  input  logic   pix_sof,
  input  pixel_t pix,
  output logic   word_valid,
  output logic   word_sof,
  output word_t  word
);

  localparam int COL_W = $clog2(IMG_W);

  logic [2:0]       slot;      // next free pixel position in acc
  logic [COL_W-1:0] col;       // column of the next pixel
  logic             sof_pend;  // acc holds the first pixel of a frame
  word_t            acc;

  logic [2:0]       slot_in;
  logic [COL_W-1:0] col_in;
  word_t            acc_in;
  logic             sof_in;

  always_comb begin
    // a start of frame restarts the row and the word
    slot_in = pix_sof ? 3'd0 : slot;
    col_in  = pix_sof ? '0 : col;
    acc_in  = pix_sof ? '0 : acc;
    sof_in  = pix_sof | sof_pend;
    acc_in[slot_in*PIX_W +: PIX_W] = pix;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      slot       <= '0;
      col        <= '0;
      sof_pend   <= 1'b0;
      acc        <= '0;
      word_valid <= 1'b0;
      word_sof   <= 1'b0;
      word       <= '0;
    end else begin
      word_valid <= 1'b0;
      if (pix_valid) begin
        if (slot_in == 3'(PIX_PER_WORD - 1) || col_in == COL_W'(IMG_W - 1)) begin
          word_valid <= 1'b1;
          word_sof   <= sof_in;
          word       <= acc_in;
          acc        <= '0;
          slot       <= '0;
          sof_pend   <= 1'b0;
        end else begin
          acc        <= acc_in;
          slot       <= slot_in + 3'd1;
          sof_pend   <= sof_in;
        end
        col <= (col_in == COL_W'(IMG_W - 1)) ? '0 : col_in + 1'b1;
      end
    end
  end

endmodule
