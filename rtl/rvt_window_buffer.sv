// RVT window buffer: the 11 x 15 pixel window held on chip as three sections
// of 11 words (each section is an 11-row x 5-pixel column of the image).
//
// Words of the next column arrive from the input memory switch top to bottom
// (col_row 0..10) and are collected in a fill column. When row 10 arrives the
// window shifts right by five pixels in one clock: section 0 is dropped,
// sections 1 and 2 move down and the fill column becomes section 2. The
// window then holds 15 columns and the five target pixels in columns 5..9
// have complete 11x11 neighbourhoods. The buffer issues these five windows on
// five consecutive clocks (win_p = 0..4 selects the neighbourhood whose left
// edge is column win_p). Only 11 memory reads are needed for five results.
// Window k (the column with word k at its top) is issued only for k >= 2,
// since before that the buffer is not yet full in a new frame.
//
// Interface: win is the whole 11x15 window, stable while win_valid is high;
// win_k and win_half identify it. A new column needs 11 clocks, issuing
// needs 5, so issuing always ends before the next shift (checked by an
// assertion).
// Three 11x5 sections, the five-pixel shift and 11 reads per five results
// follow the document; the separate fill column, which lets the new column
// arrive while the current window is still in use, is this design's choice.
module rvt_window_buffer
  import smart_camera_pkg::*;
  import rvt_pkg::*;
#(
  parameter int unsigned K_W = 16
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           col_valid,
  input  word_t          col_word,
  input  logic [3:0]     col_row,
  input  logic [K_W-1:0] col_k,
  input  logic           col_half,
  output logic           win_valid,
  output logic [2:0]     win_p,
  output logic [K_W-1:0] win_k,
  output logic           win_half,
  output pixel_t         win [WIN][WIN_COLS]
);

  word_t sec  [3][WIN];
  word_t fill [WIN-1];

  always_ff @(posedge clk) begin
    if (col_valid) begin
      if (col_row == 4'(WIN - 1)) begin
        for (int r = 0; r < WIN; r++) begin
          sec[0][r] <= sec[1][r];
          sec[1][r] <= sec[2][r];
        end
        for (int r = 0; r < WIN - 1; r++) sec[2][r] <= fill[r];
        sec[2][WIN-1] <= col_word;
      end else begin
        fill[col_row] <= col_word;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      win_valid <= 1'b0;
      win_p     <= '0;
      win_k     <= '0;
      win_half  <= 1'b0;
    end else begin
      if (win_valid) begin
        win_p <= win_p + 3'd1;
        if (win_p == 3'(PIX_PER_WORD - 1)) win_valid <= 1'b0;
      end
      if (col_valid && col_row == 4'(WIN - 1) && col_k >= K_W'(2)) begin
        win_valid <= 1'b1;
        win_p     <= '0;
        win_k     <= col_k;
        win_half  <= col_half;
      end
    end
  end

  // the window must not shift while its five results are being issued
  assert property (@(posedge clk) !(rst_n && win_valid && win_p != 3'(PIX_PER_WORD - 1)
                                    && col_valid && col_row == 4'(WIN - 1)));

  always_comb begin
    for (int r = 0; r < WIN; r++)
      for (int c = 0; c < WIN_COLS; c++)
        win[r][c] = word_pixel(sec[c / PIX_PER_WORD][r], c % PIX_PER_WORD);
  end

endmodule
