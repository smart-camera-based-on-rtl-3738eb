// RVT image processing design: from window columns read out of memory to one
// filter result per image pixel.
//
// The window buffer collects each new 11-word column and issues the five
// 11x11 neighbourhoods of the current 11x15 window; the filter unit returns,
// for each, the strongest of the 16 matched-filter responses and its
// direction. Each result is formatted as a result_word_t (target pixel,
// direction label, response) and addressed by the target pixel's position in
// the padded frame: for window k and offset p the target is
// (k-1)*5 + p + 5*PADW, PADW = 5*WPR being the padded row length. At the end
// of each padded row the window spans two image rows; those results are
// written like the others and are meaningless, as the document accepts for
// the image border. res_last marks the last result of a frame, res_bank is
// the frame's half bit.
//
// Timing: five results per 11-clock column; a result appears FU_LAT + 1
// clocks after its window is issued.
module rvt_image_processor
  import smart_camera_pkg::*;
  import rvt_pkg::*;
#(
  parameter int unsigned IMG_W = 512,
  parameter int unsigned IMG_H = 512,
  // derived, not to be overridden
  parameter int unsigned WPR  = (IMG_W + PIX_PER_WORD - 1) / PIX_PER_WORD,
  parameter int unsigned FW   = WPR * IMG_H,
  parameter int unsigned NWIN = FW - (WIN - 1) * WPR,
  parameter int unsigned K_W  = $clog2(NWIN)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           col_valid,
  input  word_t          col_word,
  input  logic [3:0]     col_row,
  input  logic [K_W-1:0] col_k,
  input  logic           col_half,
  output logic           res_valid,
  output logic           res_bank,
  output mem_addr_t      res_addr,
  output word_t          res_data,
  output logic           res_last
);

  localparam int unsigned PADW = PIX_PER_WORD * WPR;

  typedef struct packed {
    logic      half;
    logic      last;
    mem_addr_t addr;
  } tag_t;

  logic           win_valid;
  logic [2:0]     win_p;
  logic [K_W-1:0] win_k;
  logic           win_half;
  pixel_t         win [WIN][WIN_COLS];

  rvt_window_buffer #(.K_W(K_W)) u_wbuf (
    .clk, .rst_n, .col_valid, .col_word, .col_row, .col_k, .col_half,
    .win_valid, .win_p, .win_k, .win_half, .win
  );

  tag_t in_tag, out_tag;
  always_comb begin
    in_tag.half = win_half;
    in_tag.last = (win_k == K_W'(NWIN - 1)) && (win_p == 3'(PIX_PER_WORD - 1));
    in_tag.addr = mem_addr_t'((32'(win_k) - 1) * PIX_PER_WORD + 32'(win_p) + CENTER * PADW);
  end

  logic   fu_valid;
  resp_t  fu_best;
  pixel_t fu_center;

  rvt_filter_unit #(.TAG_W($bits(tag_t))) u_fu (
    .clk, .rst_n, .in_valid(win_valid), .win, .in_p(win_p), .in_tag(in_tag),
    .out_valid(fu_valid), .out_best(fu_best), .out_center(fu_center), .out_tag(out_tag)
  );

  result_word_t rw;
  always_comb begin
    rw       = '0;
    rw.pix   = fu_center;
    rw.label = fu_best.label;
    rw.mag   = fu_best.mag;
  end

  always_ff @(posedge clk) begin
    res_bank <= out_tag.half;
    res_addr <= out_tag.addr;
    res_data <= rw;
    res_last <= out_tag.last;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) res_valid <= 1'b0;
    else        res_valid <= fu_valid;
  end

endmodule
