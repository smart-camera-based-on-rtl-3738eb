// PIV window loader: fetches the two interrogation areas of one window from
// the board memories into Block RAMs A and B.
//
// The two PIV images are stored by the shared packing and memory switching
// logic like any camera frames: the first image in address half 0, the
// second in half 1, word i of an image holding pixels 5i..5i+4 of the
// padded raster (WPR words per row). For a window centred at (cx, cy) Area A
// is the m x m square of image 1 with top-left corner (cx - m/2, cy - m/2)
// and Area B the n x n square of image 2 with top-left corner
// (cx - n/2, cy - n/2). Row by row the loader requests every word that
// overlaps the area, through the memory switch's external read port, and
// when a word returns writes its overlapping pixels (up to five) into the
// area RAM in one clock. Requests are pipelined: one per clock when granted.
// Areas must lie inside the image.
//
// Timing: start (while idle) latches the window; done pulses once the last
// pixel of Area B is written.
// That a memory interface moves both areas from the input memory into two
// on-chip RAMs follows the document; the placement of the images, the area
// geometry around the centre and the word-wise transfer are this design's
// choices.
module piv_window_loader
  import smart_camera_pkg::*;
  import piv_pkg::*;
#(
  parameter int unsigned IMG_W = 1008,
  parameter int unsigned IMG_H = 1016,
  // derived, not to be overridden
  parameter int unsigned WPR   = (IMG_W + PIX_PER_WORD - 1) / PIX_PER_WORD,
  parameter int unsigned FW    = WPR * IMG_H,
  parameter int unsigned IDX_W = $clog2(FW + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [COORD_W-1:0] cx,
  input  logic [COORD_W-1:0] cy,
  input  logic [SIZE_W-1:0]  size_a,
  input  logic [SIZE_W-1:0]  size_b,
  output logic               busy,
  output logic               done,
  // memory read port
  output logic               rd_req,
  output logic               rd_half,
  output logic [IDX_W-1:0]   rd_idx,
  input  logic               rd_gnt,
  input  logic               rd_valid,
  input  word_t              rd_data,
  // area RAM write port
  output logic               a_we,
  output logic               b_we,
  output logic [SIZE_W-1:0]  wrow,
  output logic signed [SIZE_W+1:0] wbase,
  output logic [PIX_PER_WORD-1:0]  wmask,
  output pixel_t             wpix [PIX_PER_WORD]
);

  localparam int WC_W = COORD_W;   // word column

  typedef struct packed {
    logic              area;   // 0 = A, 1 = B
    logic [SIZE_W-1:0] row;
    logic [WC_W-1:0]   w;
  } tag_t;

  localparam int TQ = 4;           // outstanding reads (read latency < 4)

  logic               issuing;
  logic               area;
  logic [SIZE_W-1:0]  r;
  logic [WC_W-1:0]    w, w_first, w_last;
  logic [IDX_W-1:0]   row_base;
  logic [COORD_W-1:0] x0 [2];      // left column of each area
  logic [SIZE_W-1:0]  sz [2];
  logic [COORD_W-1:0] cx_q, cy_q;

  tag_t               tq [TQ];
  logic [1:0]         tq_rd, tq_wr;
  logic [2:0]         tq_cnt;

  function automatic logic [COORD_W-1:0] corner(logic [COORD_W-1:0] c, logic [SIZE_W-1:0] s);
    return c - COORD_W'(s >> 1);
  endfunction

  assign rd_req  = issuing && (tq_cnt != 3'(TQ));
  assign rd_half = area;
  assign rd_idx  = row_base + IDX_W'(w);

  // set up the walk over one area
  task automatic begin_area(input logic ar, input logic [COORD_W-1:0] ccx,
                            input logic [COORD_W-1:0] ccy, input logic [SIZE_W-1:0] s);
    logic [COORD_W-1:0] xl, yt;
    xl = corner(ccx, s);
    yt = corner(ccy, s);
    area     <= ar;
    r        <= '0;
    w_first  <= WC_W'(xl / PIX_PER_WORD);
    w        <= WC_W'(xl / PIX_PER_WORD);
    w_last   <= WC_W'(32'(xl) + 32'(s) - 1) / WC_W'(PIX_PER_WORD);
    row_base <= IDX_W'(yt) * IDX_W'(WPR);
    x0[ar]   <= xl;
    sz[ar]   <= s;
  endtask

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      issuing  <= 1'b0;
      busy     <= 1'b0;
      done     <= 1'b0;
      area     <= 1'b0;
      r        <= '0;
      w        <= '0;
      w_first  <= '0;
      w_last   <= '0;
      row_base <= '0;
      x0       <= '{default: '0};
      sz       <= '{default: '0};
      cx_q     <= '0;
      cy_q     <= '0;
      tq_rd    <= '0;
      tq_wr    <= '0;
      tq_cnt   <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy    <= 1'b1;
        issuing <= 1'b1;
        cx_q    <= cx;
        cy_q    <= cy;
        sz[1]   <= size_b;
        begin_area(1'b0, cx, cy, size_a);
      end
      if (rd_req && rd_gnt) begin
        tq[tq_wr] <= '{area: area, row: r, w: w};
        tq_wr     <= tq_wr + 1'b1;
        if (w == w_last) begin
          w        <= w_first;
          r        <= r + 1'b1;
          row_base <= row_base + IDX_W'(WPR);
          if (r == sz[area] - 1'b1) begin
            if (!area) begin_area(1'b1, cx_q, cy_q, sz[1]);
            else       issuing <= 1'b0;
          end
        end else begin
          w <= w + 1'b1;
        end
      end
      if (rd_valid) tq_rd <= tq_rd + 1'b1;
      tq_cnt <= tq_cnt + 3'(rd_req && rd_gnt) - 3'(rd_valid);
      // finished when nothing is left to issue and the last read returns
      if (busy && !issuing && (tq_cnt == '0 || (tq_cnt == 3'd1 && rd_valid))) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end

  // unpack a returned word into the area RAM
  tag_t ht;
  logic [COORD_W+2:0] px0;
  always_comb begin
    ht    = tq[tq_rd];
    px0   = (COORD_W+3)'(ht.w) * (COORD_W+3)'(PIX_PER_WORD);   // first pixel column of the word
    a_we  = rd_valid && !ht.area;
    b_we  = rd_valid && ht.area;
    wrow  = ht.row;
    wbase = (SIZE_W+2)'(signed'(px0) - signed'((COORD_W+3)'(x0[ht.area])));
    for (int k = 0; k < PIX_PER_WORD; k++) begin
      wpix[k]  = word_pixel(rd_data, k);
      wmask[k] = (px0 + (COORD_W+3)'(k) >= (COORD_W+3)'(x0[ht.area])) &&
                 (px0 + (COORD_W+3)'(k) <  (COORD_W+3)'(x0[ht.area]) + (COORD_W+3)'(sz[ht.area]));
    end
  end

  assert property (@(posedge clk) !rst_n || !(rd_valid && tq_cnt == '0));

endmodule
