// Input memory switching: stores packed camera words in two board memories
// and reads them back one word per clock without ever reading and writing the
// same chip in one cycle.
//
// Word i of a frame (raster order, WPR words per padded row) is kept in
// memory i[0] at address {half, i/2}: consecutive words alternate between
// Memory 0 and Memory 1. Successive frames alternate between the two address
// halves of both chips, so a frame can still be read while the next one is
// being written.
//
// Reads. With EXT_READS = 0 (RVT configuration) the module walks the RVT window: window k
// (k = 0 .. NWIN-1) needs the new 5-pixel column made of words
// k + r*WPR, r = 0..10, read top to bottom. Because WPR is odd (103 for a
// 512-pixel row) every read goes to the other chip than the one before, so
// each chip is read at most every other clock. With EXT_READS = 1 (PIV configuration)
// reads come from the ext_rd_* port instead (used by the PIV window loader);
// a request is granted in the clock where ext_rd_gnt is high. Either way a
// word is read only once it has been written: a read waits (stall = 1)
// until the frame in that half is complete or the word's index is below the
// count of words already written. In RVT mode a frame's half is marked
// consumed once its last window has been read. Processing therefore starts as soon as the
// first 11 rows are in memory, not after a whole frame.
//
// Writes. Words from the packer enter a small FIFO. The head word is written
// in any clock where its chip is not being read, i.e. in the other chip's
// read cycles.
//
// Timing: memory requests are combinational from registers; read data is
// expected RD_LAT clocks after the request and is presented on col_* (RVT)
// or ext_rd_* (external) in that clock.
// The alternating placement of words, the alternating reads, writes in the
// idle cycles and starting after 11 rows follow the document. The FIFO, the
// frame halves, the external read port and the stall rule are this design's
// choices.
module input_mem_switch
  import smart_camera_pkg::*;
#(
  parameter int unsigned IMG_W      = 512,
  parameter int unsigned IMG_H      = 512,
  parameter int unsigned WIN        = 11,
  parameter int unsigned RD_LAT     = 2,
  parameter int unsigned FIFO_DEPTH = 4,
  parameter bit          EXT_READS  = 1'b0,   // 0 = RVT window reads, 1 = external reads
  // derived, not to be overridden
  parameter int unsigned WPR   = (IMG_W + PIX_PER_WORD - 1) / PIX_PER_WORD,
  parameter int unsigned FW    = WPR * IMG_H,
  parameter int unsigned NWIN  = FW - (WIN - 1) * WPR,
  parameter int unsigned IDX_W = $clog2(FW + 1),
  parameter int unsigned K_W   = $clog2(NWIN)
) (
  input  logic             clk,
  input  logic             rst_n,
  // packed words from the packer
  input  logic             word_valid,
  input  logic             word_sof,
  input  word_t            word,
  // RVT window columns
  output logic             col_valid,
  output word_t            col_word,
  output logic [3:0]       col_row,
  output logic [K_W-1:0]   col_k,
  output logic             col_half,
  // external read port
  input  logic             ext_rd_req,
  input  logic             ext_rd_half,
  input  logic [IDX_W-1:0] ext_rd_idx,
  output logic             ext_rd_gnt,
  output logic             ext_rd_valid,
  output word_t            ext_rd_data,
  // board memories 0 and 1
  output mem_req_t         mem0_req,
  output mem_req_t         mem1_req,
  input  word_t            mem0_rdata,
  input  word_t            mem1_rdata,
  // status
  output logic             stall,         // a wanted read is waiting for its data
  output logic [1:0]       half_done,     // the frame in that half is complete
  output logic             overflow,      // sticky: a word was lost (FIFO full)
  output logic             overrun        // sticky: a frame was overwritten while read
);

  initial begin
    assert ((FW + 1) / 2 <= 2 ** (MEM_AW - 1))
      else $fatal(1, "frame does not fit in half a memory");
  end

  typedef struct packed {
    logic             half;
    logic [IDX_W-1:0] idx;
    word_t            data;
  } wentry_t;

  localparam int PTR_W = $clog2(FIFO_DEPTH);

  function automatic mem_addr_t word_addr(logic half, logic [IDX_W-1:0] idx);
    mem_addr_t a;
    a = mem_addr_t'(idx) >> 1;
    a[MEM_AW-1] = half;
    return a;
  endfunction

  // ---------------------------------------------------------------- writer
  logic             acc_half;   // half of the frame being accepted
  logic             acc_seen;   // a frame has started
  logic [IDX_W-1:0] acc_idx;

  wentry_t          fifo [FIFO_DEPTH];
  logic [PTR_W-1:0] rd_ptr, wr_ptr;
  logic [PTR_W:0]   count;

  logic             mem_half;   // half of the frame last written to memory
  logic             mem_active;
  logic [IDX_W-1:0] wr_done;    // words of that frame already in memory

  wentry_t head;
  logic    push, pop;
  assign head = fifo[rd_ptr];
  assign push = word_valid && (word_sof || acc_seen) && (count != (PTR_W+1)'(FIFO_DEPTH));

  // ---------------------------------------------------------------- readers
  logic             rd_half;
  logic [K_W-1:0]   rd_k;
  logic [3:0]       rd_r;
  logic [IDX_W-1:0] rd_i;

  function automatic logic avail(logic h, logic [IDX_W-1:0] i);
    return half_done[h] || (mem_active && mem_half == h && i < wr_done);
  endfunction

  logic rvt_rd, ext_rd, rd_sel;
  logic rd_hit;           // some read this cycle
  mem_addr_t rd_addr;

  logic mode;
  assign mode = EXT_READS;

  always_comb begin
    rvt_rd     = !mode && avail(rd_half, rd_i);
    ext_rd     = mode && ext_rd_req && avail(ext_rd_half, ext_rd_idx);
    ext_rd_gnt = ext_rd;
    rd_hit     = rvt_rd || ext_rd;
    rd_sel     = mode ? ext_rd_idx[0] : rd_i[0];
    rd_addr    = mode ? word_addr(ext_rd_half, ext_rd_idx) : word_addr(rd_half, rd_i);
    stall      = mode ? (ext_rd_req && !ext_rd) : !rvt_rd;
  end

  // write the FIFO head to its chip unless that chip is being read
  assign pop = (count != 0) && !(rd_hit && rd_sel == head.idx[0]);

  always_comb begin
    mem0_req = '0;
    mem1_req = '0;
    if (rd_hit) begin
      if (rd_sel) mem1_req = '{en: 1'b1, we: 1'b0, addr: rd_addr, wdata: '0};
      else        mem0_req = '{en: 1'b1, we: 1'b0, addr: rd_addr, wdata: '0};
    end
    if (pop) begin
      if (head.idx[0]) mem1_req = '{en: 1'b1, we: 1'b1, addr: word_addr(head.half, head.idx), wdata: head.data};
      else             mem0_req = '{en: 1'b1, we: 1'b1, addr: word_addr(head.half, head.idx), wdata: head.data};
    end
  end

  // one chip is never read and written in the same clock
  assert property (@(posedge clk) disable iff (!rst_n) !(mem0_req.en && mem0_req.we && rd_hit && !rd_sel));
  assert property (@(posedge clk) disable iff (!rst_n) !(mem1_req.en && mem1_req.we && rd_hit && rd_sel));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc_half   <= 1'b1;
      acc_seen   <= 1'b0;
      acc_idx    <= '0;
      rd_ptr     <= '0;
      wr_ptr     <= '0;
      count      <= '0;
      mem_half   <= 1'b1;
      mem_active <= 1'b0;
      wr_done    <= '0;
      half_done  <= '0;
      overflow   <= 1'b0;
      overrun    <= 1'b0;
      rd_half    <= 1'b0;
      rd_k       <= '0;
      rd_r       <= '0;
      rd_i       <= '0;
    end else begin
      // accept a packed word
      if (word_valid && (word_sof || acc_seen)) begin
        if (push) begin
          fifo[wr_ptr] <= '{half: word_sof ? ~acc_half : acc_half,
                            idx:  word_sof ? '0 : acc_idx,
                            data: word};
          wr_ptr <= (wr_ptr == PTR_W'(FIFO_DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
        end else begin
          overflow <= 1'b1;
        end
        if (word_sof) begin
          acc_half <= ~acc_half;
          acc_seen <= 1'b1;
          acc_idx  <= IDX_W'(1);
        end else begin
          acc_idx  <= acc_idx + 1'b1;
        end
      end
      // write the head word to memory
      if (pop) begin
        rd_ptr <= (rd_ptr == PTR_W'(FIFO_DEPTH - 1)) ? '0 : rd_ptr + 1'b1;
        if (head.idx == '0) begin
          mem_half   <= head.half;
          mem_active <= 1'b1;
          wr_done    <= IDX_W'(1);
          half_done[head.half] <= (FW == 1);
          if (!mode && head.half == rd_half && (rd_k != '0 || rd_r != '0))
            overrun <= 1'b1;
        end else begin
          wr_done <= wr_done + 1'b1;
          if (wr_done + 1'b1 == IDX_W'(FW)) half_done[head.half] <= 1'b1;
        end
      end
      count <= count + (PTR_W+1)'(push) - (PTR_W+1)'(pop);
      // step the RVT window walk
      if (rvt_rd) begin
        if (rd_r == 4'(WIN - 1)) begin
          rd_r <= '0;
          if (rd_k == K_W'(NWIN - 1)) begin
            // frame consumed: its half waits for the next frame
            rd_k    <= '0;
            rd_i    <= '0;
            rd_half <= ~rd_half;
            half_done[rd_half] <= 1'b0;
          end else begin
            rd_k <= rd_k + 1'b1;
            rd_i <= IDX_W'(rd_k) + 1'b1;
          end
        end else begin
          rd_r <= rd_r + 1'b1;
          rd_i <= rd_i + IDX_W'(WPR);
        end
      end
    end
  end

  // ------------------------------------------------- read data return path
  typedef struct packed {
    logic           valid;
    logic           ext;
    logic           sel;
    logic [3:0]     row;
    logic [K_W-1:0] k;
    logic           half;
  } rtag_t;

  rtag_t tags [RD_LAT];
  rtag_t tag_out;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int s = 0; s < int'(RD_LAT); s++) tags[s] <= '0;
    end else begin
      tags[0] <= '{valid: rd_hit, ext: mode, sel: rd_sel, row: rd_r, k: rd_k, half: rd_half};
      for (int s = 1; s < int'(RD_LAT); s++) tags[s] <= tags[s-1];
    end
  end

  assign tag_out      = tags[RD_LAT-1];
  assign col_valid    = tag_out.valid && !tag_out.ext;
  assign col_word     = tag_out.sel ? mem1_rdata : mem0_rdata;
  assign col_row      = tag_out.row;
  assign col_k        = tag_out.k;
  assign col_half     = tag_out.half;
  assign ext_rd_valid = tag_out.valid && tag_out.ext;
  assign ext_rd_data  = col_word;

endmodule
