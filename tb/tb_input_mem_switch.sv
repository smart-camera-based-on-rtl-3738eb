// Testbench for input_mem_switch with two board memory models.
//
// RVT instance (15-pixel rows = 3 words, 14 rows, 12 windows per frame):
// three frames of random words are written at a camera-like rate. The
// window columns must come out in order (window k, rows 0..10, word
// k + 3*row) with the right data for each frame; every read must find its
// word already written; consecutive reads must alternate between the two
// chips; no chip may be read and written in one clock; the reader must
// have waited for data at least once (processing starts after 11 rows, not
// after a frame); no overflow or overrun.
// External-read instance: after two frames are stored, random word reads
// through the external port must return the stored words, RD_LAT clocks
// after the grant.
// Error flags, last: frames back to back at one word per clock must raise
// overrun on the RVT instance; a read of chip 0 held every clock must block
// the writes so that the FIFO fills and overflow rises on the other one.
// The alternating placement and reads are the document's scheme; the image
// sizes, timing of the stream and the checks are this testbench's own.
module tb_input_mem_switch;
  import smart_camera_pkg::*;

  localparam int IMG_W = 15, IMG_H = 14, WPR = 3, FW = WPR * IMG_H, NWIN = FW - 10 * WPR;
  localparam int RD_LAT = 2, NFRAMES = 3;
  localparam int IDX_W = $clog2(FW + 1), K_W = $clog2(NWIN);

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  // ---------------- RVT instance
  logic word_valid = 0, word_sof = 0;
  word_t word = '0;
  logic col_valid, col_half;
  word_t col_word;
  logic [3:0] col_row;
  logic [K_W-1:0] col_k;
  logic ext_gnt_u, ext_valid_u;
  word_t ext_data_u;
  mem_req_t m0, m1;
  word_t r0, r1;
  logic stall, overflow, overrun;
  logic [1:0] half_done;

  input_mem_switch #(.IMG_W(IMG_W), .IMG_H(IMG_H), .RD_LAT(RD_LAT), .EXT_READS(1'b0)) dut (
    .clk, .rst_n, .word_valid, .word_sof, .word,
    .col_valid, .col_word, .col_row, .col_k, .col_half,
    .ext_rd_req(1'b0), .ext_rd_half(1'b0), .ext_rd_idx('0),
    .ext_rd_gnt(ext_gnt_u), .ext_rd_valid(ext_valid_u), .ext_rd_data(ext_data_u),
    .mem0_req(m0), .mem1_req(m1), .mem0_rdata(r0), .mem1_rdata(r1),
    .stall, .half_done, .overflow, .overrun
  );
  board_sram #(.RD_LAT(RD_LAT)) u_m0 (.clk, .req(m0), .rdata(r0));
  board_sram #(.RD_LAT(RD_LAT)) u_m1 (.clk, .req(m1), .rdata(r1));

  word_t frames [NFRAMES][FW];
  logic stress = 0;  // error-flag phase: data checks are off
  int fr = 0, ek = 0, er = 0, cols = 0, stalls = 0, last_chip = -1, reads = 0, bad_alt = 0;
  bit started = 0, finished_rvt = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      // chip usage rules
      if (m0.en && !m0.we && m1.en && !m1.we) begin failures++; $display("two reads at once"); end
      if (m0.en && !m0.we || m1.en && !m1.we) begin
        automatic int chip = m1.en && !m1.we ? 1 : 0;
        automatic mem_req_t q = chip ? m1 : m0;
        reads++;
        if (chip == last_chip) bad_alt++;
        last_chip = chip;
        if (!stress && !(chip ? u_m1.written(q.addr) : u_m0.written(q.addr))) begin
          failures++; $display("read of unwritten address %h", q.addr);
        end
      end
      if (started && stall && !finished_rvt) stalls++;
      if (m0.en && m0.we) started = 1;
      if (col_valid && !stress) begin
        cols++;
        checks++;
        if (int'(col_k) != ek || int'(col_row) != er || col_word != frames[fr][ek + WPR * er] ||
            col_half != 1'(fr)) begin
          failures++;
          $display("frame %0d col k=%0d row=%0d, expected k=%0d row=%0d", fr, col_k, col_row, ek, er);
        end
        if (er == 10) begin
          er = 0;
          if (ek == NWIN - 1) begin ek = 0; fr++; end else ek++;
        end else er++;
        if (fr == NFRAMES) finished_rvt = 1;
      end
    end
  end

  // ---------------- external-read instance
  logic xw_valid = 0, xw_sof = 0;
  word_t xw = '0;
  logic x_req = 0, x_half = 0;
  logic [IDX_W-1:0] x_idx = '0;
  logic x_gnt, x_valid;
  word_t x_data;
  logic x_colv, x_colh;
  word_t x_colw;
  logic [3:0] x_colr;
  logic [K_W-1:0] x_colk;
  mem_req_t xm0, xm1;
  word_t xr0, xr1;
  logic x_stall, x_ovf, x_ovr;
  logic [1:0] x_hd;

  input_mem_switch #(.IMG_W(IMG_W), .IMG_H(IMG_H), .RD_LAT(RD_LAT), .EXT_READS(1'b1)) dut_ext (
    .clk, .rst_n, .word_valid(xw_valid), .word_sof(xw_sof), .word(xw),
    .col_valid(x_colv), .col_word(x_colw), .col_row(x_colr), .col_k(x_colk), .col_half(x_colh),
    .ext_rd_req(x_req), .ext_rd_half(x_half), .ext_rd_idx(x_idx),
    .ext_rd_gnt(x_gnt), .ext_rd_valid(x_valid), .ext_rd_data(x_data),
    .mem0_req(xm0), .mem1_req(xm1), .mem0_rdata(xr0), .mem1_rdata(xr1),
    .stall(x_stall), .half_done(x_hd), .overflow(x_ovf), .overrun(x_ovr)
  );
  board_sram #(.RD_LAT(RD_LAT)) u_xm0 (.clk, .req(xm0), .rdata(xr0));
  board_sram #(.RD_LAT(RD_LAT)) u_xm1 (.clk, .req(xm1), .rdata(xr1));

  word_t xexp [$];
  int    xdue [$];
  int    cycle = 0, ext_reads = 0;
  always @(posedge clk) begin
    cycle++;
    if (rst_n && x_req && x_gnt && !stress) begin
      xexp.push_back(frames[x_half][x_idx]);
      xdue.push_back(cycle + RD_LAT);
    end
    if (rst_n && x_valid && !stress) begin
      checks++;
      ext_reads++;
      if (xexp.size() == 0) begin failures++; $display("extra external data"); end
      else begin
        automatic word_t e = xexp.pop_front();
        automatic int due = xdue.pop_front();
        if (x_data != e || cycle != due) begin
          failures++; $display("external read %h at %0d, expected %h at %0d", x_data, cycle, e, due);
        end
      end
    end
  end

  initial begin
    for (int f = 0; f < NFRAMES; f++)
      for (int i = 0; i < FW; i++) frames[f][i] = {$urandom, $urandom};
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    for (int f = 0; f < NFRAMES; f++)
      for (int i = 0; i < FW; i++) begin
        @(negedge clk);
        word_valid = 1; word_sof = (i == 0); word = frames[f][i];
        xw_valid = (f < 2); xw_sof = (i == 0); xw = frames[f][i];
        @(negedge clk);
        word_valid = 0; word_sof = 0; xw_valid = 0; xw_sof = 0;
        repeat ($urandom_range(2, 8)) @(negedge clk);
      end
    wait (finished_rvt);
    // random external reads of the two stored frames
    for (int n = 0; n < 100; n++) begin
      @(negedge clk);
      x_req = 1; x_half = 1'($urandom); x_idx = IDX_W'($urandom_range(0, FW - 1));
      @(posedge clk);
      while (!x_gnt) @(posedge clk);
      @(negedge clk);
      x_req = 0;
    end
    repeat (10) @(negedge clk);
    checks++;
    if (cols != NFRAMES * NWIN * 11) begin failures++; $display("%0d columns words, expected %0d", cols, NFRAMES * NWIN * 11); end
    checks++;
    if (bad_alt != 0) begin failures++; $display("%0d reads did not alternate chips", bad_alt); end
    checks++;
    if (stalls == 0) begin failures++; $display("reader never waited for data"); end
    checks++;
    if (overflow || overrun || x_ovf || x_ovr) begin failures++; $display("overflow/overrun"); end
    checks++;
    if (ext_reads != 100) begin failures++; $display("%0d external reads", ext_reads); end
    // error flags.  Window walk: frames back to back at one word per clock
    // outrun the reader, so a frame is overwritten while it is read.  External
    // reads: a read of chip 0 every clock blocks the words bound for chip 0,
    // so the FIFO fills and words are lost.
    stress = 1;
    @(negedge clk);
    x_req = 1; x_half = 1; x_idx = '0;
    for (int f = 0; f < 4; f++)
      for (int i = 0; i < FW; i++) begin
        @(negedge clk);
        word_valid = 1; word_sof = (i == 0); word = {$urandom, $urandom};
        xw_valid = (f == 0); xw_sof = (i == 0); xw = word;
      end
    @(negedge clk);
    word_valid = 0; word_sof = 0; xw_valid = 0; xw_sof = 0; x_req = 0;
    repeat (20) @(negedge clk);
    checks++;
    if (!x_ovf || x_ovr) begin failures++; $display("external-read flags %b %b", x_ovf, x_ovr); end
    checks++;
    if (!overrun || overflow) begin failures++; $display("window-walk flags %b %b", overflow, overrun); end
    $display("reads %0d, stall cycles %0d", reads, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
