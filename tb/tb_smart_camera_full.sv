// Full-size testbench: smart_camera_top at its default parameters (RVT
// frames 512 x 512, PIV images 1008 x 1016, two-clock memory reads) with
// eight board memory models.
//
// RVT: one 512 x 512 frame of random pixels is streamed at one pixel per
// clock; after rvt_frame_done every 13th result word in Memory 2 (and the
// last) is compared with the strongest-template reference, the result
// count must be five per window (5 x 51704 = 258520) and the
// processing time is reported.
// PIV: two 1008 x 1016 images (image 2 = image 1 moved by (-3, +2)) are
// streamed; one 40/32 window at the image centre is run and its result word
// compared with a reference correlation, peak and parabolic fit; the
// window's clock count is reported.
// Frame and image sizes are the document's; the random image content is this
// testbench's.
module tb_smart_camera_full;
  import smart_camera_pkg::*;
  import rvt_pkg::*;
  import piv_pkg::*;
  import tb_ref_pkg::*;

  localparam int RW = 512, RH = 512, RWPR = 103, RPADW = 515, RFW = RWPR * RH, RNWIN = RFW - 10 * RWPR;
  localparam int PW = 1008, PH = 1016, PPADW = 1010;

  logic clk = 0, rst_n = 0;
  logic rvt_pix_valid = 0, rvt_pix_sof = 0;
  pixel_t rvt_pix = '0;
  mem_req_t rvt_mem0_req, rvt_mem1_req, rvt_mem2_req, rvt_mem3_req;
  word_t rvt_mem0_rdata, rvt_mem1_rdata, rvt_mem2_rdata, rvt_mem3_rdata;
  logic rvt_frame_done, rvt_done_bank, rvt_stall, rvt_overflow, rvt_overrun;
  logic piv_pix_valid = 0, piv_pix_sof = 0;
  pixel_t piv_pix = '0;
  mem_req_t piv_mem0_req, piv_mem1_req, piv_mem2_req, piv_mem3_req;
  word_t piv_mem0_rdata, piv_mem1_rdata, piv_mem2_rdata, piv_mem3_rdata;
  logic [1:0] piv_half_done;
  logic piv_stall, piv_overflow, piv_overrun;
  logic piv_reg_we = 0;
  logic [2:0] piv_reg_addr = '0;
  logic [15:0] piv_reg_wdata = '0;
  logic piv_start = 0, piv_busy, piv_res_done;
  corr_t piv_res_peak;
  int checks = 0, failures = 0;
  longint cycle = 0;

  smart_camera_top dut (
    .clk, .rst_n,
    .rvt_pix_valid, .rvt_pix_sof, .rvt_pix,
    .rvt_mem0_req, .rvt_mem1_req, .rvt_mem0_rdata, .rvt_mem1_rdata, .rvt_mem2_req, .rvt_mem3_req,
    .rvt_frame_done, .rvt_done_bank, .rvt_stall, .rvt_overflow, .rvt_overrun,
    .piv_pix_valid, .piv_pix_sof, .piv_pix,
    .piv_mem0_req, .piv_mem1_req, .piv_mem0_rdata, .piv_mem1_rdata, .piv_mem2_req, .piv_mem3_req,
    .piv_half_done, .piv_stall, .piv_overflow, .piv_overrun, .piv_reg_we, .piv_reg_addr, .piv_reg_wdata, .piv_start, .piv_busy,
    .piv_res_done, .piv_res_peak
  );

  board_sram u_rm0 (.clk, .req(rvt_mem0_req), .rdata(rvt_mem0_rdata));
  board_sram u_rm1 (.clk, .req(rvt_mem1_req), .rdata(rvt_mem1_rdata));
  board_sram u_rm2 (.clk, .req(rvt_mem2_req), .rdata(rvt_mem2_rdata));
  board_sram u_rm3 (.clk, .req(rvt_mem3_req), .rdata(rvt_mem3_rdata));
  board_sram u_pm0 (.clk, .req(piv_mem0_req), .rdata(piv_mem0_rdata));
  board_sram u_pm1 (.clk, .req(piv_mem1_req), .rdata(piv_mem1_rdata));
  board_sram u_pm2 (.clk, .req(piv_mem2_req), .rdata(piv_mem2_rdata));
  board_sram u_pm3 (.clk, .req(piv_mem3_req), .rdata(piv_mem3_rdata));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cycle++;
    if (rst_n && (rvt_overflow || rvt_overrun || piv_overflow || piv_overrun)) begin
      failures++; $display("overflow/overrun at cycle %0d", cycle); $finish;
    end
  end

  // ---------------------------------------------------------------- RVT
  pixel_t rimg [RPADW * RH];
  bit rvt_ok = 0;
  longint rvt_t0, rvt_t1;
  int rvt_words = 0;

  always @(posedge clk) if (rst_n && rvt_mem2_req.en && rvt_mem2_req.we) rvt_words++;

  initial begin : rvt_part
    for (int i = 0; i < RPADW * RH; i++) rimg[i] = (i % RPADW < RW) ? pixel_t'($urandom) : '0;
    wait (rst_n);
    @(negedge clk);
    rvt_t0 = cycle;
    for (int y = 0; y < RH; y++)
      for (int x = 0; x < RW; x++) begin
        rvt_pix_valid = 1; rvt_pix_sof = (x == 0 && y == 0); rvt_pix = rimg[y * RPADW + x];
        @(negedge clk);
      end
    rvt_pix_valid = 0; rvt_pix_sof = 0;
    while (!rvt_frame_done) @(negedge clk);
    rvt_t1 = cycle;
    checks++;
    if (rvt_done_bank != 0) begin failures++; $display("first frame not in Memory 2"); end
    repeat (4) @(negedge clk);
    checks++;
    if (rvt_words != 5 * (RNWIN - 2)) begin failures++; $display("%0d RVT results, expected %0d", rvt_words, 5 * (RNWIN - 2)); end
    for (int q = 0; q < 5 * (RNWIN - 2); q++)
      if (q % 13 == 0 || q == 5 * (RNWIN - 2) - 1) begin
        automatic int t = 5 * RPADW + 5 + q;
        automatic int nb [11][11];
        automatic best_t b;
        automatic result_word_t rw = result_word_t'(u_rm2.peek(mem_addr_t'(t)));
        for (int i = 0; i < 11; i++)
          for (int j = 0; j < 11; j++) nb[i][j] = int'(rimg[t + (i - 5) * RPADW + (j - 5)]);
        b = rvt_best(nb);
        checks++;
        if (int'(rw.label) != b.label || int'(rw.mag) != b.mag || rw.pix != rimg[t]) begin
          failures++;
          if (failures < 10) $display("RVT addr %0d: label %0d mag %0d pix %0d, expected %0d %0d %0d",
                                      t, rw.label, rw.mag, rw.pix, b.label, b.mag, rimg[t]);
        end
      end
    $display("RVT: 512x512 frame, %0d results, last result %0d clocks after the first pixel (%0.2f ms at 60 MHz)",
             rvt_words, rvt_t1 - rvt_t0, real'(rvt_t1 - rvt_t0) / 60.0e3);
    rvt_ok = 1;
  end

  // ---------------------------------------------------------------- PIV
  pixel_t pimg [2][PH * PPADW];
  bit piv_ok = 0;

  function automatic int pp(int h, int y, int x);
    return int'(pimg[h][y * PPADW + x]);
  endfunction

  task automatic wr(piv_reg_e a, int v);
    @(negedge clk);
    piv_reg_we = 1; piv_reg_addr = a; piv_reg_wdata = 16'(v);
    @(negedge clk) piv_reg_we = 0;
  endtask

  initial begin : piv_part
    localparam int DX = -3, DY = 2, CX = 504, CY = 508, M = 40, N = 32, S = M - N + 1, HALF = (M - N) / 2;
    longint plane [S][S];
    longint best, epx, epy, t0;
    int bx, by;
    piv_result_t r;
    for (int y = 0; y < PH; y++)
      for (int x = 0; x < PPADW; x++) pimg[0][y * PPADW + x] = (x < PW) ? pixel_t'($urandom) : '0;
    for (int y = 0; y < PH; y++)
      for (int x = 0; x < PPADW; x++)
        pimg[1][y * PPADW + x] = (x < PW && y - DY >= 0 && y - DY < PH && x - DX >= 0 && x - DX < PW) ?
                                 pimg[0][(y - DY) * PPADW + x - DX] : ((x < PW) ? pixel_t'($urandom) : '0);
    wait (rst_n);
    @(negedge clk);
    for (int h = 0; h < 2; h++)
      for (int y = 0; y < PH; y++)
        for (int x = 0; x < PW; x++) begin
          piv_pix_valid = 1; piv_pix_sof = (x == 0 && y == 0); piv_pix = pimg[h][y * PPADW + x];
          @(negedge clk);
        end
    piv_pix_valid = 0; piv_pix_sof = 0;
    while (piv_half_done != 2'b11) @(negedge clk);
    best = -1; bx = 0; by = 0;
    for (int sy = 0; sy < S; sy++)
      for (int sx = 0; sx < S; sx++) begin
        automatic longint acc = 0;
        for (int i = 0; i < N; i++)
          for (int j = 0; j < N; j++)
            acc += longint'(pp(0, CY - M / 2 + i + sy, CX - M / 2 + j + sx)) * longint'(pp(1, CY - N / 2 + i, CX - N / 2 + j));
        plane[sy][sx] = acc;
        if (acc > best) begin best = acc; bx = sx; by = sy; end
      end
    epx = longint'(bx - HALF) * 256;
    if (bx > 0 && bx < S - 1) epx += parabolic_frac(plane[by][bx-1], best, plane[by][bx+1], FRAC_W);
    epy = longint'(by - HALF) * 256;
    if (by > 0 && by < S - 1) epy += parabolic_frac(plane[by-1][bx], best, plane[by+1][bx], FRAC_W);
    wr(REG_CX, CX); wr(REG_CY, CY); wr(REG_RES_ADDR, 5);
    @(negedge clk) piv_start = 1;
    t0 = cycle;
    @(negedge clk) piv_start = 0;
    while (!piv_res_done) @(negedge clk);
    $display("PIV: 40/32 window done %0d clocks after start", cycle - t0);
    @(negedge clk);
    r = piv_result_t'(u_pm2.peek(mem_addr_t'(5)));
    checks++;
    if (longint'(r.px) != epx || longint'(r.py) != epy || int'(r.cx) != CX || int'(r.cy) != CY ||
        longint'(piv_res_peak) != best) begin
      failures++;
      $display("PIV: px %0d py %0d cx %0d cy %0d peak %0d; expected %0d %0d %0d %0d %0d",
               r.px, r.py, r.cx, r.cy, piv_res_peak, epx, epy, CX, CY, best);
    end
    checks++;
    if (bx - HALF != -DX || by - HALF != -DY) begin
      failures++; $display("PIV: peak at shift (%0d,%0d)", bx - HALF, by - HALF);
    end
    piv_ok = 1;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (rvt_ok && piv_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
