// Workload testbench: smart_camera_top at its default parameters under the
// timing of the evaluated applications.
//
// RVT: two 512 x 512 frames arrive the way the camera sends them: pixels at
// 30 MHz (one every two clocks of the 60 MHz clock), then blanking up to the
// 30 frames/s frame period of 2,000,000 clocks. Checked: the first result is
// in Memory 2 within 250 us (15,000 clocks) of the first pixel, each frame's
// results are complete before the next frame starts (the design keeps up
// with 30 frames/s), the two frames land in Memory 2 and Memory 3, every
// 17th result of each frame is right, and no word is lost or overwritten.
// PIV: two 1008 x 1016 images are sent at the same 30 MHz pixel rate. As
// soon as image 1 is stored the host runs one full row of 40/32 windows
// with 50 % overlap (centres 16 pixels apart, 61 windows at row 20), so the
// windows proceed while image 2 is still arriving. Every result word is
// compared with a reference correlation, peak and parabolic fit, and the
// clocks per window are reported.
// Frame sizes, frame rate, pixel clock, window sizes and overlap are the
// document's; the random image content and the choice of window row are this
// testbench's.
module tb_smart_camera_workloads;
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
  localparam int FRAME_CLKS = 2000000;   // 60 MHz / 30 frames/s
  pixel_t rimg [2][RPADW * RH];
  bit rvt_ok = 0;
  longint frame_t0 [2], first_res_t = -1, done_t [2];
  int rvt_words [2] = '{0, 0};
  int n_done = 0;

  always @(posedge clk) if (rst_n) begin
    if (rvt_mem2_req.en && rvt_mem2_req.we) begin
      rvt_words[0]++;
      if (first_res_t < 0) first_res_t = cycle;
    end
    if (rvt_mem3_req.en && rvt_mem3_req.we) rvt_words[1]++;
    if (rvt_frame_done && n_done < 2) begin
      done_t[n_done] = cycle;
      checks++;
      if (int'(rvt_done_bank) != n_done) begin failures++; $display("frame %0d done in bank %0d", n_done, rvt_done_bank); end
      n_done++;
    end
  end

  task automatic check_frame(int f);
    for (int q = 0; q < 5 * (RNWIN - 2); q++)
      if (q % 17 == f || q == 5 * (RNWIN - 2) - 1) begin
        automatic int t = 5 * RPADW + 5 + q;
        automatic int nb [11][11];
        automatic best_t b;
        automatic result_word_t rw = result_word_t'(f ? u_rm3.peek(mem_addr_t'(t)) : u_rm2.peek(mem_addr_t'(t)));
        for (int i = 0; i < 11; i++)
          for (int j = 0; j < 11; j++) nb[i][j] = int'(rimg[f][t + (i - 5) * RPADW + (j - 5)]);
        b = rvt_best(nb);
        checks++;
        if (int'(rw.label) != b.label || int'(rw.mag) != b.mag || rw.pix != rimg[f][t]) begin
          failures++;
          if (failures < 10) $display("RVT frame %0d addr %0d: label %0d mag %0d pix %0d, expected %0d %0d %0d",
                                      f, t, rw.label, rw.mag, rw.pix, b.label, b.mag, rimg[f][t]);
        end
      end
  endtask

  initial begin : rvt_part
    for (int f = 0; f < 2; f++)
      for (int i = 0; i < RPADW * RH; i++) rimg[f][i] = (i % RPADW < RW) ? pixel_t'($urandom) : '0;
    wait (rst_n);
    @(negedge clk);
    for (int f = 0; f < 2; f++) begin
      frame_t0[f] = cycle;
      for (int y = 0; y < RH; y++)
        for (int x = 0; x < RW; x++) begin
          rvt_pix_valid = 1; rvt_pix_sof = (x == 0 && y == 0); rvt_pix = rimg[f][y * RPADW + x];
          @(negedge clk) rvt_pix_valid = 0; rvt_pix_sof = 0;
          @(negedge clk);
        end
      while (cycle < frame_t0[f] + FRAME_CLKS) @(negedge clk);
      checks++;
      if (n_done != f + 1) begin failures++; $display("frame %0d not finished within its frame period", f); end
      checks++;
      if (rvt_words[f] != 5 * (RNWIN - 2)) begin failures++; $display("frame %0d: %0d results", f, rvt_words[f]); end
    end
    checks++;
    if (first_res_t < 0 || first_res_t - frame_t0[0] > 15000) begin
      failures++; $display("first result %0d clocks after the first pixel", first_res_t - frame_t0[0]);
    end
    for (int f = 0; f < 2; f++) check_frame(f);
    $display("RVT: first result %0d clocks (%0.1f us) after the first pixel; frames done %0d and %0d clocks (%0.2f / %0.2f ms) after their first pixel, frame period %0d",
             first_res_t - frame_t0[0], real'(first_res_t - frame_t0[0]) / 60.0,
             done_t[0] - frame_t0[0], done_t[1] - frame_t0[1],
             real'(done_t[0] - frame_t0[0]) / 60.0e3, real'(done_t[1] - frame_t0[1]) / 60.0e3, FRAME_CLKS);
    rvt_ok = 1;
  end

  // ---------------------------------------------------------------- PIV
  pixel_t pimg [2][PH * PPADW];
  bit piv_ok = 0;
  bit img2_incomplete_seen = 0;

  function automatic int pp(int h, int y, int x);
    return int'(pimg[h][y * PPADW + x]);
  endfunction

  task automatic wr(piv_reg_e a, int v);
    @(negedge clk);
    piv_reg_we = 1; piv_reg_addr = a; piv_reg_wdata = 16'(v);
    @(negedge clk) piv_reg_we = 0;
  endtask

  localparam int M = 40, N = 32, S = M - N + 1, HALF = (M - N) / 2, CY = 20, NWIN_ROW = (PW - M) / (N / 2) + 1;

  initial begin : piv_camera
    for (int h = 0; h < 2; h++)
      for (int y = 0; y < PH; y++)
        for (int x = 0; x < PPADW; x++) pimg[h][y * PPADW + x] = (x < PW) ? pixel_t'($urandom) : '0;
    wait (rst_n);
    @(negedge clk);
    for (int h = 0; h < 2; h++)
      for (int y = 0; y < PH; y++)
        for (int x = 0; x < PW; x++) begin
          piv_pix_valid = 1; piv_pix_sof = (x == 0 && y == 0); piv_pix = pimg[h][y * PPADW + x];
          @(negedge clk) piv_pix_valid = 0; piv_pix_sof = 0;
          @(negedge clk);
        end
  end

  initial begin : piv_host
    longint t_first, t_last, t_w0, t_ws, t_rest;
    wait (rst_n);
    while (!piv_half_done[0]) @(negedge clk);
    t_first = cycle;
    for (int w = 0; w < NWIN_ROW; w++) begin
      automatic int cx = M / 2 + w * (N / 2);
      automatic longint plane [S][S];
      automatic longint best = -1, epx, epy;
      automatic int bx = 0, by = 0;
      automatic piv_result_t r;
      for (int sy = 0; sy < S; sy++)
        for (int sx = 0; sx < S; sx++) begin
          automatic longint acc = 0;
          for (int i = 0; i < N; i++)
            for (int j = 0; j < N; j++)
              acc += longint'(pp(0, CY - M / 2 + i + sy, cx - M / 2 + j + sx)) * longint'(pp(1, CY - N / 2 + i, cx - N / 2 + j));
          plane[sy][sx] = acc;
          if (acc > best) begin best = acc; bx = sx; by = sy; end
        end
      epx = longint'(bx - HALF) * 256;
      if (bx > 0 && bx < S - 1) epx += parabolic_frac(plane[by][bx-1], best, plane[by][bx+1], FRAC_W);
      epy = longint'(by - HALF) * 256;
      if (by > 0 && by < S - 1) epy += parabolic_frac(plane[by-1][bx], best, plane[by+1][bx], FRAC_W);
      wr(REG_CX, cx); wr(REG_CY, CY); wr(REG_RES_ADDR, w);
      t_ws = cycle;
      if (w == 1) t_rest = cycle;
      @(negedge clk) piv_start = 1;
      @(negedge clk) piv_start = 0;
      while (!piv_res_done) @(negedge clk);
      if (w == 0) t_w0 = cycle - t_ws;
      if (!piv_half_done[1]) img2_incomplete_seen = 1;
      @(negedge clk);
      r = piv_result_t'(u_pm2.peek(mem_addr_t'(w)));
      checks++;
      if (longint'(r.px) != epx || longint'(r.py) != epy || int'(r.cx) != cx || int'(r.cy) != CY ||
          longint'(piv_res_peak) != best) begin
        failures++;
        if (failures < 10) $display("PIV window %0d: px %0d py %0d cx %0d cy %0d peak %0d; expected %0d %0d %0d %0d %0d",
                                    w, r.px, r.py, r.cx, r.cy, piv_res_peak, epx, epy, cx, CY, best);
      end
    end
    t_last = cycle;
    checks++;
    if (!img2_incomplete_seen) begin failures++; $display("no window finished before image 2 was complete"); end
    $display("PIV: %0d windows of 40/32 at 50%% overlap in %0d clocks; the first took %0d clocks (waiting for image 2 rows), the other %0d took %0d each including register writes; 3782 windows at that rate take %0.3f s at 60 MHz",
             NWIN_ROW, t_last - t_first, t_w0, NWIN_ROW - 1, (t_last - t_rest) / (NWIN_ROW - 1),
             real'(t_last - t_rest) / real'(NWIN_ROW - 1) * 3782.0 / 60.0e6);
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
    repeat (6000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
