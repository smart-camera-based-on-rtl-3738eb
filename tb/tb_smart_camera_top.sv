// End-to-end testbench for smart_camera_top at reduced image sizes (RVT
// frames 13 x 14, PIV images 64 x 48) with eight board memory models.
//
// RVT: three camera frames arrive at about one pixel in four clocks (the
// camera is slower than the clock, as on the board). After each
// rvt_frame_done the result memory named by rvt_done_bank is compared word
// by word with the strongest-template reference for that frame.
// PIV: two images are streamed (image 2 = image 1 moved by a known
// amount); the host starts the first window as soon as image 1 is stored,
// so its Area B reads wait for image 2. Four windows with changing sizes
// are run and each result word in Memory 2 is compared with a reference
// correlation, peak and parabolic fit.
//
// Mechanism counters (each must be non-zero): read stalls, Memory 0 written
// while Memory 1 is read and the reverse, RVT frames finished in each output
// bank, checked RVT results, PIV reads of each image, PIV reads waiting for
// unwritten data, PIV size changes, PIV results. overflow and overrun must
// stay low (both flags are raised on purpose in the unit testbench of the
// input memory switch).
// The mechanisms counted are those the document describes; the reduced sizes
// and the traffic pattern are this testbench's own.
module tb_smart_camera_top;
  import smart_camera_pkg::*;
  import rvt_pkg::*;
  import piv_pkg::*;
  import tb_ref_pkg::*;

  localparam int RW = 13, RH = 14, RPADW = 15, RWPR = 3, RFW = RWPR * RH, RNWIN = RFW - 10 * RWPR;
  localparam int PW = 64, PH = 48, PWPR = 13, PPADW = 65;
  localparam int NFRAMES = 3;

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

  smart_camera_top #(.RVT_IMG_W(RW), .RVT_IMG_H(RH), .PIV_IMG_W(PW), .PIV_IMG_H(PH)) dut (
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

  // ---------------------------------------------------------------- counters
  int n_stall = 0, n_wr0_rd1 = 0, n_wr1_rd0 = 0, n_bank [2] = '{0, 0}, n_rvt_res = 0;
  int n_piv_rd [2] = '{0, 0}, n_piv_wait = 0, n_size_change = 0, n_piv_res = 0;
  int rvt_frames_done = 0;

  always @(posedge clk) if (rst_n) begin
    if (rvt_stall) n_stall++;
    if (rvt_mem0_req.en && rvt_mem0_req.we && rvt_mem1_req.en && !rvt_mem1_req.we) n_wr0_rd1++;
    if (rvt_mem1_req.en && rvt_mem1_req.we && rvt_mem0_req.en && !rvt_mem0_req.we) n_wr1_rd0++;
    if (dut.p_rd_req && dut.p_rd_gnt) n_piv_rd[dut.p_rd_half]++;
    if (dut.p_rd_req && !dut.p_rd_gnt && piv_stall) n_piv_wait++;
    if (piv_res_done) n_piv_res++;
    checks++;
    if (rvt_overflow || rvt_overrun || piv_overflow || piv_overrun) begin
      failures++; $display("overflow/overrun at %0t", $time);
    end
  end

  // ---------------------------------------------------------------- RVT
  int rimg [NFRAMES][RPADW * RH];

  task automatic check_rvt_frame(int f, int bank);
    for (int k = 2; k < RNWIN; k++)
      for (int p = 0; p < 5; p++) begin
        automatic int t = 5 * RPADW + 5 * (k - 1) + p;
        automatic int nb [11][11];
        automatic best_t b;
        automatic result_word_t rw;
        rw = result_word_t'(bank ? u_rm3.peek(mem_addr_t'(t)) : u_rm2.peek(mem_addr_t'(t)));
        for (int i = 0; i < 11; i++)
          for (int j = 0; j < 11; j++) nb[i][j] = rimg[f][t + (i - 5) * RPADW + (j - 5)];
        b = rvt_best(nb);
        checks++;
        n_rvt_res++;
        if (int'(rw.label) != b.label || int'(rw.mag) != b.mag || int'(rw.pix) != rimg[f][t]) begin
          failures++;
          if (failures < 10) $display("RVT frame %0d addr %0d: label %0d mag %0d pix %0d, expected %0d %0d %0d",
                                      f, t, rw.label, rw.mag, rw.pix, b.label, b.mag, rimg[f][t]);
        end
      end
  endtask

  always @(posedge clk) if (rst_n && rvt_frame_done) begin
    automatic int f = rvt_frames_done;
    automatic int bank = int'(rvt_done_bank);
    rvt_frames_done++;
    n_bank[bank]++;
    checks++;
    if (f >= NFRAMES || bank != f % 2) begin failures++; $display("frame done %0d in bank %0d", f, bank); end
    else begin
      repeat (2) @(posedge clk);
      check_rvt_frame(f, bank);
    end
  end

  initial begin : rvt_camera
    for (int f = 0; f < NFRAMES; f++)
      for (int i = 0; i < RPADW * RH; i++)
        rimg[f][i] = (i % RPADW < RW) ? int'($urandom_range(0, 4095)) : 0;
    wait (rst_n);
    for (int f = 0; f < NFRAMES; f++) begin
      for (int y = 0; y < RH; y++)
        for (int x = 0; x < RW; x++) begin
          while ($urandom_range(0, 3) != 0) @(negedge clk);
          @(negedge clk);
          rvt_pix_valid = 1; rvt_pix_sof = (x == 0 && y == 0); rvt_pix = pixel_t'(rimg[f][y * RPADW + x]);
          @(negedge clk) rvt_pix_valid = 0; rvt_pix_sof = 0;
        end
      repeat (100) @(negedge clk);    // vertical blanking
    end
  end

  // ---------------------------------------------------------------- PIV
  int pimg [2][PH][PPADW];

  initial begin : piv_camera
    int dx, dy;
    dx = 2; dy = -1;
    for (int y = 0; y < PH; y++)
      for (int x = 0; x < PPADW; x++) pimg[0][y][x] = (x < PW) ? int'($urandom_range(0, 4095)) : 0;
    for (int y = 0; y < PH; y++)
      for (int x = 0; x < PPADW; x++)
        pimg[1][y][x] = (x < PW && y - dy >= 0 && y - dy < PH && x - dx >= 0 && x - dx < PW) ?
                        pimg[0][y - dy][x - dx] : ((x < PW) ? int'($urandom_range(0, 4095)) : 0);
    wait (rst_n);
    for (int h = 0; h < 2; h++)
      for (int y = 0; y < PH; y++)
        for (int x = 0; x < PW; x++) begin
          @(negedge clk);
          piv_pix_valid = 1; piv_pix_sof = (x == 0 && y == 0); piv_pix = pixel_t'(pimg[h][y][x]);
          @(negedge clk) piv_pix_valid = 0; piv_pix_sof = 0;
        end
  end

  task automatic wr(piv_reg_e a, int v);
    @(negedge clk);
    piv_reg_we = 1; piv_reg_addr = a; piv_reg_wdata = 16'(v);
    @(negedge clk) piv_reg_we = 0;
  endtask

  int last_m = M_MAX, last_n = N_MAX;

  task automatic piv_window(int x, int y, int m, int n, int raddr);
    longint plane [S_MAX][S_MAX];
    longint best, epx, epy;
    int bx, by, s, half, n_before;
    piv_result_t r;
    s = m - n + 1; half = (m - n) / 2;
    best = -1; bx = 0; by = 0;
    for (int sy = 0; sy < s; sy++)
      for (int sx = 0; sx < s; sx++) begin
        automatic longint acc = 0;
        for (int i = 0; i < n; i++)
          for (int j = 0; j < n; j++)
            acc += longint'(pimg[0][y - m / 2 + i + sy][x - m / 2 + j + sx]) *
                   longint'(pimg[1][y - n / 2 + i][x - n / 2 + j]);
        plane[sy][sx] = acc;
        if (acc > best) begin best = acc; bx = sx; by = sy; end
      end
    epx = longint'(bx - half) * 256;
    if (bx > 0 && bx < s - 1) epx += parabolic_frac(plane[by][bx-1], best, plane[by][bx+1], FRAC_W);
    epy = longint'(by - half) * 256;
    if (by > 0 && by < s - 1) epy += parabolic_frac(plane[by-1][bx], best, plane[by+1][bx], FRAC_W);
    if (m != last_m || n != last_n) n_size_change++;
    last_m = m; last_n = n;
    wr(REG_CX, x); wr(REG_CY, y); wr(REG_SIZE_A, m); wr(REG_SIZE_B, n); wr(REG_RES_ADDR, raddr);
    n_before = n_piv_res;
    @(negedge clk) piv_start = 1;
    @(negedge clk) piv_start = 0;
    while (n_piv_res == n_before) @(negedge clk);
    @(negedge clk);
    r = piv_result_t'(u_pm2.peek(mem_addr_t'(raddr)));
    checks++;
    if (longint'(r.px) != epx || longint'(r.py) != epy || int'(r.cx) != x || int'(r.cy) != y ||
        longint'(piv_res_peak) != best) begin
      failures++;
      $display("PIV window (%0d,%0d) %0d/%0d: px %0d py %0d cx %0d cy %0d peak %0d; expected %0d %0d %0d %0d %0d",
               x, y, m, n, r.px, r.py, r.cx, r.cy, piv_res_peak, epx, epy, x, y, best);
    end
  endtask

  initial begin : piv_host
    piv_result_t r0;
    wait (rst_n);
    wait (piv_half_done[0]);
    checks++;
    if (piv_half_done[1]) begin failures++; $display("image 2 stored too early"); end
    piv_window(32, 24, 40, 32, 0);
    r0 = piv_result_t'(u_pm2.peek(0));
    checks++;
    if ((longint'(r0.px) + 128) >>> 8 != -2 || (longint'(r0.py) + 128) >>> 8 != 1) begin
      failures++; $display("PIV did not find the (2,-1) move");
    end
    piv_window(25, 21, 12, 8, 1);
    piv_window(40, 26, 40, 32, 2);
    piv_window(10, 40, 9, 5, 3);
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (rvt_frames_done == NFRAMES && n_piv_res == 4);
    repeat (50) @(negedge clk);
    checks++;
    if (rvt_frames_done != NFRAMES) begin failures++; $display("%0d RVT frames", rvt_frames_done); end
    $display("mechanisms: stall %0d, wr0_rd1 %0d, wr1_rd0 %0d, bank0 %0d, bank1 %0d, rvt results %0d,",
             n_stall, n_wr0_rd1, n_wr1_rd0, n_bank[0], n_bank[1], n_rvt_res);
    $display("            piv reads img1 %0d img2 %0d, piv waits %0d, size changes %0d, piv results %0d",
             n_piv_rd[0], n_piv_rd[1], n_piv_wait, n_size_change, n_piv_res);
    checks++; if (n_stall == 0)       begin failures++; $display("no read stall"); end
    checks++; if (n_wr0_rd1 == 0)     begin failures++; $display("never wrote Memory 0 while reading Memory 1"); end
    checks++; if (n_wr1_rd0 == 0)     begin failures++; $display("never wrote Memory 1 while reading Memory 0"); end
    checks++; if (n_bank[0] == 0)     begin failures++; $display("no frame in output bank 0"); end
    checks++; if (n_bank[1] == 0)     begin failures++; $display("no frame in output bank 1"); end
    checks++; if (n_rvt_res == 0)     begin failures++; $display("no RVT result checked"); end
    checks++; if (n_piv_rd[0] == 0)   begin failures++; $display("no PIV read of image 1"); end
    checks++; if (n_piv_rd[1] == 0)   begin failures++; $display("no PIV read of image 2"); end
    checks++; if (n_piv_wait == 0)    begin failures++; $display("no PIV read waited for data"); end
    checks++; if (n_size_change == 0) begin failures++; $display("no PIV size change"); end
    checks++; if (n_piv_res == 0)     begin failures++; $display("no PIV result"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
