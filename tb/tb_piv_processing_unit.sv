// Testbench for piv_processing_unit on a 64 x 48 image pair. Image 1 holds
// random particle blobs on a noisy background; image 2 is image 1 moved by
// a known (dx, dy). For each window the host registers are written, start
// is pulsed and the result word is compared with a reference computed here:
// the full correlation plane, its first maximum in raster order, the
// parabolic fit and the window centre. Also checks that the integer
// displacement equals -(dx, dy) for clean moves, that the busy time of a
// 40/32 window is above the (m-n+1)^2 n = 2592 correlation clocks, and
// that registers are ignored while busy. Windows 40/32, 12/8 and 9/5.
// The correlation and the parabolic fit are the document's equations; the
// image size, particle pattern and result format are this testbench's and
// this design's own.
module tb_piv_processing_unit;
  import smart_camera_pkg::*;
  import piv_pkg::*;
  import tb_ref_pkg::*;

  localparam int IMG_W = 64, IMG_H = 48;
  localparam int WPR = (IMG_W + 4) / 5, FW = WPR * IMG_H, IDX_W = $clog2(FW + 1);

  logic clk = 0, rst_n = 0;
  logic reg_we = 0;
  logic [2:0] reg_addr = '0;
  logic [15:0] reg_wdata = '0;
  logic start = 0, busy;
  logic rd_req, rd_half;
  logic [IDX_W-1:0] rd_idx;
  logic rd_gnt, rd_valid;
  word_t rd_data;
  logic res_valid;
  mem_addr_t res_addr;
  word_t res_data;
  corr_t res_peak;
  int checks = 0, failures = 0;

  piv_processing_unit #(.IMG_W(IMG_W), .IMG_H(IMG_H)) dut (.*);

  always #5 clk = ~clk;

  int    img [2][IMG_H][WPR*5];
  word_t mem [2][FW];

  logic gnt_rand = 0;
  word_t pipe_d [2];
  logic  pipe_v [2] = '{0, 0};
  assign rd_gnt = gnt_rand;
  always @(posedge clk) begin
    gnt_rand <= ($urandom_range(0, 4) != 0);
    pipe_v[0] <= rd_req && rd_gnt;
    pipe_d[0] <= mem[rd_half][rd_idx];
    pipe_v[1] <= pipe_v[0];
    pipe_d[1] <= pipe_d[0];
  end
  assign rd_valid = pipe_v[1];
  assign rd_data  = pipe_d[1];

  task automatic make_images(int dx, int dy, bit noisy);
    int base [IMG_H + 16][IMG_W + 16];
    foreach (base[y, x]) base[y][x] = noisy ? $urandom_range(0, 40) : 0;
    for (int p = 0; p < 60; p++) begin
      automatic int py = $urandom_range(0, IMG_H + 15), px = $urandom_range(0, IMG_W + 15);
      automatic int amp = $urandom_range(800, 3000);
      for (int y = -2; y <= 2; y++)
        for (int x = -2; x <= 2; x++)
          if (py + y >= 0 && py + y < IMG_H + 16 && px + x >= 0 && px + x < IMG_W + 16) begin
            automatic int v = base[py + y][px + x] + amp / (1 + 2 * (y * y + x * x));
            base[py + y][px + x] = v > 4095 ? 4095 : v;
          end
    end
    for (int y = 0; y < IMG_H; y++)
      for (int x = 0; x < WPR * 5; x++) begin
        img[0][y][x] = (x < IMG_W) ? base[y + 8][x + 8] : 0;
        img[1][y][x] = (x < IMG_W) ? base[y + 8 - dy][x + 8 - dx] : 0;
      end
    for (int h = 0; h < 2; h++)
      for (int i = 0; i < FW; i++) begin
        mem[h][i] = '0;
        for (int k = 0; k < 5; k++) mem[h][i][12*k +: 12] = 12'(img[h][i / WPR][(i % WPR) * 5 + k]);
      end
  endtask

  task automatic wr(piv_reg_e a, int v);
    @(negedge clk);
    reg_we = 1; reg_addr = a; reg_wdata = 16'(v);
    @(negedge clk) reg_we = 0;
  endtask

  // returns the integer displacement found
  task automatic window(int x, int y, int m, int n, int raddr, output int ipx, output int ipy);
    longint plane [S_MAX][S_MAX];
    longint best;
    int bx, by, s, half, cycles;
    longint epx, epy;
    piv_result_t r;
    s = m - n + 1; half = (m - n) / 2;
    best = -1; bx = 0; by = 0;
    for (int sy = 0; sy < s; sy++)
      for (int sx = 0; sx < s; sx++) begin
        automatic longint acc = 0;
        for (int i = 0; i < n; i++)
          for (int j = 0; j < n; j++)
            acc += longint'(img[0][y - m / 2 + i + sy][x - m / 2 + j + sx]) *
                   longint'(img[1][y - n / 2 + i][x - n / 2 + j]);
        plane[sy][sx] = acc;
        if (acc > best) begin best = acc; bx = sx; by = sy; end
      end
    epx = longint'(bx - half) * 256;
    if (bx > 0 && bx < s - 1) epx += parabolic_frac(plane[by][bx-1], best, plane[by][bx+1], FRAC_W);
    epy = longint'(by - half) * 256;
    if (by > 0 && by < s - 1) epy += parabolic_frac(plane[by-1][bx], best, plane[by+1][bx], FRAC_W);
    ipx = bx - half; ipy = by - half;

    wr(REG_CX, x); wr(REG_CY, y); wr(REG_SIZE_A, m); wr(REG_SIZE_B, n); wr(REG_RES_ADDR, raddr);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    // writes while busy must be ignored
    wr(REG_CX, 0); wr(REG_SIZE_B, 3);
    cycles = 12;
    while (!res_valid && cycles < 50000) begin @(negedge clk); cycles++; end
    r = piv_result_t'(res_data);
    checks++;
    if (longint'(r.px) != epx || longint'(r.py) != epy || int'(r.cx) != x || int'(r.cy) != y ||
        longint'(res_peak) != best || int'(res_addr) != raddr) begin
      failures++;
      $display("window (%0d,%0d) %0d/%0d: px %0d py %0d cx %0d cy %0d peak %0d addr %0d; expected %0d %0d %0d %0d %0d %0d",
               x, y, m, n, r.px, r.py, r.cx, r.cy, res_peak, res_addr, epx, epy, x, y, best, raddr);
    end
    if (m == 40 && n == 32) begin
      checks++;
      if (cycles < 2592) begin failures++; $display("window took only %0d clocks", cycles); end
    end
    @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("busy after the result"); end
  endtask

  initial begin
    int ipx, ipy;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 6; t++) begin
      automatic int dx = $signed($urandom_range(0, 6)) - 3, dy = $signed($urandom_range(0, 6)) - 3;
      make_images(dx, dy, t % 2);
      window(32, 24, 40, 32, 7 + t, ipx, ipy);
      checks++;
      if (ipx != -dx || ipy != -dy) begin
        failures++; $display("reference found (%0d,%0d) for a move of (%0d,%0d)", ipx, ipy, dx, dy);
      end
      window($urandom_range(20, 43), $urandom_range(20, 27), 40, 32, 100 + t, ipx, ipy);
      window($urandom_range(6, 57), $urandom_range(6, 41), 12, 8, 200 + t, ipx, ipy);
      window($urandom_range(5, 58), $urandom_range(5, 42), 9, 5, 300 + t, ipx, ipy);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
