// Testbench for rvt_image_processor on a small frame (13-pixel rows padded
// to 15, 14 rows, 12 windows per frame), two frames of random pixels fed as
// memory columns one word per clock. Every result is checked against the
// strongest-template reference computed from the padded raster around its
// target pixel: address, centre pixel, label, response, bank and the last
// flag. Also checked: five results per 11-clock column (first to last
// result of a frame spans 11*(NWIN-3)+4 clocks) and the result count.
// Five results per eleven reads follows the document; the result format and
// addressing are this design's.
module tb_rvt_image_processor;
  import smart_camera_pkg::*;
  import rvt_pkg::*;
  import tb_ref_pkg::*;

  localparam int IMG_W = 13, IMG_H = 14, WPR = 3, PADW = 15, FW = WPR * IMG_H;
  localparam int NWIN = FW - 10 * WPR, K_W = $clog2(NWIN);

  logic clk = 0, rst_n = 0;
  logic col_valid = 0, col_half = 0;
  word_t col_word = '0;
  logic [3:0] col_row = 0;
  logic [K_W-1:0] col_k = 0;
  logic res_valid, res_bank, res_last;
  mem_addr_t res_addr;
  word_t res_data;
  int checks = 0, failures = 0, cycle = 0;

  rvt_image_processor #(.IMG_W(IMG_W), .IMG_H(IMG_H)) dut (.*);

  always #5 clk = ~clk;

  int img [2][PADW * IMG_H];
  int nres [2], first_t [2], last_t [2], lasts = 0;

  function automatic word_t img_word(int f, int i);
    word_t w = '0;
    for (int j = 0; j < 5; j++) w[12*j +: 12] = pixel_t'(img[f][5 * i + j]);
    return w;
  endfunction

  always @(posedge clk) begin
    cycle++;
    if (rst_n && res_valid) begin
      automatic int f = int'(res_bank);
      automatic int t = int'(res_addr);
      automatic result_word_t rw = result_word_t'(res_data);
      automatic int nb [11][11];
      automatic best_t b;
      automatic int k = (t - 5 * PADW) / 5 + 1;
      automatic int p = (t - 5 * PADW) % 5;
      if (nres[f] == 0) first_t[f] = cycle;
      last_t[f] = cycle;
      checks++;
      // results arrive in order: window k = 2.., p = 0..4
      if (k != 2 + nres[f] / 5 || p != nres[f] % 5) begin
        failures++; $display("frame %0d result %0d at address %0d", f, nres[f], t);
      end
      nres[f]++;
      for (int i = 0; i < 11; i++)
        for (int j = 0; j < 11; j++) nb[i][j] = img[f][t + (i - 5) * PADW + (j - 5)];
      b = rvt_best(nb);
      checks++;
      if (int'(rw.label) != b.label || int'(rw.mag) != b.mag || int'(rw.pix) != img[f][t]) begin
        failures++;
        $display("frame %0d addr %0d: label %0d mag %0d pix %0d, expected %0d %0d %0d",
                 f, t, rw.label, rw.mag, rw.pix, b.label, b.mag, img[f][t]);
      end
      checks++;
      if (res_last != (k == NWIN - 1 && p == 4)) begin failures++; $display("last flag wrong at %0d", t); end
      if (res_last) lasts++;
    end
  end

  initial begin
    for (int f = 0; f < 2; f++)
      for (int i = 0; i < PADW * IMG_H; i++)
        img[f][i] = (i % PADW < IMG_W) ? int'($urandom_range(0, 4095)) : 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      for (int k = 0; k < NWIN; k++)
        for (int r = 0; r < 11; r++) begin
          @(negedge clk);
          col_valid = 1; col_half = 1'(f); col_k = K_W'(k); col_row = 4'(r);
          col_word = img_word(f, k + WPR * r);
        end
      @(negedge clk) col_valid = 0;
      repeat (20) @(negedge clk);
    end
    for (int f = 0; f < 2; f++) begin
      checks++;
      if (nres[f] != 5 * (NWIN - 2)) begin failures++; $display("frame %0d: %0d results", f, nres[f]); end
      checks++;
      if (last_t[f] - first_t[f] != 11 * (NWIN - 3) + 4) begin
        failures++; $display("frame %0d: results span %0d clocks", f, last_t[f] - first_t[f]);
      end
    end
    checks++;
    if (lasts != 2) begin failures++; $display("%0d last flags", lasts); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
