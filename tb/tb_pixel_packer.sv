// Testbench for pixel_packer: rows of 12 pixels (not a multiple of five) are
// packed; every word is compared with five pixels of a reference image in
// raster order, with the row tail filled by zero pixels. A frame restart in
// mid-row must start a new word. Also checks the one-clock latency and the
// start-of-frame flag (a word is sampled on the second rising edge after
// the pixel is driven, i.e. one clock after the pixel is taken).
// Five pixels per word and zero padding follow the document; bit positions
// and latency are this design's.
module tb_pixel_packer;
  import smart_camera_pkg::*;

  localparam int W   = 12;
  localparam int WPR = 3;

  logic clk = 0, rst_n = 0;
  logic pix_valid = 0, pix_sof = 0;
  pixel_t pix = '0;
  logic word_valid, word_sof;
  word_t word;
  int checks = 0, failures = 0;

  pixel_packer #(.IMG_W(W)) dut (.*);

  always #5 clk = ~clk;

  word_t exp_q [$];
  bit    exp_sof_q [$];
  int    last_pix_cycle, cycle = 0;
  always @(posedge clk) cycle++;

  task automatic send(pixel_t p, bit sof);
    @(negedge clk);
    pix_valid = 1; pix_sof = sof; pix = p;
    last_pix_cycle = cycle;
    @(negedge clk);
    pix_valid = 0; pix_sof = 0;
  endtask

  // expected words for one frame of n_rows rows of random pixels
  task automatic frame(int n_rows);
    for (int r = 0; r < n_rows; r++) begin
      pixel_t row [W];
      for (int c = 0; c < W; c++) row[c] = pixel_t'($urandom);
      for (int w = 0; w < WPR; w++) begin
        word_t e = '0;
        for (int k = 0; k < 5; k++)
          if (5 * w + k < W) e[12*k +: 12] = row[5 * w + k];
        exp_q.push_back(e);
        exp_sof_q.push_back(r == 0 && w == 0);
      end
      for (int c = 0; c < W; c++) send(row[c], r == 0 && c == 0);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n && word_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("unexpected word %h", word);
      end else begin
        automatic word_t e = exp_q.pop_front();
        automatic bit s = exp_sof_q.pop_front();
        if (word !== e || word_sof !== s) begin
          failures++; $display("word %h sof %0b, expected %h sof %0b", word, word_sof, e, s);
        end
        // one clock after the completing pixel
        checks++;
        if (cycle != last_pix_cycle + 2) begin
          failures++; $display("latency %0d", cycle - last_pix_cycle);
        end
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    frame(3);
    // an interrupted frame: one full word, then two pixels that a new frame discards
    begin
      pixel_t p [7];
      automatic word_t e = '0;
      for (int c = 0; c < 7; c++) p[c] = pixel_t'($urandom);
      for (int k = 0; k < 5; k++) e[12*k +: 12] = p[k];
      exp_q.push_back(e);
      exp_sof_q.push_back(1'b1);
      for (int c = 0; c < 7; c++) send(p[c], c == 0);
    end
    repeat (3) @(negedge clk);
    frame(2);
    repeat (5) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d words missing", exp_q.size()); end
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
