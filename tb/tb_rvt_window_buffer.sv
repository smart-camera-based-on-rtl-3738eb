// Testbench for rvt_window_buffer: columns of 11 words arrive one word per
// clock, as from the memory switch, each word tagged with its column k and
// row. Every pixel encodes (k, row, pixel position). For each column with
// k >= 2 the buffer must issue five windows on consecutive clocks with
// p = 0..4, and window pixel (r, c) must be pixel c%5 of row r of column
// k - 2 + c/5. Columns k < 2 must issue nothing.
// The 11 x 15 window of three 11 x 5 sections follows the document; the
// issue timing is this design's.
module tb_rvt_window_buffer;
  import smart_camera_pkg::*;
  import rvt_pkg::*;

  localparam int K_W = 8;

  logic clk = 0, rst_n = 0;
  logic col_valid = 0;
  word_t col_word = '0;
  logic [3:0] col_row = 0;
  logic [K_W-1:0] col_k = 0;
  logic col_half = 0;
  logic win_valid;
  logic [2:0] win_p;
  logic [K_W-1:0] win_k;
  logic win_half;
  pixel_t win [WIN][WIN_COLS];
  int checks = 0, failures = 0, issued = 0, expected_issues = 0;

  rvt_window_buffer #(.K_W(K_W)) dut (.*);

  always #5 clk = ~clk;

  function automatic pixel_t code(int k, int r, int j);
    return pixel_t'(((k & 63) << 6) | (r << 2) ^ j ^ (k >> 6));
  endfunction

  int exp_p = 0;
  always @(posedge clk) begin
    if (rst_n && win_valid) begin
      issued++;
      checks++;
      if (int'(win_p) != exp_p || win_k < 2) begin
        failures++; $display("p %0d expected %0d, k %0d", win_p, exp_p, win_k);
      end
      exp_p = (exp_p + 1) % 5;
      for (int r = 0; r < WIN; r++)
        for (int c = 0; c < WIN_COLS; c++) begin
          checks++;
          if (win[r][c] != code(int'(win_k) - 2 + c / 5, r, c % 5)) begin
            failures++;
            if (failures < 10) $display("k %0d pixel (%0d,%0d) = %h", win_k, r, c, win[r][c]);
          end
        end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 40; k++) begin
      for (int r = 0; r < 11; r++) begin
        @(negedge clk);
        col_valid = 1;
        col_k = K_W'(k);
        col_row = 4'(r);
        col_half = 1'b0;
        for (int j = 0; j < 5; j++) col_word[12*j +: 12] = code(k, r, j);
        col_word[63:60] = '0;
        if (k % 4 == 3 && r == 5) begin   // a stall in the middle of a column
          col_valid = 0;
          @(negedge clk);
          col_valid = 1;
        end
      end
      if (k >= 2) expected_issues += 5;
    end
    @(negedge clk) col_valid = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (issued != expected_issues) begin
      failures++; $display("%0d windows issued, expected %0d", issued, expected_issues);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
