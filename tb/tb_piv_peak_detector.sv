// Testbench for piv_peak_detector: planes of 81 random values (some with
// repeated maxima) are streamed with their (x, y) shifts; after each plane
// the stored peak must be the maximum and the position that of its first
// occurrence in raster order. clear must forget the previous plane.
// Recording the peak follows the document; the tie rule checked here is this
// design's.
module tb_piv_peak_detector;
  import piv_pkg::*;

  logic clk = 0, rst_n = 0;
  logic clear = 0, in_valid = 0;
  corr_t in_value = '0;
  logic [SH_W-1:0] in_x = '0, in_y = '0;
  corr_t peak;
  logic [SH_W-1:0] peak_x, peak_y;
  logic peak_seen;
  int checks = 0, failures = 0;

  piv_peak_detector dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < 30; p++) begin
      corr_t best;
      int bx, by;
      @(negedge clk) clear = 1;
      @(negedge clk) clear = 0;
      best = '0; bx = -1; by = -1;
      for (int y = 0; y < S_MAX; y++)
        for (int x = 0; x < S_MAX; x++) begin
          @(negedge clk);
          in_valid = 1; in_x = SH_W'(x); in_y = SH_W'(y);
          in_value = (p % 3 == 0) ? corr_t'($urandom_range(0, 5)) : corr_t'({$urandom, $urandom});
          if (p == 1) in_value = corr_t'(1000 - 10 * (y * S_MAX + x));   // peak at the first value
          if (bx < 0 || in_value > best) begin best = in_value; bx = x; by = y; end
        end
      @(negedge clk) in_valid = 0;
      @(negedge clk);
      checks++;
      if (peak != best || int'(peak_x) != bx || int'(peak_y) != by || !peak_seen) begin
        failures++; $display("plane %0d: %0d at (%0d,%0d), expected %0d at (%0d,%0d)", p, peak, peak_x, peak_y, best, bx, by);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
