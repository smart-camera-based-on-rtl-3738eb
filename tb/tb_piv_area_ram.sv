// Testbench for piv_area_ram (40 x 40): the area is filled word by word the
// way the loader does it (five pixels per write, first and last word of a
// row partly masked, negative base column), then every row is read back and
// compared with a reference array, one clock after the row address.
// The area sizes are the document's (40 x 40); the word-wise write pattern
// is this design's.
module tb_piv_area_ram;
  import smart_camera_pkg::*;

  localparam int ROWS = 40, COLS = 40;
  localparam int RW = $clog2(ROWS), CW = $clog2(COLS) + 1;

  logic clk = 0;
  logic we = 0;
  logic [RW-1:0] wrow = '0;
  logic signed [CW-1:0] wbase = '0;
  logic [4:0] wmask = '0;
  pixel_t wpix [5];
  logic [RW-1:0] rrow = '0;
  pixel_t rdata [COLS];
  int checks = 0, failures = 0;

  piv_area_ram #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  always #5 clk = ~clk;

  pixel_t ref_a [ROWS][COLS];

  initial begin
    for (int pass = 0; pass < 2; pass++) begin
      // area starts 3 pixels into a word: words cover columns -3 .. 41
      for (int r = 0; r < ROWS; r++)
        for (int w = 0; w < 9; w++) begin
          @(negedge clk);
          we = 1; wrow = RW'(r); wbase = CW'(5 * w - 3);
          for (int k = 0; k < 5; k++) begin
            automatic int c = 5 * w - 3 + k;
            wpix[k] = pixel_t'($urandom);
            wmask[k] = (c >= 0 && c < COLS);
            if (wmask[k]) ref_a[r][c] = wpix[k];
          end
        end
      @(negedge clk) we = 0;
      for (int r = 0; r < ROWS; r++) begin
        @(negedge clk) rrow = RW'(r);
        @(negedge clk);
        for (int c = 0; c < COLS; c++) begin
          checks++;
          if (rdata[c] != ref_a[r][c]) begin
            failures++; if (failures < 10) $display("row %0d col %0d: %h expected %h", r, c, rdata[c], ref_a[r][c]);
          end
        end
      end
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
