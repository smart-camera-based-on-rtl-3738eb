// Testbench for rvt_interconnect: random 11x15 windows with random offsets.
// For every direction and weight group, the sum of the seven routed pixels
// must equal the sum of the window pixels that the template drawing in
// tb_ref_pkg marks with that weight (neighbourhood starting at column p);
// the centre pixel and tag must follow. Output one clock after input.
// The templates are the document's; the registered output is this design's.
module tb_rvt_interconnect;
  import smart_camera_pkg::*;
  import rvt_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  pixel_t win [WIN][WIN_COLS];
  logic [2:0] in_p = 0;
  logic [7:0] in_tag = 0;
  logic out_valid;
  pixel_t grp [NDIR][NGRP][NTAP];
  pixel_t out_center;
  logic [7:0] out_tag;
  int checks = 0, failures = 0;

  rvt_interconnect #(.TAG_W(8)) dut (.*);

  always #5 clk = ~clk;

  localparam int WEIGHT [NGRP] = '{1, 2, -1, -2};

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      for (int r = 0; r < WIN; r++)
        for (int c = 0; c < WIN_COLS; c++) win[r][c] = pixel_t'($urandom);
      in_p = 3'($urandom_range(0, 4));
      in_tag = 8'(n);
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid || out_tag != 8'(n) || out_center != win[5][5 + in_p]) begin
        failures++; $display("valid/tag/centre wrong");
      end
      for (int d = 0; d < NDIR; d++)
        for (int g = 0; g < NGRP; g++) begin
          automatic int got = 0, exp = 0;
          for (int t = 0; t < NTAP; t++) got += int'(grp[d][g][t]);
          for (int r = 0; r < 11; r++)
            for (int c = 0; c < 11; c++)
              if (coef(d, r, c) == WEIGHT[g]) exp += int'(win[r][c + in_p]);
          checks++;
          if (got != exp) begin
            failures++; $display("dir %0d group %0d p %0d: %0d expected %0d", d, g, in_p, got, exp);
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
