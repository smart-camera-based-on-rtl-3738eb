// Testbench for rvt_filter_unit: a new random 11x15 window and offset every
// clock (with gaps), plus windows holding an ideal dark line in each of the
// 16 directions. Each output is compared with the strongest response and its
// direction computed from the template drawing in tb_ref_pkg, and must come
// FU_LAT = 10 clocks after its input, one result per clock.
// Sixteen directions, eight responses and the comparator tree follow the
// document; the latency checked is this design's.
module tb_rvt_filter_unit;
  import smart_camera_pkg::*;
  import rvt_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  pixel_t win [WIN][WIN_COLS];
  logic [2:0] in_p = 0;
  logic [15:0] in_tag = 0;
  logic out_valid;
  resp_t out_best;
  pixel_t out_center;
  logic [15:0] out_tag;
  int checks = 0, failures = 0, cycle = 0;
  int line_dirs_seen [16];

  rvt_filter_unit #(.TAG_W(16)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  typedef struct { best_t b; int center; int t; int tag; int want_dir; } exp_t;
  exp_t q [$];

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin failures++; $display("extra output"); end
      else begin
        e = q.pop_front();
        if (int'(out_best.mag) != e.b.mag || int'(out_best.label) != e.b.label ||
            int'(out_center) != e.center || int'(out_tag) != e.tag || cycle - e.t != FU_LAT + 1) begin
          failures++;
          $display("got %0d/%0d after %0d, expected %0d/%0d", out_best.label, out_best.mag,
                   cycle - e.t, e.b.label, e.b.mag);
        end
        if (e.want_dir >= 0) begin
          checks++;
          if (int'(out_best.label) != e.want_dir) begin
            failures++; $display("line template %0d detected as %0d", e.want_dir, out_best.label);
          end
        end
      end
    end
  end

  task automatic apply(int want_dir);
    int nb [11][11];
    for (int r = 0; r < 11; r++)
      for (int c = 0; c < 11; c++) nb[r][c] = int'(win[r][c + in_p]);
    q.push_back('{b: rvt_best(nb), center: int'(win[5][5 + in_p]), t: cycle, tag: int'(in_tag), want_dir: want_dir});
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // a window equal to a template (scaled) must be detected in that direction
    for (int d = 0; d < 16; d++) begin
      @(negedge clk);
      in_p = 3'(d % 5);
      for (int r = 0; r < WIN; r++)
        for (int c = 0; c < WIN_COLS; c++) begin
          automatic int cc = c - int'(in_p);
          automatic int w = (cc >= 0 && cc < 11) ? coef(d % 8, r, cc) : 0;
          if (d >= 8) w = -w;
          win[r][c] = pixel_t'(2048 + 600 * w);
        end
      in_tag = 16'(d);
      in_valid = 1;
      apply(d);
    end
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      in_valid = (n % 9 != 4);
      for (int r = 0; r < WIN; r++)
        for (int c = 0; c < WIN_COLS; c++) win[r][c] = pixel_t'($urandom);
      in_p = 3'($urandom_range(0, 4));
      in_tag = 16'(1000 + n);
      if (in_valid) apply(-1);
    end
    @(negedge clk) in_valid = 0;
    repeat (15) @(negedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("%0d outputs missing", q.size()); end
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
