// Testbench for piv_correlator: back-to-back sums of n rows (n = 32, 8 and
// 1) of X random pixel pairs, with idle gaps; each sum is compared with the
// sum of products computed here and must appear CORR_LAT = 7 clocks after
// its last row. Includes an all-ones-max case for the widest value.
// The sum of products follows the document's cross-correlation; lane count,
// latency and sum lengths are this design's.
module tb_piv_correlator;
  import smart_camera_pkg::*;
  import piv_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_first = 0, in_last = 0;
  pixel_t a [X], b [X];
  logic out_valid;
  corr_t out_value;
  int checks = 0, failures = 0, cycle = 0;

  piv_correlator dut (.*);

  always #5 clk = ~clk;

  longint exp_q [$];
  int     due_q [$];

  always @(posedge clk) begin
    cycle++;
    if (rst_n && out_valid) begin
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("extra output"); end
      else begin
        automatic longint e = exp_q.pop_front();
        automatic int due = due_q.pop_front();
        if (longint'(out_value) != e || cycle != due) begin
          failures++; $display("value %0d at %0d, expected %0d at %0d", out_value, cycle, e, due);
        end
      end
    end
  end

  task automatic sum(int n, bit maxed, bit gaps);
    longint s = 0;
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      in_valid = 1; in_first = (i == 0); in_last = (i == n - 1);
      for (int j = 0; j < X; j++) begin
        a[j] = maxed ? '1 : pixel_t'($urandom);
        b[j] = maxed ? '1 : pixel_t'($urandom);
        s += longint'(a[j]) * longint'(b[j]);
      end
      if (i == n - 1) begin
        exp_q.push_back(s);
        due_q.push_back(cycle + CORR_LAT + 1);
      end
      if (gaps && i % 5 == 2) begin
        @(negedge clk) in_valid = 0;
      end
    end
    @(negedge clk) in_valid = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    sum(32, 1, 0);
    for (int n = 0; n < 20; n++) sum((n % 3 == 0) ? 8 : (n % 3 == 1) ? 32 : 1, 0, n % 2);
    repeat (12) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d sums missing", exp_q.size()); end
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
