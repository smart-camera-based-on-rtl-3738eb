// Testbench for rvt_response: random pixel groups (plus all-max and
// all-zero corner cases) are fed one per clock; each output is compared with
// |S(+1) + 2 S(+2) - S(-1) - 2 S(-2)| and its sign, computed here, and must
// appear exactly RESP_LAT = 6 clocks after its input.
// The +-1 / +-2 arithmetic and absolute value follow the document; the
// pipeline depth is this design's.
module tb_rvt_response;
  import smart_camera_pkg::*;
  import rvt_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  pixel_t grp [NGRP][NTAP];
  logic out_valid;
  mag_t out_mag;
  logic out_neg;
  int checks = 0, failures = 0, cycle = 0;

  rvt_response dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  typedef struct { int r; int t; } exp_t;
  exp_t q [$];

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin failures++; $display("extra output"); end
      else begin
        e = q.pop_front();
        if (int'(out_mag) != (e.r < 0 ? -e.r : e.r) || out_neg != (e.r < 0) || cycle - e.t != RESP_LAT + 1) begin
          failures++;
          $display("mag %0d neg %0b after %0d, expected r=%0d", out_mag, out_neg, cycle - e.t, e.r);
        end
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      int s [NGRP];
      @(negedge clk);
      in_valid = (n % 7 != 3);
      for (int g = 0; g < NGRP; g++) begin
        s[g] = 0;
        for (int t = 0; t < NTAP; t++) begin
          case (n)
            0: grp[g][t] = (g % 2 == 0) ? '1 : '0;   // +1 max, -1 zero ...
            1: grp[g][t] = (g >= 2) ? '1 : '0;       // most negative response
            2: grp[g][t] = (g < 2) ? '1 : '0;        // most positive response
            default: grp[g][t] = pixel_t'($urandom);
          endcase
          s[g] += int'(grp[g][t]);
        end
      end
      if (in_valid) q.push_back('{r: s[0] + 2 * s[1] - s[2] - 2 * s[3], t: cycle});
    end
    @(negedge clk) in_valid = 0;
    repeat (10) @(negedge clk);
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
