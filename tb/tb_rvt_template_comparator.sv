// Testbench for rvt_template_comparator: random and equal response pairs;
// the output one clock later must be the pair member with the greater
// magnitude, with its label, and input a on a tie.
// Greater-of-two with label follows the document; the tie rule is this
// design's.
module tb_rvt_template_comparator;
  import rvt_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  resp_t a, b, y;
  logic out_valid;
  int checks = 0, failures = 0;

  rvt_template_comparator dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      resp_t e;
      @(negedge clk);
      in_valid = 1;
      a.label = 4'($urandom); b.label = 4'($urandom);
      a.mag = mag_t'($urandom); b.mag = (n % 5 == 0) ? a.mag : mag_t'($urandom);
      if (n % 11 == 0) b.mag = a.mag + 1;
      e = (b.mag > a.mag) ? b : a;
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (y !== e || !out_valid) begin
        failures++; $display("got %h expected %h (a %h b %h)", y, e, a, b);
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
