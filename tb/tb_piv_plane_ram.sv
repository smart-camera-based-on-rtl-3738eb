// Testbench for piv_plane_ram (81 words): random writes, then reads of all
// addresses compared with a reference, read data one clock after the
// address; a write and a read of another address in the same clock.
// The 9 x 9 plane size follows from the document's 40/32 windows.
module tb_piv_plane_ram;
  import piv_pkg::*;

  localparam int DEPTH = S_MAX * S_MAX, AW = $clog2(DEPTH);

  logic clk = 0;
  logic we = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  corr_t wdata = '0, rdata;
  int checks = 0, failures = 0;

  piv_plane_ram dut (.*);

  always #5 clk = ~clk;

  corr_t ref_m [DEPTH];

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = AW'(a); wdata = corr_t'({$urandom, $urandom}); ref_m[a] = wdata;
      raddr = AW'((a + DEPTH - 1) % DEPTH);
    end
    for (int n = 0; n < 3 * DEPTH; n++) begin
      automatic int a = $urandom_range(0, DEPTH - 1);
      @(negedge clk);
      raddr = AW'(a);
      we = (n % 3 == 0);
      waddr = AW'((a + 1) % DEPTH);
      wdata = corr_t'({$urandom, $urandom});
      if (we) ref_m[(a + 1) % DEPTH] = wdata;
      @(negedge clk);
      we = 0;
      checks++;
      if (rdata != ref_m[a]) begin failures++; $display("addr %0d: %h expected %h", a, rdata, ref_m[a]); end
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
