// Testbench for piv_subpixel: random peaks (c at least as large as its four
// neighbours, values across the full correlation width, flat planes, equal
// neighbours, missing neighbours at the plane edge) are fitted and px, py
// compared with the parabolic fit of the reference package evaluated with
// 64-bit integers; done must come DW + 3 clocks after start.
// The fit is the document's parabolic estimator; the fixed-point format and
// truncation are this design's.
module tb_piv_subpixel;
  import piv_pkg::*;
  import tb_ref_pkg::*;

  localparam int DW = CORR_W + 1 + FRAC_W;

  logic clk = 0, rst_n = 0;
  logic start = 0;
  corr_t c = '0, xm = '0, xp = '0, ym = '0, yp = '0;
  logic has_xm = 0, has_xp = 0, has_ym = 0, has_yp = 0;
  logic signed [SH_W:0] ix = '0, iy = '0;
  logic done;
  disp_t px, py;
  int checks = 0, failures = 0;

  piv_subpixel dut (.*);

  always #5 clk = ~clk;

  function automatic corr_t below(corr_t top, int mode);
    longint t = longint'(top);
    longint d = longint'($urandom_range(0, 100));
    case (mode)
      0: return top;                                       // equal
      1: return corr_t'((t > d) ? t - d : 0);
      default: return corr_t'((t * longint'($urandom_range(0, 1000))) / 1000);
    endcase
  endfunction

  function automatic longint expect_axis(longint i, longint a, longint cc, longint b, bit ha, bit hb);
    return i * 256 + ((ha && hb) ? parabolic_frac(a, cc, b, FRAC_W) : 0);
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      longint ex, ey;
      int lat;
      @(negedge clk);
      c  = (n % 4 == 0) ? corr_t'({$urandom, $urandom}) : (n % 4 == 1) ? '1 : corr_t'($urandom_range(0, 5000));
      if (n == 5) c = '0;
      xm = below(c, $urandom_range(0, 2)); xp = below(c, $urandom_range(0, 2));
      ym = below(c, $urandom_range(0, 2)); yp = below(c, $urandom_range(0, 2));
      has_xm = ($urandom_range(0, 7) != 0); has_xp = ($urandom_range(0, 7) != 0);
      has_ym = ($urandom_range(0, 7) != 0); has_yp = ($urandom_range(0, 7) != 0);
      ix = (SH_W+1)'($signed($urandom_range(0, 8)) - 4);
      iy = (SH_W+1)'($signed($urandom_range(0, 8)) - 4);
      ex = expect_axis(ix, xm, c, xp, has_xm, has_xp);
      ey = expect_axis(iy, ym, c, yp, has_ym, has_yp);
      start = 1;
      @(negedge clk) start = 0;
      lat = 1;
      while (!done && lat < 200) begin @(negedge clk); lat++; end
      checks++;
      if (lat != DW + 3) begin failures++; $display("latency %0d expected %0d", lat, DW + 3); end
      checks++;
      if (longint'(px) != ex || longint'(py) != ey) begin
        failures++;
        if (failures < 10) $display("case %0d: px %0d py %0d expected %0d %0d (c=%0d xm=%0d xp=%0d)", n, px, py, ex, ey, c, xm, xp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
