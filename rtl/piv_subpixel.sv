// PIV sub-pixel interpolation: three-point parabolic peak fit in x and y.
//
// Given the peak correlation value c at integer shift (ix, iy) and its four
// neighbours on the plane, it computes
//   px = ix + (R(x-1) - R(x+1)) / (2R(x-1) - 4c + 2R(x+1))
// and the same in y. Since c is the maximum the denominator is <= 0, so the
// fraction is evaluated as |R(x+1) - R(x-1)| * 2^FRAC_W / (4c - 2R(x-1) -
// 2R(x+1)) on two sequential dividers (x and y in parallel) and given the
// sign of R(x+1) - R(x-1); its magnitude never exceeds one half. It is
// truncated towards zero. When a neighbour lies outside the plane
// (has_* low) or the denominator is zero, the fraction on that axis is 0.
//
// Timing: done pulses DW + 3 clocks after start; px, py are signed fixed
// point with FRAC_W fraction bits and stay valid until the next start.
// The parabolic fit is the one the document uses; the fixed-point format,
// rounding and edge handling are this design's choices.
module piv_subpixel
  import piv_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  corr_t                  c,
  input  corr_t                  xm,
  input  corr_t                  xp,
  input  corr_t                  ym,
  input  corr_t                  yp,
  input  logic                   has_xm,
  input  logic                   has_xp,
  input  logic                   has_ym,
  input  logic                   has_yp,
  input  logic signed [SH_W:0]   ix,
  input  logic signed [SH_W:0]   iy,
  output logic                   done,
  output disp_t                  px,
  output disp_t                  py
);

  localparam int VW = CORR_W + 3;            // 4c - 2a - 2b
  localparam int DW = CORR_W + 1 + FRAC_W;   // |b - a| << FRAC_W

  typedef struct packed {
    logic          ok;      // both neighbours exist and denominator > 0
    logic          neg;     // fraction is negative
    logic [DW-1:0] num;
    logic [VW-1:0] den;
  } axis_t;

  function automatic axis_t setup(corr_t cc, corr_t a, corr_t b, logic ha, logic hb);
    axis_t r;
    r.den = (VW'(cc) << 2) - (VW'(a) << 1) - (VW'(b) << 1);
    r.neg = a > b;
    r.num = DW'(corr_t'(r.neg ? a - b : b - a)) << FRAC_W;
    r.ok  = ha && hb && (r.den != '0);
    return r;
  endfunction

  axis_t ax, ay;
  logic  sx_start;
  logic signed [SH_W:0] ix_q, iy_q;
  logic  dx_busy, dx_done, dy_busy, dy_done;
  logic [DW-1:0] qx, qy;
  logic [VW-1:0] rx_unused, ry_unused;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sx_start <= 1'b0;
      ax <= '0;
      ay <= '0;
      ix_q <= '0;
      iy_q <= '0;
    end else begin
      sx_start <= start;
      if (start) begin
        ax   <= setup(c, xm, xp, has_xm, has_xp);
        ay   <= setup(c, ym, yp, has_ym, has_yp);
        ix_q <= ix;
        iy_q <= iy;
      end
    end
  end

  seq_divider #(.DW(DW), .VW(VW)) u_divx (
    .clk, .rst_n, .start(sx_start), .dividend(ax.num), .divisor(ax.den),
    .busy(dx_busy), .done(dx_done), .quotient(qx), .remainder(rx_unused)
  );
  seq_divider #(.DW(DW), .VW(VW)) u_divy (
    .clk, .rst_n, .start(sx_start), .dividend(ay.num), .divisor(ay.den),
    .busy(dy_busy), .done(dy_done), .quotient(qy), .remainder(ry_unused)
  );

  function automatic disp_t combine(logic signed [SH_W:0] i, axis_t a, logic [DW-1:0] q);
    disp_t f;
    f = a.ok ? disp_t'(q[FRAC_W-1:0]) : '0;   // |fraction| <= 1/2
    if (a.neg) f = -f;
    return (disp_t'(i) <<< FRAC_W) + f;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      done <= 1'b0;
      px   <= '0;
      py   <= '0;
    end else begin
      done <= dx_done;
      if (dx_done) begin
        px <= combine(ix_q, ax, qx);
        py <= combine(iy_q, ay, qy);
      end
    end
  end

  // the two dividers run in lock step
  assert property (@(posedge clk) !rst_n || (dx_done == dy_done && dx_busy == dy_busy));

endmodule
