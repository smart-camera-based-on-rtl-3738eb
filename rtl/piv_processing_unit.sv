// PIV image processing unit: one cross-correlation window per start.
//
// The host programs the registers (centre coordinates, sizes m of Area A
// and n of Area B, and the output word for the result) and pulses start.
// The unit then
//   1. loads Area A (image 1) and Area B (image 2) from the board memories
//      into Block RAMs A and B (piv_window_loader);
//   2. computes the (m-n+1) x (m-n+1) correlation plane
//      R(x,y) = sum_i sum_j A(i+y, j+x) B(i, j), shifts in raster order
//      (x fastest), feeding the correlator one row of B and the
//      overlapping row segment of A per clock, so each value takes n clocks
//      and the next one follows without a gap. Values are written into
//      Block RAM C and the peak and its position are recorded on the fly;
//   3. reads the peak's four neighbours back from Block RAM C and runs the
//      parabolic sub-pixel fit;
//   4. emits one result word: displacement (px, py) and the window centre.
// px and py are the peak position relative to the centre of the plane,
// x - (m-n)/2 plus the fraction, as in the fit equation; with A and B
// centred on the same point the particle image has moved by (-px, -py)
// from image 1 to image 2.
//
// Timing: about (words per area row) x (m + n) clocks for loading,
// (m-n+1)^2 x n for the plane (2592 for 40/32), then roughly 60 clocks.
// busy is high from start to the result. m - n must be even, n <= 32,
// m <= 40.
// The structure (Block RAMs A, B, C, correlation, peak, sub-pixel fit,
// registers with centre and sizes) follows the document's block diagram;
// the sequencing, the register map and the result format are this design's
// choices.
module piv_processing_unit
  import smart_camera_pkg::*;
  import piv_pkg::*;
#(
  parameter int unsigned IMG_W = 1008,
  parameter int unsigned IMG_H = 1016,
  // derived, not to be overridden
  parameter int unsigned WPR   = (IMG_W + PIX_PER_WORD - 1) / PIX_PER_WORD,
  parameter int unsigned FW    = WPR * IMG_H,
  parameter int unsigned IDX_W = $clog2(FW + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  // host registers
  input  logic             reg_we,
  input  logic [2:0]       reg_addr,
  input  logic [15:0]      reg_wdata,
  input  logic             start,
  output logic             busy,
  // memory read port (external port of the input memory switch)
  output logic             rd_req,
  output logic             rd_half,
  output logic [IDX_W-1:0] rd_idx,
  input  logic             rd_gnt,
  input  logic             rd_valid,
  input  word_t            rd_data,
  // result
  output logic             res_valid,
  output mem_addr_t        res_addr,
  output word_t            res_data,
  output corr_t            res_peak
);

  initial assert (X == N_MAX) else $fatal(1, "one row of Area B per clock needs X == N_MAX");

  localparam int PA_W = $clog2(S_MAX * S_MAX);

  // ------------------------------------------------------------ registers
  logic [COORD_W-1:0] cx, cy;
  logic [SIZE_W-1:0]  m, n;
  mem_addr_t          raddr_reg;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cx <= '0;
      cy <= '0;
      m  <= SIZE_W'(M_MAX);
      n  <= SIZE_W'(N_MAX);
      raddr_reg <= '0;
    end else if (reg_we && !busy) begin
      case (piv_reg_e'(reg_addr))
        REG_CX:       cx <= reg_wdata[COORD_W-1:0];
        REG_CY:       cy <= reg_wdata[COORD_W-1:0];
        REG_SIZE_A:   m  <= reg_wdata[SIZE_W-1:0];
        REG_SIZE_B:   n  <= reg_wdata[SIZE_W-1:0];
        REG_RES_ADDR: raddr_reg <= mem_addr_t'(reg_wdata);
        default: ;
      endcase
    end
  end

  logic [SH_W:0] s_cnt;     // m - n + 1 shifts per axis
  logic [SH_W:0] half;      // (m - n) / 2
  assign s_cnt = (SH_W+1)'(m - n + 1'b1);
  assign half  = (SH_W+1)'((m - n) >> 1);

  // ------------------------------------------------------------ loader and area RAMs
  logic ld_start, ld_busy, ld_done;
  logic a_we, b_we;
  logic [SIZE_W-1:0] wrow;
  logic signed [SIZE_W+1:0] wbase;
  logic [PIX_PER_WORD-1:0] wmask;
  pixel_t wpix [PIX_PER_WORD];

  piv_window_loader #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_loader (
    .clk, .rst_n, .start(ld_start), .cx, .cy, .size_a(m), .size_b(n),
    .busy(ld_busy), .done(ld_done),
    .rd_req, .rd_half, .rd_idx, .rd_gnt, .rd_valid, .rd_data,
    .a_we, .b_we, .wrow, .wbase, .wmask, .wpix
  );

  logic [SIZE_W-1:0] a_rrow, b_rrow;
  pixel_t arow [M_MAX];
  pixel_t brow [N_MAX];

  piv_area_ram #(.ROWS(M_MAX), .COLS(M_MAX)) u_ram_a (
    .clk, .we(a_we), .wrow(wrow[$clog2(M_MAX)-1:0]), .wbase(($clog2(M_MAX)+1)'(wbase)),
    .wmask, .wpix, .rrow(a_rrow[$clog2(M_MAX)-1:0]), .rdata(arow)
  );
  piv_area_ram #(.ROWS(N_MAX), .COLS(N_MAX)) u_ram_b (
    .clk, .we(b_we), .wrow(wrow[$clog2(N_MAX)-1:0]), .wbase(($clog2(N_MAX)+1)'(wbase)),
    .wmask, .wpix, .rrow(b_rrow[$clog2(N_MAX)-1:0]), .rdata(brow)
  );

  // ------------------------------------------------------------ controller
  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_CORR, S_DRAIN, S_NBR, S_SUB, S_OUT} state_e;
  state_e state;

  logic [SIZE_W-1:0] ci;          // row of B
  logic [SH_W-1:0]   csx, csy;    // shift being issued
  logic [SH_W-1:0]   ox, oy;      // shift of the next correlator output
  logic [PA_W:0]     ocnt;        // plane values written
  logic [2:0]        nstep;

  // row read this clock, lanes formed next clock
  logic              p_valid, p_first, p_last;
  logic [SH_W-1:0]   p_sx;

  assign a_rrow = ci + SIZE_W'(csy);
  assign b_rrow = ci;

  pixel_t a_lane [X];
  pixel_t b_lane [X];
  always_comb begin
    for (int j = 0; j < X; j++) begin
      a_lane[j] = (int'(p_sx) + j < M_MAX) ? arow[(int'(p_sx) + j) % M_MAX] : '0;
      b_lane[j] = (j < int'(n)) ? brow[j] : '0;
    end
  end

  logic  c_valid;
  corr_t c_value;
  piv_correlator u_corr (
    .clk, .rst_n, .in_valid(p_valid), .in_first(p_first), .in_last(p_last),
    .a(a_lane), .b(b_lane), .out_valid(c_valid), .out_value(c_value)
  );

  // plane RAM C
  logic [PA_W-1:0] pr_addr;
  corr_t           pr_data;
  piv_plane_ram u_plane (
    .clk, .we(c_valid), .waddr(ocnt[PA_W-1:0]), .wdata(c_value),
    .raddr(pr_addr), .rdata(pr_data)
  );

  // peak
  corr_t           peak;
  logic [SH_W-1:0] peak_x, peak_y;
  logic            peak_seen;
  piv_peak_detector u_peak (
    .clk, .rst_n, .clear(state == S_LOAD), .in_valid(c_valid), .in_value(c_value),
    .in_x(ox), .in_y(oy), .peak, .peak_x, .peak_y, .peak_seen
  );

  // neighbours
  corr_t nb [4];                   // x-1, x+1, y-1, y+1
  logic  has [4];
  always_comb begin
    has[0] = peak_x != '0;
    has[1] = (SH_W+1)'(peak_x) != s_cnt - 1'b1;
    has[2] = peak_y != '0;
    has[3] = (SH_W+1)'(peak_y) != s_cnt - 1'b1;
  end

  function automatic logic [PA_W-1:0] paddr(logic [SH_W-1:0] x, logic [SH_W-1:0] y,
                                            logic [SH_W:0] s);
    return PA_W'(32'(y) * 32'(s) + 32'(x));
  endfunction

  always_comb begin
    case (nstep)
      3'd0:    pr_addr = paddr(peak_x - SH_W'(has[0]), peak_y, s_cnt);
      3'd1:    pr_addr = paddr(peak_x + SH_W'(has[1]), peak_y, s_cnt);
      3'd2:    pr_addr = paddr(peak_x, peak_y - SH_W'(has[2]), s_cnt);
      default: pr_addr = paddr(peak_x, peak_y + SH_W'(has[3]), s_cnt);
    endcase
  end

  // sub-pixel fit
  logic  sp_start, sp_done;
  disp_t px, py;
  piv_subpixel u_sub (
    .clk, .rst_n, .start(sp_start), .c(peak), .xm(nb[0]), .xp(nb[1]), .ym(nb[2]), .yp(nb[3]),
    .has_xm(has[0]), .has_xp(has[1]), .has_ym(has[2]), .has_yp(has[3]),
    .ix(signed'({1'b0, peak_x}) - signed'(half)), .iy(signed'({1'b0, peak_y}) - signed'(half)),
    .done(sp_done), .px, .py
  );

  assign ld_start = (state == S_IDLE) && start;
  assign busy     = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      ci        <= '0;
      csx       <= '0;
      csy       <= '0;
      ox        <= '0;
      oy        <= '0;
      ocnt      <= '0;
      nstep     <= '0;
      p_valid   <= 1'b0;
      p_first   <= 1'b0;
      p_last    <= 1'b0;
      p_sx      <= '0;
      sp_start  <= 1'b0;
      res_valid <= 1'b0;
      res_addr  <= '0;
      res_data  <= '0;
      res_peak  <= '0;
      nb        <= '{default: '0};
    end else begin
      p_valid   <= 1'b0;
      sp_start  <= 1'b0;
      res_valid <= 1'b0;
      // plane values: write address and shift of each correlator output
      if (c_valid) begin
        ocnt <= ocnt + 1'b1;
        if ((SH_W+1)'(ox) == s_cnt - 1'b1) begin
          ox <= '0;
          oy <= oy + 1'b1;
        end else begin
          ox <= ox + 1'b1;
        end
      end
      case (state)
        S_IDLE: if (start) state <= S_LOAD;
        S_LOAD: begin
          ci <= '0; csx <= '0; csy <= '0;
          ox <= '0; oy <= '0; ocnt <= '0;
          if (ld_done) state <= S_CORR;
        end
        S_CORR: begin
          p_valid <= 1'b1;
          p_first <= (ci == '0);
          p_last  <= (ci == n - 1'b1);
          p_sx    <= csx;
          if (ci == n - 1'b1) begin
            ci <= '0;
            if ((SH_W+1)'(csx) == s_cnt - 1'b1) begin
              csx <= '0;
              if ((SH_W+1)'(csy) == s_cnt - 1'b1) state <= S_DRAIN;
              else csy <= csy + 1'b1;
            end else begin
              csx <= csx + 1'b1;
            end
          end else begin
            ci <= ci + 1'b1;
          end
        end
        S_DRAIN: begin
          nstep <= '0;
          if (32'(ocnt) == 32'(s_cnt) * 32'(s_cnt)) state <= S_NBR;
        end
        S_NBR: begin
          // address for step k is applied in step k, data captured in step k+1
          nstep <= nstep + 1'b1;
          if (nstep != 3'd0) nb[2'(nstep - 3'd1)] <= pr_data;
          if (nstep == 3'd4) begin
            sp_start <= 1'b1;
            state    <= S_SUB;
          end
        end
        S_SUB: if (sp_done) state <= S_OUT;
        S_OUT: begin
          res_valid <= 1'b1;
          res_addr  <= raddr_reg;
          res_data  <= piv_result_t'{rsvd: '0, cy: cy, cx: cx, py: py, px: px};
          res_peak  <= peak;
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) !rst_n || state != S_NBR || peak_seen);

endmodule
