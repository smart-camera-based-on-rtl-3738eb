// Testbench for piv_window_loader on a 64 x 48 image pair (13 words per
// row). A memory model answers the read port: requests are granted at
// random, data returns two clocks after the grant. The area RAM writes are
// collected into reference areas and compared pixel by pixel with the
// squares of image 1 (Area A, m x m) and image 2 (Area B, n x n) around the
// programmed centre; every area pixel must be written exactly once and done
// must pulse once per window. Sizes 40/32, 12/8, 9/5 and odd offsets.
// Areas A and B from the two images follow the document; the image size,
// area placement and grant pattern are this testbench's and this design's
// own.
module tb_piv_window_loader;
  import smart_camera_pkg::*;
  import piv_pkg::*;

  localparam int IMG_W = 64, IMG_H = 48;
  localparam int WPR = (IMG_W + 4) / 5, FW = WPR * IMG_H, IDX_W = $clog2(FW + 1);

  logic clk = 0, rst_n = 0;
  logic start = 0;
  logic [COORD_W-1:0] cx = '0, cy = '0;
  logic [SIZE_W-1:0] size_a = '0, size_b = '0;
  logic busy, done;
  logic rd_req, rd_half;
  logic [IDX_W-1:0] rd_idx;
  logic rd_gnt, rd_valid;
  word_t rd_data;
  logic a_we, b_we;
  logic [SIZE_W-1:0] wrow;
  logic signed [SIZE_W+1:0] wbase;
  logic [4:0] wmask;
  pixel_t wpix [5];
  int checks = 0, failures = 0;

  piv_window_loader #(.IMG_W(IMG_W), .IMG_H(IMG_H)) dut (.*);

  always #5 clk = ~clk;

  pixel_t img [2][IMG_H][WPR*5];
  word_t  mem [2][FW];
  pixel_t got [2][N_MAX + 8][M_MAX];
  int     cnt [2][M_MAX][M_MAX];
  int     n_done = 0;

  // memory model: random grant, data two clocks after the grant
  logic gnt_rand = 0;
  word_t pipe_d [2];
  logic  pipe_v [2] = '{0, 0};
  assign rd_gnt = gnt_rand;
  always @(posedge clk) begin
    gnt_rand <= ($urandom_range(0, 3) != 0);
    pipe_v[0] <= rd_req && rd_gnt;
    pipe_d[0] <= mem[rd_half][rd_idx];
    pipe_v[1] <= pipe_v[0];
    pipe_d[1] <= pipe_d[0];
  end
  assign rd_valid = pipe_v[1];
  assign rd_data  = pipe_d[1];

  always @(posedge clk) begin
    if (done) n_done++;
    if (a_we || b_we) begin
      automatic int ar = b_we ? 1 : 0;
      for (int k = 0; k < 5; k++)
        if (wmask[k]) begin
          automatic int col = int'(wbase) + k;
          if (col < 0 || col >= M_MAX || int'(wrow) >= M_MAX) begin
            failures++; $display("write outside area: row %0d col %0d", wrow, col);
          end else begin
            got[ar][wrow][col] = wpix[k];
            cnt[ar][wrow][col]++;
          end
        end
    end
  end

  task automatic window(int x, int y, int m, int n);
    int sz [2];
    sz[0] = m; sz[1] = n;
    for (int a = 0; a < 2; a++) foreach (cnt[a][r, c]) cnt[a][r][c] = 0;
    n_done = 0;
    @(negedge clk);
    cx = COORD_W'(x); cy = COORD_W'(y); size_a = SIZE_W'(m); size_b = SIZE_W'(n);
    start = 1;
    @(negedge clk) start = 0;
    while (busy) @(negedge clk);
    @(negedge clk);
    checks++;
    if (n_done != 1) begin failures++; $display("done pulsed %0d times", n_done); end
    for (int a = 0; a < 2; a++)
      for (int r = 0; r < M_MAX; r++)
        for (int c = 0; c < M_MAX; c++) begin
          automatic bit in_area = r < sz[a] && c < sz[a];
          automatic int yy = y - sz[a] / 2 + r, xx = x - sz[a] / 2 + c;
          checks++;
          if (cnt[a][r][c] != (in_area ? 1 : 0)) begin
            failures++; if (failures < 10) $display("area %0d (%0d,%0d) written %0d times", a, r, c, cnt[a][r][c]);
          end else if (in_area && got[a][r][c] != img[a][yy][xx]) begin
            failures++; if (failures < 10) $display("area %0d (%0d,%0d): %h expected %h", a, r, c, got[a][r][c], img[a][yy][xx]);
          end
        end
  endtask

  initial begin
    for (int h = 0; h < 2; h++) begin
      for (int y = 0; y < IMG_H; y++)
        for (int x = 0; x < WPR * 5; x++) img[h][y][x] = (x < IMG_W) ? pixel_t'($urandom) : '0;
      for (int i = 0; i < FW; i++)
        for (int k = 0; k < 5; k++) mem[h][i][12*k +: 12] = img[h][i / WPR][(i % WPR) * 5 + k];
      for (int i = 0; i < FW; i++) mem[h][i][63:60] = '0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    window(32, 24, 40, 32);
    window(20, 20, 40, 32);
    window(43, 27, 40, 32);
    window(10, 10, 12, 8);
    window(57, 41, 12, 8);
    window(33, 17, 9, 5);
    for (int t = 0; t < 10; t++) window($urandom_range(20, 43), $urandom_range(20, 27), 40, 32);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
