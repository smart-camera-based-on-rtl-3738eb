// Smart camera FPGA design: camera pixels go straight from the framegrabber
// into the FPGA, are packed and buffered in on-board memory, and are
// processed while the frame is still arriving.
//
// The board carries one FPGA configuration at a time; this top holds the two
// applications side by side, each with its own ports, and both built from
// the same front end:
//   * RVT (retinal vascular tracing): pixel_packer -> input_mem_switch
//     (Memories 0/1, RVT window walk) -> rvt_image_processor (window buffer,
//     16-direction matched-filter unit) -> output_mem_switch (Memories 2/3).
//     One result word per pixel of a 512x512 frame, five results per 11
//     clocks, starting once 11 image rows are in memory.
//   * PIV (particle image velocimetry): pixel_packer -> input_mem_switch
//     (Memories 0/1, external reads) -> piv_processing_unit (window loader,
//     Block RAMs A/B/C, correlator, peak search, sub-pixel fit) ->
//     output_mem_switch. Two 1008x1016 images (first image in address half 0,
//     second in half 1); one displacement per host-started window.
// The camera, framegrabber, board memories and host are outside: their
// signals are the ports. Memory requests are mem_req_t structs; read data
// is expected RD_LAT clocks after a read request. All logic runs on clk
// (60 MHz in the document); pixels come with a valid strobe in that domain.
// Outputs of the shared blocks that one configuration does not need (the
// window-column port of the PIV memory switch, the external read port of
// the RVT one, the result counters, the PIV output bank) stay unconnected;
// lint reports them as unused signals.
module smart_camera_top
  import smart_camera_pkg::*;
  import rvt_pkg::*;
  import piv_pkg::*;
#(
  parameter int unsigned RVT_IMG_W = 512,
  parameter int unsigned RVT_IMG_H = 512,
  parameter int unsigned PIV_IMG_W = 1008,
  parameter int unsigned PIV_IMG_H = 1016,
  parameter int unsigned RD_LAT    = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  // ---------------- RVT configuration
  input  logic        rvt_pix_valid,
  input  logic        rvt_pix_sof,
  input  pixel_t      rvt_pix,
  output mem_req_t    rvt_mem0_req,
  output mem_req_t    rvt_mem1_req,
  input  word_t       rvt_mem0_rdata,
  input  word_t       rvt_mem1_rdata,
  output mem_req_t    rvt_mem2_req,
  output mem_req_t    rvt_mem3_req,
  output logic        rvt_frame_done,   // a frame of results is complete ...
  output logic        rvt_done_bank,    // ... in Memory 2 (0) or Memory 3 (1)
  output logic        rvt_stall,
  output logic        rvt_overflow,
  output logic        rvt_overrun,
  // ---------------- PIV configuration
  input  logic        piv_pix_valid,
  input  logic        piv_pix_sof,
  input  pixel_t      piv_pix,
  output mem_req_t    piv_mem0_req,
  output mem_req_t    piv_mem1_req,
  input  word_t       piv_mem0_rdata,
  input  word_t       piv_mem1_rdata,
  output mem_req_t    piv_mem2_req,
  output mem_req_t    piv_mem3_req,
  output logic [1:0]  piv_half_done,    // image 1 (bit 0) / image 2 (bit 1) stored
  output logic        piv_stall,        // a window read waits for its image data
  output logic        piv_overflow,
  output logic        piv_overrun,
  input  logic        piv_reg_we,
  input  logic [2:0]  piv_reg_addr,
  input  logic [15:0] piv_reg_wdata,
  input  logic        piv_start,
  output logic        piv_busy,
  output logic        piv_res_done,     // a window result has been written
  output corr_t       piv_res_peak
);

  // =================================================================== RVT
  localparam int unsigned RVT_WPR  = (RVT_IMG_W + PIX_PER_WORD - 1) / PIX_PER_WORD;
  localparam int unsigned RVT_NWIN = RVT_WPR * RVT_IMG_H - (WIN - 1) * RVT_WPR;
  localparam int unsigned RVT_K_W  = $clog2(RVT_NWIN);

  logic  r_word_valid, r_word_sof;
  word_t r_word;

  pixel_packer #(.IMG_W(RVT_IMG_W)) u_rvt_pack (
    .clk, .rst_n, .pix_valid(rvt_pix_valid), .pix_sof(rvt_pix_sof), .pix(rvt_pix),
    .word_valid(r_word_valid), .word_sof(r_word_sof), .word(r_word)
  );

  logic               col_valid, col_half;
  word_t              col_word;
  logic [3:0]         col_row;
  logic [RVT_K_W-1:0] col_k;
  logic               r_ext_gnt, r_ext_valid;
  word_t              r_ext_data;
  logic [1:0]         r_half_done;

  input_mem_switch #(
    .IMG_W(RVT_IMG_W), .IMG_H(RVT_IMG_H), .WIN(WIN), .RD_LAT(RD_LAT), .EXT_READS(1'b0)
  ) u_rvt_mem (
    .clk, .rst_n,
    .word_valid(r_word_valid), .word_sof(r_word_sof), .word(r_word),
    .col_valid, .col_word, .col_row, .col_k, .col_half,
    .ext_rd_req(1'b0), .ext_rd_half(1'b0), .ext_rd_idx('0),
    .ext_rd_gnt(r_ext_gnt), .ext_rd_valid(r_ext_valid), .ext_rd_data(r_ext_data),
    .mem0_req(rvt_mem0_req), .mem1_req(rvt_mem1_req),
    .mem0_rdata(rvt_mem0_rdata), .mem1_rdata(rvt_mem1_rdata),
    .stall(rvt_stall), .half_done(r_half_done), .overflow(rvt_overflow), .overrun(rvt_overrun)
  );

  logic      r_res_valid, r_res_bank, r_res_last;
  mem_addr_t r_res_addr;
  word_t     r_res_data;

  rvt_image_processor #(.IMG_W(RVT_IMG_W), .IMG_H(RVT_IMG_H)) u_rvt_proc (
    .clk, .rst_n, .col_valid, .col_word, .col_row, .col_k, .col_half,
    .res_valid(r_res_valid), .res_bank(r_res_bank), .res_addr(r_res_addr),
    .res_data(r_res_data), .res_last(r_res_last)
  );

  logic [31:0] r_res_count;
  output_mem_switch u_rvt_out (
    .clk, .rst_n, .res_valid(r_res_valid), .res_bank(r_res_bank), .res_addr(r_res_addr),
    .res_data(r_res_data), .res_last(r_res_last),
    .mem2_req(rvt_mem2_req), .mem3_req(rvt_mem3_req),
    .frame_done(rvt_frame_done), .done_bank(rvt_done_bank), .res_count(r_res_count)
  );

  // =================================================================== PIV
  localparam int unsigned PIV_WPR   = (PIV_IMG_W + PIX_PER_WORD - 1) / PIX_PER_WORD;
  localparam int unsigned PIV_FW    = PIV_WPR * PIV_IMG_H;
  localparam int unsigned PIV_IDX_W = $clog2(PIV_FW + 1);
  localparam int unsigned PIV_NWIN  = PIV_FW - (WIN - 1) * PIV_WPR;
  localparam int unsigned PIV_K_W   = $clog2(PIV_NWIN);

  logic  p_word_valid, p_word_sof;
  word_t p_word;

  pixel_packer #(.IMG_W(PIV_IMG_W)) u_piv_pack (
    .clk, .rst_n, .pix_valid(piv_pix_valid), .pix_sof(piv_pix_sof), .pix(piv_pix),
    .word_valid(p_word_valid), .word_sof(p_word_sof), .word(p_word)
  );

  logic                 p_rd_req, p_rd_half, p_rd_gnt, p_rd_valid;
  logic [PIV_IDX_W-1:0] p_rd_idx;
  word_t                p_rd_data;
  logic                 p_col_valid, p_col_half;
  word_t                p_col_word;
  logic [3:0]           p_col_row;
  logic [PIV_K_W-1:0]   p_col_k;
  logic                 p_stall, p_overflow, p_overrun;
  assign piv_stall    = p_stall;
  assign piv_overflow = p_overflow;
  assign piv_overrun  = p_overrun;

  input_mem_switch #(
    .IMG_W(PIV_IMG_W), .IMG_H(PIV_IMG_H), .WIN(WIN), .RD_LAT(RD_LAT), .EXT_READS(1'b1)
  ) u_piv_mem (
    .clk, .rst_n,
    .word_valid(p_word_valid), .word_sof(p_word_sof), .word(p_word),
    .col_valid(p_col_valid), .col_word(p_col_word), .col_row(p_col_row), .col_k(p_col_k),
    .col_half(p_col_half),
    .ext_rd_req(p_rd_req), .ext_rd_half(p_rd_half), .ext_rd_idx(p_rd_idx),
    .ext_rd_gnt(p_rd_gnt), .ext_rd_valid(p_rd_valid), .ext_rd_data(p_rd_data),
    .mem0_req(piv_mem0_req), .mem1_req(piv_mem1_req),
    .mem0_rdata(piv_mem0_rdata), .mem1_rdata(piv_mem1_rdata),
    .stall(p_stall), .half_done(piv_half_done), .overflow(p_overflow), .overrun(p_overrun)
  );

  logic      p_res_valid;
  mem_addr_t p_res_addr;
  word_t     p_res_data;

  piv_processing_unit #(.IMG_W(PIV_IMG_W), .IMG_H(PIV_IMG_H)) u_piv (
    .clk, .rst_n, .reg_we(piv_reg_we), .reg_addr(piv_reg_addr), .reg_wdata(piv_reg_wdata),
    .start(piv_start), .busy(piv_busy),
    .rd_req(p_rd_req), .rd_half(p_rd_half), .rd_idx(p_rd_idx), .rd_gnt(p_rd_gnt),
    .rd_valid(p_rd_valid), .rd_data(p_rd_data),
    .res_valid(p_res_valid), .res_addr(p_res_addr), .res_data(p_res_data),
    .res_peak(piv_res_peak)
  );

  logic        p_done_bank;
  logic [31:0] p_res_count;
  output_mem_switch u_piv_out (
    .clk, .rst_n, .res_valid(p_res_valid), .res_bank(1'b0), .res_addr(p_res_addr),
    .res_data(p_res_data), .res_last(1'b1),
    .mem2_req(piv_mem2_req), .mem3_req(piv_mem3_req),
    .frame_done(piv_res_done), .done_bank(p_done_bank), .res_count(p_res_count)
  );

endmodule
