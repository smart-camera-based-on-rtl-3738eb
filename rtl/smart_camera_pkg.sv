// Shared types and constants of the smart camera FPGA design.
//
// The camera delivers 12-bit pixels. The data packing stage puts five of them
// into one 64-bit word of on-board memory (bits [12k+11:12k] hold pixel k of
// the word, bits [63:60] are zero). The board memories are single-port
// synchronous chips that accept one request per clock; mem_req_t is one such
// request. The 12-bit pixel, the 64-bit word and five pixels per word follow
// the document; the bit order inside a word and the memory address width
// (512K words per chip) are this design's choice.
package smart_camera_pkg;

  parameter int PIX_W        = 12;
  parameter int WORD_W       = 64;
  parameter int PIX_PER_WORD = 5;
  parameter int MEM_AW       = 19;

  typedef logic [PIX_W-1:0]  pixel_t;
  typedef logic [WORD_W-1:0] word_t;
  typedef logic [MEM_AW-1:0] mem_addr_t;

  // One access to a board memory chip, sampled at the rising clock edge.
  typedef struct packed {
    logic      en;     // access this cycle
    logic      we;     // 1 = write wdata, 0 = read (data returns RD_LAT clocks later)
    mem_addr_t addr;
    word_t     wdata;
  } mem_req_t;

  // Pixel k (0..4) of a packed word.
  function automatic pixel_t word_pixel(word_t w, int unsigned k);
    return w[k*PIX_W +: PIX_W];
  endfunction

endpackage
