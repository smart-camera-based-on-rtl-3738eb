// Behavioural model of one on-board memory chip: a single-port synchronous
// memory of 2^AW 64-bit words. A request is sampled at the rising edge;
// a write stores wdata, a read returns the word RD_LAT clocks later on
// rdata (held until the next read completes). Words never written read as
// zero. Used by the testbenches in place of the board's memory chips.
// The one-access-per-clock behaviour follows the document's description of
// the chips; the read latency and the zero default are this model's own.
module board_sram
  import smart_camera_pkg::*;
#(
  parameter int unsigned RD_LAT = 2
) (
  input  logic     clk,
  input  mem_req_t req,
  output word_t    rdata
);

  word_t mem [mem_addr_t];
  word_t pipe [RD_LAT];

  always @(posedge clk) begin
    if (req.en && req.we) mem[req.addr] = req.wdata;
    pipe[0] <= (req.en && !req.we) ? (mem.exists(req.addr) ? mem[req.addr] : '0) : pipe[0];
    for (int s = 1; s < int'(RD_LAT); s++) pipe[s] <= pipe[s-1];
  end
  assign rdata = pipe[RD_LAT-1];

  function automatic word_t peek(mem_addr_t a);
    return mem.exists(a) ? mem[a] : '0;
  endfunction

  function automatic bit written(mem_addr_t a);
    return mem.exists(a);
  endfunction

endmodule
