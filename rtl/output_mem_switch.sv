// Output memory switching: writes results into the two output memories
// (Memory 2 and Memory 3) for the host to fetch.
//
// Each result comes with a bank bit, a word address and a last flag. The RVT
// design uses the frame's half bit as the bank, so consecutive frames go to
// alternate chips and the host can read one finished frame while the next
// is being written. A write request is issued one clock after the result
// (registered outputs). When the result flagged last has been written,
// frame_done pulses for one clock with done_bank naming the chip that now
// holds a complete set of results; res_count counts the results written
// into the current set.
// That results are stored in one of two output chips read by the host
// follows the document; the per-frame alternation and the done signalling
// are this design's choices.
module output_mem_switch
  import smart_camera_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      res_valid,
  input  logic      res_bank,
  input  mem_addr_t res_addr,
  input  word_t     res_data,
  input  logic      res_last,
  output mem_req_t  mem2_req,
  output mem_req_t  mem3_req,
  output logic      frame_done,
  output logic      done_bank,
  output logic [31:0] res_count
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mem2_req   <= '0;
      mem3_req   <= '0;
      frame_done <= 1'b0;
      done_bank  <= 1'b0;
      res_count  <= '0;
    end else begin
      mem2_req   <= '0;
      mem3_req   <= '0;
      frame_done <= 1'b0;
      if (res_valid) begin
        if (res_bank) mem3_req <= '{en: 1'b1, we: 1'b1, addr: res_addr, wdata: res_data};
        else          mem2_req <= '{en: 1'b1, we: 1'b1, addr: res_addr, wdata: res_data};
        res_count <= res_last ? '0 : res_count + 1;
        if (res_last) begin
          frame_done <= 1'b1;
          done_bank  <= res_bank;
        end
      end
    end
  end

endmodule
