// Testbench for output_mem_switch: random results with random banks and
// occasional last flags. One clock after each result exactly one of the two
// memory requests must be a write of that data to that address, in the chip
// named by the bank; after a last result frame_done must pulse with that
// bank, and the result count must restart.
// Alternating output memories follow the document; the bank-per-frame rule
// being checked is this design's own choice.
module tb_output_mem_switch;
  import smart_camera_pkg::*;

  logic clk = 0, rst_n = 0;
  logic res_valid = 0, res_bank = 0, res_last = 0;
  mem_addr_t res_addr = '0;
  word_t res_data = '0;
  mem_req_t mem2_req, mem3_req;
  logic frame_done, done_bank;
  logic [31:0] res_count;
  int checks = 0, failures = 0, frames = 0;

  output_mem_switch dut (.*);

  always #5 clk = ~clk;

  initial begin
    int count = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      res_valid = ($urandom_range(0, 3) != 0);
      res_bank  = 1'($urandom);
      res_addr  = mem_addr_t'($urandom);
      res_data  = {$urandom, $urandom};
      res_last  = ($urandom_range(0, 20) == 0);
      @(negedge clk);
      checks++;
      if (res_valid) begin
        mem_req_t hit, other;
        hit   = res_bank ? mem3_req : mem2_req;
        other = res_bank ? mem2_req : mem3_req;
        if (!(hit.en && hit.we && hit.addr == res_addr && hit.wdata == res_data) || other.en) begin
          failures++; $display("write %0d wrong", n);
        end
        checks++;
        if (frame_done != res_last || (res_last && done_bank != res_bank)) begin
          failures++; $display("frame_done wrong");
        end
        count = res_last ? 0 : count + 1;
        if (res_last) frames++;
        checks++;
        if (res_count != 32'(count)) begin failures++; $display("count %0d expected %0d", res_count, count); end
      end else if (mem2_req.en || mem3_req.en || frame_done) begin
        failures++; $display("spurious request");
      end
      res_valid = 0;
    end
    checks++;
    if (frames == 0) begin failures++; $display("no frame ended"); end
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
