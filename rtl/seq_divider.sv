// Sequential unsigned restoring divider, one quotient bit per clock.
//
// start loads dividend and divisor; DW clocks later done pulses with
// quotient = dividend / divisor and the remainder. busy is high meanwhile.
// Division by zero gives an all-ones quotient; callers handle it.
module seq_divider #(
  parameter int unsigned DW = 16,
  parameter int unsigned VW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [DW-1:0] dividend,
  input  logic [VW-1:0] divisor,
  output logic          busy,
  output logic          done,
  output logic [DW-1:0] quotient,
  output logic [VW-1:0] remainder
);

  localparam int CW = $clog2(DW + 1);

  logic [VW-1:0] rem;
  logic [DW-1:0] q;
  logic [VW-1:0] dv;
  logic [CW-1:0] cnt;
  logic [VW:0]   trial;

  assign trial = {rem, q[DW-1]} - {1'b0, dv};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      rem  <= '0;
      q    <= '0;
      dv   <= '0;
      cnt  <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy <= 1'b1;
        rem  <= '0;
        q    <= dividend;
        dv   <= divisor;
        cnt  <= CW'(DW);
      end else if (busy) begin
        if (!trial[VW]) begin
          rem <= trial[VW-1:0];
          q   <= {q[DW-2:0], 1'b1};
        end else begin
          rem <= {rem[VW-2:0], q[DW-1]};
          q   <= {q[DW-2:0], 1'b0};
        end
        cnt <= cnt - 1'b1;
        if (cnt == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign quotient  = q;
  assign remainder = rem;

endmodule
