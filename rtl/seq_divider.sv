// seq_divider: unsigned restoring divider, one quotient bit per clock.
//
// A pulse on start latches dividend and divisor.  The quotient
// floor(dividend / divisor) is built MSB first over DW clocks, then
// done pulses for one clock with quotient valid (it holds until the next
// start).  A zero divisor yields an all-ones quotient.
// Latency: DW + 1 clocks from start to done.
module seq_divider #(
  parameter int DW = 32,   // dividend and quotient width
  parameter int VW = 32    // divisor width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [DW-1:0] dividend,
  input  logic [VW-1:0] divisor,
  output logic [DW-1:0] quotient,
  output logic          busy,
  output logic          done
);

  logic [DW-1:0]  num_q;          // dividend bits not yet consumed
  logic [VW-1:0]  rem_q;          // partial remainder, below den_q
  logic [VW-1:0]  den_q;
  logic [$clog2(DW+1)-1:0] cnt_q;
  logic [VW:0]    trial;
  logic [VW:0]    shifted;

  always_comb begin
    shifted = {rem_q, num_q[DW-1]};
    trial   = shifted - {1'b0, den_q};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      num_q    <= '0;
      rem_q    <= '0;
      den_q    <= '0;
      cnt_q    <= '0;
      quotient <= '0;
      busy     <= 1'b0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        num_q    <= dividend;
        den_q    <= divisor;
        rem_q    <= '0;
        cnt_q    <= '0;
        quotient <= '0;
        busy     <= 1'b1;
      end else if (busy) begin
        num_q <= num_q << 1;
        if (!trial[VW]) begin
          rem_q    <= trial[VW-1:0];
          quotient <= {quotient[DW-2:0], 1'b1};
        end else begin
          rem_q    <= shifted[VW-1:0];
          quotient <= {quotient[DW-2:0], 1'b0};
        end
        if (cnt_q == ($clog2(DW+1))'(DW - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
        cnt_q <= cnt_q + 1'b1;
      end
    end
  end

endmodule
