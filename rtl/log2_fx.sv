// log2_fx: base-2 logarithm of an unsigned integer, serial.
//
// The integer part is the position e of the leading one.  The input is
// normalised to a mantissa m in [1, 2) (Q1.31); each of the next LF clocks
// squares m and, when the square reaches 2, emits a 1 and halves it,
// giving one more fractional bit of log2(m).  An input of zero is treated
// as one (result 0).
//
// Timing: start is a one-clock pulse; done pulses LF + 1 clocks later with
// log2_o = e + log2(m) in Q.LF, held until the next start.
module log2_fx #(
  parameter int XW = 96,   // input width
  parameter int LF = 16    // fractional bits of the result
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  input  logic [XW-1:0]                 x,
  output logic [$clog2(XW)+LF-1:0]      log2_o,
  output logic                          done
);

  localparam int EW = $clog2(XW);

  logic [EW-1:0]  e;
  logic [XW-1:0]  xn;
  logic [31:0]    m_q;
  logic [63:0]    sq;
  logic [LF-1:0]  frac_q;
  logic [EW-1:0]  e_q;
  logic [$clog2(LF+1)-1:0] cnt_q;
  logic           busy;

  // leading one position and normalised input
  always_comb begin
    e = '0;
    for (int i = 0; i < XW; i++)
      if (x[i]) e = EW'(i);
    xn = x << (XW - 1 - int'(e));
    sq = 64'(m_q) * 64'(m_q);      // Q2.62
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_q    <= '0;
      frac_q <= '0;
      e_q    <= '0;
      cnt_q  <= '0;
      busy   <= 1'b0;
      done   <= 1'b0;
      log2_o <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        m_q    <= (x == '0) ? 32'h8000_0000 : xn[XW-1 -: 32];
        e_q    <= e;
        frac_q <= '0;
        cnt_q  <= '0;
        busy   <= 1'b1;
      end else if (busy) begin
        if (sq[63]) begin
          m_q    <= sq[63:32];
          frac_q <= {frac_q[LF-2:0], 1'b1};
        end else begin
          m_q    <= sq[62:31];
          frac_q <= {frac_q[LF-2:0], 1'b0};
        end
        cnt_q <= cnt_q + 1'b1;
        if (cnt_q == ($clog2(LF+1))'(LF - 1)) begin
          busy   <= 1'b0;
          done   <= 1'b1;
          log2_o <= {e_q, frac_q[LF-2:0], sq[63]};
        end
      end
    end
  end

endmodule
