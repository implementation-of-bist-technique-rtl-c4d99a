// cordic: cosine and sine of an angle given as a fraction of a half turn.
//
// The angle is turns * 2*pi with turns in [0, 0.5] given as an unsigned
// number with AW fractional bits of a full turn (so 0.5 turn = 2^(AW-1)).
// Angles above a quarter turn are folded with cos(pi - a) = -cos(a) and
// sin(pi - a) = sin(a); the folded angle is then rotated to zero by ITER
// shift-and-add CORDIC steps, starting from the vector (K, 0) so that the
// result needs no gain correction.  Outputs are signed with OF fractional
// bits.
//
// Timing: start is a one-clock pulse; done pulses ITER + 1 clocks later
// with cos_o and sin_o valid (held until the next start).
// Accuracy is about 2^-(ITER-2) with the default 26 steps.
module cordic
  import bist_pkg::*;
#(
  parameter int AW   = 24,   // fractional bits of the turn input
  parameter int OF   = 24,   // fractional bits of cos_o / sin_o
  parameter int ITER = 26
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [AW-1:0]       turns,   // angle / (2*pi), at most 0.5
  output logic signed [OF+1:0] cos_o,
  output logic signed [OF+1:0] sin_o,
  output logic                busy,
  output logic                done
);

  localparam int XW = OF + 6;     // datapath width with guard bits
  localparam int G  = 4;          // extra fractional guard bits

  logic signed [XW+G-1:0] x_q, y_q;
  logic signed [33:0]     z_q;    // residual angle, full turn = 2^32
  logic                   neg_q;  // angle was folded: negate cosine
  logic [$clog2(ITER+1)-1:0] i_q;

  logic [AW-1:0] folded;
  logic          fold;
  logic signed [XW+G-1:0] x_sh, y_sh;
  logic signed [33:0]     atan_i;
  logic signed [XW+G-1:0] x_nx, y_nx;    // result of the current step
  logic signed [OF+1:0]   x_out, y_out;  // x_nx, y_nx rounded to OF bits

  always_comb begin
    fold   = turns > (AW'(1) << (AW - 2));
    folded = fold ? (AW'(1) << (AW - 1)) - turns : turns;
    x_sh   = x_q >>> i_q;
    y_sh   = y_q >>> i_q;
    atan_i = $signed({2'b00, cordic_atan(int'(i_q))});
    x_nx   = z_q[33] ? x_q + y_sh : x_q - y_sh;
    y_nx   = z_q[33] ? y_q - x_sh : y_q + x_sh;
    x_out  = (OF+2)'((x_nx + (XW+G)'(1 <<< (G-1))) >>> G);
    y_out  = (OF+2)'((y_nx + (XW+G)'(1 <<< (G-1))) >>> G);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q   <= '0;
      y_q   <= '0;
      z_q   <= '0;
      neg_q <= 1'b0;
      i_q   <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
      cos_o <= '0;
      sin_o <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        // K in Q.24, rescaled to OF + G fractional bits
        x_q   <= (XW+G)'(CORDIC_K_Q24) <<< (OF + G - 24);
        y_q   <= '0;
        z_q   <= $signed({2'b00, 32'(folded) << (32 - AW)});
        neg_q <= fold;
        i_q   <= '0;
        busy  <= 1'b1;
      end else if (busy) begin
        x_q <= x_nx;
        y_q <= y_nx;
        z_q <= z_q[33] ? z_q + atan_i : z_q - atan_i;
        i_q <= i_q + 1'b1;
        if (i_q == ($clog2(ITER+1))'(ITER - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
      if (busy && i_q == ($clog2(ITER+1))'(ITER - 1)) begin
        cos_o <= neg_q ? -x_out : x_out;
        sin_o <= y_out;
      end
    end
  end

endmodule
