// adc_model: behavioural model of the ADC under test (not synthesizable).
//
// Converts the real input vin (volts, unipolar range 0 .. VREF) every
// CLK_DIV clocks and presents the code with a one-clock drdy pulse, like
// the data-ready strobe of the embedded converter.  The transition levels
// are those of an ideal N_BITS converter with a small gain and offset
// error and a repeating pattern of bent levels, so a linearity test has
// something to find.  Level k (1 .. 2^N_BITS - 1) sits at
//   (1.001 * k - 0.4 + 0.3 * [k mod 97 == 0] - 0.25 * [k mod 61 == 0]) LSB.
module adc_model #(
  parameter int  N_BITS  = 12,
  parameter int  CLK_DIV = 26,
  parameter real VREF    = 1.0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  real               vin,
  output logic [N_BITS-1:0] code,
  output logic              drdy
);

  localparam int M = (1 << N_BITS) - 1;

  function automatic real level(int k);
    real t;
    t = 1.001 * k - 0.4;
    if (k % 97 == 0) t += 0.3;
    if (k % 61 == 0) t -= 0.25;
    return t;
  endfunction

  function automatic int convert(real v_lsb);
    int lo, hi, mid;
    // levels are increasing: binary search for the last level <= v
    lo = 0; hi = M;
    while (lo < hi) begin
      mid = (lo + hi + 1) / 2;
      if (v_lsb >= level(mid)) lo = mid;
      else hi = mid - 1;
    end
    return lo;
  endfunction

  int div_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_q <= 0;
      code  <= '0;
      drdy  <= 1'b0;
    end else begin
      drdy <= 1'b0;
      if (div_q == CLK_DIV - 1) begin
        div_q <= 0;
        code  <= N_BITS'(convert(vin / VREF * (1 << N_BITS)));
        drdy  <= 1'b1;
      end else
        div_q <= div_q + 1;
    end
  end

endmodule
