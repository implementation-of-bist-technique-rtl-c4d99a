// ds_modulator: second-order delta-sigma modulator used as a 1-bit DAC.
//
// Two integrator stages, each built from two adders: the first adder
// subtracts the quantizer feedback from the stage input, the second adds
// the stage's own register (an accumulator), whose input is the sum.  The register after the
// second stage holds the modulator output; its sign is the quantizer
// decision.  The quantizer feeds back +1.0 when that output is positive
// (sign bit 0) and -1.0 when it is negative, into both stages.  The DAC bit
// x_out is the inverted sign bit, so 1 means "drive VDD".
//
// Numbers are WIDTH-bit two's complement with FRAC fractional bits
// (default 24 bits, 4 integer and 20 fractional, as the design specifies),
// so the input x_in spans [-1, 1) as a full-scale signal.
//
// Timing: one new output bit per clock.  x_out is registered and changes
// one clock after the register update; a constant input x gives a density
// of ones of (x + 1) / 2.
//
// The four-adder, two-register, one-quantizer structure, the word format
// and the inverted-sign output follow the design; that both stages subtract
// the same +/-1 feedback (unit coefficients) and that the registers sit
// directly after each stage's accumulating adder are this design's reading
// of the block diagram.  The second stage takes the first stage's sum
// before its register (the branch ahead of the first flip-flop), which
// makes the loop the classic Y = z^-1 X + (1 - z^-1)^2 E modulator;
// taking the register output instead would put the loop poles on the unit
// circle.  Reset clears both registers.
module ds_modulator #(
  parameter int WIDTH = 24,
  parameter int FRAC  = 20
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,      // clock enable (modulator rate)
  input  logic signed [WIDTH-1:0] x_in,    // input sample, FRAC fractional bits
  output logic                    x_out    // 1-bit DAC output
);

  localparam logic signed [WIDTH-1:0] ONE = WIDTH'(1) <<< FRAC;

  logic signed [WIDTH-1:0] int1_q, int2_q;   // the two registers
  logic signed [WIDTH-1:0] fb;               // quantizer feedback +/-1
  logic signed [WIDTH-1:0] sum1, sum2, sum3, sum4;

  // Quantizer: +1 for a positive modulator output, -1 for a negative one.
  assign fb = int2_q[WIDTH-1] ? -ONE : ONE;

  always_comb begin
    sum1 = x_in - fb;        // adder 1
    sum2 = sum1 + int1_q;    // adder 2 (first integrator)
    sum3 = sum2 - fb;        // adder 3 (takes the first adder pair's sum)
    sum4 = sum3 + int2_q;    // adder 4 (second integrator)
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      int1_q <= '0;
      int2_q <= '0;
    end else if (en) begin
      int1_q <= sum2;
      int2_q <= sum4;
    end
  end

  assign x_out = ~int2_q[WIDTH-1];

endmodule
