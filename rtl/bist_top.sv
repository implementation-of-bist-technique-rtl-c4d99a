// bist_top: built-in self-test of an FPGA's embedded ADC, built from
// fabric logic.
//
// Three independent parts share one clock:
//   * static_bist  - on its start button, builds a code-density histogram
//                    of NUM_SAMPLES conversions of a sine wave and computes
//                    gain error, offset, DNL and INL from it;
//   * dynamic_bist - on its start button, records 2^LOG2N conversions,
//                    takes their FFT and computes THD, SNR, SINAD, SFDR
//                    and ENOB;
//   * ds_modulator - a second-order delta-sigma modulator turning a digital
//                    sine (from a sine synthesizer outside this module)
//                    into a 1-bit stream for an output pin; an external
//                    analog low-pass filter makes it the ADC's test signal.
// Both test controllers listen to the same ADC code / data-ready port.
// Results are held on the output ports from the end of a run until the
// next start; the histogram, the per-code DNL and INL curves and the
// spectrum can be read while idle.
//
// The ADC itself, the sine synthesizer, the output pad, the analog filter
// and the logic-analyzer read-out are outside this module: their signals
// are ports.  The partition follows the design's block diagram; having
// both self-tests in one top (the design built them as two separate
// top levels) is this design's own choice.
module bist_top
  import bist_pkg::*;
#(
  parameter int N_BITS      = 12,       // ADC resolution
  parameter int CW          = 18,       // histogram counter width
  parameter int NUM_SAMPLES = 200000,   // conversions per static test
  parameter int LOG2N       = 12,       // dynamic record length 2^LOG2N
  parameter int DW          = 40,       // FFT word width
  parameter int NH          = 10,       // harmonics in THD
  parameter int DS_WIDTH    = 24,       // delta-sigma word width
  parameter int DS_FRAC     = 20        // delta-sigma fractional bits
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // ADC under test
  input  logic [N_BITS-1:0]          adc_code,
  input  logic                       adc_drdy,
  // static test
  input  logic                       static_start_btn,
  input  logic [31:0]                sine_offset,     // stimulus offset, LSB Q16.16
  input  logic [31:0]                sine_ampl,       // stimulus amplitude, LSB Q16.16
  input  logic [N_BITS-1:0]          hist_probe_addr,
  output logic [CW-1:0]              hist_probe_data,
  input  logic [N_BITS-1:0]          curve_probe_addr,
  output q16_t                       curve_probe_dnl,
  output q16_t                       curve_probe_inl,
  output logic                       static_busy,
  output logic                       static_done,
  output static_result_t             static_result,
  // dynamic test
  input  logic                       dynamic_start_btn,
  input  logic [LOG2N-1:0]           spec_probe_addr,
  output logic signed [DW-1:0]       spec_probe_re,
  output logic signed [DW-1:0]       spec_probe_im,
  output logic                       dynamic_busy,
  output logic                       dynamic_done,
  output dynamic_result_t            dynamic_result,
  // delta-sigma test-signal DAC
  input  logic                       dac_en,          // modulator rate enable
  input  logic signed [DS_WIDTH-1:0] dac_sample,      // from the sine synthesizer
  output logic                       dac_out          // to the output pin
);

  static_bist #(.N_BITS(N_BITS), .CW(CW), .NUM_SAMPLES(NUM_SAMPLES)) u_static (
    .clk, .rst_n,
    .start_btn  (static_start_btn),
    .adc_code, .adc_drdy,
    .sine_offset, .sine_ampl,
    .probe_addr (hist_probe_addr),
    .probe_data (hist_probe_data),
    .curve_addr (curve_probe_addr),
    .curve_dnl  (curve_probe_dnl),
    .curve_inl  (curve_probe_inl),
    .busy       (static_busy),
    .done       (static_done),
    .result     (static_result)
  );

  dynamic_bist #(.N_BITS(N_BITS), .LOG2N(LOG2N), .DW(DW), .NH(NH)) u_dynamic (
    .clk, .rst_n,
    .start_btn  (dynamic_start_btn),
    .adc_code, .adc_drdy,
    .probe_addr (spec_probe_addr),
    .probe_re   (spec_probe_re),
    .probe_im   (spec_probe_im),
    .busy       (dynamic_busy),
    .done       (dynamic_done),
    .result     (dynamic_result)
  );

  ds_modulator #(.WIDTH(DS_WIDTH), .FRAC(DS_FRAC)) u_dac (
    .clk, .rst_n,
    .en    (dac_en),
    .x_in  (dac_sample),
    .x_out (dac_out)
  );

endmodule
