// tb_bist_top: end-to-end test of the complete self-test at its default
// sizes (12-bit ADC, 200,000-sample histogram, 4096-point FFT).
//
// The testbench supplies what lies outside the chip logic: a behavioural
// ADC converting every 8 clocks (8 MHz fabric clock, 1 MS/s), a sine
// generator, a sine synthesizer feeding the delta-sigma DAC, and a
// third-order RC filter turning the DAC bit stream back into a voltage.
//
//  1. Static test: the ADC sees an overdriving sine from the generator
//     (0.5 V offset, 0.55 V amplitude, about 20 kHz).  A second press of
//     the button during the run must be ignored.  The histogram read back
//     through the probe port must equal the testbench's count of the
//     codes, and the results, including the DNL and INL of every code,
//     must match the floating-point reference.
//  2. Dynamic test: the ADC sees the filtered delta-sigma output of a
//     half-scale sine, 83 periods per 4096 conversions (about 20.3 kHz).
//     Results must match a floating-point DFT of the recorded codes, and
//     the fundamental's amplitude must equal the half-scale sine times the
//     filter gain within 2 %, which checks the DAC end to end.
// Each mechanism (static run, dynamic run, ignored press, histogram
// read-out, curve read-out, spectrum read-out, DAC bit stream) is counted; one that never
// happened is a failure.
module tb_bist_top;
  import bist_pkg::*;
  import static_ref_pkg::*;
  import dyn_ref_pkg::*;

  localparam int  NB = 12, CW = 18, NS = 200000, LOG2N = 12, N = 1 << LOG2N;
  localparam int  DIV = 8;
  localparam real PI = 3.14159265358979;
  localparam real FC = 60.0e3 / 8.0e6;       // filter corner / clock

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                 static_start_btn = 0, dynamic_start_btn = 0;
  logic [NB-1:0]        adc_code, hist_probe_addr = '0;
  logic                 adc_drdy;
  logic [CW-1:0]        hist_probe_data;
  logic [NB-1:0]        curve_probe_addr = '0;
  q16_t                 curve_probe_dnl, curve_probe_inl;
  logic                 static_busy, static_done, dynamic_busy, dynamic_done;
  static_result_t       static_result;
  logic [LOG2N-1:0]     spec_probe_addr = '0;
  logic signed [39:0]   spec_probe_re, spec_probe_im;
  dynamic_result_t      dynamic_result;
  logic signed [23:0]   dac_sample = '0;
  logic                 dac_out;
  real                  vin, c_lsb, a_lsb;

  bist_top dut (
    .clk, .rst_n, .adc_code, .adc_drdy,
    .static_start_btn,
    .sine_offset (32'(longint'(c_lsb * 65536.0))),
    .sine_ampl   (32'(longint'(a_lsb * 65536.0))),
    .hist_probe_addr, .hist_probe_data, .curve_probe_addr, .curve_probe_dnl, .curve_probe_inl,
    .static_busy, .static_done, .static_result,
    .dynamic_start_btn, .spec_probe_addr, .spec_probe_re, .spec_probe_im,
    .dynamic_busy, .dynamic_done, .dynamic_result,
    .dac_en (1'b1), .dac_sample, .dac_out
  );

  adc_model #(.N_BITS(NB), .CLK_DIV(DIV)) u_adc (.clk, .rst_n, .vin, .code(adc_code), .drdy(adc_drdy));

  // analog side: generator or filtered DAC output
  bit     use_dac = 0;
  longint tick = 0;
  real    f1 = 0, f2 = 0, f3 = 0, alpha;
  int     dac_ones = 0;
  initial alpha = 1.0 - $exp(-2.0 * PI * FC);
  always @(posedge clk) begin
    real ph;
    tick <= tick + 1;
    // sine synthesizer: half scale, 83 periods per 4096 * DIV clocks
    ph = 2.0 * PI * 83.0 * $itor(tick) / (N * DIV);
    dac_sample <= 24'(longint'(0.5 * $sin(ph) * (1 << 20)));
    // three RC poles on the bit stream (0 V or 1 V)
    f1 = f1 + alpha * ((dac_out ? 1.0 : 0.0) - f1);
    f2 = f2 + alpha * (f1 - f2);
    f3 = f3 + alpha * (f2 - f3);
    dac_ones <= dac_ones + int'(dac_out);
    if (use_dac) vin <= f3;
    else vin <= 0.5 + 0.55 * $sin(2.0 * PI * 20.0123e3 * $itor(tick) / 8.0e6);
  end

  // what enters each test
  int hist [] = new[1 << NB];
  int rec  [] = new[N];
  int hcount = 0, dcount = 0;
  always @(negedge clk) begin
    if (dut.u_static.state == 3'd2 && adc_drdy) begin
      hist[adc_code] = hist[adc_code] + 1;
      hcount++;
    end
    if (dut.u_dynamic.state == 3'd1 && adc_drdy) begin
      if (dcount < N) rec[dcount] = int'(adc_code) - (1 << (NB - 1));
      dcount++;
    end
  end

  int checks = 0, failures = 0;
  int n_curve_probe = 0, n_static = 0, n_dynamic = 0, n_ignored = 0, n_hist_probe = 0, n_spec_probe = 0;

  function automatic void check(string what, real got, real exp, real tol);
    checks++;
    if ((got - exp) > tol || (exp - got) > tol) begin
      failures++;
      $display("FAIL %s: got %f expected %f", what, got, exp);
    end else
      $display("ok   %s: %f (reference %f)", what, got, exp);
  endfunction

  task automatic press(ref logic btn);
    @(posedge clk) #1 btn = 1;
    repeat (5) @(posedge clk);
    #1 btn = 0;
  endtask

  function automatic real rc_gain(real f);
    // magnitude of one discrete RC pole at f (cycles per clock)
    real re, im;
    re = 1.0 - (1.0 - alpha) * $cos(2.0 * PI * f);
    im = (1.0 - alpha) * $sin(2.0 * PI * f);
    return alpha / $sqrt(re * re + im * im);
  endfunction

  initial begin
    static_ref_t sr;
    dyn_ref_t    dr;
    int          bad, cyc;
    real         mag, expect_amp;

    c_lsb = 0.5 * (1 << NB);
    a_lsb = 0.55 * (1 << NB);
    foreach (hist[i]) hist[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- static test ----
    press(static_start_btn);
    while (!static_busy) @(posedge clk);
    repeat (1000) @(posedge clk);
    press(static_start_btn);             // must be ignored
    cyc = 0;
    while (static_busy) begin @(posedge clk); cyc++; end
    #1;
    if (static_done && hcount == NS) n_static++;
    if (hcount == NS) n_ignored++;
    $display("static run: %0d conversions, %0d clocks after the second press", hcount, cyc);
    bad = 0;
    for (int i = 0; i < (1 << NB); i++) begin
      hist_probe_addr = NB'(i);
      @(posedge clk); @(posedge clk); #1;
      if (int'(hist_probe_data) != hist[i]) bad++;
    end
    checks++;
    if (bad != 0) begin failures++; $display("FAIL %0d histogram bins differ", bad); end
    else begin n_hist_probe++; $display("ok   histogram read back"); end
    sr = compute_static(hist, NB, c_lsb, a_lsb);
    check("gain error %", $itor(static_result.gain_err_pct) / 65536.0, sr.gain_err_pct, 0.002);
    check("offset LSB",   $itor(static_result.offset_lsb)   / 65536.0, sr.offset,  0.002);
    check("DNL min",      $itor(static_result.dnl_min)      / 65536.0, sr.dnl_min, 0.002);
    check("DNL max",      $itor(static_result.dnl_max)      / 65536.0, sr.dnl_max, 0.002);
    check("INL min",      $itor(static_result.inl_min)      / 65536.0, sr.inl_min, 0.002);
    check("INL max",      $itor(static_result.inl_max)      / 65536.0, sr.inl_max, 0.002);
    begin
      int bad;
      bad = 0;
      for (int k = 1; k <= (1 << NB) - 1; k++) begin
        curve_probe_addr = NB'(k);
        @(posedge clk); @(posedge clk); #1;
        if (($itor(curve_probe_dnl) / 65536.0 - sr.dnl[k]) ** 2 > 0.002 ** 2 && k < (1 << NB) - 1) bad++;
        if (($itor(curve_probe_inl) / 65536.0 - sr.inl[k]) ** 2 > 0.002 ** 2) bad++;
      end
      checks++;
      if (bad != 0) begin failures++; $display("FAIL %0d curve points differ", bad); end
      else begin n_curve_probe++; $display("ok   DNL and INL curves match at every code"); end
    end

    // ---- dynamic test on the delta-sigma DAC signal ----
    use_dac = 1;
    repeat (20000) @(posedge clk);       // let the filter settle
    press(dynamic_start_btn);
    while (!dynamic_busy) @(posedge clk);
    while (dynamic_busy) @(posedge clk);
    #1;
    if (dynamic_done && dcount == N) n_dynamic++;
    dr = compute_dynamic(rec, 10);
    check("fundamental bin", $itor(dynamic_result.fund_bin), dr.fund_bin, 0.1);
    check("THD dB",   $itor(dynamic_result.thd_db)   / 65536.0, dr.thd,   0.02);
    check("SNR dB",   $itor(dynamic_result.snr_db)   / 65536.0, dr.snr,   0.02);
    check("SINAD dB", $itor(dynamic_result.sinad_db) / 65536.0, dr.sinad, 0.02);
    check("SFDR dB",  $itor(dynamic_result.sfdr_db)  / 65536.0, dr.sfdr,  0.02);
    check("ENOB",     $itor(dynamic_result.enob)     / 65536.0, dr.enob,  0.005);
    spec_probe_addr = LOG2N'(83);
    @(posedge clk); @(posedge clk); #1;
    mag = $sqrt(($itor(spec_probe_re) / 4096.0) ** 2 + ($itor(spec_probe_im) / 4096.0) ** 2);
    // half-scale sine = 0.25 V = 1024 LSB, times the filter gain, N/2 per bin
    expect_amp = 0.25 * (1 << NB) * (N / 2) * rc_gain(83.0 / (N * DIV)) ** 3;
    check("DAC tone in bin 83 (relative)", mag / expect_amp, 1.0, 0.02);
    if (mag > 0) n_spec_probe++;

    // ---- mechanisms ----
    checks++;
    $display("mechanisms: static runs %0d, dynamic runs %0d, ignored presses %0d, histogram read-outs %0d, curve read-outs %0d, spectrum read-outs %0d, DAC ones %0d",
             n_static, n_dynamic, n_ignored, n_hist_probe, n_curve_probe, n_spec_probe, dac_ones);
    if (n_static == 0 || n_dynamic == 0 || n_ignored == 0 || n_hist_probe == 0 || n_curve_probe == 0 ||
        n_spec_probe == 0 || dac_ones == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
