// tb_static_bist: self-checking test of the static self-test controller
// with a behavioural 8-bit ADC sampling an overdriving sine wave.
//
// Presses start twice.  For each run it checks that exactly NUM_SAMPLES
// conversions were counted (histogram read back through the probe port
// against the testbench's own count), that the run took the expected
// number of clocks, and that the reported gain error, offset, DNL and INL
// extremes and the per-code DNL and INL curves match the floating-point
// reference within 0.002 LSB / 0.002 %.
module tb_static_bist;
  import bist_pkg::*;
  import static_ref_pkg::*;

  localparam int N = 8, CW = 18, NS = 30000, DIV = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          start_btn = 0, adc_drdy, busy, done;
  logic [N-1:0]  adc_code, probe_addr = '0;
  logic [CW-1:0] probe_data;
  static_result_t res;
  real           vin;
  real           c_lsb = 130.0, a_lsb = 140.0;

  adc_model #(.N_BITS(N), .CLK_DIV(DIV)) u_adc (.clk, .rst_n, .vin, .code(adc_code), .drdy(adc_drdy));

  static_bist #(.N_BITS(N), .CW(CW), .NUM_SAMPLES(NS)) dut (
    .clk, .rst_n, .start_btn, .adc_code, .adc_drdy,
    .sine_offset (32'(longint'(c_lsb * 65536.0))),
    .sine_ampl   (32'(longint'(a_lsb * 65536.0))),
    .probe_addr, .probe_data, .busy, .done, .result(res),
    .curve_addr, .curve_dnl, .curve_inl
  );
  logic [N-1:0] curve_addr = '0;
  q16_t         curve_dnl, curve_inl;

  // sine stimulus, not harmonically related to the conversion rate
  real ph = 0.0;
  always @(posedge clk) begin
    ph  <= ph + 2.0 * 3.14159265358979 * 0.00123457;
    vin <= (c_lsb + a_lsb * $sin(ph)) / (1 << N);
  end

  // the testbench's own histogram of what entered during collection
  int hist [] = new[1 << N];
  int counted = 0;
  always @(negedge clk)
    if (dut.state == 3'd2 && adc_drdy) begin
      hist[adc_code] = hist[adc_code] + 1;
      counted++;
    end

  int checks = 0, failures = 0;

  function automatic void check(string what, real got, real exp, real tol);
    checks++;
    if ((got - exp) > tol || (exp - got) > tol) begin
      failures++;
      $display("FAIL %s: got %f expected %f", what, got, exp);
    end else
      $display("ok   %s: %f", what, got);
  endfunction

  task automatic one_run(int run);
    static_ref_t r;
    int cyc, bad;
    foreach (hist[i]) hist[i] = 0;
    counted = 0;
    @(posedge clk) #1 start_btn = 1;
    repeat (5) @(posedge clk);
    #1 start_btn = 0;
    cyc = 0;
    while (!busy) @(posedge clk);
    while (busy) begin @(posedge clk); cyc++; end
    #1;
    checks++;
    if (!done || counted != NS) begin
      failures++;
      $display("FAIL run %0d: done=%0d counted=%0d", run, done, counted);
    end
    // clear + collect + engine, engine about 75 clocks per level
    checks++;
    if (cyc < NS * DIV || cyc > NS * DIV + (1 << N) + 80 * (1 << N) + 400) begin
      failures++;
      $display("FAIL run %0d took %0d clocks", run, cyc);
    end else
      $display("ok   run %0d took %0d clocks", run, cyc);
    bad = 0;
    for (int i = 0; i < (1 << N); i++) begin
      probe_addr = N'(i);
      @(posedge clk); @(posedge clk); #1;
      if (int'(probe_data) != hist[i]) bad++;
    end
    checks++;
    if (bad != 0) begin failures++; $display("FAIL %0d histogram bins differ", bad); end
    else $display("ok   histogram read back");
    r = compute_static(hist, N, c_lsb, a_lsb);
    check("gain error %", $itor(res.gain_err_pct) / 65536.0, r.gain_err_pct, 0.002);
    check("offset LSB",   $itor(res.offset_lsb)   / 65536.0, r.offset,  0.002);
    check("DNL min",      $itor(res.dnl_min)      / 65536.0, r.dnl_min, 0.002);
    check("DNL max",      $itor(res.dnl_max)      / 65536.0, r.dnl_max, 0.002);
    check("INL min",      $itor(res.inl_min)      / 65536.0, r.inl_min, 0.002);
    check("INL max",      $itor(res.inl_max)      / 65536.0, r.inl_max, 0.002);
    begin
      int bad;
      bad = 0;
      for (int k = 1; k <= (1 << N) - 1; k++) begin
        curve_addr = N'(k);
        @(posedge clk); @(posedge clk); #1;
        if (($itor(curve_dnl) / 65536.0 - r.dnl[k]) ** 2 > 0.002 ** 2 && k < (1 << N) - 1) bad++;
        if (($itor(curve_inl) / 65536.0 - r.inl[k]) ** 2 > 0.002 ** 2) bad++;
      end
      checks++;
      if (bad != 0) begin failures++; $display("FAIL %0d curve points differ", bad); end
      else begin $display("ok   DNL and INL curves match at every code"); end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    one_run(1);
    one_run(2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
