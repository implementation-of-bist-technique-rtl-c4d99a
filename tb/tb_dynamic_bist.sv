// tb_dynamic_bist: self-checking test of the dynamic self-test controller
// with a behavioural 12-bit ADC sampling a coherent sine (13 periods in a
// 256-sample record) plus a little second harmonic.
//
// Presses start twice.  Each run must collect exactly 256 conversions and
// report the fundamental bin, THD, SNR, SINAD, SFDR and ENOB of those
// samples as a floating-point DFT computes them (tolerance 0.02 dB,
// 0.005 bit).  The spectrum is read back through the probe port and the
// fundamental's magnitude compared.  The run length is checked too.
module tb_dynamic_bist;
  import bist_pkg::*;
  import dyn_ref_pkg::*;

  localparam int NB = 12, LOG2N = 8, N = 1 << LOG2N, DW = 40, DIV = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                 start_btn = 0, adc_drdy, busy, done;
  logic [NB-1:0]        adc_code;
  logic [LOG2N-1:0]     probe_addr = '0;
  logic signed [DW-1:0] probe_re, probe_im;
  dynamic_result_t      res;
  real                  vin;

  adc_model #(.N_BITS(NB), .CLK_DIV(DIV)) u_adc (.clk, .rst_n, .vin, .code(adc_code), .drdy(adc_drdy));

  dynamic_bist #(.N_BITS(NB), .LOG2N(LOG2N), .DW(DW), .NH(10)) dut (
    .clk, .rst_n, .start_btn, .adc_code, .adc_drdy,
    .probe_addr, .probe_re, .probe_im, .busy, .done, .result(res)
  );

  // coherent stimulus: 13 periods per 256 conversions of DIV clocks
  longint tick = 0;
  always @(posedge clk) begin
    real ph;
    tick <= tick + 1;
    ph   = 2.0 * 3.14159265358979 * 13.0 * $itor(tick) / (N * DIV);
    vin  <= 0.5 + 0.45 * $sin(ph) + 0.002 * $sin(2.0 * ph + 0.4);
  end

  int rec [] = new[N];
  int counted = 0;
  always @(negedge clk)
    if (dut.state == 3'd1 && adc_drdy) begin
      if (counted < N) rec[counted] = int'(adc_code) - (1 << (NB - 1));
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
    dyn_ref_t r;
    int cyc;
    real mag, er, ei;
    counted = 0;
    @(posedge clk) #1 start_btn = 1;
    repeat (5) @(posedge clk);
    #1 start_btn = 0;
    while (!busy) @(posedge clk);
    cyc = 0;
    while (busy) begin @(posedge clk); cyc++; end
    #1;
    checks++;
    if (!done || counted != N) begin
      failures++; $display("FAIL run %0d: done=%0d counted=%0d", run, done, counted);
    end
    checks++;
    if (cyc > N * DIV + 2 * N * LOG2N + 30 * N + 2 * N + 200) begin
      failures++; $display("FAIL run %0d took %0d clocks", run, cyc);
    end else $display("ok   run %0d took %0d clocks", run, cyc);
    r = compute_dynamic(rec, 10);
    check("fundamental bin", $itor(res.fund_bin), r.fund_bin, 0.1);
    check("THD dB",   $itor(res.thd_db)   / 65536.0, r.thd,   0.02);
    check("SNR dB",   $itor(res.snr_db)   / 65536.0, r.snr,   0.02);
    check("SINAD dB", $itor(res.sinad_db) / 65536.0, r.sinad, 0.02);
    check("SFDR dB",  $itor(res.sfdr_db)  / 65536.0, r.sfdr,  0.02);
    check("ENOB",     $itor(res.enob)     / 65536.0, r.enob,  0.005);
    // probe the fundamental bin
    probe_addr = LOG2N'(r.fund_bin);
    @(posedge clk); @(posedge clk); #1;
    er = 0; ei = 0;
    for (int i = 0; i < N; i++) begin
      er += rec[i] * $cos(2.0 * 3.14159265358979 * ((r.fund_bin * i) % N) / N);
      ei -= rec[i] * $sin(2.0 * 3.14159265358979 * ((r.fund_bin * i) % N) / N);
    end
    mag = $sqrt(($itor(probe_re) / 4096.0) ** 2 + ($itor(probe_im) / 4096.0) ** 2);
    check("probed fundamental magnitude", mag, $sqrt(er * er + ei * ei), 0.5);
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
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
