// tb_spectrum_metrics: self-checking test of the dynamic-test metrics.
//
// Builds the spectrum of a 256-sample record (a sine in bin 19 with 2nd,
// 3rd and 7th harmonics, a 5th harmonic that aliases past Nyquist, a DC
// offset and pseudo-random noise) with a floating-point DFT, serves it
// from a one-clock-latency memory model, and compares the fundamental bin,
// THD, SNR, SINAD, SFDR and ENOB with a floating-point evaluation
// (tolerance 0.01 dB, 0.002 bit).  Also checks the run length.
module tb_spectrum_metrics;
  import bist_pkg::*;
  localparam int LOG2N = 8, N = 1 << LOG2N, DW = 40, NH = 10;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                 start = 0, busy, done;
  logic [LOG2N-1:0]     rd_addr;
  logic signed [DW-1:0] rd_re, rd_im;
  dynamic_result_t      res;

  spectrum_metrics #(.LOG2N(LOG2N), .DW(DW), .NH(NH)) dut (.*, .result(res));

  longint xr [N], xi [N];
  always_ff @(posedge clk) begin
    rd_re <= DW'(xr[rd_addr]);
    rd_im <= DW'(xi[rd_addr]);
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

  function automatic int fold(int b);
    b = b % N;
    return (b > N / 2) ? N - b : b;
  endfunction

  initial begin
    real s [N];
    real pw [N / 2 + 1];
    real ps, ph, pn, pspur, sinad;
    int  kf, cyc;
    bit  harm [N / 2 + 1];

    for (int n = 0; n < N; n++) begin
      int r;
      r = int'($urandom_range(2000)) - 1000;
      s[n] = 30.0 + 1800.0 * $sin(2 * PI * 19 * n / N)
           + 9.0 * $sin(2 * PI * 38 * n / N) + 4.0 * $cos(2 * PI * 57 * n / N)
           + 2.0 * $sin(2 * PI * 95 * n / N) + 3.0 * $sin(2 * PI * 133 * n / N)
           + r / 400.0;
    end
    for (int k = 0; k < N; k++) begin
      real er, ei;
      er = 0; ei = 0;
      for (int n = 0; n < N; n++) begin
        er += s[n] * $cos(2 * PI * k * n / N);
        ei -= s[n] * $sin(2 * PI * k * n / N);
      end
      xr[k] = longint'(er * 4096.0);
      xi[k] = longint'(ei * 4096.0);
    end
    // reference on the same integer spectrum
    kf = 1;
    for (int k = 1; k <= N / 2; k++) begin
      pw[k] = $itor(xr[k]) * $itor(xr[k]) + $itor(xi[k]) * $itor(xi[k]);
      if (pw[k] > pw[kf]) kf = k;
      harm[k] = 0;
    end
    for (int h = 2; h <= NH + 1; h++) harm[fold(h * kf)] = 1;
    ps = pw[kf]; ph = 0; pn = 0; pspur = 0;
    for (int k = 1; k <= N / 2; k++) begin
      if (k == kf) continue;
      if (harm[k]) ph += pw[k]; else pn += pw[k];
      if (pw[k] > pspur) pspur = pw[k];
    end
    sinad = 10.0 * $log10(ps / (pn + ph));

    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    start = 1; @(posedge clk); #1; start = 0;
    cyc = 1;
    while (!done) begin @(posedge clk); #1; cyc++; end
    check("fundamental bin", $itor(res.fund_bin), kf, 0.1);
    check("THD dB",   $itor(res.thd_db)   / 65536.0, 10.0 * $log10(ps / ph), 0.01);
    check("SNR dB",   $itor(res.snr_db)   / 65536.0, 10.0 * $log10(ps / pn), 0.01);
    check("SINAD dB", $itor(res.sinad_db) / 65536.0, sinad, 0.01);
    check("SFDR dB",  $itor(res.sfdr_db)  / 65536.0, 10.0 * $log10(ps / pspur), 0.01);
    check("ENOB",     $itor(res.enob)     / 65536.0, (sinad - 1.76) / 6.02, 0.002);
    checks++;
    if (cyc > 2 * N + 5 * 20 + 10) begin
      failures++; $display("FAIL run took %0d clocks", cyc);
    end else $display("ok   run took %0d clocks", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
