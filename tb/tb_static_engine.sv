// tb_static_engine: self-checking test of the static test engine.
//
// Builds the code-density histogram of a clipped sine wave seen by a
// N_BITS = 8 ADC whose transition levels carry a known error pattern,
// serves it through a one-clock-latency memory model, and compares gain
// error, offset, DNL and INL extremes and the per-code DNL and INL curves
// with a floating-point evaluation of the same least-squares formulas.  Also checks the run length.
module tb_static_engine;
  import bist_pkg::*;

  localparam int N  = 8;
  localparam int CW = 18;
  localparam int M  = (1 << N) - 1;
  localparam int S  = 60000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          start = 0, busy, done;
  logic [N-1:0]  hist_addr;
  logic [CW-1:0] hist_data;
  static_result_t res;
  logic [31:0]   c_q16, a_q16;

  int   hist [1 << N];
  real  tl   [1 << N];    // true transition levels of the model ADC
  int   checks = 0, failures = 0;

  static_engine #(.N_BITS(N), .CW(CW)) dut (
    .clk, .rst_n, .start,
    .num_samples (CW'(S)),
    .sine_offset (c_q16),
    .sine_ampl   (a_q16),
    .hist_addr, .hist_data, .busy, .done,
    .result (res),
    .curve_addr, .curve_dnl, .curve_inl
  );
  logic [N-1:0] curve_addr = '0;
  q16_t         curve_dnl, curve_inl;

  always_ff @(posedge clk) hist_data <= CW'(hist[hist_addr]);

  function automatic void check(string what, real got, real exp, real tol);
    checks++;
    if ((got - exp) > tol || (exp - got) > tol) begin
      failures++;
      $display("FAIL %s: got %f expected %f", what, got, exp);
    end else
      $display("ok   %s: %f (expected %f)", what, got, exp);
  endfunction

  real c, a;
  real t [1 << N];
  real st, skt, st2, g, vos, dnl, inl, dmin, dmax, imin, imax;
  int  cyc;

  initial begin
    // model ADC: ideal levels k, a few bent ones and a gain/offset error
    for (int k = 1; k <= M; k++) begin
      tl[k] = 1.003 * k - 0.7;
      if (k % 37 == 0) tl[k] += 0.4;
      if (k % 53 == 0) tl[k] -= 0.3;
    end
    c = 128.0;
    a = 140.0;                      // overdrives both ends
    c_q16 = 32'(longint'(c * 65536.0));
    a_q16 = 32'(longint'(a * 65536.0));
    for (int i = 0; i < (1 << N); i++) hist[i] = 0;
    for (int i = 0; i < S; i++) begin
      real v;
      int  code;
      v = c + a * $sin(2.0 * 3.14159265358979 * 0.0123457 * i + 0.3);
      code = 0;
      for (int k = 1; k <= M; k++) if (v >= tl[k]) code = k;
      hist[code]++;
    end

    // reference: the same formulas in floating point
    begin
      int ch;
      ch = 0; st = 0; skt = 0; st2 = 0;
      for (int k = 1; k <= M; k++) begin
        ch += hist[k-1];
        t[k] = c - a * $cos(3.14159265358979 * ch / S);
        st += t[k]; skt += k * t[k]; st2 += t[k] * t[k];
      end
      g   = M * (skt - (1 << (N-1)) * st) / (M * st2 - st * st);
      vos = (1 << (N-1)) - g * st / M;
      dmin = 1e9; dmax = -1e9; imin = 1e9; imax = -1e9;
      for (int k = 1; k <= M; k++) begin
        inl = g * t[k] + vos - k;
        if (inl < imin) imin = inl;
        if (inl > imax) imax = inl;
        if (k < M) begin
          dnl = g * (t[k+1] - t[k]) - 1.0;
          if (dnl < dmin) dmin = dnl;
          if (dnl > dmax) dmax = dnl;
        end
      end
    end

    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    start <= 1;
    @(posedge clk);
    start <= 0;
    cyc = 0;
    while (!done) begin
      @(posedge clk);
      cyc++;
    end
    #1;
    check("gain error %",  $itor(res.gain_err_pct) / 65536.0, (g - 1.0) * 100.0, 0.002);
    check("offset LSB",    $itor(res.offset_lsb)   / 65536.0, vos,  0.002);
    check("DNL min",       $itor(res.dnl_min)      / 65536.0, dmin, 0.002);
    check("DNL max",       $itor(res.dnl_max)      / 65536.0, dmax, 0.002);
    check("INL min",       $itor(res.inl_min)      / 65536.0, imin, 0.002);
    check("INL max",       $itor(res.inl_max)      / 65536.0, imax, 0.002);
    // per-code curves
    begin
      int bad;
      bad = 0;
      for (int k = 1; k <= M; k++) begin
        curve_addr = N'(k);
        @(posedge clk); @(posedge clk); #1;
        if (($itor(curve_inl) / 65536.0 - (g * t[k] + vos - k)) ** 2 > 0.002 ** 2) bad++;
        if (k < M && ($itor(curve_dnl) / 65536.0 - (g * (t[k+1] - t[k]) - 1.0)) ** 2 > 0.002 ** 2) bad++;
      end
      checks++;
      if (bad != 0) begin failures++; $display("FAIL %0d curve points differ", bad); end
      else $display("ok   DNL and INL curves match at every code");
    end
    // schedule: at most 80 clocks per level plus fit and pass 3
    checks++;
    if (cyc > 80 * M + 300 + 3 * M) begin
      failures++;
      $display("FAIL run took %0d clocks", cyc);
    end else
      $display("ok   run took %0d clocks", cyc);
    if (busy) begin failures++; $display("FAIL busy after done"); end
    checks++;
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
