// tb_static_4bit: the static test on an ideal 4-bit converter with two
// transition levels moved from their ideal places, the classic check of
// a histogram-based linearity test.
//
// Levels 1..15 sit at k LSB except level 5 (+0.4 LSB) and level 11
// (-0.3 LSB).  The converter samples an overdriving sine; the histogram
// is served to the static engine (N_BITS = 4).  Checks: results against
// the floating-point reference, and that the DNL extremes are near the
// values the moved level 5 implies (code 4 0.4 LSB wide, code 5 0.4 LSB
// narrow: about +0.4 and -0.4 LSB, within the
// sine-histogram error of 0.1 LSB), at the extremes and at codes 4 and 5
// of the per-code DNL curve, and every point of both curves.
module tb_static_4bit;
  import bist_pkg::*;
  import static_ref_pkg::*;

  localparam int N = 4, CW = 18, M = (1 << N) - 1, S = 100000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          start = 0, busy, done;
  logic [N-1:0]  hist_addr;
  logic [CW-1:0] hist_data;
  static_result_t res;
  real           c = 8.0, a = 9.0;

  int  hist [] = new[1 << N];
  real tl [M + 1];
  int  checks = 0, failures = 0;

  static_engine #(.N_BITS(N), .CW(CW)) dut (
    .clk, .rst_n, .start,
    .num_samples (CW'(S)),
    .sine_offset (32'(longint'(c * 65536.0))),
    .sine_ampl   (32'(longint'(a * 65536.0))),
    .hist_addr, .hist_data, .busy, .done, .result (res),
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

  initial begin
    static_ref_t r;
    for (int k = 1; k <= M; k++) tl[k] = k;
    tl[5]  += 0.4;
    tl[11] -= 0.3;
    foreach (hist[i]) hist[i] = 0;
    for (int i = 0; i < S; i++) begin
      real v;
      int  code;
      v = c + a * $sin(2.0 * 3.14159265358979 * 0.00731 * i);
      code = 0;
      for (int k = 1; k <= M; k++) if (v >= tl[k]) code = k;
      hist[code]++;
    end
    r = compute_static(hist, N, c, a);

    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk) #1 start = 1;
    @(posedge clk) #1 start = 0;
    while (!done) @(posedge clk);
    #1;
    check("gain error %", $itor(res.gain_err_pct) / 65536.0, r.gain_err_pct, 0.002);
    check("offset LSB",   $itor(res.offset_lsb)   / 65536.0, r.offset,  0.002);
    check("DNL min",      $itor(res.dnl_min)      / 65536.0, r.dnl_min, 0.002);
    check("DNL max",      $itor(res.dnl_max)      / 65536.0, r.dnl_max, 0.002);
    check("INL min",      $itor(res.inl_min)      / 65536.0, r.inl_min, 0.002);
    check("INL max",      $itor(res.inl_max)      / 65536.0, r.inl_max, 0.002);
    // moving level 5 up by 0.4 LSB widens code 4 (+0.4) and narrows code 5 (-0.4)
    check("DNL max near +0.4", $itor(res.dnl_max) / 65536.0, 0.4, 0.1);
    check("DNL min near -0.4", $itor(res.dnl_min) / 65536.0, -0.4, 0.1);
    begin
      int bad;
      bad = 0;
      for (int k = 1; k <= M; k++) begin
        curve_addr = N'(k);
        @(posedge clk); @(posedge clk); #1;
        if (($itor(curve_dnl) / 65536.0 - r.dnl[k]) ** 2 > 0.002 ** 2 && k < M) bad++;
        if (($itor(curve_inl) / 65536.0 - r.inl[k]) ** 2 > 0.002 ** 2) bad++;
      end
      checks++;
      if (bad != 0) begin failures++; $display("FAIL %0d curve points differ", bad); end
      else begin $display("ok   DNL and INL curves match at every code"); end
    end
    curve_addr = N'(4);
    @(posedge clk); @(posedge clk); #1;
    check("DNL of code 4", $itor(curve_dnl) / 65536.0, 0.4, 0.1);
    curve_addr = N'(5);
    @(posedge clk); @(posedge clk); #1;
    check("DNL of code 5", $itor(curve_dnl) / 65536.0, -0.4, 0.1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
