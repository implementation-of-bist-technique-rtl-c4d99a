// tb_fft_engine: self-checking test of the radix-2 FFT engine.
//
// Loads records of 256 samples (a random one, and a two-tone one with a
// DC offset), runs the transform and compares every bin with a direct
// floating-point DFT of the same samples, allowing 0.01 plus one part
// per million of the bin's magnitude.  Also checks the clock count
// against 4 clocks per butterfly plus the twiddle generation.
module tb_fft_engine;
  localparam int LOG2N = 8, N = 1 << LOG2N, IW = 12, FIN = 12, DW = 40;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                 load_en = 0, start = 0, busy, done;
  logic [LOG2N-1:0]     load_addr = '0, rd_addr = '0;
  logic signed [IW-1:0] load_data = '0;
  logic signed [DW-1:0] rd_re, rd_im;

  fft_engine #(.LOG2N(LOG2N), .IW(IW), .FIN(FIN), .DW(DW)) dut (.*);

  int checks = 0, failures = 0;
  int x [N];

  task automatic run(string tag);
    int cyc, bad;
    real er, ei, gr, gi, worst;
    for (int i = 0; i < N; i++) begin
      load_en = 1; load_addr = LOG2N'(i); load_data = IW'(x[i]);
      @(posedge clk); #1;
    end
    load_en = 0;
    start = 1; @(posedge clk); #1; start = 0;
    cyc = 1;
    while (!done) begin @(posedge clk); #1; cyc++; end
    checks++;
    if (cyc > 4 * (N / 2) * LOG2N + 30 * N) begin
      failures++; $display("FAIL %s took %0d clocks", tag, cyc);
    end else $display("ok   %s took %0d clocks", tag, cyc);
    bad = 0; worst = 0;
    for (int k = 0; k < N; k++) begin
      rd_addr = LOG2N'(k);
      @(posedge clk); #1;
      er = 0; ei = 0;
      for (int n = 0; n < N; n++) begin
        er += x[n] * $cos(2.0 * 3.14159265358979 * k * n / N);
        ei -= x[n] * $sin(2.0 * 3.14159265358979 * k * n / N);
      end
      gr = $itor(rd_re) / (1 << FIN);
      gi = $itor(rd_im) / (1 << FIN);
      if ((gr - er) ** 2 + (gi - ei) ** 2 > worst) worst = (gr - er) ** 2 + (gi - ei) ** 2;
      if ((gr - er) ** 2 + (gi - ei) ** 2 > (0.01 + 1e-6 * $sqrt(er * er + ei * ei)) ** 2) begin
        if (bad < 4) $display("FAIL %s bin %0d: (%f,%f) vs (%f,%f)", tag, k, gr, gi, er, ei);
        bad++;
      end
    end
    checks++;
    if (bad != 0) failures++;
    else $display("ok   %s: %0d bins match, worst error %g", tag, N, $sqrt(worst));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < N; i++) x[i] = int'($urandom_range(4095)) - 2048;
    run("random record");
    for (int i = 0; i < N; i++)
      x[i] = int'(300.0 + 1500.0 * $sin(2.0 * 3.14159265358979 * 13 * i / N)
                  + 100.0 * $cos(2.0 * 3.14159265358979 * 40 * i / N));
    run("two tones");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
