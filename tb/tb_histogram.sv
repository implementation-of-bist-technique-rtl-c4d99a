// tb_histogram: self-checking test of the code-density histogram.
//
// Clears the memory (checking the sweep takes 2^N_BITS clocks), feeds
// 20,000 codes with random gaps, including runs of the same code on
// consecutive clocks, then reads every bin back and compares it with a
// count kept by the testbench.  A second clear must zero every bin.
module tb_histogram;
  localparam int N = 12, CW = 18;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          clear = 0, clearing, sample_valid = 0;
  logic [N-1:0]  sample_code = '0, rd_addr = '0;
  logic [CW-1:0] rd_data;

  histogram #(.N_BITS(N), .CW(CW)) dut (.*);

  int ref_cnt [1 << N];
  int checks = 0, failures = 0;

  task automatic do_clear();
    int cyc;
    @(posedge clk) #1; clear = 1;
    @(posedge clk) #1; clear = 0;
    cyc = 1;
    while (clearing) begin @(posedge clk) #1; cyc++; end
    checks++;
    if (cyc != (1 << N) + 1) begin
      failures++;
      $display("FAIL clear took %0d clocks", cyc);
    end
    foreach (ref_cnt[i]) ref_cnt[i] = 0;
  endtask

  task automatic read_all(string tag);
    int bad;
    bad = 0;
    for (int i = 0; i < (1 << N); i++) begin
      rd_addr = N'(i);
      @(posedge clk) #1;
      @(posedge clk) #1;
      if (int'(rd_data) != ref_cnt[i]) begin
        if (bad < 5) $display("FAIL %s bin %0d: %0d vs %0d", tag, i, rd_data, ref_cnt[i]);
        bad++;
      end
    end
    checks++;
    if (bad != 0) failures++;
    else $display("ok   %s: all %0d bins match", tag, 1 << N);
  endtask

  initial begin
    int code;
    repeat (3) begin @(posedge clk); #1; end
    rst_n = 1;
    do_clear();
    code = 0;
    for (int i = 0; i < 20000; i++) begin
      if ($urandom_range(3) != 0) code = $urandom_range((1 << N) - 1);
      if (i % 1000 < 50) code = 7;            // burst of one code
      sample_code  = N'(code);
      sample_valid = 1;
      ref_cnt[code]++;
      @(posedge clk) #1;
      if ($urandom_range(2) == 0) begin
        sample_valid = 0;
        repeat ($urandom_range(3)) begin @(posedge clk); #1; end
      end
    end
    sample_valid = 0;
    repeat (3) begin @(posedge clk); #1; end
    read_all("after counting");
    do_clear();
    read_all("after clear");
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
