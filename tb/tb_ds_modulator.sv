// tb_ds_modulator: self-checking test of the second-order delta-sigma
// modulator.
//
// 1. Constant inputs: the density of ones over 8192 clocks must equal
//    (x + 1) / 2 within 0.2 %.
// 2. A half-scale sine: the output bits must match, clock for clock, a
//    floating-point model of the two-integrator loop, and the loop's
//    integrators must stay within the 4 integer bits.
module tb_ds_modulator;
  localparam int W = 24, F = 20;

  logic clk = 0, rst_n = 0, en = 1;
  logic signed [W-1:0] x_in = '0;
  logic x_out;
  always #5 clk = ~clk;

  ds_modulator #(.WIDTH(W), .FRAC(F)) dut (.clk, .rst_n, .en, .x_in, .x_out);

  int checks = 0, failures = 0;

  task automatic density(input real x);
    int ones;
    real d;
    rst_n = 0;
    x_in  = W'(longint'(x * (1 << F)));
    @(posedge clk); #1 rst_n = 1;
    repeat (64) @(posedge clk);
    ones = 0;
    for (int i = 0; i < 8192; i++) begin
      @(posedge clk); #1;
      ones += int'(x_out);
    end
    d = ones / 8192.0;
    checks++;
    if (d - (x + 1.0) / 2.0 > 0.002 || (x + 1.0) / 2.0 - d > 0.002) begin
      failures++;
      $display("FAIL density for x=%f: %f", x, d);
    end else
      $display("ok   density for x=%f: %f", x, d);
  endtask

  initial begin
    real i1, i2, fb, xs;
    int  mism, bad_range;
    density(0.0);
    density(0.25);
    density(-0.5);
    density(0.6);

    // clock-for-clock comparison with a real-valued loop model
    rst_n = 0;
    x_in  = '0;
    @(posedge clk); #1 rst_n = 1;
    i1 = 0; i2 = 0; mism = 0; bad_range = 0;
    for (int n = 0; n < 20000; n++) begin
      xs = 0.5 * $sin(2.0 * 3.14159265358979 * n / 400.0);
      x_in = W'(longint'(xs * (1 << F)));
      xs = $itor(x_in) / (1 << F);
      @(posedge clk); #1;
      // model update (same clock edge)
      fb = (i2 < 0) ? -1.0 : 1.0;
      i1 = i1 + xs - fb;
      i2 = i2 + i1 - fb;
      if (x_out !== (i2 >= 0)) mism++;
      if (i2 > 7.9 || i2 < -7.9 || i1 > 7.9 || i1 < -7.9) bad_range++;
    end
    checks++;
    if (mism != 0) begin
      failures++;
      $display("FAIL %0d output bits differ from the loop model", mism);
    end else
      $display("ok   20000 output bits match the loop model");
    checks++;
    if (bad_range != 0) begin
      failures++;
      $display("FAIL integrators left the 4-integer-bit range");
    end else
      $display("ok   integrators stay in range");
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
