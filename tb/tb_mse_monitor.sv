// tb_mse_monitor: windows of random-amplitude slicer errors. For each window
// the reference sums er^2+ei^2, converts it to SNR_sl = 10*log10(42) -
// 10*log10(J) with real arithmetic, and expects snr_low for SNR < 31 dB and
// snr_high for SNR > 34 dB. The done pulse must come exactly L_WIN enabled
// samples after the window start; clear must restart a window.
module tb_mse_monitor;
  localparam int EW = 14, FRAC = 12, L_WIN = 64;
  localparam int SW = 2 * EW + $clog2(L_WIN) + 1;
  logic clk = 0, rst_n = 0, en = 0, clear = 0;
  logic signed [EW-1:0] er, ei;
  logic done, snr_low, snr_high;
  logic [SW-1:0] sum;
  int checks = 0, failures = 0;
  int n_low = 0, n_high = 0, n_mid = 0;

  mse_monitor #(.EW(EW), .FRAC(FRAC), .L_WIN(L_WIN)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic window(input int amp, input int gaps);
    longint s = 0;
    real j, snr;
    for (int i = 0; i < L_WIN; i++) begin
      int a, b;
      // optional idle cycles (en = 0) inside the window
      for (int g = 0; g < gaps; g++) begin
        @(negedge clk); en = 0;
        @(posedge clk); #1;
        checks++; if (done) failures++;
      end
      @(negedge clk);
      a = int'($urandom_range(0, 2 * amp)) - amp;
      b = int'($urandom_range(0, 2 * amp)) - amp;
      er = EW'(a); ei = EW'(b); en = 1;
      s += longint'(a * a + b * b);
      @(posedge clk); #1;
      checks++;
      if (done != (i == L_WIN - 1)) begin
        failures++;
        $display("FAIL done at sample %0d", i);
      end
    end
    j = real'(s) / L_WIN / (2.0 ** (2 * FRAC));
    snr = 10.0 * $log10(42.0) - 10.0 * $log10(j);
    checks++;
    if (longint'(sum) != s || snr_low != (snr < 31.0) || snr_high != (snr > 34.0)) begin
      failures++;
      $display("FAIL sum=%0d/%0d snr=%f low=%b high=%b", sum, s, snr, snr_low, snr_high);
    end
    if (snr_low) n_low++; else if (snr_high) n_high++; else n_mid++;
  endtask

  initial begin
    er = 0; ei = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < 60; w++) window(600 + 20 * w, w % 3 == 0 ? 1 : 0);
    // clear in the middle of a window: the count restarts
    for (int i = 0; i < 10; i++) begin
      @(negedge clk); er = 14'sd4000; ei = 14'sd4000; en = 1;
    end
    @(negedge clk); en = 0; clear = 1;
    @(negedge clk); clear = 0;
    window(700, 0);
    checks++;
    if (n_low == 0 || n_high == 0 || n_mid == 0) failures++;
    $display("windows low=%0d mid=%0d high=%0d", n_low, n_mid, n_high);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
