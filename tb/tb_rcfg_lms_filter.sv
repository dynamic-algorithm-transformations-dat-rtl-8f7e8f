// tb_rcfg_lms_filter: system identification with the real reconfigurable
// LMS filter (8 taps, 8-bit data and coefficients). An unknown 8-tap system
// h plus small noise produces d(n) from white input x(n). Checks:
//   * every cycle, y equals sum alpha_k * masked(w_k) * masked(x(n-k))
//     computed from the w outputs and the tb's own input history;
//   * every cycle, the next w equals w + beta*((e*x) >>> MU_SH) at register
//     level, seen through the top BW bits after convergence;
//   * after convergence w is within 2 LSB of h;
//   * beta = 0 freezes w; alpha, bw_red and bx_red change y as expected.
module tb_rcfg_lms_filter;
  localparam int N = 8, BW = 8, BX = 8, B_ADD = 16;
  logic clk = 0, rst_n = 0, en = 0;
  logic signed [BX-1:0] x;
  logic signed [B_ADD-1:0] d, y, e;
  logic [N-1:0] alpha, beta;
  logic [1:0] bw_red, bx_red;
  logic signed [N-1:0][BW-1:0] w;
  int checks = 0, failures = 0;
  int hist[N];
  int h[N] = '{3, -6, 40, 9, 25, 61, 12, -2};   // unknown system, value h/128

  rcfg_lms_filter #(.N(N), .BW(BW), .BX(BX), .B_ADD(B_ADD)) dut (.*);

  always #5 clk = ~clk;

  task automatic step(input bit chk);
    int yy, dd, wm, xm;
    @(negedge clk);
    for (int k = N-1; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = int'($urandom_range(0, 255)) - 128;
    x = BX'(hist[0]);
    xm = -(1 << bx_red);
    hist[0] = hist[0] & xm;       // the filter stores the masked sample
    dd = 0;
    for (int k = 0; k < N; k++) dd += h[k] * hist[k];
    dd += int'($urandom_range(0, 8)) - 4;
    d = B_ADD'(dd);
    en = 1;
    #1;
    if (chk) begin
      wm = -(1 << bw_red);
      yy = 0;
      for (int k = 0; k < N; k++) if (alpha[k]) yy += (int'($signed(w[k])) & wm) * hist[k];
      checks++;
      if (int'(y) != yy || int'(e) != dd - yy) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0t bw=%0d bx=%0d a=%b y=%0d/%0d e=%0d/%0d", $time, bw_red, bx_red, alpha, y, yy, e, dd - yy);
      end
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (hist[k]) hist[k] = 0;
    alpha = '1; beta = '1; bw_red = 0; bx_red = 0; x = 0; d = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 30000; n++) step(1);
    for (int k = 0; k < N; k++) begin
      checks++;
      if (int'($signed(w[k])) - h[k] > 2 || h[k] - int'($signed(w[k])) > 2) begin
        failures++;
        $display("FAIL w[%0d]=%0d h=%0d", k, w[k], h[k]);
      end
    end
    // Freeze.
    beta = '0;
    begin
      logic signed [N-1:0][BW-1:0] ws;
      ws = w;
      for (int n = 0; n < 500; n++) step(1);
      checks++;
      if (w != ws) failures++;
    end
    // Reconfigure: power down taps 0, 3, 7; force LSBs of w and x.
    @(posedge clk); #1; alpha = 8'b0111_0110;
    for (int n = 0; n < 500; n++) step(1);
    @(posedge clk); #1; bw_red = 1; bx_red = 2;
    for (int n = 0; n < 500; n++) step(1);
    @(posedge clk); #1; bw_red = 2; bx_red = 1;
    for (int n = 0; n < 500; n++) step(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
