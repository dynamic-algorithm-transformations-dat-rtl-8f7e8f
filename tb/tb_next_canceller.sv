// tb_next_canceller: the SPA block cancelling a synthetic NEXT path.
//
// Received sample r = far-end symbol + sum conj(h_k) a(n-k) + small noise,
// with a fixed complex crosstalk response h and random 64-CAP symbols on
// both ends. Checks:
//   * same-cycle datapath: u = r - y, with y rebuilt from the coefficients
//     read back through rd_idx (direct complex arithmetic), every cycle;
//   * slicer decisions equal the far-end symbols after convergence and the
//     coefficient of each tap is close to h;
//   * beta = 0 freezes the coefficients; alpha = 0 removes a tap's share.
module tb_next_canceller;
  localparam int N = 30, BW = 12, BX = 4, B_ADD = 16, ACC_W = B_ADD + 2, EW = BW + 2;
  logic clk = 0, rst_n = 0, en = 0;
  logic signed [BX-1:0] ar, ai;
  logic signed [ACC_W-1:0] rr, ri, ur, ui;
  logic [N-1:0] alpha, beta;
  logic [1:0] prec_red;
  logic [4:0] rd_idx;
  logic signed [3:0] dec_r, dec_i;
  logic signed [EW-1:0] er, ei;
  logic signed [BW-1:0] rd_c1, rd_d1;
  int checks = 0, failures = 0;
  real hc[N], hd[N];
  int tr[N], ti[N];
  int far_r, far_i;

  next_canceller #(.N(N)) dut (.*);

  always #100 clk = ~clk;

  function automatic int sym();
    return 2 * int'($urandom_range(0, 7)) - 7;
  endfunction

  // Coefficients as the F-block uses them (read back one tap at a time).
  int cc1[N], cd1[N];
  task automatic read_coefs();
    for (int k = 0; k < N; k++) begin
      rd_idx = 5'(k); #1;
      cc1[k] = int'(rd_c1); cd1[k] = int'(rd_d1);
    end
  endtask

  task automatic step(input bit check_dp);
    real yr, yi, nr, ni;
    for (int k = N-1; k > 0; k--) begin tr[k] = tr[k-1]; ti[k] = ti[k-1]; end
    tr[0] = sym(); ti[0] = sym();
    far_r = sym(); far_i = sym();
    yr = 0; yi = 0;
    for (int k = 0; k < N; k++) begin
      yr += hc[k] * tr[k] + hd[k] * ti[k];
      yi += hc[k] * ti[k] - hd[k] * tr[k];
    end
    nr = (real'($urandom_range(0, 200)) - 100.0) / 4096.0;
    ni = (real'($urandom_range(0, 200)) - 100.0) / 4096.0;
    ar = BX'(tr[0]); ai = BX'(ti[0]);
    rr = ACC_W'($rtoi((far_r + yr + nr) * 4096.0));
    ri = ACC_W'($rtoi((far_i + yi + ni) * 4096.0));
    en = 1;
    if (check_dp) begin
      int yr2, yi2, m;
      read_coefs();
      m = -(1 << prec_red);
      yr2 = 0; yi2 = 0;
      for (int k = 0; k < N; k++) if (alpha[k]) begin
        int a, b;
        a = cc1[k] & m; b = cd1[k] & m;
        yr2 += (a + b) * tr[k] + (a - b) * ti[k];
        yi2 += (a + b) * ti[k] - (a - b) * tr[k];
      end
      checks++;
      if (int'(ur) != int'(rr) - yr2 || int'(ui) != int'(ri) - yi2) begin
        failures++;
        if (failures < 10) $display("FAIL datapath u=%0d/%0d", ur, int'(rr) - yr2);
      end
    end
    @(posedge clk); #1;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int errs;
    for (int k = 0; k < N; k++) begin
      hc[k] = 0.002 * ((k % 5) - 2); hd[k] = 0.001 * ((k % 3) - 1);
      tr[k] = 0; ti[k] = 0;
    end
    hc[2] = 0.04; hd[2] = -0.02; hc[7] = -0.03; hd[7] = 0.03; hc[12] = 0.02;
    alpha = '1; beta = '1; prec_red = 0; rd_idx = 0;
    ar = 0; ai = 0; rr = 0; ri = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) step(1);
    for (int n = 0; n < 20000; n++) step(n % 997 == 0);
    // Converged: decisions must match the far-end symbols.
    errs = 0;
    for (int n = 0; n < 2000; n++) begin
      step(n % 100 == 0);
      // step already advanced the clock; the decision was for far_r/far_i
    end
    for (int n = 0; n < 2000; n++) begin
      for (int k = N-1; k > 0; k--) begin tr[k] = tr[k-1]; ti[k] = ti[k-1]; end
      tr[0] = sym(); ti[0] = sym(); far_r = sym(); far_i = sym();
      begin
        real yr, yi;
        yr = 0; yi = 0;
        for (int k = 0; k < N; k++) begin
          yr += hc[k] * tr[k] + hd[k] * ti[k];
          yi += hc[k] * ti[k] - hd[k] * tr[k];
        end
        ar = BX'(tr[0]); ai = BX'(ti[0]);
        rr = ACC_W'($rtoi((far_r + yr) * 4096.0));
        ri = ACC_W'($rtoi((far_i + yi) * 4096.0));
      end
      #1;
      checks++;
      if (int'(dec_r) != far_r || int'(dec_i) != far_i) errs++;
      @(posedge clk); #1;
    end
    if (errs != 0) begin failures++; $display("FAIL %0d decision errors", errs); end
    // Coefficients close to the crosstalk response (c1 = c+d, d1 = c-d).
    read_coefs();
    for (int k = 0; k < N; k++) begin
      real ec1, ed1;
      ec1 = (hc[k] + hd[k]) * 2048.0; ed1 = (hc[k] - hd[k]) * 2048.0;
      checks++;
      if (cc1[k] - ec1 > 6.0 || ec1 - cc1[k] > 6.0 || cd1[k] - ed1 > 6.0 || ed1 - cd1[k] > 6.0) begin
        failures++;
        $display("FAIL tap %0d c1=%0d exp %f d1=%0d exp %f", k, cc1[k], ec1, cd1[k], ed1);
      end
    end
    // beta = 0: coefficients hold.
    beta = '0;
    begin
      int s1[N], s2[N];
      read_coefs(); foreach (s1[k]) begin s1[k] = cc1[k]; s2[k] = cd1[k]; end
      for (int n = 0; n < 500; n++) step(n % 50 == 0);
      read_coefs();
      for (int k = 0; k < N; k++) begin
        checks++;
        if (cc1[k] != s1[k] || cd1[k] != s2[k]) failures++;
      end
    end
    // alpha / precision: datapath check with taps off and LSBs forced.
    alpha = ~(N'(1) << 2);
    prec_red = 2;
    for (int n = 0; n < 500; n++) step(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
