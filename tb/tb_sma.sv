// tb_sma: the SMA controller driven with slicer-error levels that put the
// SNR above, inside or below the 31..34 dB window, and a fixed set of tap
// coefficients answered by the tb. Short windows (16 symbols, decision every
// 32) keep the run small. Checks:
//   * convergence: weight update switched off after CONV_DEC decisions;
//   * each tap switched off is the powered-up tap with the smallest
//     E_k = |w_k|^2/E_m(w_k) (reference in real arithmetic);
//   * SNR inside the window stops the trimming; a drop below it right after
//     a power-down restores that tap (undo) and freezes the count;
//   * a drop below it in steady state powers every tap up again (re-adapt);
//   * prec_red always follows the tap count (eq. for Bw,opt).
module tb_sma;
  localparam int N = 30, BW = 12, EW = 14;
  logic clk = 0, rst_n = 0, en = 0;
  logic signed [EW-1:0] er, ei;
  logic [4:0] rd_idx;
  logic signed [BW-1:0] rd_c1, rd_d1;
  logic [N-1:0] alpha, beta;
  logic [1:0] prec_red;
  logic [3:0] bv;
  logic [4:0] n_on;
  dat_pkg::sma_state_e state;
  logic [2*EW+4:0] mse_sum;
  logic ev_decide, ev_power_down, ev_undo, ev_readapt, ev_converged;
  int checks = 0, failures = 0;
  int mc1[N], md1[N];
  int amp = 188;
  int n_down = 0, n_undo = 0, n_readapt = 0, n_conv = 0;
  logic [N-1:0] prev_alpha;

  sma #(.N(N), .BW(BW), .L_WIN(16), .RECONF_L(32), .CONV_DEC(2)) dut (.*);

  always #5 clk = ~clk;
  assign rd_c1 = (rd_idx < N) ? BW'(mc1[rd_idx]) : '0;
  assign rd_d1 = (rd_idx < N) ? BW'(md1[rd_idx]) : '0;

  function automatic real nmodel(input int v);
    logic [BW-1:0] b;
    int ones, tz;
    b = BW'(v);
    ones = $countones(b);
    tz = 0;
    for (int i = 0; i < BW; i++) begin
      if (b[i]) break;
      tz++;
    end
    return 0.9 * ones + 0.1 * (BW - tz);
  endfunction

  function automatic int argmin_e(input logic [N-1:0] a);
    int best = -1;
    real be = 0.0;
    for (int k = 0; k < N; k++) if (a[k]) begin
      real en, ek;
      en = nmodel(mc1[k]) + nmodel((mc1[k] - md1[k]) >>> 1) + nmodel(md1[k]);
      ek = (en == 0.0) ? 0.0 : real'(mc1[k] * mc1[k] + md1[k] * md1[k]) / en;
      if (best < 0 || ek < be) begin best = k; be = ek; end
    end
    return best;
  endfunction

  // symbol stream: constant-magnitude errors with random signs
  always @(negedge clk) begin
    en <= rst_n;
    er <= EW'($urandom_range(0, 1) ? amp : -amp);
    ei <= EW'($urandom_range(0, 1) ? amp : -amp);
  end

  // event checker
  always @(posedge clk) begin
    #1;
    if (rst_n) begin
      int ones;
      ones = $countones(alpha);
      checks++;
      if (int'(n_on) != ones) failures++;
      checks++;
      if (int'(prec_red) != ((16 * ones <= N) ? 2 : (4 * ones <= N) ? 1 : 0)) failures++;
      if (ev_power_down) begin
        int exp_k;
        exp_k = argmin_e(prev_alpha);
        n_down++;
        checks++;
        if ((prev_alpha & ~alpha) != (N'(1) << exp_k) || beta != '0) begin
          failures++;
          $display("FAIL power-down: expected tap %0d, alpha %b -> %b", exp_k, prev_alpha, alpha);
        end
      end
      if (ev_undo) begin
        n_undo++;
        checks++;
        if ($countones(alpha) != $countones(prev_alpha) + 1) failures++;
      end
      if (ev_readapt) begin
        n_readapt++;
        checks++;
        if (alpha != '1 || beta != '1 || state != dat_pkg::SMA_ADAPT) failures++;
      end
      if (ev_converged) begin
        n_conv++;
        checks++;
        if (beta != '0) failures++;
      end
      if (!ev_power_down && !ev_undo && !ev_readapt) begin
        checks++;
        if (alpha != prev_alpha) begin failures++; $display("FAIL alpha changed without event"); end
      end
      prev_alpha = alpha;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wait_decisions(input int n);
    repeat (n) begin
      @(posedge clk);
      while (!ev_decide) @(posedge clk);
    end
  endtask

  initial begin
    int downs_before;
    for (int k = 0; k < N; k++) begin
      mc1[k] = int'($urandom_range(0, 400)) - 200;
      md1[k] = int'($urandom_range(0, 400)) - 200;
    end
    mc1[4] = 0; md1[4] = 0;
    prev_alpha = '1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // High SNR: converge, then trim taps.
    amp = 188;
    while (n_down < 12) @(posedge clk);
    // SNR inside the window: trimming stops.
    amp = 445;
    wait_decisions(2);
    downs_before = n_down;
    wait_decisions(4);
    checks++;
    if (n_down != downs_before || state != dat_pkg::SMA_MONITOR) begin
      failures++; $display("FAIL trimming did not stop inside the window");
    end
    // High again: one more tap goes, then SNR falls: undo.
    amp = 188;
    while (n_down == downs_before) @(posedge clk);
    amp = 1000;
    while (n_undo == 0) @(posedge clk);
    downs_before = n_down;
    amp = 188;
    wait_decisions(4);
    checks++;
    if (n_down != downs_before) begin failures++; $display("FAIL trimmed after undo"); end
    // Large drop in steady state: every tap back on.
    amp = 1000;
    while (n_readapt == 0) @(posedge clk);
    amp = 188;
    while (n_conv < 2) @(posedge clk);
    checks++;
    if (n_conv < 2 || n_undo != 1 || n_readapt != 1) failures++;
    $display("events: converged=%0d power_down=%0d undo=%0d readapt=%0d", n_conv, n_down, n_undo, n_readapt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
