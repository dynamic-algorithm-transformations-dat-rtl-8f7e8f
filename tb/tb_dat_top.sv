// tb_dat_top: end-to-end run of the DAT-based NEXT canceller at its default
// size (30 taps, 12-bit coefficients, 1024-symbol SNR windows, a decision
// every 8192 symbols), plus a system-identification run of the real
// reconfigurable LMS filter and its own controller beside it.
//
// Channel model: received sample = far-end 64-CAP symbol + NEXT + uniform
// noise (about 40 dB SNR). The NEXT response has three strong taps and 27
// weak ones, so the SMA can drop the weak taps without leaving the
// 31..34 dB window but not a strong one. Half-way the response changes (a
// different cable), which must trigger a re-adaptation.
//
// Mechanisms counted (each must happen): convergence with weight update
// switched off, tap power-down, undo of a power-down, re-adaptation on a
// state change, coefficient precision reduction, supply code reduction, and
// on the real filter convergence, power-down, undo, supply code reduction, a
// data-precision reduction (full-scale uniform input) and its restoration
// (sparse input, high peak-to-average ratio).
// Checks: every weak tap goes before any strong tap; in steady state the
// slicer decisions equal the far-end symbols; the final tap set holds the
// strong taps; the real filter identifies its unknown system, ends with
// exactly its strong taps, and its output always matches a model built from
// the reported tap set and coefficient and data precisions.
module tb_dat_top;
  localparam int N = 30, BW = 12, BX = 4, ACC_W = 18, EW = 14;
  logic clk = 0, rst_n = 0;
  logic sym_en = 0;
  logic signed [BX-1:0] tx_ar = 0, tx_ai = 0;
  logic signed [ACC_W-1:0] rx_r = 0, rx_i = 0, u_r, u_i;
  logic signed [3:0] dec_r, dec_i;
  logic signed [EW-1:0] err_r, err_i;
  logic [N-1:0] alpha, beta;
  logic [1:0] prec_red;
  logic [3:0] bv;
  logic [4:0] n_on;
  dat_pkg::sma_state_e sma_state;
  logic [2*EW+10:0] mse_sum;
  logic ev_decide, ev_power_down, ev_undo, ev_readapt, ev_converged;
  logic si_en = 0;
  logic signed [7:0] si_x = 0;
  logic signed [15:0] si_d = 0, si_y, si_e;
  logic [7:0] si_alpha, si_beta;
  logic [1:0] si_bw_red, si_bx_red;
  logic signed [7:0][7:0] si_w;
  logic [5:0] si_bv;
  logic [3:0] si_n_on;
  dat_pkg::sma_state_e si_state;
  logic si_ev_power_down, si_ev_undo, si_ev_readapt, si_ev_converged, si_ev_decide;
  logic [42:0] si_mse_sum;
  logic si_bx_done;
  logic [25:0] si_x_pow;

  dat_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_conv = 0, n_down = 0, n_undo = 0, n_readapt = 0, n_prec = 0, n_vdd = 0;
  int steady_syms = 0, steady_errs = 0;
  real hc[N], hd[N];
  int big_tap[3];
  int tr[N], ti[N];
  int far_r, far_i;
  logic [3:0] bv_max;
  logic [N-1:0] prev_alpha;
  int tb_phase = 0;

  function automatic int sym();
    return 2 * int'($urandom_range(0, 7)) - 7;
  endfunction

  task automatic set_channel(input int s0, input int s1, input int s2);
    for (int k = 0; k < N; k++) begin
      hc[k] = 0.0015 * ((k % 5) - 2) + 0.0005;
      hd[k] = 0.001 * ((k % 3) - 1);
    end
    big_tap[0] = s0; big_tap[1] = s1; big_tap[2] = s2;
    hc[s0] = 0.04;  hd[s0] = -0.02;
    hc[s1] = -0.03; hd[s1] = 0.03;
    hc[s2] = 0.025; hd[s2] = 0.01;
  endtask

  // Symbol stream: one symbol per clock except every 16th clock (idle).
  int cyc = 0;
  always @(negedge clk) if (rst_n) begin
    real yr, yi, nr, ni;
    cyc++;
    sym_en = (cyc % 16 != 0);
    if (sym_en) begin
      for (int k = N-1; k > 0; k--) begin tr[k] = tr[k-1]; ti[k] = ti[k-1]; end
      tr[0] = sym(); ti[0] = sym();
      far_r = sym(); far_i = sym();
      yr = 0; yi = 0;
      for (int k = 0; k < N; k++) begin
        yr += hc[k] * tr[k] + hd[k] * ti[k];
        yi += hc[k] * ti[k] - hd[k] * tr[k];
      end
      nr = (real'($urandom_range(0, 648)) - 324.0) / 4096.0;
      ni = (real'($urandom_range(0, 648)) - 324.0) / 4096.0;
      tx_ar = BX'(tr[0]); tx_ai = BX'(ti[0]);
      rx_r = ACC_W'($rtoi((far_r + yr + nr) * 4096.0));
      rx_i = ACC_W'($rtoi((far_i + yi + ni) * 4096.0));
      #1;
      if (sma_state == dat_pkg::SMA_MONITOR && (tb_phase == 0 || n_readapt > 0)) begin
        steady_syms++;
        if (int'(dec_r) != far_r || int'(dec_i) != far_i) steady_errs++;
      end
    end
  end

  // Event monitor.
  always @(posedge clk) begin
    #2;
    if (rst_n) begin
      if (ev_converged) begin
        n_conv++;
        checks++;
        if (beta != '0) failures++;
      end
      if (ev_power_down) begin
        logic [N-1:0] off;
        n_down++;
        off = prev_alpha & ~alpha;
        // a strong tap may only go when every weak tap is already off
        for (int s = 0; s < 3; s++) if (off[big_tap[s]]) begin
          checks++;
          if ($countones(alpha) != 2) begin
            failures++;
            $display("FAIL strong tap %0d switched off with %0d taps on", big_tap[s], $countones(alpha));
          end
        end
      end
      if (ev_undo) n_undo++;
      if (ev_readapt) begin
        n_readapt++;
        checks++;
        if (alpha != '1 || beta != '1) failures++;
      end
      if (prec_red != 0 && prev_alpha != alpha) n_prec++;
      if (bv < bv_max && prev_alpha != alpha) n_vdd++;
      if (ev_decide)
        $display("t=%0t phase=%0d state=%s taps=%0d prec_red=%0d bv=%0d SNR=%0.2f dB", $time, tb_phase,
                 sma_state.name(), n_on, prec_red, bv,
                 10.0 * $log10(42.0) - 10.0 * $log10(real'(mse_sum) / 1024.0 / (2.0 ** 24)));
      prev_alpha = alpha;
    end
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog: state=%s", sma_state.name());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Second DAT system: the real filter identifies an 8-tap unknown system
  // (three strong taps, five weak) under its own controller with MSE limit
  // 0.01. Removing all weak taps costs about 0.001 of MSE, removing the
  // weakest strong tap (25/128) another 0.013, so the controller must end
  // with exactly the strong taps after one undo. Every sample the filter
  // output is checked against a model built from the reported alpha,
  // coefficient precision and data precision.
  localparam int SI_A = 120000, SI_B = 130000;
  int sh[8] = '{2, -3, 40, 5, 25, 61, -4, 1};
  logic [7:0] si_strong = 8'b0011_0100;
  int sx[8], sxm[8];
  int n_bx_down = 0, n_bx_up = 0;
  int n_si_conv = 0, n_si_down = 0, n_si_undo = 0;
  logic [1:0] bx_prev = 0;
  logic [5:0] si_bv_max;
  bit si_done = 0;
  always @(posedge clk) begin
    if (si_ev_converged)  n_si_conv++;
    if (si_ev_power_down) n_si_down++;
    if (si_ev_undo)       n_si_undo++;
  end
  initial begin
    foreach (sx[k]) begin sx[k] = 0; sxm[k] = 0; end
    @(posedge rst_n);
    #2 si_bv_max = si_bv;
    for (int n = 0; n < SI_B; n++) begin
      int dd, yy, m;
      @(negedge clk);
      for (int k = 7; k > 0; k--) begin sx[k] = sx[k-1]; sxm[k] = sxm[k-1]; end
      // full-scale uniform input (low peak-to-average ratio), then a sparse
      // one (high ratio) at the end
      if (n < SI_A) sx[0] = int'($urandom_range(0, 255)) - 128;
      else          sx[0] = ($urandom_range(0, 7) == 0) ? int'($urandom_range(0, 255)) - 128 : 0;
      sxm[0] = sx[0] & -(1 << si_bx_red);
      if (si_bx_red > bx_prev) n_bx_down++;
      if (si_bx_red < bx_prev) n_bx_up++;
      bx_prev = si_bx_red;
      si_x = 8'(sx[0]);
      dd = 0;
      for (int k = 0; k < 8; k++) dd += sh[k] * sx[k];
      si_d = 16'(dd + int'($urandom_range(0, 8)) - 4);
      si_en = 1;
      #1;
      m = -(1 << si_bw_red);
      yy = 0;
      for (int k = 0; k < 8; k++) if (si_alpha[k]) yy += (int'($signed(si_w[k])) & m) * sxm[k];
      checks++;
      if (int'(si_y) != yy) failures++;
      if (n == SI_A - 1) begin
        $display("real filter: alpha=%b n_on=%0d Bw=%0d bv=%0d state=%s", si_alpha, si_n_on,
                 8 - si_bw_red, si_bv, si_state.name());
        checks++;
        if (si_alpha != si_strong || si_state != dat_pkg::SMA_MONITOR) begin
          failures++;
          $display("FAIL real filter ended with taps %b in %s, expected %b", si_alpha,
                   si_state.name(), si_strong);
        end
        for (int k = 0; k < 8; k++) if (si_strong[k]) begin
          checks++;
          if (int'($signed(si_w[k])) - sh[k] > 2 || sh[k] - int'($signed(si_w[k])) > 2) begin
            failures++;
            $display("FAIL system identification w[%0d]=%0d h=%0d", k, $signed(si_w[k]), sh[k]);
          end
        end
        checks++;
        if (!(si_bv < si_bv_max)) begin
          failures++; $display("FAIL real filter supply code not lowered");
        end
      end
    end
    @(negedge clk); si_en = 0;
    si_done = 1;
  end

  initial begin
    for (int k = 0; k < N; k++) begin tr[k] = 0; ti[k] = 0; end
    set_channel(2, 7, 12);
    prev_alpha = '1;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    #3;
    bv_max = bv;
    // Phase 0: first cable. Converge, trim, undo, settle.
    while (n_undo < 1) @(posedge clk);
    repeat (3) begin @(posedge clk); while (!ev_decide) @(posedge clk); end
    checks++;
    for (int s = 0; s < 3; s++) if (!alpha[big_tap[s]]) begin
      failures++; $display("FAIL strong tap %0d is off in steady state", big_tap[s]);
    end
    // Phase 1: the cable changes.
    tb_phase = 1;
    @(negedge clk);
    set_channel(5, 15, 22);
    while (n_readapt < 1) @(posedge clk);
    while (n_undo < 2) @(posedge clk);
    repeat (2) begin @(posedge clk); while (!ev_decide) @(posedge clk); end
    checks++;
    for (int s = 0; s < 3; s++) if (!alpha[big_tap[s]]) begin
      failures++; $display("FAIL strong tap %0d is off in steady state", big_tap[s]);
    end
    checks++;
    if (steady_syms == 0 || steady_errs != 0) begin
      failures++; $display("FAIL %0d decision errors in %0d steady-state symbols", steady_errs, steady_syms);
    end
    $display("mechanisms: converged=%0d power_down=%0d undo=%0d readapt=%0d prec_reduced=%0d vdd_lowered=%0d",
             n_conv, n_down, n_undo, n_readapt, n_prec, n_vdd);
    checks++; if (n_conv  == 0) begin failures++; $display("FAIL no convergence"); end
    checks++; if (n_down  == 0) begin failures++; $display("FAIL no power-down"); end
    checks++; if (n_undo  == 0) begin failures++; $display("FAIL no undo"); end
    checks++; if (n_readapt == 0) begin failures++; $display("FAIL no re-adaptation"); end
    checks++; if (n_prec  == 0) begin failures++; $display("FAIL precision never reduced"); end
    checks++; if (n_vdd   == 0) begin failures++; $display("FAIL supply never lowered"); end
    wait (si_done);
    $display("real filter: converged=%0d power_down=%0d undo=%0d", n_si_conv, n_si_down, n_si_undo);
    checks++; if (n_si_conv == 0) begin failures++; $display("FAIL real filter never converged"); end
    checks++; if (n_si_down == 0) begin failures++; $display("FAIL real filter never powered a tap down"); end
    checks++; if (n_si_undo == 0) begin failures++; $display("FAIL real filter never undid a power-down"); end
    checks++; if (n_bx_down == 0) begin failures++; $display("FAIL data precision never reduced"); end
    checks++; if (n_bx_up == 0) begin failures++; $display("FAIL data precision never restored"); end
    $display("real filter: data precision reduced %0d, restored %0d times", n_bx_down, n_bx_up);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
