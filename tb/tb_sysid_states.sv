// tb_sysid_states: the five input states of the 8-tap system-identification
// example, each run on the reconfigurable LMS filter in the configuration
// that state calls for.
//
// Per state the unknown system has non-zero taps only where the state's
// optimum tap pattern is 1 (patterns 11111111, 01111111, 00111110,
// 00101110, 00100100, tap 1 first). The testbench sets alpha = beta = that
// pattern, takes the coefficient-precision reduction from precision_select
// and the supply code from vdd_select (both at the example's sizes: 8 taps,
// 5 V maximum supply, 20 ns sample period, 16-bit adders), and then:
//   - checks the precision against 8,8,8,8,7 bits;
//   - checks the supply level against 5.0, 4.9, 4.6, 4.4, 4.2 V to within
//     one 0.1 V level (the threshold voltage is this design's assumption,
//     so an exact match is not expected in every state) and counts the
//     exact matches;
//   - runs the adaptive filter from reset for 4000 random 8-bit samples and
//     checks, over the last 500, that the error stays within the rounding
//     allowed by the chosen coefficient precision;
//   - checks that every powered-down tap kept its weight (zero from reset).
module tb_sysid_states;
  localparam int N = 8, BW = 8, BX = 8, B_ADD = 16;
  localparam int RUN = 4000, TAIL = 500;

  logic clk = 0, rst_n = 0, en = 0;
  logic signed [BX-1:0] x = 0;
  logic signed [B_ADD-1:0] d = 0, y, e;
  logic [N-1:0] alpha = '1, beta = '1;
  logic [1:0] bw_red, bx_red = 0;
  logic signed [N-1:0][BW-1:0] w;
  logic [3:0] n_on;
  logic [5:0] bv;

  rcfg_lms_filter dut (.*);
  precision_select #(.N(N)) u_prec (.n_on(n_on), .prec_red(bw_red));
  vdd_select #(.N(N), .B_ADD(B_ADD), .VDD_MAX_MV(5000), .T_S_PS(20000))
    u_vdd (.n_on(n_on), .bv(bv));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int exact_vdd = 0;

  // Table of states: tap pattern (tap 1 = bit 0), precision, supply in 0.1 V.
  logic [N-1:0] pat [5] = '{8'b1111_1111, 8'b1111_1110, 8'b0111_1100,
                            8'b0111_0100, 8'b0010_0100};
  int bw_exp [5] = '{8, 8, 8, 8, 7};
  int vdd_exp[5] = '{50, 49, 46, 44, 42};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    int h[N];
    int xs[N];
    int acc, lvl, tol, max_err;
    for (int s = 0; s < 5; s++) begin
      // unknown system on the powered-up taps only; even values so that
      // a one-bit precision reduction can still represent it
      for (int k = 0; k < N; k++)
        h[k] = pat[s][k] ? 2 * ($urandom_range(0, 40) - 20) : 0;
      for (int k = 0; k < N; k++) xs[k] = 0;
      alpha = pat[s];
      beta  = pat[s];
      n_on  = 4'($countones(pat[s]));
      rst_n = 0;
      en    = 0;
      repeat (2) @(posedge clk);
      #1 rst_n = 1;
      #1;
      check(BW - int'(bw_red) == bw_exp[s],
            $sformatf("state %0d precision %0d bits, expected %0d", s + 1, BW - bw_red, bw_exp[s]));
      lvl = 10 + int'(bv);
      check(lvl - vdd_exp[s] <= 1 && vdd_exp[s] - lvl <= 1,
            $sformatf("state %0d supply %0d/10 V, expected %0d/10 V", s + 1, lvl, vdd_exp[s]));
      if (lvl == vdd_exp[s]) exact_vdd++;
      // allowed error: one coefficient LSB at the reduced precision per
      // powered-up tap, times the largest input
      tol = int'(n_on) * (1 << bw_red) * 128;
      max_err = 0;
      for (int n = 0; n < RUN; n++) begin
        for (int k = N - 1; k > 0; k--) xs[k] = xs[k-1];
        xs[0] = int'($urandom_range(0, 255)) - 128;
        acc = 0;
        for (int k = 0; k < N; k++) acc += h[k] * xs[k];
        x  = BX'(xs[0]);
        d  = B_ADD'(acc);
        en = 1;
        #1;
        if (n >= RUN - TAIL) begin
          int ae;
          ae = int'(e) < 0 ? -int'(e) : int'(e);
          if (ae > max_err) max_err = ae;
          check(int'(y) + int'(e) == acc, $sformatf("state %0d: y + e != d", s + 1));
        end
        @(posedge clk);
        #1;
      end
      en = 0;
      check(max_err <= tol,
            $sformatf("state %0d: residual error %0d above %0d", s + 1, max_err, tol));
      for (int k = 0; k < N; k++)
        if (!pat[s][k])
          check($signed(w[k]) == 0, $sformatf("state %0d: powered-down tap %0d moved", s + 1, k + 1));
      $display("state s%0d: taps=%0d Bw=%0d Vdd=%0d.%0d V max|e|=%0d (limit %0d)",
               s + 1, n_on, BW - bw_red, lvl / 10, lvl % 10, max_err, tol);
    end
    $display("supply level equal to the published one in %0d of 5 states", exact_vdd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6 * (RUN + 10)) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
