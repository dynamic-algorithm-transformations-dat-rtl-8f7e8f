// tb_tap_select: random coefficient sets and tap masks. The tb answers the
// coefficient reads itself and computes E_k = |w_k|^2 / E_m(w_k) in real
// arithmetic, with E_m from N(w) = 0.9*ones + 0.1*(BW - LSB zeros) of the
// three SR multiplier coefficients c+d, d, c-d. The selected tap must be
// the powered-up tap with the smallest E_k, and done must come N+1 cycles
// after start.
module tb_tap_select;
  localparam int N = 30, BW = 12;
  logic clk = 0, rst_n = 0, start = 0;
  logic [N-1:0] alpha;
  logic [4:0] rd_idx, sel_idx;
  logic signed [BW-1:0] rd_c1, rd_d1;
  logic busy, done, found;
  int checks = 0, failures = 0;
  int mc1[N], md1[N];

  tap_select #(.N(N), .BW(BW)) dut (.*);

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

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    alpha = '1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      int best, cyc;
      real be;
      for (int k = 0; k < N; k++) begin
        int range = (t % 3 == 0) ? 64 : 2000;
        mc1[k] = int'($urandom_range(0, 2 * range)) - range;
        md1[k] = int'($urandom_range(0, 2 * range)) - range;
        if ($urandom_range(0, 9) == 0) begin mc1[k] = 0; md1[k] = 0; end
      end
      alpha = (t % 5 == 0) ? '1 : N'({$urandom, $urandom});
      if (t == 7) alpha = '0;
      best = -1; be = 0.0;
      for (int k = 0; k < N; k++) if (alpha[k]) begin
        real mag, en, ek;
        int dd;
        dd = (mc1[k] - md1[k]) >>> 1;
        mag = real'(mc1[k] * mc1[k] + md1[k] * md1[k]) / 2.0;
        en = nmodel(mc1[k]) + nmodel(dd) + nmodel(md1[k]);
        ek = (en == 0.0) ? 0.0 : mag / en;
        if (best < 0 || ek < be) begin best = k; be = ek; end
      end
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != N + 1) begin failures++; $display("FAIL latency %0d", cyc); end
      checks++;
      if (best < 0 ? found : (!found || int'(sel_idx) != best)) begin
        failures++;
        $display("FAIL t=%0d sel=%0d found=%b exp %0d", t, sel_idx, found, best);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
