// tb_sr_fblock: random symbols, coefficients, tap enables and precision
// settings into the strength-reduced complex F-block. The reference forms
// y = sum conj(w_k) x(n-k) directly in complex arithmetic from
// c = (c1+d1)/2, d = (c1-d1)/2 (four real products per tap), so it shares
// nothing with the three-multiplier structure under test. Outputs are
// checked in the same cycle as the input (no pipeline latency).
module tb_sr_fblock;
  localparam int N = 30, BW = 12, BX = 4, B_ADD = 16, ACC_W = B_ADD + 2;
  logic clk = 0, rst_n = 0, en = 0;
  logic signed [BX-1:0] xr, xi;
  logic signed [N-1:0][BW-1:0] c1, d1;
  logic [N-1:0] alpha;
  logic [1:0] prec_red;
  logic signed [N-1:0][BX-1:0] xr_tap, xi_tap;
  logic signed [N-1:0][BX:0] xd_tap;
  logic signed [ACC_W-1:0] yr2, yi2;
  int checks = 0, failures = 0;
  int hr[N], hi[N];     // symbol history, hr[0] = current

  sr_fblock #(.N(N), .BW(BW), .BX(BX), .B_ADD(B_ADD)) dut (.*);

  always #5 clk = ~clk;

  function automatic int sym();
    return 2 * int'($urandom_range(0, 7)) - 7;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < N; k++) begin hr[k] = 0; hi[k] = 0; end
    xr = 0; xi = 0; alpha = '1; prec_red = 0; c1 = '0; d1 = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int er, ei, cm, dm, m;
      @(negedge clk);
      for (int k = N-1; k > 0; k--) begin hr[k] = hr[k-1]; hi[k] = hi[k-1]; end
      hr[0] = sym(); hi[0] = sym();
      xr = BX'(hr[0]); xi = BX'(hi[0]);
      if (n % 50 == 0) begin
        for (int k = 0; k < N; k++) begin
          c1[k] = BW'($signed($urandom_range(0, 511)) - 256);
          d1[k] = BW'($signed($urandom_range(0, 511)) - 256);
        end
        alpha = (n < 500) ? '1 : N'({$urandom, $urandom});
        prec_red = (n < 1000) ? 2'd0 : 2'($urandom_range(0, 2));
      end
      en = 1;
      #1;
      er = 0; ei = 0;
      m = -(1 << prec_red);
      for (int k = 0; k < N; k++) begin
        if (alpha[k]) begin
          cm = int'($signed(c1[k])) & m;
          dm = int'($signed(d1[k])) & m;
          // (c + jd)* (xr + j xi) scaled by 2^BW: c*2^BW = cm+dm, d*2^BW = cm-dm
          er += (cm + dm) * hr[k] + (cm - dm) * hi[k];
          ei += (cm + dm) * hi[k] - (cm - dm) * hr[k];
        end
      end
      checks++;
      if (int'(yr2) != er || int'(yi2) != ei) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d yr2=%0d/%0d yi2=%0d/%0d", n, yr2, er, yi2, ei);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
