// tb_sr_wud: the strength-reduced weight update against the plain complex
// LMS rule. The reference keeps c1 = c + d and d1 = c - d and adds
// floor(Re-part / 2^MU_SH) with the increments written from
// x * conj(e) directly (c1: xr*er + xi*ei + xi*er - xr*ei,
// d1: xr*er + xi*ei - xi*er + xr*ei). Taps with beta = 0 must hold.
module tb_sr_wud;
  localparam int N = 30, BW = 12, BX = 4, EW = 14, G = 8, MU_SH = 5, CW = BW + G;
  logic clk = 0, rst_n = 0, en = 0;
  logic [N-1:0] beta;
  logic signed [N-1:0][BX-1:0] xr_tap, xi_tap;
  logic signed [N-1:0][BX:0] xd_tap;
  logic signed [EW-1:0] er, ei;
  logic signed [N-1:0][BW-1:0] c1, d1;
  longint rc1[N], rd1[N];
  int checks = 0, failures = 0;

  sr_wud #(.N(N), .BW(BW), .BX(BX), .EW(EW), .G(G), .MU_SH(MU_SH)) dut (.*);

  always #5 clk = ~clk;

  function automatic longint fl(input longint v);  // floor(v / 2^MU_SH)
    return v >>> MU_SH;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < N; k++) begin rc1[k] = 0; rd1[k] = 0; end
    beta = '1; er = 0; ei = 0; xr_tap = '0; xi_tap = '0; xd_tap = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      int vr[N], vi[N];
      int e_r, e_i;
      @(negedge clk);
      for (int k = 0; k < N; k++) begin
        vr[k] = 2 * int'($urandom_range(0, 7)) - 7;
        vi[k] = 2 * int'($urandom_range(0, 7)) - 7;
        xr_tap[k] = BX'(vr[k]);
        xi_tap[k] = BX'(vi[k]);
        xd_tap[k] = (BX+1)'(vr[k] - vi[k]);
      end
      e_r = int'($urandom_range(0, 4000)) - 2000;
      e_i = int'($urandom_range(0, 4000)) - 2000;
      er = EW'(e_r); ei = EW'(e_i);
      if (n % 100 == 0) beta = (n < 1000) ? '1 : N'({$urandom, $urandom});
      en = (n % 7 != 3);
      if (en) begin
        for (int k = 0; k < N; k++) begin
          if (beta[k]) begin
            rc1[k] += fl(longint'(vr[k]*e_r + vi[k]*e_i + vi[k]*e_r - vr[k]*e_i));
            rd1[k] += fl(longint'(vr[k]*e_r + vi[k]*e_i - vi[k]*e_r + vr[k]*e_i));
          end
        end
      end
      @(posedge clk); #1;
      for (int k = 0; k < N; k++) begin
        longint tc, td;
        tc = rc1[k] >>> G;  // top BW bits of the CW-bit register
        td = rd1[k] >>> G;
        checks++;
        if (longint'($signed(c1[k])) != tc || longint'($signed(d1[k])) != td) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d k=%0d c1=%0d/%0d d1=%0d/%0d", n, k, $signed(c1[k]), tc, $signed(d1[k]), td);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
