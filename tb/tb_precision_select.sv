// tb_precision_select: every tap count for the NEXT canceller (N = 30) and
// the system-identification filter (N = 8). Reference: Bw,opt =
// ceil(Bw + 0.5*log2(n/N)) in real arithmetic, reduction = Bw - Bw,opt,
// limited to 2 bits. Also the published pairs: 30, 22, 12, 8 taps keep
// 12 bits; 7, 6, 5, 4 taps use 11 bits; with 8 taps, 2 taps use 7 bits.
module tb_precision_select;
  logic [4:0] n30;
  logic [1:0] r30;
  logic [3:0] n8;
  logic [1:0] r8;
  int checks = 0, failures = 0;

  precision_select #(.N(30), .BW_RED_MAX(2)) dut30 (.n_on(n30), .prec_red(r30));
  precision_select #(.N(8),  .BW_RED_MAX(2)) dut8  (.n_on(n8),  .prec_red(r8));

  function automatic int ref_red(input int n, input int nt);
    real bopt;
    int red;
    if (n == 0) n = 1;
    bopt = 12.0 + 0.5 * $ln(real'(n) / nt) / $ln(2.0);
    red = 12 - int'($ceil(bopt - 1e-9));
    return red > 2 ? 2 : red;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int tbl_n[8] = '{30, 22, 12, 8, 7, 6, 5, 4};
    int tbl_b[8] = '{12, 12, 12, 12, 11, 11, 11, 11};
    for (int n = 0; n <= 30; n++) begin
      n30 = 5'(n); #1;
      checks++;
      if (int'(r30) != ref_red(n, 30)) begin failures++; $display("FAIL N=30 n=%0d r=%0d", n, r30); end
    end
    for (int n = 0; n <= 8; n++) begin
      n8 = 4'(n); #1;
      checks++;
      if (int'(r8) != ref_red(n, 8)) begin failures++; $display("FAIL N=8 n=%0d r=%0d", n, r8); end
    end
    for (int i = 0; i < 8; i++) begin
      n30 = 5'(tbl_n[i]); #1;
      checks++;
      if (12 - int'(r30) != tbl_b[i]) failures++;
    end
    n8 = 2; #1; checks++; if (8 - int'(r8) != 7) failures++;
    n8 = 4; #1; checks++; if (8 - int'(r8) != 8) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
